// tb_rf_precharge_out: precharged merge and phase-locked hold of one port.
// Checks the all-ones reset state; that an enabled read of either half is
// captured at the falling edge as lbl_t & lbl_b together with the error
// flag; that the output does not move at the rising edge or while the bit
// lines change; and that a cycle without a read keeps the last output.
module tb_rf_precharge_out;
  localparam int unsigned W = 74;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] lbl_t, lbl_b, rdata, exp_d;
  logic err_in, rd_en, bsel, rerr, exp_e;
  int checks = 0, failures = 0, holds = 0;

  rf_precharge_out #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .lbl_t(lbl_t), .lbl_b(lbl_b), .err_in(err_in),
    .rd_en(rd_en), .bsel(bsel), .rdata(rdata), .rerr(rerr));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (rdata !== exp_d || rerr !== exp_e) begin
      failures++;
      $display("FAIL %s t=%0t rdata=%h exp=%h rerr=%b exp=%b", what, $time, rdata, exp_d, rerr, exp_e);
    end
  endtask

  initial begin
    lbl_t = '0; lbl_b = '0; err_in = 1'b1; rd_en = 1'b1; bsel = 1'b0;
    #1 rst_n = 1'b0;
    #1;
    exp_d = '1; exp_e = 1'b0;
    check("reset");
    #20;
    check("reset held");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      #1;
      check("rising edge keeps output");
      rd_en  = ($urandom % 4) != 0;
      bsel   = 1'($urandom);
      err_in = ($urandom % 5) == 0;
      // the half not addressed stays precharged
      lbl_t = bsel ? '1 : W'({$urandom, $urandom, $urandom});
      lbl_b = bsel ? W'({$urandom, $urandom, $urandom}) : '1;
      #1;
      check("high phase keeps output");
      @(negedge clk);
      if (rd_en) begin
        exp_d = lbl_t & lbl_b;
        exp_e = err_in;
      end else holds++;
      #1;
      check("falling edge");
      // precharge in the low phase drives the lines high again
      lbl_t = '1; lbl_b = '1; err_in = 1'b0;
      #1;
      check("low phase hold");
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL no idle cycle"); end
    $display("holds=%0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
