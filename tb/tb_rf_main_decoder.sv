// tb_rf_main_decoder: exhaustive check of the two-stage static decoder.
// Predecoded lines are built in the testbench from each address; the word
// lines must be exactly the one-hot code of the address, and all zero when
// both lines of every bit are low (disabled port).
module tb_rf_main_decoder;
  localparam int unsigned AW = 6;
  logic [AW-1:0]      a_t, a_c;
  logic [(1<<AW)-1:0] wl, exp_wl;
  int checks = 0, failures = 0;

  rf_main_decoder #(.AW(AW)) dut (.a_t(a_t), .a_c(a_c), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      a_t = AW'(a);
      a_c = ~AW'(a);
      exp_wl = '0;
      exp_wl[a] = 1'b1;
      #1;
      checks++;
      if (wl !== exp_wl) begin
        failures++;
        $display("FAIL addr=%0d wl=%h", a, wl);
      end
    end
    a_t = '0;
    a_c = '0;
    #1;
    checks++;
    if (wl !== '0) begin
      failures++;
      $display("FAIL disabled wl=%h", wl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
