// tb_rf_mirror_check: replica rows and comparator of the far word lines.
// The testbench writes random data into the two replica rows through random
// write ports (highest port wins), then presents bit-line data that either
// equal the replica or differ in one random bit, with the far word line of
// either half selected or not. err must be high exactly when a far word
// line is selected and its bit line differs from the replica written last.
module tb_rf_mirror_check;
  localparam int unsigned W = 74, NRD = 5, NWR = 4;
  logic clk = 1'b0;
  logic [NWR-1:0][1:0]   wwl_far;
  logic [NWR-1:0][W-1:0] wdata;
  logic [NRD-1:0][1:0]   rwl_far;
  logic [NRD-1:0][W-1:0] lbl_t, lbl_b;
  logic [NRD-1:0]        err;
  logic [W-1:0] rep [2];
  int checks = 0, failures = 0, detections = 0;

  rf_mirror_check #(.W(W), .NRD(NRD), .NWR(NWR)) dut (
    .clk(clk), .wwl_far(wwl_far), .wdata(wdata), .rwl_far(rwl_far),
    .lbl_t(lbl_t), .lbl_b(lbl_b), .err(err));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rwl_far = '0;
    lbl_t = '0;
    lbl_b = '0;
    // first write both replicas
    @(negedge clk);
    wwl_far = '0;
    wwl_far[0] = 2'b11;
    wdata[0] = {$urandom, $urandom, $urandom};
    @(posedge clk);
    rep[0] = wdata[0];
    rep[1] = wdata[0];
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        wwl_far[p] = ($urandom % 3 == 0) ? 2'($urandom) : 2'b00;
        wdata[p] = {$urandom, $urandom, $urandom};
      end
      @(posedge clk);
      for (int p = 0; p < NWR; p++)
        for (int h = 0; h < 2; h++)
          if (wwl_far[p][h]) rep[h] = wdata[p];
      #1;
      for (int p = 0; p < NRD; p++) begin
        logic bad_t, bad_b, exp_err;
        int unsigned bit_t, bit_b;
        rwl_far[p] = 2'b00;
        case ($urandom % 3)
          0: rwl_far[p][0] = 1'b1;
          1: rwl_far[p][1] = 1'b1;
          default: ;
        endcase
        bad_t = ($urandom % 2) != 0;
        bad_b = ($urandom % 2) != 0;
        lbl_t[p] = rep[0];
        lbl_b[p] = rep[1];
        bit_t = $urandom % W;
        bit_b = $urandom % W;
        if (bad_t) lbl_t[p][bit_t] = ~lbl_t[p][bit_t];
        if (bad_b) lbl_b[p][bit_b] = ~lbl_b[p][bit_b];
        #1;
        exp_err = (rwl_far[p][0] && bad_t) || (rwl_far[p][1] && bad_b);
        checks++;
        if (err[p] !== exp_err) begin
          failures++;
          $display("FAIL port %0d rwl=%b bad=%b%b err=%b", p, rwl_far[p], bad_b, bad_t, err[p]);
        end
        if (exp_err) detections++;
      end
    end
    checks++;
    if (detections == 0) begin failures++; $display("FAIL no detection exercised"); end
    $display("detections=%0d", detections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
