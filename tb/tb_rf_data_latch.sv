// tb_rf_data_latch: the write data latch must take its inputs at the
// falling edge only and hold them through the rising edge.
module tb_rf_data_latch;
  localparam int unsigned NP = 4, W = 74;
  logic clk = 1'b0;
  logic [NP-1:0][W-1:0] d, q, exp_q;
  int checks = 0, failures = 0;

  rf_data_latch #(.NP(NP), .W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NP-1:0][W-1:0] rnd();
    for (int p = 0; p < NP; p++)
      rnd[p] = {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    d = rnd();
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      d = rnd();
      @(negedge clk);
      exp_q = d;
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL capture i=%0d", i); end
      d = rnd();
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL hold i=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
