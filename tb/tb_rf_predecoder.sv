// tb_rf_predecoder: exhaustive check of the enable-fused predecoder.
// For every address and both enable values the in-phase and inverse lines
// are compared with addr/~addr when enabled and with all-zero when not.
module tb_rf_predecoder;
  localparam int unsigned AW = 6;
  logic [AW-1:0] addr, a_t, a_c;
  logic          en;
  int checks = 0, failures = 0;

  rf_predecoder #(.AW(AW)) dut (.addr(addr), .en(en), .a_t(a_t), .a_c(a_c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < (1 << AW); a++) begin
        addr = AW'(a);
        en   = e[0];
        #1;
        checks++;
        if (e == 1 ? (a_t !== AW'(a) || a_c !== ~AW'(a)) : (a_t !== '0 || a_c !== '0)) begin
          failures++;
          $display("FAIL addr=%0d en=%0d a_t=%b a_c=%b", a, e, a_t, a_c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
