// tb_regfile_formats: the register file at the other common data formats.
//
// Runs rf_format_harness, an end-to-end random-traffic check against a
// reference model, on four smaller sizes of the same 5R4W design:
// 32x32, 32x64, 64x32 and 64x64 bits (words x width). The full 64x74 size
// is covered by tb_regfile_5r4w. Each size must finish its run without a
// mismatch and exercise every mechanism.
module tb_regfile_formats;
  localparam int NSETS = 1500;
  logic [3:0] done;
  int c [4];
  int f [4];
  int checks, failures;

  rf_format_harness #(.WORDS(32), .W(32), .NSETS(NSETS)) h0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  rf_format_harness #(.WORDS(32), .W(64), .NSETS(NSETS)) h1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  rf_format_harness #(.WORDS(64), .W(32), .NSETS(NSETS)) h2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  rf_format_harness #(.WORDS(64), .W(64), .NSETS(NSETS)) h3 (.done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    #((NSETS + 200) * 10);
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3] + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    #1;
    checks = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
