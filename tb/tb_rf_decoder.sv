// tb_rf_decoder: checks the latched pre-enabled decoder on both edges.
// Two instances are driven with the same random address/enable stream: the
// read-side one (rising edge) and the write-side one (falling edge). After
// each edge the word lines of the instance of that edge must be the one-hot
// code of the address presented at that edge (zero when disabled); changes
// of the inputs between edges must not move any word line.
module tb_rf_decoder;
  localparam int unsigned AW = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [AW-1:0] addr;
  logic          en;
  logic [(1<<AW)-1:0] wl_r, wl_f;
  logic [AW-1:0] aq_r, aq_f;
  logic          eq_r, eq_f;
  logic [(1<<AW)-1:0] exp_r, exp_f;
  int checks = 0, failures = 0;

  rf_decoder #(.AW(AW), .FALL_EDGE(1'b0)) dut_r (
    .clk(clk), .rst_n(rst_n), .addr(addr), .en(en), .wl(wl_r), .addr_q(aq_r), .en_q(eq_r));
  rf_decoder #(.AW(AW), .FALL_EDGE(1'b1)) dut_f (
    .clk(clk), .rst_n(rst_n), .addr(addr), .en(en), .wl(wl_f), .addr_q(aq_f), .en_q(eq_f));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [(1<<AW)-1:0] onehot(input logic [AW-1:0] a, input logic e);
    onehot = '0;
    if (e) onehot[a] = 1'b1;
  endfunction

  task automatic check(input string what, input logic [(1<<AW)-1:0] got, input logic [(1<<AW)-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t got=%h exp=%h", what, $time, got, exp);
    end
  endtask

  initial begin
    addr = '0;
    en   = 1'b0;
    #1 rst_n = 1'b0;
    #1;
    check("reset rise", wl_r, '0);
    check("reset fall", wl_f, '0);
    rst_n = 1'b1;
    exp_r = '0;
    exp_f = '0;
    for (int i = 0; i < 300; i++) begin
      // inputs change in the low phase, shortly before the rising edge
      @(negedge clk);
      #2;
      addr = AW'($urandom);
      en   = ($urandom % 4) != 0;
      @(posedge clk);
      exp_r = onehot(addr, en);
      #1;
      check("rise after edge", wl_r, exp_r);
      check("fall holds", wl_f, exp_f);
      // change inputs in the high phase: only the falling-edge latch takes them
      addr = AW'($urandom);
      en   = ($urandom % 4) != 0;
      #1;
      check("rise holds", wl_r, exp_r);
      @(negedge clk);
      exp_f = onehot(addr, en);
      #1;
      check("fall after edge", wl_f, exp_f);
      check("rise holds low phase", wl_r, exp_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
