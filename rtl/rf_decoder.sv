// rf_decoder: pre-enabled word-line decoder of one port.
//
// The published decoder works in four steps, all reproduced here:
//   1. the port address and enable are latched at the port's clock edge, so
//      address changes during the rest of the cycle cannot move the word
//      line;
//   2. the latched enable is fused with the latched address in the
//      predecoder (rf_predecoder) into in-phase and inverse address lines;
//   3. the two-stage static main decoder (rf_main_decoder) turns these into
//      one word line;
//   4. a disabled port leaves all word lines low on its own.
// The latch is modelled as an edge-triggered register. Read ports latch on
// the rising edge (FALL_EDGE = 0) and write ports on the falling edge
// (FALL_EDGE = 1), which is the read/write timing separation of the design.
//
// Interface: clk, rst_n (asynchronous, active low: clears the latched
// enable), addr[AW], en in; wl[2**AW] out (one-hot or zero), addr_q and
// en_q out (the latched values, used by the block select of the output
// stage).
// Timing: wl follows the latching edge and holds for one full clock period.
// Assertions check that wl is one-hot or zero and zero when disabled.
module rf_decoder #(
  parameter int unsigned AW        = rf_pkg::RF_AW,
  parameter bit          FALL_EDGE = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW-1:0]      addr,
  input  logic               en,
  output logic [(1<<AW)-1:0] wl,
  output logic [AW-1:0]      addr_q,
  output logic               en_q
);
  if (FALL_EDGE) begin : g_fall
    always_ff @(negedge clk or negedge rst_n)
      if (!rst_n) begin
        addr_q <= '0;
        en_q   <= 1'b0;
      end else begin
        addr_q <= addr;
        en_q   <= en;
      end
  end else begin : g_rise
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        addr_q <= '0;
        en_q   <= 1'b0;
      end else begin
        addr_q <= addr;
        en_q   <= en;
      end
  end

  logic [AW-1:0] a_t, a_c;

  rf_predecoder #(.AW(AW)) u_pre (
    .addr (addr_q),
    .en   (en_q),
    .a_t  (a_t),
    .a_c  (a_c)
  );

  rf_main_decoder #(.AW(AW)) u_main (
    .a_t (a_t),
    .a_c (a_c),
    .wl  (wl)
  );

  // A port raises at most one word line, and none while disabled.
  a_wl_onehot: assert property (@(posedge clk) $onehot0(wl))
    else $error("rf_decoder: more than one word line active");
  a_wl_off: assert property (@(posedge clk) !en_q |-> wl == '0)
    else $error("rf_decoder: word line active on a disabled port");
endmodule
