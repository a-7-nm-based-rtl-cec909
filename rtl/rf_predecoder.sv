// rf_predecoder: enable-fused address predecoder of the pre-enabled decoder.
//
// The latched address and the latched port enable are merged here, before
// any decoding, into an in-phase line a_t and an inverse line a_c per
// address bit. With the port enabled, a_t = addr and a_c = ~addr. With the
// port disabled both lines of every bit are low, so the static main decoder
// that follows cannot raise any word line: the enable is carried inside the
// address lines and no per-word-line enable driver is needed.
//
// The clock information of the published circuit is supplied by the edge
// at which the address latch in front of this block closes (rf_decoder);
// this block itself is purely combinational.
//
// Interface: addr[AW], en in; a_t[AW], a_c[AW] out. No state, no latency.
module rf_predecoder #(
  parameter int unsigned AW = rf_pkg::RF_AW
) (
  input  logic [AW-1:0] addr,
  input  logic          en,
  output logic [AW-1:0] a_t,
  output logic [AW-1:0] a_c
);
  always_comb begin
    a_t = addr  & {AW{en}};
    a_c = ~addr & {AW{en}};
  end
endmodule
