// rf_main_decoder: two-stage static decoder from predecoded lines to word lines.
//
// Stage 1 decodes the low LO = AW/2 address bits and the remaining high
// HI = AW-LO bits separately into one-hot groups (8 + 8 lines for the
// 6-bit address of a 64-word array), each line the AND of one of the two
// predecoded lines (a_t or a_c) of every bit of its group. Stage 2 ANDs one
// line of each group into each of the 2**AW word lines. Because a disabled
// port drives a_t = a_c = 0, every stage-1 line and hence every word line is
// low: the decoder shuts itself off without a word-line enable driver.
//
// The split into two stages follows the published two-stage static main
// decoder; the even split of the address bits between the two groups is
// this design's choice.
//
// Interface: a_t[AW], a_c[AW] in; wl[2**AW] out, one-hot or all zero.
// Purely combinational.
module rf_main_decoder #(
  parameter int unsigned AW = rf_pkg::RF_AW
) (
  input  logic [AW-1:0]      a_t,
  input  logic [AW-1:0]      a_c,
  output logic [(1<<AW)-1:0] wl
);
  localparam int unsigned LO = AW / 2;
  localparam int unsigned HI = AW - LO;

  logic [(1<<LO)-1:0] grp_lo;
  logic [(1<<HI)-1:0] grp_hi;

  // Stage 1: one-hot group lines.
  always_comb begin
    for (int unsigned g = 0; g < (1 << LO); g++) begin
      grp_lo[g] = 1'b1;
      for (int unsigned b = 0; b < LO; b++)
        grp_lo[g] &= ((g >> b) & 1) != 0 ? a_t[b] : a_c[b];
    end
    for (int unsigned g = 0; g < (1 << HI); g++) begin
      grp_hi[g] = 1'b1;
      for (int unsigned b = 0; b < HI; b++)
        grp_hi[g] &= ((g >> b) & 1) != 0 ? a_t[LO+b] : a_c[LO+b];
    end
  end

  // Stage 2: word lines.
  always_comb begin
    for (int unsigned w = 0; w < (1 << AW); w++)
      wl[w] = grp_hi[w >> LO] & grp_lo[w & ((1 << LO) - 1)];
  end
endmodule
