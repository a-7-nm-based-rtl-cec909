// rf_array: split multiport storage array with word-line access.
//
// The WORDS x W array is built as two halves of WORDS/2 word lines, the
// layout's two mirror-image arrays on either side of the central data
// control block: half 0 holds words 0..WORDS/2-1, half 1 holds words
// WORDS/2..WORDS-1. Each cell has one write access per write port and one
// single-ended read access per read port (the isolated read stack of the
// 10-transistor cell), so reads never disturb the stored data.
//
// Write: each write port drives one-hot word lines wwl[p] and latched data
// wdata[p]. Word lines rise after the falling clock edge and the cells hold
// the new data at the next rising edge, so the array is updated at the
// rising edge. If two write ports hit the same word in one cycle the higher
// numbered port wins (this design's choice; the source design does not say).
//
// Read: each read port drives one-hot word lines rwl[p]. Each half has its
// own precharged local read bit line per bit: it stays high unless a
// selected cell stores 0, i.e. lbl = AND over the half of (~rwl | cell).
// lbl_t is the line of half 0 and lbl_b that of half 1; an unselected half
// leaves its line at 1. The lines are combinational in the word lines and
// the stored data.
//
// far_fail_mask models the timing fault that the mirror check guards
// against: bits set in it are not written when a write hits one of the two
// farthest word lines (WORDS/2-1 and WORDS-1), as happens when the far end
// of a long word line rises too late. It is all zero in normal use.
//
// No reset: like any SRAM the contents are undefined until written.
module rf_array #(
  parameter int unsigned WORDS = rf_pkg::RF_WORDS,
  parameter int unsigned W     = rf_pkg::RF_WIDTH,
  parameter int unsigned NRD   = rf_pkg::RF_RD_PORTS,
  parameter int unsigned NWR   = rf_pkg::RF_WR_PORTS
) (
  input  logic                       clk,
  input  logic [NWR-1:0][WORDS-1:0]  wwl,
  input  logic [NWR-1:0][W-1:0]      wdata,
  input  logic [W-1:0]               far_fail_mask,
  input  logic [NRD-1:0][WORDS-1:0]  rwl,
  output logic [NRD-1:0][W-1:0]      lbl_t,
  output logic [NRD-1:0][W-1:0]      lbl_b
);
  localparam int unsigned HALF = WORDS / 2;

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NWR; p++)
      for (int unsigned r = 0; r < WORDS; r++)
        if (wwl[p][r]) begin
          if (r == HALF - 1 || r == WORDS - 1)
            mem[r] <= (wdata[p] & ~far_fail_mask) | (mem[r] & far_fail_mask);
          else
            mem[r] <= wdata[p];
        end
  end

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      lbl_t[p] = '1;
      lbl_b[p] = '1;
      for (int unsigned r = 0; r < HALF; r++) begin
        lbl_t[p] &= ~{W{rwl[p][r]}}        | mem[r];
        lbl_b[p] &= ~{W{rwl[p][HALF + r]}} | mem[HALF + r];
      end
    end
  end
endmodule
