// rf_mirror_check: single-word-line write-error detection with replica rows.
//
// The two longest word lines of the split array (WORDS/2-1 at the far end
// of half 0 and WORDS-1 at the far end of half 1) are the first to fail
// when a word line rises too late, so only these two are checked. Each has
// a replica row placed right next to the central data control block, where
// the word line is short and the write is always correct. Every write to a
// far word line writes the same latched data into its replica in the same
// cycle (same port priority as the main array: higher port number wins).
// When a read port selects a far word line, the data on its local bit line
// are compared with the replica; a difference raises err for that port,
// meaning the write to that word line, and so possibly others, went wrong.
// Reads of any other word line give err = 0.
//
// Interface: clk; wwl_far[NWR][2] and wdata[NWR][W] from the write ports;
// rwl_far[NRD][2] and the local bit lines lbl_t/lbl_b of each read port;
// err[NRD] out, combinational, captured with the data by the output stage.
// Replica rows update at the rising edge, like the main array. No reset.
module rf_mirror_check #(
  parameter int unsigned W   = rf_pkg::RF_WIDTH,
  parameter int unsigned NRD = rf_pkg::RF_RD_PORTS,
  parameter int unsigned NWR = rf_pkg::RF_WR_PORTS
) (
  input  logic                  clk,
  input  logic [NWR-1:0][1:0]   wwl_far,
  input  logic [NWR-1:0][W-1:0] wdata,
  input  logic [NRD-1:0][1:0]   rwl_far,
  input  logic [NRD-1:0][W-1:0] lbl_t,
  input  logic [NRD-1:0][W-1:0] lbl_b,
  output logic [NRD-1:0]        err
);
  logic [W-1:0] replica [2];

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NWR; p++)
      for (int unsigned h = 0; h < 2; h++)
        if (wwl_far[p][h]) replica[h] <= wdata[p];
  end

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++)
      err[p] = (rwl_far[p][0] && (lbl_t[p] != replica[0])) ||
               (rwl_far[p][1] && (lbl_b[p] != replica[1]));
  end
endmodule
