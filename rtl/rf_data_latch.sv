// rf_data_latch: input data latch of the write ports.
//
// Write data enter through the input control block and are held here for
// the write half-cycle. The data of every write port are captured at the
// falling clock edge, the edge that also latches the write addresses, and
// held for one full clock period, so the bit lines stay stable while the
// word line is high. Modelled as a falling-edge register; it has no reset
// because the data are only used together with a latched write enable,
// which is reset in the write decoder.
//
// Interface: clk, d[NP][W] in; q[NP][W] out.
// Timing: q changes at the falling edge of clk.
module rf_data_latch #(
  parameter int unsigned NP = rf_pkg::RF_WR_PORTS,
  parameter int unsigned W  = rf_pkg::RF_WIDTH
) (
  input  logic             clk,
  input  logic [NP-1:0][W-1:0] d,
  output logic [NP-1:0][W-1:0] q
);
  always_ff @(negedge clk)
    q <= d;
endmodule
