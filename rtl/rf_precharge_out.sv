// rf_precharge_out: precharged read output with phase-locked hold, one read port.
//
// The two local read bit lines of a port (lbl_t from half 0 and lbl_b from
// half 1) are precharged high; a selected cell storing 0 pulls its line
// down. The output node therefore reads out = lbl_t & lbl_b: it keeps the
// default 1 and drops to 0 when either half reads 0.
//
// The phase-locked clock CTRL_CLK is built from the port's read enable and
// the block select (the half addressed, the top address bit): ctrl_clk[h]
// = rd_en & (bsel == h). The output of the read started at rising edge n is
// captured at the following falling edge, before the bit lines are
// precharged again, and held unchanged through rising edge n+1 until the
// next enabled read is captured. A precharge or a bit-line glitch in the
// other half-cycle can therefore not flip the output. The error flag of the
// mirror check is held together with the data.
//
// Choices of this design: the hold is modelled as a falling-edge register;
// a cycle without a read keeps the last output; reset sets the output to
// the default all-ones state (asynchronous, active low) and the flag to 0.
//
// Interface: clk, rst_n, lbl_t[W], lbl_b[W], err_in, rd_en, bsel in;
// rdata[W], rerr out.
// Timing: rdata valid from the falling edge after the read's rising edge
// until the next falling edge, i.e. it is sampled at the next rising edge.
module rf_precharge_out #(
  parameter int unsigned W = rf_pkg::RF_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] lbl_t,
  input  logic [W-1:0] lbl_b,
  input  logic         err_in,
  input  logic         rd_en,
  input  logic         bsel,
  output logic [W-1:0] rdata,
  output logic         rerr
);
  logic [1:0] ctrl_clk;

  always_comb begin
    ctrl_clk[0] = rd_en & ~bsel;
    ctrl_clk[1] = rd_en & bsel;
  end

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) begin
      rdata <= '1;
      rerr  <= 1'b0;
    end else if (|ctrl_clk) begin
      rdata <= lbl_t & lbl_b;
      rerr  <= err_in;
    end
endmodule
