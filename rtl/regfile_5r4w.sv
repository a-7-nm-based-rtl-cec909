// regfile_5r4w: 64 x 74-bit register file, 5 read and 4 write ports, with
// read/write timing separation and far-word-line write-error detection.
//
// Every clock cycle each of the 5 read ports and each of the 4 write ports
// can make one access. Reads and writes are triggered by opposite clock
// edges, so they never use the array at the same time:
//   * rising edge: the read decoders (rf_decoder, FALL_EDGE=0) latch the
//     read addresses and enables; during the high half-cycle the read word
//     lines select the cells and the local bit lines of the two array halves
//     carry the data; the output stage (rf_precharge_out) captures them at
//     the falling edge and holds them (phase-locked hold).
//   * falling edge: the write decoders (FALL_EDGE=1) latch the write
//     addresses and enables and rf_data_latch latches the write data; during
//     the low half-cycle the write word lines are high and the array
//     (rf_array) holds the new data at the next rising edge.
// A write presented at falling edge n is therefore seen by a read latched
// at rising edge n+1, the same cycle's read half. Several write ports
// writing one word in the same cycle: the highest-numbered port wins.
//
// Word lines 31 and 63 are the farthest from the central control block.
// rf_mirror_check keeps a replica of each and raises rerr[p] for a read of
// one of them whose data differ from the replica.
//
// Port timing, with cycle n starting at rising edge n:
//   raddr/ren   sampled at rising edge n; rdata/rerr valid from falling
//               edge n to falling edge n+1 (sample them at rising edge n+1);
//               a port with ren = 0 keeps its last output.
//   waddr/wen/wdata sampled at falling edge n; the word is updated at
//               rising edge n+1.
//   far_fail_mask  models late far word lines for characterisation: bits
//               set are lost when writing word 31 or 63. Tie to 0 in use.
//   rst_n       asynchronous, active low: clears the latched enables and
//               sets the outputs to their precharged all-ones state. It
//               does not clear the array.
module regfile_5r4w
  import rf_pkg::*;
#(
  parameter int unsigned WORDS = RF_WORDS,
  parameter int unsigned W     = RF_WIDTH,
  parameter int unsigned NRD   = RF_RD_PORTS,
  parameter int unsigned NWR   = RF_WR_PORTS,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read ports
  input  logic [NRD-1:0][AW-1:0] raddr,
  input  logic [NRD-1:0]         ren,
  output logic [NRD-1:0][W-1:0]  rdata,
  output logic [NRD-1:0]         rerr,
  // write ports
  input  logic [NWR-1:0][AW-1:0] waddr,
  input  logic [NWR-1:0]         wen,
  input  logic [NWR-1:0][W-1:0]  wdata,
  // fault model of the far word lines
  input  logic [W-1:0]           far_fail_mask
);
  localparam int unsigned HALF = WORDS / 2;

  logic [NRD-1:0][WORDS-1:0] rwl;
  logic [NRD-1:0][AW-1:0]    raddr_q;
  logic [NRD-1:0]            ren_q;
  logic [NWR-1:0][WORDS-1:0] wwl;
  logic [NWR-1:0][W-1:0]     wdata_q;
  logic [NRD-1:0][W-1:0]     lbl_t, lbl_b;
  logic [NRD-1:0]            err;
  logic [NWR-1:0][1:0]       wwl_far;
  logic [NRD-1:0][1:0]       rwl_far;

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    rf_decoder #(.AW(AW), .FALL_EDGE(1'b0)) u_rdec (
      .clk    (clk),
      .rst_n  (rst_n),
      .addr   (raddr[p]),
      .en     (ren[p]),
      .wl     (rwl[p]),
      .addr_q (raddr_q[p]),
      .en_q   (ren_q[p])
    );
    assign rwl_far[p] = {rwl[p][WORDS-1], rwl[p][HALF-1]};

    rf_precharge_out #(.W(W)) u_out (
      .clk    (clk),
      .rst_n  (rst_n),
      .lbl_t  (lbl_t[p]),
      .lbl_b  (lbl_b[p]),
      .err_in (err[p]),
      .rd_en  (ren_q[p]),
      .bsel   (raddr_q[p][AW-1]),
      .rdata  (rdata[p]),
      .rerr   (rerr[p])
    );
  end

  for (genvar p = 0; p < NWR; p++) begin : g_wr
    logic [AW-1:0] waddr_q_unused;
    logic          wen_q_unused;
    rf_decoder #(.AW(AW), .FALL_EDGE(1'b1)) u_wdec (
      .clk    (clk),
      .rst_n  (rst_n),
      .addr   (waddr[p]),
      .en     (wen[p]),
      .wl     (wwl[p]),
      .addr_q (waddr_q_unused),
      .en_q   (wen_q_unused)
    );
    assign wwl_far[p] = {wwl[p][WORDS-1], wwl[p][HALF-1]};
  end

  rf_data_latch #(.NP(NWR), .W(W)) u_din (
    .clk (clk),
    .d   (wdata),
    .q   (wdata_q)
  );

  rf_array #(.WORDS(WORDS), .W(W), .NRD(NRD), .NWR(NWR)) u_array (
    .clk           (clk),
    .wwl           (wwl),
    .wdata         (wdata_q),
    .far_fail_mask (far_fail_mask),
    .rwl           (rwl),
    .lbl_t         (lbl_t),
    .lbl_b         (lbl_b)
  );

  rf_mirror_check #(.W(W), .NRD(NRD), .NWR(NWR)) u_mirror (
    .clk     (clk),
    .wwl_far (wwl_far),
    .wdata   (wdata_q),
    .rwl_far (rwl_far),
    .lbl_t   (lbl_t),
    .lbl_b   (lbl_b),
    .err     (err)
  );
endmodule
