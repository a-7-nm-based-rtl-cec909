// rf_format_harness: reusable end-to-end check of one register-file size.
//
// Same procedure as tb_regfile_5r4w, for a size given by the parameters:
// all words are first written, then NSETS cycles of random traffic on all
// ports are checked against a reference model (writes of a cycle first,
// highest port wins, fault mask on the far words WORDS/2-1 and WORDS-1,
// then the reads of the same cycle), with the read result checked one
// cycle after its rising edge. done rises when the run is over; checks and
// failures count the comparisons and mismatches, including one failure
// per mechanism (same-cycle read of a written word, port collision, idle
// hold, clean far read, detected far write error) that never occurred.
module rf_format_harness #(
  parameter int unsigned WORDS = 64,
  parameter int unsigned W     = 74,
  parameter int unsigned NRD   = 5,
  parameter int unsigned NWR   = 4,
  parameter int          NSETS = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW = $clog2(WORDS), HALF = WORDS / 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0]         ren;
  logic [NRD-1:0][W-1:0]  rdata;
  logic [NRD-1:0]         rerr;
  logic [NWR-1:0][AW-1:0] waddr;
  logic [NWR-1:0]         wen;
  logic [NWR-1:0][W-1:0]  wdata;
  logic [W-1:0]           far_fail_mask;

  regfile_5r4w #(.WORDS(WORDS), .W(W), .NRD(NRD), .NWR(NWR)) dut (
    .clk(clk), .rst_n(rst_n),
    .raddr(raddr), .ren(ren), .rdata(rdata), .rerr(rerr),
    .waddr(waddr), .wen(wen), .wdata(wdata),
    .far_fail_mask(far_fail_mask));

  always #5 clk = ~clk;

  int n_raw = 0, n_war = 0, n_waw = 0, n_parallel = 0, n_hold = 0, n_far_ok = 0, n_detect = 0;


  // reference model
  logic [W-1:0] mem [WORDS];
  logic [W-1:0] rep [2];
  logic [W-1:0] last_d [NRD];
  logic         last_e [NRD];
  // expectations of the last three sets, indexed by set number mod 4
  logic [W-1:0] exp_d [4][NRD];
  logic         exp_e [4][NRD];
  logic [NRD-1:0][AW-1:0] prev_raddr;
  logic [NRD-1:0]         prev_ren;

  function automatic logic [AW-1:0] pick_addr();
    case ($urandom % 5)
      0: return AW'(HALF - 1);
      1: return AW'(WORDS - 1);
      2: return AW'($urandom % 4);
      default: return AW'($urandom);
    endcase
  endfunction

  task automatic drive_set(input int k, input bit init);
    bit hot;
    hot = ($urandom % 8) == 0;
    far_fail_mask = (!init && $urandom % 12 == 0) ? W'({$urandom, $urandom, $urandom, $urandom}) | W'(1) : '0;
    for (int p = 0; p < NWR; p++) begin
      wdata[p] = W'({$urandom, $urandom, $urandom});
      if (init) begin
        wen[p]   = 1'b1;
        waddr[p] = AW'(k * NWR + p);
      end else begin
        wen[p]   = hot || ($urandom % 3 != 0);
        waddr[p] = pick_addr();
      end
    end
    for (int p = 0; p < NRD; p++) begin
      ren[p]   = !init && (hot || ($urandom % 4 != 0));
      raddr[p] = pick_addr();
    end
    // mechanism counts
    if (&ren && &wen) n_parallel++;
    for (int p = 0; p < NWR; p++)
      for (int q = p + 1; q < NWR; q++)
        if (wen[p] && wen[q] && waddr[p] == waddr[q]) n_waw++;
    for (int r = 0; r < NRD; r++)
      for (int p = 0; p < NWR; p++)
        if (ren[r] && wen[p] && raddr[r] == waddr[p]) n_raw++;
    for (int r = 0; r < NRD; r++)
      for (int p = 0; p < NWR; p++)
        if (prev_ren[r] && wen[p] && prev_raddr[r] == waddr[p]) n_war++;
    prev_raddr = raddr;
    prev_ren   = ren;
    // model: writes of the set first
    for (int p = 0; p < NWR; p++)
      if (wen[p]) begin
        if (waddr[p] == AW'(HALF - 1) || waddr[p] == AW'(WORDS - 1)) begin
          mem[waddr[p]] = (wdata[p] & ~far_fail_mask) | (mem[waddr[p]] & far_fail_mask);
          rep[waddr[p][AW-1]] = wdata[p];
        end else
          mem[waddr[p]] = wdata[p];
      end
    // then its reads
    for (int p = 0; p < NRD; p++) begin
      if (ren[p]) begin
        last_d[p] = mem[raddr[p]];
        last_e[p] = (raddr[p] == AW'(HALF - 1) || raddr[p] == AW'(WORDS - 1)) &&
                    mem[raddr[p]] != rep[raddr[p][AW-1]];
        if (raddr[p] == AW'(HALF - 1) || raddr[p] == AW'(WORDS - 1)) begin
          if (last_e[p]) n_detect++;
          else           n_far_ok++;
        end
      end else if (!init) n_hold++;
      exp_d[k % 4][p] = last_d[p];
      exp_e[k % 4][p] = last_e[p];
    end
  endtask

  task automatic check_set(input int k);
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rdata[p] !== exp_d[k % 4][p] || rerr[p] !== exp_e[k % 4][p]) begin
        failures++;
        if (failures < 20)
          $display("FAIL set %0d port %0d rdata=%h exp=%h rerr=%b exp=%b",
                   k, p, rdata[p], exp_d[k % 4][p], rerr[p], exp_e[k % 4][p]);
      end
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    ren = '0; wen = '0; raddr = '0; waddr = '0; wdata = '0; far_fail_mask = '0;
    prev_ren = '0; prev_raddr = '0;
    for (int p = 0; p < NRD; p++) begin
      last_d[p] = '1;
      last_e[p] = 1'b0;
    end
    #1 rst_n = 1'b0;
    #11;
    // reset state: outputs precharged to all ones
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rdata[p] !== '1 || rerr[p] !== 1'b0) begin
        failures++;
        $display("FAIL reset output port %0d", p);
      end
    end
    rst_n = 1'b1;
    for (int k = 0; k < NSETS; k++) begin
      @(posedge clk);
      #1;
      if (k >= 2) check_set(k - 2);
      drive_set(k, k < int'(WORDS / NWR));
    end
    @(posedge clk); #1; check_set(NSETS - 2);
    ren = '0; wen = '0;
    @(posedge clk); #1; check_set(NSETS - 1);
    $display("%0dx%0d: raw=%0d war=%0d waw=%0d parallel=%0d hold=%0d far_ok=%0d detect=%0d",
             WORDS, W, n_raw, n_war, n_waw, n_parallel, n_hold, n_far_ok, n_detect);
    checks++;
    if (n_raw == 0 || n_war == 0 || n_waw == 0 || n_parallel == 0 ||
        n_hold == 0 || n_far_ok == 0 || n_detect == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    done = 1'b1;
  end
endmodule
