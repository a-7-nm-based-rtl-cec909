// tb_regfile_5r4w: end-to-end test of the 5R4W register file at full size.
//
// The register file is used at its default size (64 x 74 bits, 5R4W). Each
// cycle, just after the rising edge, the testbench presents a new set of
// requests on all nine ports: the writes are taken at the coming falling
// edge and the reads at the next rising edge. A reference model applies
// the writes of a set in port order (highest port wins, far-word-line
// fault mask on words 31 and 63 only, replicas always written) and then
// the reads of the same set, which must see these writes. The read data
// and error flags of a set are checked two rising edges after the set was
// presented, i.e. one cycle after the read's rising edge, which checks the
// read latency; a port with its enable low must keep its last output.
//
// Mechanisms counted, each of which must occur:
//   raw       read of a word written in the same cycle (timing separation)
//   war       word read in one cycle and overwritten in the next
//   waw       two write ports writing the same word in one cycle
//   parallel  all five reads and four writes active in one cycle
//   hold      read port idle, output held
//   far_ok    read of word 31 or 63 with matching replica, no error
//   detect    read of a far word corrupted by the fault mask, error raised
module tb_regfile_5r4w;
  import rf_pkg::*;
  localparam int unsigned WORDS = RF_WORDS, W = RF_WIDTH, NRD = RF_RD_PORTS, NWR = RF_WR_PORTS;
  localparam int unsigned AW = RF_AW, HALF = WORDS / 2;
  localparam int NSETS = 4000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [NRD-1:0][AW-1:0] raddr;
  logic [NRD-1:0]         ren;
  logic [NRD-1:0][W-1:0]  rdata;
  logic [NRD-1:0]         rerr;
  logic [NWR-1:0][AW-1:0] waddr;
  logic [NWR-1:0]         wen;
  logic [NWR-1:0][W-1:0]  wdata;
  logic [W-1:0]           far_fail_mask;

  regfile_5r4w dut (
    .clk(clk), .rst_n(rst_n),
    .raddr(raddr), .ren(ren), .rdata(rdata), .rerr(rerr),
    .waddr(waddr), .wen(wen), .wdata(wdata),
    .far_fail_mask(far_fail_mask));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_raw = 0, n_war = 0, n_waw = 0, n_parallel = 0, n_hold = 0, n_far_ok = 0, n_detect = 0;

  initial begin
    #((NSETS + 200) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    far_fail_mask = (!init && $urandom % 12 == 0) ? W'({$urandom, $urandom, $urandom}) | W'(1) : '0;
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
    $display("raw=%0d war=%0d waw=%0d parallel=%0d hold=%0d far_ok=%0d detect=%0d",
             n_raw, n_war, n_waw, n_parallel, n_hold, n_far_ok, n_detect);
    checks++;
    if (n_raw == 0 || n_war == 0 || n_waw == 0 || n_parallel == 0 ||
        n_hold == 0 || n_far_ok == 0 || n_detect == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
