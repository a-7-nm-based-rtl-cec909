// tb_rf_array: random multiport traffic on the split storage array.
// A reference array in the testbench is updated at each rising edge with
// the writes of all ports in port order (the highest port wins) and with
// the far-word-line fault mask applied to words WORDS/2-1 and WORDS-1 only.
// After every edge and again after changing the read word lines, the local
// bit lines of both halves are compared with the model: an unselected half
// must read all ones, a selected half the stored word. Writes must not be
// visible before the rising edge. Port collisions and far-row faults are
// counted and must each occur.
module tb_rf_array;
  localparam int unsigned WORDS = 64, W = 74, NRD = 5, NWR = 4, HALF = WORDS / 2;
  logic clk = 1'b0;
  logic [NWR-1:0][WORDS-1:0] wwl;
  logic [NWR-1:0][W-1:0]     wdata;
  logic [W-1:0]              far_fail_mask;
  logic [NRD-1:0][WORDS-1:0] rwl;
  logic [NRD-1:0][W-1:0]     lbl_t, lbl_b;
  logic [W-1:0] model [WORDS];
  int checks = 0, failures = 0, collisions = 0, far_faults = 0;

  rf_array #(.WORDS(WORDS), .W(W), .NRD(NRD), .NWR(NWR)) dut (
    .clk(clk), .wwl(wwl), .wdata(wdata), .far_fail_mask(far_fail_mask),
    .rwl(rwl), .lbl_t(lbl_t), .lbl_b(lbl_b));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_addr();
    case ($urandom % 4)
      0: return HALF - 1;
      1: return WORDS - 1;
      2: return $urandom % 4;
      default: return $urandom % WORDS;
    endcase
  endfunction

  task automatic check_reads(input string when);
    for (int p = 0; p < NRD; p++) begin
      logic [W-1:0] et, eb;
      et = '1;
      eb = '1;
      for (int r = 0; r < HALF; r++) begin
        if (rwl[p][r])        et &= model[r];
        if (rwl[p][HALF + r]) eb &= model[HALF + r];
      end
      checks++;
      if (lbl_t[p] !== et || lbl_b[p] !== eb) begin
        failures++;
        $display("FAIL %s port %0d t=%0t", when, p, $time);
      end
    end
  endtask

  task automatic random_reads();
    for (int p = 0; p < NRD; p++) begin
      rwl[p] = '0;
      if ($urandom % 5 != 0) rwl[p][pick_addr()] = 1'b1;
    end
  endtask

  initial begin
    wwl = '0;
    rwl = '0;
    wdata = '0;
    far_fail_mask = '0;
    // initialise every word through port 0
    for (int r = 0; r < WORDS; r++) begin
      @(negedge clk);
      wwl = '0;
      wwl[0][r] = 1'b1;
      wdata[0] = {$urandom, $urandom, $urandom};
      model[r] = wdata[0];
    end
    @(negedge clk);
    wwl = '0;
    for (int i = 0; i < 2000; i++) begin
      int a [NWR];
      @(negedge clk);
      far_fail_mask = ($urandom % 6 == 0) ? W'({$urandom, $urandom, $urandom}) : '0;
      for (int p = 0; p < NWR; p++) begin
        wwl[p] = '0;
        wdata[p] = {$urandom, $urandom, $urandom};
        a[p] = -1;
        if ($urandom % 3 != 0) begin
          a[p] = pick_addr();
          wwl[p][a[p]] = 1'b1;
        end
      end
      for (int p = 0; p < NWR; p++)
        for (int q = p + 1; q < NWR; q++)
          if (a[p] >= 0 && a[p] == a[q]) collisions++;
      random_reads();
      #1;
      check_reads("before write edge");
      @(posedge clk);
      for (int p = 0; p < NWR; p++)
        if (a[p] >= 0) begin
          if (a[p] == HALF - 1 || a[p] == WORDS - 1) begin
            if (far_fail_mask != '0) far_faults++;
            model[a[p]] = (wdata[p] & ~far_fail_mask) | (model[a[p]] & far_fail_mask);
          end else
            model[a[p]] = wdata[p];
        end
      #1;
      check_reads("after write edge");
      random_reads();
      #1;
      check_reads("new read lines");
    end
    checks++;
    if (collisions == 0 || far_faults == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: collisions=%0d far_faults=%0d", collisions, far_faults);
    end
    $display("collisions=%0d far_faults=%0d", collisions, far_faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
