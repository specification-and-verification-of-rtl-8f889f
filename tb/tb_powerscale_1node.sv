// tb_powerscale_1node: the same end-to-end test as tb_powerscale_top, on
// the configuration whose protocol the source verified formally: one node,
// processors P0 and P1, the address bus and one data path, two DIRs, with
// two behavioural processors and a memory that returns reads and accepts DIR
// copies at random, slowly enough that the DIRs fill up.
//
// Checked against the four requirements of the protocol:
//  1. response: every request gets its grant(s) (ABR: ABG; PDBR: PDBG;
//     ADBR: ABG then PDBG), within a bound, and all are served at the end;
//  2. fairness: while a processor waits for the address bus, no other
//     processor gets it twice; while it waits for its data path, no other
//     processor of that path gets it twice;
//  3. order: on each path, PDBGs of writes come in the order of their ABGs;
//  4. flow control: no word is ever sent into full DIRs (overflow flags stay
//     low, DIR count never above two) and the DIRs always drain again.
// Also checked: the words written to memory arrive per path in the order they
// were sent, with their values intact, and at most one address bus owner.
// Each mechanism (the three request kinds, masking with a processor waiting,
// MDBG under the mask, tenures without data, read returns, address bus
// handover at the release edge) is counted and must occur.
module tb_powerscale_1node;
  import ps_pkg::*;
  localparam int NN = 1, PPN = 2, NP = NN * PPN, RUN = 20000, BOUND = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] abr, adbr, pdbr, addrsend, pdfree, datasend, abg, pdbg, idle;
  logic [NP-1:0][63:0] ds_data;
  logic [NN-1:0] rd_req, mem_xfer, dir_wr_valid, dir_wr_ready, dir_mask, dir_overflow, rd_overflow;
  logic [NN-1:0][63:0] dir_wr_data;
  logic [NN-1:0][1:0] dir_busy;
  logic addr_busy;
  dstate_e [NN-1:0] path_state;
  logic [NN-1:0] xfer_before;
  bit sent_in_tenure[NP];

  powerscale_top #(.N_NODES(1)) dut (.clk, .rst_n, .abr, .adbr, .pdbr, .addrsend, .pdfree, .datasend, .ds_data,
                      .abg, .pdbg, .rd_req, .mem_xfer, .dir_wr_valid, .dir_wr_data, .dir_wr_ready,
                      .addr_busy, .path_state, .dir_mask, .dir_busy, .dir_overflow, .rd_overflow);

  for (genvar p = 0; p < NP; p++) begin : g_proc
    ps_proc_model #(.ID(p)) u_p (.clk, .rst_n, .enable, .abg(abg[p]), .pdbg(pdbg[p]),
      .abr(abr[p]), .adbr(adbr[p]), .pdbr(pdbr[p]), .addrsend(addrsend[p]), .pdfree(pdfree[p]),
      .datasend(datasend[p]), .ds_data(ds_data[p]), .idle(idle[p]));
  end

  // checker state
  int  kind[NP];        // 0 none, 1 ABR, 2 PDBR, 3 ADBR waiting ABG, 4 ADBR waiting PDBG
  int  since[NP];       // cycles waiting
  int  a_other[NP][NP]; // address grants to q while p waits
  int  d_other[NP][NP]; // data grants to q while p waits
  int  wq[NN][$];       // ABG order of writes per path
  logic [63:0] words[NN][$];
  int  n_abr = 0, n_pdbr = 0, n_adbr = 0, n_mask_wait = 0, n_mdbg_masked = 0, n_nodata = 0;
  int  n_reads = 0, n_handover = 0, n_words = 0, n_full = 0, max_wait = 0;
  bit  mask_before[NN];
  int  rd_pend[NN];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  initial begin
    foreach (kind[i]) begin kind[i] = 0; since[i] = 0; end
    foreach (a_other[i, j]) begin a_other[i][j] = 0; d_other[i][j] = 0; end
    rd_req = '0; dir_wr_ready = '0;
    foreach (rd_pend[n]) begin rd_pend[n] = 0; mask_before[n] = 0; end
    xfer_before = '0;
    repeat (3) @(negedge clk);
    rst_n = 1; enable = 1;
    for (int t = 0; t < RUN + 3000; t++) begin
      @(posedge clk); #1;
      if (t == RUN) enable = 0;
      // requests seen at this edge
      for (int p = 0; p < NP; p++) begin
        if (abr[p])  begin kind[p] = 1; since[p] = 0; end
        if (pdbr[p]) begin kind[p] = 2; since[p] = 0; end
        if (adbr[p]) begin kind[p] = 3; since[p] = 0; end
      end
      // grants, visible after this edge
      for (int p = 0; p < NP; p++) begin
        int n;
        n = p / PPN;
        if (abg[p]) begin
          checks++;
          if (kind[p] == 1) begin kind[p] = 0; n_abr++; end
          else if (kind[p] == 3) begin kind[p] = 4; wq[n].push_back(p); end
          else fail($sformatf("ABG to P%0d without request", p));
          for (int q = 0; q < NP; q++) if (q != p && (kind[q] == 1 || kind[q] == 3)) begin
            a_other[q][p]++;
            checks++;
            if (a_other[q][p] > 1) fail($sformatf("address fairness: P%0d granted twice while P%0d waits", p, q));
          end
          foreach (a_other[p][q]) a_other[p][q] = 0;
        end
        if (pdbg[p]) begin
          checks++;
          if (kind[p] == 2) begin kind[p] = 0; n_pdbr++; end
          else if (kind[p] == 4) begin
            checks++;
            if (wq[n].size() == 0 || wq[n][0] != p) fail($sformatf("write order on path %0d: PDBG to P%0d", n, p));
            if (wq[n].size() > 0) void'(wq[n].pop_front());
            kind[p] = 0; n_adbr++;
          end else fail($sformatf("PDBG to P%0d without request", p));
          checks++;
          if (dir_mask[n]) fail($sformatf("PDBG to P%0d while DIRs full", p));
          for (int q = n * PPN; q < (n + 1) * PPN; q++) if (q != p && (kind[q] == 2 || kind[q] == 4)) begin
            d_other[q][p]++;
            checks++;
            if (d_other[q][p] > 1) fail($sformatf("data fairness: P%0d granted twice while P%0d waits", p, q));
          end
          foreach (d_other[p][q]) d_other[p][q] = 0;
        end
      end
      // response bound
      for (int p = 0; p < NP; p++) if (kind[p] != 0) begin
        since[p]++;
        if (since[p] > max_wait) max_wait = since[p];
        if (since[p] == BOUND) fail($sformatf("P%0d waited %0d cycles (kind %0d)", p, BOUND, kind[p]));
      end
      // mechanisms
      if ($countones(addrsend & abg) == 0 && addrsend != '0 && abg != '0) n_handover++;
      for (int n = 0; n < NN; n++) begin
        if (dir_mask[n]) begin
          for (int q = n * PPN; q < (n + 1) * PPN; q++) if (kind[q] == 2 || kind[q] == 4) n_mask_wait++;
        end
        if (path_state[n] == D_MEM && !xfer_before[n] && !mem_xfer[n] && mask_before[n]) n_mdbg_masked++;
        mask_before[n] = dir_mask[n];
        if (rd_req[n]) rd_pend[n]++;
        if (xfer_before[n] && !mem_xfer[n]) begin rd_pend[n]--; n_reads++; end
        xfer_before[n] = mem_xfer[n];
        if (dir_busy[n] == 2) n_full++;
        checks++;
        if (dir_busy[n] > 2 || dir_overflow[n] || rd_overflow[n])
          fail($sformatf("path %0d flow control: busy=%0d overflow=%0b/%0b", n, dir_busy[n], dir_overflow[n], rd_overflow[n]));
      end
      // tenures with and without data
      for (int p = 0; p < NP; p++) begin
        if (pdbg[p]) sent_in_tenure[p] = 0;
        if (datasend[p]) sent_in_tenure[p] = 1;
        if (pdfree[p] && !sent_in_tenure[p]) n_nodata++;
      end
      // data words: sent ...
      for (int p = 0; p < NP; p++) if (datasend[p]) words[p / PPN].push_back(ds_data[p]);
      checks++;
      if ($countones(abg) > 1) fail("two address grants");
      // memory side for the next cycle
      @(negedge clk);
      for (int n = 0; n < NN; n++) begin
        dir_wr_ready[n] = ($urandom_range(0, 11) == 0) || !enable;
        rd_req[n] = enable && ($urandom_range(0, 39) == 0) && (rd_pend[n] < 3);
      end
      // ... and, at the coming edge, written to memory
      for (int n = 0; n < NN; n++) if (dir_wr_valid[n] && dir_wr_ready[n]) begin
        checks++;
        if (words[n].size() == 0 || dir_wr_data[n] != words[n][0])
          fail($sformatf("path %0d memory got %h", n, dir_wr_data[n]));
        if (words[n].size() > 0) void'(words[n].pop_front());
        n_words++;
      end
    end
    // everything served and drained
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (kind[p] != 0 || !idle[p]) fail($sformatf("P%0d not served at end (kind %0d)", p, kind[p]));
    end
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (words[n].size() != 0 || dir_busy[n] != 0 || dir_mask[n])
        fail($sformatf("path %0d not drained", n));
    end
    $display("grants: ABR %0d, PDBR %0d, ADBR %0d; words to memory %0d; read returns %0d",
             n_abr, n_pdbr, n_adbr, n_words, n_reads);
    $display("masking: processor-cycles waiting under mask %0d, MDBG under mask %0d, cycles with full DIRs %0d",
             n_mask_wait, n_mdbg_masked, n_full);
    $display("tenures without data %0d, address handovers at release edge %0d, longest wait %0d cycles",
             n_nodata, n_handover, max_wait);
    checks++;
    if (n_abr == 0 || n_pdbr == 0 || n_adbr == 0 || n_mask_wait == 0 || n_mdbg_masked == 0 ||
        n_nodata == 0 || n_reads == 0 || n_handover == 0 || n_words == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
