// tb_rnd_data_arb: one data path with two processors and the memory
// controller (the default). Processors ask for the path either with PDBR or
// through an IDBR queue kept by the testbench; the memory controller asks
// with MDBR; the DIR mask is switched at random. A reference model (a list
// of waiting devices and a pointer) predicts every grant, the queue pops and
// the pointer. Also checked: no PDBG while masked, the pointer kept after an
// MDBG given under the mask, no arbitration before the DIR status of a
// processor tenure arrives, and a one-cycle request-to-grant latency.
module tb_rnd_data_arb;
  import ps_pkg::*;
  localparam int NPR = 2, ND = 3;
  int checks = 0, failures = 0;
  int n_pdbr = 0, n_idbr = 0, n_mdbg = 0, n_masked_mdbg = 0, n_wait_block = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPR-1:0] pdbr, pdfree, pdbg; logic idbr_valid, idbr_pop, mdbr, mdfree, mdbg, mask, stat_rec;
  logic [0:0] idbr_id, owner; logic [1:0] ptr; dstate_e state;

  rnd_data_arb dut (.clk, .rst_n, .pdbr, .pdfree, .pdbg, .idbr_valid, .idbr_id, .idbr_pop,
                    .mdbr, .mdfree, .mdbg, .mask, .stat_rec, .state, .ptr, .owner);

  int q[$];                 // IDBR queue
  bit w_pdbr[NPR], busy_p[NPR];  // waiting with PDBR; has a request in flight
  bit w_md;
  int m_ptr = 0, m_state = 0, m_owner = 0, exp_gnt = -1, hold = -1, rec_in = -1, md_hold = -1;
  bit exp_pop;

  initial begin
    pdbr = '0; pdfree = '0; mdbr = 0; mdfree = 0; mask = 0; stat_rec = 0;
    idbr_valid = 0; idbr_id = '0; w_md = 0;
    foreach (w_pdbr[i]) begin w_pdbr[i] = 0; busy_p[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (exp_gnt < 0 ? ({mdbg, pdbg} != '0) :
          exp_gnt == NPR ? !(mdbg && pdbg == '0) : !(!mdbg && pdbg == (NPR'(1) << exp_gnt))) begin
        failures++; $display("FAIL t=%0d pdbg=%b mdbg=%b expected %0d", t, pdbg, mdbg, exp_gnt);
      end
      checks++;
      if (int'(ptr) != m_ptr) begin failures++; $display("FAIL t=%0d ptr=%0d model %0d", t, ptr, m_ptr); end
      if (exp_gnt == NPR) md_hold = $urandom_range(0, 3);
      else if (exp_gnt >= 0) hold = $urandom_range(0, 3);
      // drive
      pdbr = '0; pdfree = '0; mdbr = 0; mdfree = 0; stat_rec = 0;
      if (hold == 0) begin pdfree[m_owner] = 1; busy_p[m_owner] = 0; rec_in = $urandom_range(1, 3); end
      if (hold >= 0) hold--;
      if (rec_in == 0) stat_rec = 1;
      if (rec_in >= 0) rec_in--;
      if (md_hold == 0) begin mdfree = 1; end
      if (md_hold >= 0) md_hold--;
      if ($urandom_range(0, 15) == 0) mask = ~mask;
      for (int i = 0; i < NPR; i++)
        if (!busy_p[i] && !(pdfree[i]) && $urandom_range(0, 5) == 0) begin
          busy_p[i] = 1;
          if ($urandom_range(0, 1)) begin pdbr[i] = 1; w_pdbr[i] = 1; end
          else q.push_back(i);
        end
      if (!w_md && m_state != 3 && $urandom_range(0, 7) == 0) begin mdbr = 1; w_md = 1; end
      idbr_valid = q.size() > 0;
      idbr_id = q.size() > 0 ? 1'(q[0]) : 1'b0;
      // predict
      exp_gnt = -1; exp_pop = 0;
      if (m_state == 0) begin
        for (int k = 0; k < ND; k++) begin
          int j, r;
          j = (m_ptr + k) % ND;
          if (j == NPR) r = w_md; else r = !mask && (w_pdbr[j] || (q.size() > 0 && q[0] == j));
          if (exp_gnt < 0 && r) exp_gnt = j;
        end
        if (exp_gnt == NPR) begin
          w_md = 0; m_state = 3; n_mdbg++;
          if (mask) n_masked_mdbg++; else m_ptr = (exp_gnt + 1) % ND;
        end else if (exp_gnt >= 0) begin
          m_state = 1; m_owner = exp_gnt; m_ptr = (exp_gnt + 1) % ND;
          if (q.size() > 0 && q[0] == exp_gnt) begin exp_pop = 1; void'(q.pop_front()); n_idbr++; end
          else begin w_pdbr[exp_gnt] = 0; n_pdbr++; end
        end
      end else if (m_state == 1) begin
        if (pdfree[m_owner]) m_state = 2;
      end else if (m_state == 2) begin
        if (w_md || w_pdbr[0] || w_pdbr[1] || q.size() > 0) n_wait_block++;
        if (stat_rec) m_state = 0;
      end else if (m_state == 3) begin
        if (mdfree) m_state = 0;
      end
      #1;
      checks++;
      if (idbr_pop != exp_pop) begin failures++; $display("FAIL t=%0d idbr_pop=%0b", t, idbr_pop); end
    end
    checks++;
    if (n_pdbr == 0 || n_idbr == 0 || n_masked_mdbg == 0 || n_wait_block == 0) failures++;
    $display("grants: PDBR %0d IDBR %0d MDBG %0d (masked %0d); waits for DIR status with requests pending %0d",
             n_pdbr, n_idbr, n_mdbg, n_masked_mdbg, n_wait_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
