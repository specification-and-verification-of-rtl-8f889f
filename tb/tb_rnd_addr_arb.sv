// tb_rnd_addr_arb: ten processors (the default) post random ABR and ADBR
// requests and release the address bus a random time after their grant.
// A reference model, kept as a list of waiting processors and a pointer,
// predicts every grant. Also checked: one owner at a time, the IDBR pushed
// with the right data path and local index for every ADBR grant and for no
// ABR grant, a one-cycle request-to-grant latency on an idle bus, and the
// fairness bound (while a processor waits, every other processor is granted
// at most once).
module tb_rnd_addr_arb;
  localparam int NP = 10, PPN = 2;
  int checks = 0, failures = 0;
  int n_abr = 0, n_adbr = 0, n_fast = 0, n_handover = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] abr, adbr, addrsend, abg;
  logic idbr_push, busy; logic [2:0] idbr_node; logic [0:0] idbr_local; logic [3:0] owner, ptr;

  rnd_addr_arb dut (.clk, .rst_n, .abr, .adbr, .addrsend, .abg, .idbr_push, .idbr_node,
                    .idbr_local, .busy, .owner, .ptr);

  // reference state
  int  m_wait[NP];       // 0 none, 1 ABR, 2 ADBR waiting
  int  m_ptr = 0, m_owner = -1, exp_gnt = -1;
  bit  exp_adbr;
  int  hold[NP];         // cycles until ADDRSEND, -1 if not owner
  int  others[NP];       // grants to others while waiting

  initial begin
    abr = '0; adbr = '0; addrsend = '0;
    foreach (m_wait[i]) begin m_wait[i] = 0; hold[i] = -1; others[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // 1. compare with the prediction made for the last edge
      checks++;
      if (exp_gnt < 0 ? (abg != '0) : (abg != (NP'(1) << exp_gnt))) begin
        failures++; $display("FAIL t=%0d abg=%b expected %0d", t, abg, exp_gnt);
      end
      checks++;
      if (idbr_push != (exp_gnt >= 0 && exp_adbr) ||
          (idbr_push && (int'(idbr_node) != exp_gnt / PPN || int'(idbr_local) != exp_gnt % PPN))) begin
        failures++; $display("FAIL t=%0d idbr push=%0b node=%0d local=%0d", t, idbr_push, idbr_node, idbr_local);
      end
      if (exp_gnt >= 0) begin
        hold[exp_gnt] = $urandom_range(0, 3);
        if (exp_adbr) n_adbr++; else n_abr++;
      end
      // 2. drive the next cycle
      abr = '0; adbr = '0; addrsend = '0;
      foreach (hold[i]) if (hold[i] == 0) begin addrsend[i] = 1'b1; hold[i] = -1; end
        else if (hold[i] > 0) hold[i]--;
      for (int i = 0; i < NP; i++)
        if (m_wait[i] == 0 && hold[i] < 0 && !addrsend[i] && $urandom_range(0, 9) == 0) begin
          if ($urandom_range(0, 1)) abr[i] = 1'b1; else adbr[i] = 1'b1;
        end
      // Latency: one request on an idle bus with nothing else waiting.
      begin
        bit idle;
        int nw;
        idle = (m_owner < 0);
        nw = 0;
        foreach (m_wait[i]) if (m_wait[i] != 0) nw++;
        // 3. predict the next edge
        foreach (abr[i]) begin
          if (abr[i])  m_wait[i] = 1;
          if (adbr[i]) m_wait[i] = 2;
        end
        exp_gnt = -1;
        if (m_owner < 0 || addrsend[m_owner]) begin
          if (m_owner >= 0) n_handover++;
          m_owner = -1;
          for (int k = 0; k < NP; k++) begin
            int j;
            j = (m_ptr + k) % NP;
            if (exp_gnt < 0 && m_wait[j] != 0) exp_gnt = j;
          end
          if (exp_gnt >= 0) begin
            if (idle && nw == 0) n_fast++;
            exp_adbr = (m_wait[exp_gnt] == 2);
            m_wait[exp_gnt] = 0;
            m_owner = exp_gnt;
            m_ptr = (exp_gnt + 1) % NP;
            foreach (m_wait[i]) if (m_wait[i] != 0 && i != exp_gnt) others[i]++;
            others[exp_gnt] = 0;
          end
        end
        foreach (others[i]) begin
          checks++;
          if (others[i] > NP - 1) begin failures++; $display("FAIL fairness P%0d", i); end
        end
      end
    end
    checks++;
    if (n_abr == 0 || n_adbr == 0 || n_fast == 0 || n_handover == 0) begin
      failures++; $display("FAIL coverage abr=%0d adbr=%0d fast=%0d handover=%0d", n_abr, n_adbr, n_fast, n_handover);
    end
    $display("grants: ABR %0d ADBR %0d, idle-bus grants %0d, same-edge handovers %0d",
             n_abr, n_adbr, n_fast, n_handover);
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
