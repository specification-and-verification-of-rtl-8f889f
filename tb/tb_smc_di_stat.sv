// tb_smc_di_stat: processor tenures on one data path, each sending one
// random 64-bit word or none, while memory accepts DIR copies at random. A
// tenure only starts when the arbiter's view of the DIR count (rebuilt here
// from the block's reports) leaves a DIR free, as the arbiter does. Checked:
// di_change or di_nochange one cycle after every PDFREE, matching whether a
// word was sent; di_reset one cycle after every copy; words copied in the
// order sent and never before their tenure was reported; the busy count;
// both DIRs full at some point; finally a DATASEND into full DIRs sets
// `overflow`.
module tb_smc_di_stat;
  int checks = 0, failures = 0, n_full = 0, n_send = 0, n_nosend = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic datasend, pdfree, chg, noc, rst_ev, wr_valid, wr_ready, overflow;
  logic [63:0] ds_data, wr_data; logic [1:0] nb;

  smc_di_stat dut (.clk, .rst_n, .datasend, .ds_data, .pdfree, .di_change(chg), .di_nochange(noc),
                   .di_reset(rst_ev), .wr_valid, .wr_data, .wr_ready, .nb_busy(nb), .overflow);

  logic [63:0] sent[$], committed[$];
  int arb_count = 0, phase = 0, cnt = 0;   // phase 0 idle, 1 in tenure, 2 waiting report
  bit exp_chg, exp_noc, exp_rst, sent_now, word;

  initial begin
    datasend = 0; pdfree = 0; wr_ready = 0; ds_data = '0;
    exp_chg = 0; exp_noc = 0; exp_rst = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      checks++;
      if (chg != exp_chg || noc != exp_noc || rst_ev != exp_rst) begin
        failures++; $display("FAIL t=%0d chg=%0b noc=%0b rst=%0b expected %0b %0b %0b",
                             t, chg, noc, rst_ev, exp_chg, exp_noc, exp_rst);
      end
      checks++;
      if (int'(nb) != sent.size() + committed.size()) begin
        failures++; $display("FAIL t=%0d nb_busy=%0d", t, nb);
      end
      if (nb == 2) n_full++;
      arb_count = arb_count + int'(chg) - int'(rst_ev);
      if ((chg || noc) && phase == 2) phase = 0;
      // memory side: check and take a copy
      checks++;
      if (wr_valid != (committed.size() > 0) || (wr_valid && wr_data != committed[0])) begin
        failures++; $display("FAIL t=%0d wr_valid=%0b data=%h", t, wr_valid, wr_data);
      end
      wr_ready = $urandom_range(0, 3) == 0;
      exp_rst = wr_valid && wr_ready;
      if (exp_rst) void'(committed.pop_front());
      // processor side
      datasend = 0; pdfree = 0; exp_chg = 0; exp_noc = 0;
      if (phase == 0 && arb_count < 2 && $urandom_range(0, 2) == 0) begin
        phase = 1; cnt = $urandom_range(0, 3); word = $urandom_range(0, 3) != 0; sent_now = 0;
      end else if (phase == 1) begin
        if (word && !sent_now && (cnt == 0 || $urandom_range(0, 1))) begin
          datasend = 1; ds_data = {$urandom, $urandom}; sent.push_back(ds_data); sent_now = 1;
        end
        if (cnt == 0) begin
          pdfree = 1; phase = 2;
          exp_chg = sent_now; exp_noc = !sent_now;
          if (sent_now) n_send++; else n_nosend++;
          while (sent.size() > 0) committed.push_back(sent.pop_front());
        end else cnt--;
      end
    end
    // fill both DIRs, then one more word
    @(negedge clk); wr_ready = 0; datasend = 0; pdfree = 0;
    repeat (20) @(negedge clk);
    while (nb < 2) begin
      datasend = 1; pdfree = 1; ds_data = '1; @(negedge clk);
    end
    datasend = 1; @(negedge clk); datasend = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    checks++;
    if (n_full == 0 || n_send == 0 || n_nosend == 0) begin failures++; $display("FAIL coverage"); end
    $display("tenures with data %0d, without %0d, cycles with both DIRs busy %0d", n_send, n_nosend, n_full);
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
