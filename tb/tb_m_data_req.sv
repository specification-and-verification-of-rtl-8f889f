// tb_m_data_req: read returns are queued at random and granted by the
// testbench a random time after each MDBR. Checked: an MDBR only while a
// return is pending and none is outstanding, MDBR one cycle after a return is
// queued on an idle block, the path held for exactly XFER_CYCLES (4) cycles
// after MDBG, an MDFREE right after, the pending count, and the overflow
// flag when more than MAX_PEND (4) returns are queued.
module tb_m_data_req;
  localparam int XF = 4, MP = 4;
  int checks = 0, failures = 0, n_xfer = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_req, mdbr, mdbg, mdfree, xfer, overflow; logic [2:0] pending;
  m_data_req dut (.clk, .rst_n, .rd_req, .mdbr, .mdbg, .mdfree, .xfer, .pending, .overflow);

  int model_pend = 0, st = 0, gdly = -1, xcnt = 0;  // st: 0 idle, 1 requested, 2 xfer
  bit prev_rd_idle, exp_ovf = 0;

  initial begin
    rd_req = 0; mdbg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // protocol observation
      checks++;
      case (st)
        0: if (mdbr) begin st = 1; gdly = $urandom_range(0, 4); end
           else if (model_pend > 0 && !prev_rd_idle) begin failures++; $display("FAIL t=%0d no MDBR", t); end
        1: if (mdbr || xfer || mdfree) begin failures++; $display("FAIL t=%0d while waiting", t); end
        2: begin
             if (xcnt < XF) begin
               if (!xfer) begin failures++; $display("FAIL t=%0d xfer low after %0d", t, xcnt); end
               xcnt++;
             end else begin
               if (xfer || !mdfree) begin failures++; $display("FAIL t=%0d no MDFREE", t); end
               n_xfer++; st = 0; model_pend--;
               if (mdbr) begin st = 1; gdly = $urandom_range(0, 4); end
             end
           end
        default: ;
      endcase
      if (st == 0 && mdbr) begin failures++; end
      checks++;
      if (int'(pending) != model_pend) begin failures++; $display("FAIL t=%0d pending=%0d model=%0d", t, pending, model_pend); end
      // drive
      mdbg = 0;
      if (st == 1) begin
        if (gdly == 0) begin mdbg = 1; st = 2; xcnt = 0; end
        gdly--;
      end
      rd_req = (t < 4500) && ($urandom_range(0, 13) == 0);
      prev_rd_idle = (st == 0) && (model_pend == 0);
      if (rd_req && model_pend < MP) model_pend++;
      else if (rd_req) exp_ovf = 1;
    end
    checks++;
    if (overflow != exp_ovf) begin failures++; $display("FAIL overflow=%0b expected %0b", overflow, exp_ovf); end
    repeat (100) @(negedge clk);
    for (int i = 0; i < MP + 2; i++) begin rd_req = 1; @(negedge clk); end
    rd_req = 0; @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    checks++;
    if (n_xfer < 10) failures++;
    $display("transfers %0d", n_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
