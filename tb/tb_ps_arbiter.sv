// tb_ps_arbiter: directed scenarios on the full arbiter (five data paths,
// ten processors), with the memory controller's reports driven by the
// testbench. Each scenario checks exact grant cycles:
//  - an ABR on an idle address bus is granted in the next cycle;
//  - two writes (ADBR) by P0 and P1 get their data grants in the order of
//    their address grants, even when the data pointer favours P1;
//  - after PDFREE the path is not granted again before the DIR report;
//  - with both DIRs of path 1 busy (mask), a waiting PDBR is held back, the
//    memory gets MDBG, the pointer does not move, and the PDBR is granted
//    once a DIR is freed;
//  - paths 2 and 3 grant in the same cycle, independently.
module tb_ps_arbiter;
  import ps_pkg::*;
  localparam int NN = 5, NP = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] abr, adbr, pdbr, addrsend, pdfree, abg, pdbg;
  logic [NN-1:0] mdbr, mdfree, mdbg, di_change, di_nochange, di_reset, dir_mask;
  logic [NN-1:0][1:0] dir_busy;
  dstate_e [NN-1:0] path_state;
  logic addr_busy;

  ps_arbiter dut (.clk, .rst_n, .abr, .adbr, .pdbr, .addrsend, .pdfree, .abg, .pdbg,
                  .mdbr, .mdfree, .mdbg, .di_change, .di_nochange, .di_reset,
                  .addr_busy, .dir_mask, .dir_busy, .path_state);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  task automatic clear();
    {abr, adbr, pdbr, addrsend, pdfree} = '0;
    {mdbr, mdfree, di_change, di_nochange, di_reset} = '0;
  endtask

  // next cycle: release all pulses, then look at the registered grants
  task automatic step();
    @(negedge clk); clear();
  endtask

  initial begin
    clear();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // address latency
    abr[5] = 1; step();
    chk(abg == (NP'(1) << 5), "ABR on idle bus not granted in next cycle");
    addrsend[5] = 1; step();
    chk(abg == '0 && !addr_busy, "address bus not released");

    // P0 intervention moves path 0's pointer to P1
    pdbr[0] = 1; step();
    chk(pdbg == NP'(1), "PDBR P0 not granted in next cycle");
    pdfree[0] = 1; step();
    pdbr[1] = 1; step();
    chk(pdbg == '0, "path granted before the DIR report");
    step();
    chk(pdbg == '0, "path granted before the DIR report (2)");
    di_nochange[0] = 1; step();
    step();
    chk(pdbg == NP'(2), "PDBR P1 not granted after the DIR report");
    pdfree[1] = 1; step();
    di_nochange[0] = 1; step();
    // path 0 pointer now at the memory controller, then P0; address pointer at P6.
    // Writes: P1 and P0 both ADBR. Address order from pointer 6: P0 then P1.
    adbr[0] = 1; adbr[1] = 1; step();
    chk(abg == NP'(1), "ADBR P0 should win the address bus");
    addrsend[0] = 1; step();
    chk(abg == NP'(2), "ADBR P1 granted at release edge");
    addrsend[1] = 1; step();
    chk(pdbg == NP'(1), "data grant of P0's write");
    step();
    chk(pdbg == '0, "no second data grant while path busy");
    pdfree[0] = 1; step();
    di_change[0] = 1; step();
    step();
    chk(pdbg == NP'(2), "data grant of P1's write follows its address grant");
    pdfree[1] = 1; step();
    di_change[0] = 1; step();
    chk(dir_busy[0] == 2 && dir_mask[0], "path 0 DIRs both busy");
    di_reset[0] = 1; step();
    di_reset[0] = 1; step();
    chk(dir_busy[0] == 0 && !dir_mask[0], "path 0 DIRs freed");

    // masking on path 1 (P2, P3); P3 then P2 leaves the pointer at P3
    pdbr[3] = 1; step(); chk(pdbg == NP'(1) << 3, "P3 granted");
    pdfree[3] = 1; step(); di_change[1] = 1; step();
    pdbr[2] = 1; step(); chk(pdbg == NP'(1) << 2, "P2 granted");
    pdfree[2] = 1; step(); di_change[1] = 1; step();
    chk(dir_mask[1], "mask on with both DIRs busy");
    pdbr[2] = 1; pdbr[3] = 1; mdbr[1] = 1; step();
    chk(mdbg[1] && pdbg == '0, "only MDBG under the mask");
    repeat (3) step();
    mdfree[1] = 1; step();
    repeat (3) begin step(); chk(pdbg == '0, "no PDBG while DIRs full"); end
    di_reset[1] = 1; step(); step();
    // pointer kept at P3 by the masked MDBG: P3 goes first
    chk(pdbg == NP'(1) << 3, "P3 granted first: pointer kept after MDBG under the mask");
    pdfree[3] = 1; step(); di_nochange[1] = 1; step(); step();
    chk(pdbg == NP'(1) << 2, "P2 granted next");
    pdfree[2] = 1; step(); di_nochange[1] = 1; step();

    // independent paths
    pdbr[7] = 1; mdbr[2] = 1; step();
    chk(pdbg == NP'(1) << 7 && mdbg[2], "paths 2 and 3 granted in the same cycle");
    repeat (3) step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
