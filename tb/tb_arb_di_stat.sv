// tb_arb_di_stat: random legal DIR reports against a counter model; checks
// the busy count, that the mask is high exactly when both DIRs are busy, and
// that stat_rec answers each end-of-tenure report in the same cycle.
module tb_arb_di_stat;
  int checks = 0, failures = 0, masked_cycles = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic chg, noc, rst_ev, mask, rec; logic [1:0] nb;
  arb_di_stat dut (.clk, .rst_n, .di_change(chg), .di_nochange(noc), .di_reset(rst_ev),
                   .mask(mask), .stat_rec(rec), .nb_busy(nb));
  int model = 0;

  initial begin
    {chg, noc, rst_ev} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(nb) != model || mask != (model == 2)) begin
        failures++;
        $display("FAIL t=%0d nb=%0d mask=%0b model=%0d", t, nb, mask, model);
      end
      if (mask) masked_cycles++;
      rst_ev = (model > 0) && ($urandom_range(0, 2) == 0);
      case ($urandom_range(0, 3))
        0: begin chg = (model < 2) || rst_ev; noc = 1'b0; end
        1: begin chg = 1'b0; noc = 1'b1; end
        default: begin chg = 1'b0; noc = 1'b0; end
      endcase
      #1;
      checks++;
      if (rec != (chg || noc)) begin
        failures++;
        $display("FAIL stat_rec=%0b chg=%0b noc=%0b", rec, chg, noc);
      end
      model = model + int'(chg) - int'(rst_ev);
    end
    checks++;
    if (masked_cycles == 0) begin failures++; $display("FAIL mask never set"); end
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
