// arb_di_stat: the arbiter's count of busy data-in registers (DIRs).
//
// The memory controller reports three events per data path:
//   di_change   - a processor data tenure ended and its data now occupies a DIR
//   di_nochange - a processor data tenure ended without data being sent
//   di_reset    - a DIR was copied to memory and is free again
// The count rises on di_change and falls on di_reset (both may come in the
// same cycle). `mask` is high while all DIRs are busy: the data arbiter then
// gives no processor data grant (PDBG). `stat_rec` tells the data arbiter,
// in the same cycle, that the status of the last processor tenure has been
// received; the new count and mask are visible from the next cycle on.
// Following the source, the count lives in the arbiter and the flow-control
// rule is "all DIRs busy"; the three-event report format is this design's
// reading of the signal names.
module arb_di_stat #(
  parameter int unsigned NB_DIR = 2,
  localparam int unsigned CW    = $clog2(NB_DIR + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          di_change,
  input  logic          di_nochange,
  input  logic          di_reset,
  output logic          mask,
  output logic          stat_rec,
  output logic [CW-1:0] nb_busy
);

  assign mask     = (int'(nb_busy) == NB_DIR);
  assign stat_rec = di_change | di_nochange;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nb_busy <= '0;
    else        nb_busy <= nb_busy + CW'(di_change) - CW'(di_reset);
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                    (di_change && !di_reset) |-> (int'(nb_busy) < NB_DIR));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                    (di_reset && !di_change) |-> (nb_busy != 0));
  a_one_report:   assert property (@(posedge clk) disable iff (!rst_n)
                    !(di_change && di_nochange));

endmodule
