// smc_di_stat: the memory controller's data-in registers (DIRs) of one data
// path and the flow-control reports it sends to the arbiter.
//
// A DIR is a one-slot buffer for data a processor writes. A processor that
// holds the path may send one data word (DATASEND, with ds_data) and then
// frees the path (PDFREE). The word goes into a free DIR. At the end of the
// tenure the block reports to the arbiter, one cycle after PDFREE: di_change
// if a word was received in this tenure, di_nochange if not. Words whose
// tenure has been reported are copied to memory in arrival order over the
// wr_valid/wr_ready port; each copy frees a DIR and is reported with a
// di_reset pulse one cycle later. A word is not copied before its tenure is
// reported, so the arbiter's count never falls below the real occupancy.
//
// The arbiter grants no processor while all DIRs are busy, so a DATASEND
// with no free DIR must not happen: the word is dropped and the sticky
// `overflow` flag is set. Following the source: two DIRs per path, the busy
// count, the DIR freed by the copy to memory. This design's choice: DIRs
// used as a queue (oldest copied first), the report timing and format, and
// the memory-side valid/ready handshake (the write address travels on the
// address bus and is outside this block).
module smc_di_stat #(
  parameter int unsigned NB_DIR = ps_pkg::NB_DIR_DEF,
  parameter int unsigned DATA_W = ps_pkg::DATA_W_DEF,
  localparam int unsigned CW    = $clog2(NB_DIR + 1),
  localparam int unsigned AW    = (NB_DIR > 1) ? $clog2(NB_DIR) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              datasend,    // processor sends a data word
  input  logic [DATA_W-1:0] ds_data,
  input  logic              pdfree,      // processor tenure on this path ends
  output logic              di_change,   // to arbiter: a DIR became busy
  output logic              di_nochange, // to arbiter: tenure without data
  output logic              di_reset,    // to arbiter: a DIR was freed
  output logic              wr_valid,    // DIR copy to memory (FREEDIR)
  output logic [DATA_W-1:0] wr_data,
  input  logic              wr_ready,
  output logic [CW-1:0]     nb_busy,     // DIRs holding data
  output logic              overflow
);

  logic [DATA_W-1:0] dir [NB_DIR];
  logic [AW-1:0]     wptr, rptr;
  logic              ds;          // a word arrived in the current tenure
  logic              wr_in, rd_out, ds_now;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == NB_DIR - 1) ? '0 : AW'(int'(p) + 1);
  endfunction

  assign wr_in    = datasend && (int'(nb_busy) < NB_DIR);
  assign ds_now   = ds || wr_in;
  // Only reported words may leave; the unreported one is the newest.
  assign wr_valid = (nb_busy > CW'(ds));
  assign wr_data  = dir[rptr];
  assign rd_out   = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      nb_busy     <= '0;
      ds          <= 1'b0;
      di_change   <= 1'b0;
      di_nochange <= 1'b0;
      di_reset    <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      if (wr_in)  wptr <= inc(wptr);
      if (rd_out) rptr <= inc(rptr);
      nb_busy     <= nb_busy + CW'(wr_in) - CW'(rd_out);
      di_change   <= pdfree && ds_now;
      di_nochange <= pdfree && !ds_now;
      di_reset    <= rd_out;
      if (pdfree)      ds <= 1'b0;
      else if (wr_in)  ds <= 1'b1;
      if (datasend && !wr_in) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_in) dir[wptr] <= ds_data;
  end

  a_one_per_tenure: assert property (@(posedge clk) disable iff (!rst_n) datasend |-> !ds);

endmodule
