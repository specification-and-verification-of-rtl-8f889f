// m_data_req: the memory controller's requester of one data path.
//
// For a read, the memory controller must own the data path to the reading
// processor before it returns the data. Each rd_req pulse queues one such
// return (a counter, up to MAX_PEND). With a return queued, the block issues
// a memory data bus request (MDBR, one-cycle pulse), waits for the memory
// data bus grant (MDBG), then holds the path for XFER_CYCLES cycles (`xfer`
// high: the crossbar routes memory data to the path) and frees it with an
// MDFREE pulse. Only one request is outstanding at a time.
//
// Following the source: MDBR, MDBG and the freeing of the path. This design's
// choice: the return queue, its depth, the transfer length (the source does
// not give a burst length) and the pulse handshakes. A rd_req with a full
// queue is dropped and sets the sticky `overflow` flag.
module m_data_req #(
  parameter int unsigned MAX_PEND    = 4,
  parameter int unsigned XFER_CYCLES = 4,
  localparam int unsigned QW = $clog2(MAX_PEND + 1),
  localparam int unsigned XW = (XFER_CYCLES > 1) ? $clog2(XFER_CYCLES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_req,    // one read return to deliver
  output logic          mdbr,      // memory data bus request (pulse)
  input  logic          mdbg,      // memory data bus grant (pulse)
  output logic          mdfree,    // memory frees the path (pulse)
  output logic          xfer,      // path held, data being returned
  output logic [QW-1:0] pending,
  output logic          overflow
);
  import ps_pkg::*;

  mstate_e       state;
  logic [XW-1:0] beat;
  logic          acc, done;

  assign acc  = rd_req && (int'(pending) < MAX_PEND);
  assign xfer = (state == M_XFER);
  assign done = xfer && (int'(beat) == XFER_CYCLES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      pending  <= '0;
      beat     <= '0;
      mdbr     <= 1'b0;
      mdfree   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      mdbr    <= 1'b0;
      mdfree  <= 1'b0;
      pending <= pending + QW'(acc) - QW'(done);
      if (rd_req && !acc) overflow <= 1'b1;
      unique case (state)
        M_IDLE: if (pending != 0) begin
          mdbr  <= 1'b1;
          state <= M_REQ;
        end
        M_REQ: if (mdbg) begin
          state <= M_XFER;
          beat  <= '0;
        end
        M_XFER: begin
          beat <= beat + 1'b1;
          if (done) begin
            mdfree <= 1'b1;
            state  <= M_IDLE;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  a_grant_expected: assert property (@(posedge clk) disable iff (!rst_n) mdbg |-> state == M_REQ);

endmodule
