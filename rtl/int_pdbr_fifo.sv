// int_pdbr_fifo: queue of internal data bus requests (IDBR).
//
// When the address arbiter grants the address bus (ABG) to a processor that
// asked for an address-data operation (ADBR), the processor's index is
// pushed here. The head of the queue is offered to the data path arbiter as
// a data bus request of that processor; it is popped when the data arbiter
// grants it (PDBG). Serving IDBRs strictly in queue order makes data grants of
// address-data operations follow the order of their address grants.
//
// Interface: push/push_id enqueue, pop dequeues the head; head_valid/head_id
// show the head (combinationally from the registers). Push and pop may occur
// in the same cycle. Pushing into a full queue or popping an empty one is an
// error caught by assertions; with at most one outstanding request per
// processor, a depth equal to the number of processors on the path suffices.
// The circular buffer is this design's choice of implementation.
module int_pdbr_fifo #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned IDW   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           push,
  input  logic [IDW-1:0] push_id,
  input  logic           pop,
  output logic           head_valid,
  output logic [IDW-1:0] head_id,
  output logic           full,
  output logic [AW:0]    count
);

  logic [IDW-1:0] mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : AW'(int'(p) + 1);
  endfunction

  assign head_valid = (count != 0);
  assign head_id    = mem[rd_ptr];
  assign full       = (int'(count) == DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_id;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> head_valid);

endmodule
