// rnd_data_arb: round-robin arbiter of one data path, with DIR masking.
//
// The devices on the circular list are the path's processors (indices
// 0..PROCS-1) followed by the memory controller (index PROCS). A processor
// requests the path either with a processor data bus request (PDBR, for a
// cache-to-cache intervention), recorded in a table, or through the internal
// request queue (IDBR, the data half of an address-data write), of which only
// the head entry is visible. The memory controller requests with MDBR.
//
// While the path is free (state D_IDLE) the round-robin scan picks the first
// eligible device at or after the pointer, grants it (PDBG or MDBG, one-cycle
// pulse on the next cycle) and moves the pointer past it. Masking: while all
// DIRs of the memory controller are busy (`mask`), processors are not
// eligible, only MDBG can be given, and the pointer is not moved after it.
// A processor tenure ends with PDFREE from its owner; the arbiter then waits
// (D_WAIT) for the DIR status of that tenure (`stat_rec`) before arbitrating
// again, so the mask it uses counts the data just sent. A memory tenure ends
// with MDFREE. When a processor is granted and the queue head names it, the
// IDBR is served and popped (idbr_pop, same cycle as the decision);
// otherwise its PDBR table entry is cleared.
//
// Following the source: device list, pointer and masking rules, IDBR queue
// head. This design's choice: pulse handshakes, the wait for the status
// report, and IDBR having precedence over a PDBR of the same processor.
module rnd_data_arb #(
  parameter int unsigned PROCS = ps_pkg::PROCS_PER_NODE_DEF,
  localparam int unsigned ND   = PROCS + 1,
  localparam int unsigned DW   = $clog2(ND),
  localparam int unsigned LW   = (PROCS > 1) ? $clog2(PROCS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PROCS-1:0] pdbr,        // processor data bus request
  input  logic [PROCS-1:0] pdfree,      // processor frees the path
  output logic [PROCS-1:0] pdbg,        // processor data bus grant
  input  logic             idbr_valid,  // IDBR queue head
  input  logic [LW-1:0]    idbr_id,
  output logic             idbr_pop,
  input  logic             mdbr,        // memory data bus request
  input  logic             mdfree,      // memory frees the path
  output logic             mdbg,        // memory data bus grant
  input  logic             mask,        // all DIRs busy
  input  logic             stat_rec,    // DIR status of last processor tenure received
  output ps_pkg::dstate_e  state,
  output logic [DW-1:0]    ptr,
  output logic [LW-1:0]    owner
);
  import ps_pkg::*;

  logic [PROCS-1:0] dbr_tab, pend_pdbr, idbr_vec, proc_req;
  logic             md_pend, pend_md, found, grant, grant_mem;
  logic [DW-1:0]    idx, nxt;
  logic [ND-1:0]    req;

  assign pend_pdbr = dbr_tab | pdbr;
  assign pend_md   = md_pend | mdbr;

  always_comb begin
    idbr_vec = '0;
    if (idbr_valid) idbr_vec[idbr_id] = 1'b1;
  end

  assign proc_req = pend_pdbr | idbr_vec;
  assign req      = {pend_md, (mask ? PROCS'(0) : proc_req)};

  rr_pick #(.N(ND)) u_pick (.req(req), .ptr(ptr), .found(found), .idx(idx), .next(nxt));

  assign grant     = (state == D_IDLE) && found;
  assign grant_mem = grant && (int'(idx) == PROCS);
  assign idbr_pop  = grant && !grant_mem && idbr_vec[LW'(idx)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dbr_tab <= '0;
      md_pend <= 1'b0;
      pdbg    <= '0;
      mdbg    <= 1'b0;
      state   <= D_IDLE;
      ptr     <= '0;
      owner   <= '0;
    end else begin
      pdbg    <= '0;
      mdbg    <= 1'b0;
      dbr_tab <= pend_pdbr;
      md_pend <= pend_md;
      unique case (state)
        D_IDLE: if (grant) begin
          if (grant_mem) begin
            mdbg    <= 1'b1;
            md_pend <= 1'b0;
            state   <= D_MEM;
            if (!mask) ptr <= nxt;   // masking: pointer kept after MDBG
          end else begin
            pdbg[LW'(idx)] <= 1'b1;
            owner          <= LW'(idx);
            state          <= D_PROC;
            ptr            <= nxt;
            if (!idbr_vec[LW'(idx)]) dbr_tab[LW'(idx)] <= 1'b0;
          end
        end
        D_PROC: if (pdfree[owner]) state <= D_WAIT;
        D_WAIT: if (stat_rec)      state <= D_IDLE;
        D_MEM:  if (mdfree)        state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

  a_no_pdbg_masked: assert property (@(posedge clk) disable iff (!rst_n)
                      (grant && !grant_mem) |-> !mask);
  a_onehot_grant:   assert property (@(posedge clk) disable iff (!rst_n)
                      $onehot0({pdbg, mdbg}));
  a_free_owner:     assert property (@(posedge clk) disable iff (!rst_n)
                      (pdfree != '0) |-> (state == D_PROC && pdfree == (PROCS'(1) << owner)));
  a_mdfree_owner:   assert property (@(posedge clk) disable iff (!rst_n)
                      mdfree |-> state == D_MEM);

endmodule
