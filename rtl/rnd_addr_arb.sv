// rnd_addr_arb: round-robin arbiter of the address bus.
//
// Every processor may post an address-only request (ABR) or an address-data
// request (ADBR), each as a one-cycle pulse; the arbiter records them in two
// request tables. While the address bus is free, the round-robin scan picks the
// first requesting processor at or after the current pointer, gives it an
// address bus grant (ABG, a one-cycle pulse on the next cycle) and moves the
// pointer to the processor after it. With no request the pointer stays. For
// an ADBR, the grant also pushes the processor's index as an internal data
// bus request (IDBR) towards the data arbiter of that processor's data path
// (idbr_push/idbr_node/idbr_local), so its data grant follows address grant
// order. The bus stays owned until the owner signals ADDRSEND (command sent),
// and may be granted again at that same clock edge.
//
// Timing: a request seen at a clock edge with the bus free gives ABG in the
// following cycle. At most one request per processor is outstanding.
// Following the source: the tables, the pointer rule, the IDBR push on ADBR.
// This design's choice: the pulse handshake, the same-edge handover, and the
// processor-to-data-path mapping (node = index / PROCS_PER_NODE).
module rnd_addr_arb #(
  parameter int unsigned N_NODES        = ps_pkg::N_NODES_DEF,
  parameter int unsigned PROCS_PER_NODE = ps_pkg::PROCS_PER_NODE_DEF,
  localparam int unsigned NPROC = N_NODES * PROCS_PER_NODE,
  localparam int unsigned PW    = (NPROC > 1) ? $clog2(NPROC) : 1,
  localparam int unsigned NW    = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned LW    = (PROCS_PER_NODE > 1) ? $clog2(PROCS_PER_NODE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] abr,        // address-only request
  input  logic [NPROC-1:0] adbr,       // address-data request
  input  logic [NPROC-1:0] addrsend,   // owner has sent its command: bus free
  output logic [NPROC-1:0] abg,        // address bus grant (one-cycle pulse)
  output logic             idbr_push,  // IDBR for the processor just granted
  output logic [NW-1:0]    idbr_node,  // its data path
  output logic [LW-1:0]    idbr_local, // its index within the path
  output logic             busy,       // address bus owned
  output logic [PW-1:0]    owner,
  output logic [PW-1:0]    ptr         // current round-robin pointer
);

  logic [NPROC-1:0] abr_tab, adbr_tab, pend_abr, pend_adbr, gnt_vec;
  logic             free, found, grant;
  logic [PW-1:0]    idx, nxt;

  assign pend_abr  = abr_tab  | abr;
  assign pend_adbr = adbr_tab | adbr;
  assign free      = !busy || addrsend[owner];

  rr_pick #(.N(NPROC)) u_pick (
    .req(pend_abr | pend_adbr), .ptr(ptr), .found(found), .idx(idx), .next(nxt));

  assign grant = free && found;

  always_comb begin
    gnt_vec = '0;
    if (grant) gnt_vec[idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      abr_tab    <= '0;
      adbr_tab   <= '0;
      abg        <= '0;
      busy       <= 1'b0;
      owner      <= '0;
      ptr        <= '0;
      idbr_push  <= 1'b0;
      idbr_node  <= '0;
      idbr_local <= '0;
    end else begin
      abr_tab   <= pend_abr  & ~gnt_vec;
      adbr_tab  <= pend_adbr & ~gnt_vec;
      abg       <= gnt_vec;
      idbr_push <= grant && pend_adbr[idx];
      if (grant) begin
        busy       <= 1'b1;
        owner      <= idx;
        ptr        <= nxt;
        idbr_node  <= NW'(int'(idx) / PROCS_PER_NODE);
        idbr_local <= LW'(int'(idx) % PROCS_PER_NODE);
      end else if (free) begin
        busy <= 1'b0;
      end
    end
  end

  // One grant at a time; ADDRSEND only from the owner; one request per processor.
  a_onehot_abg:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(abg));
  a_send_owner:   assert property (@(posedge clk) disable iff (!rst_n)
                    (addrsend != '0) |-> (busy && addrsend == (NPROC'(1) << owner)));
  a_one_request:  assert property (@(posedge clk) disable iff (!rst_n)
                    ((abr | adbr) & (abr_tab | adbr_tab)) == '0 && (abr & adbr) == '0);

endmodule
