// ps_arbiter: the PowerScale bus arbiter.
//
// The arbiter grants the shared address bus and the data paths of the
// machine. It consists of one address bus arbiter (rnd_addr_arb) over all
// processors and, for every data path (one per node), a queue of internal
// data bus requests (int_pdbr_fifo), a data path arbiter (rnd_data_arb) over
// the node's processors and the memory controller, and a count of the
// memory controller's busy data-in registers (arb_di_stat) that masks
// processor data grants while all DIRs are full. The data paths are
// arbitrated independently of one another.
//
// Processor p (0 .. N_NODES*PROCS_PER_NODE-1) belongs to node
// p / PROCS_PER_NODE and uses that node's data path. Requests (ABR, ADBR,
// PDBR) and releases (ADDRSEND, PDFREE, MDFREE) are one-cycle pulses; grants
// (ABG, PDBG, MDBG) are one-cycle pulses from registers. An ADBR gets ABG
// first, then PDBG, with PDBGs of ADBRs on a path in the order of their ABGs.
// The flow-control reports (di_change, di_nochange, di_reset) come from the
// memory controller, one set per data path.
module ps_arbiter #(
  parameter int unsigned N_NODES        = ps_pkg::N_NODES_DEF,
  parameter int unsigned PROCS_PER_NODE = ps_pkg::PROCS_PER_NODE_DEF,
  parameter int unsigned NB_DIR         = ps_pkg::NB_DIR_DEF,
  localparam int unsigned NPROC = N_NODES * PROCS_PER_NODE,
  localparam int unsigned NW    = (N_NODES > 1) ? $clog2(N_NODES) : 1,
  localparam int unsigned LW    = (PROCS_PER_NODE > 1) ? $clog2(PROCS_PER_NODE) : 1,
  localparam int unsigned CW    = $clog2(NB_DIR + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // processors
  input  logic [NPROC-1:0]   abr,
  input  logic [NPROC-1:0]   adbr,
  input  logic [NPROC-1:0]   pdbr,
  input  logic [NPROC-1:0]   addrsend,
  input  logic [NPROC-1:0]   pdfree,
  output logic [NPROC-1:0]   abg,
  output logic [NPROC-1:0]   pdbg,
  // memory controller, per data path
  input  logic [N_NODES-1:0] mdbr,
  input  logic [N_NODES-1:0] mdfree,
  output logic [N_NODES-1:0] mdbg,
  input  logic [N_NODES-1:0] di_change,
  input  logic [N_NODES-1:0] di_nochange,
  input  logic [N_NODES-1:0] di_reset,
  // status
  output logic               addr_busy,
  output logic [N_NODES-1:0] dir_mask,
  output logic [N_NODES-1:0][CW-1:0] dir_busy,
  output ps_pkg::dstate_e [N_NODES-1:0] path_state
);

  logic          idbr_push;
  logic [NW-1:0] idbr_node;
  logic [LW-1:0] idbr_local;
  logic [$clog2(NPROC > 1 ? NPROC : 2)-1:0] a_owner, a_ptr;

  rnd_addr_arb #(.N_NODES(N_NODES), .PROCS_PER_NODE(PROCS_PER_NODE)) u_addr (
    .clk, .rst_n, .abr, .adbr, .addrsend, .abg,
    .idbr_push, .idbr_node, .idbr_local,
    .busy(addr_busy), .owner(a_owner), .ptr(a_ptr));

  for (genvar n = 0; n < N_NODES; n++) begin : g_path
    logic          q_valid, q_pop, q_full, stat_rec;
    logic [LW-1:0] q_id, d_owner;
    logic [$clog2(PROCS_PER_NODE + 1)-1:0] d_ptr;
    logic [$clog2(PROCS_PER_NODE > 1 ? PROCS_PER_NODE : 2):0] q_count;

    int_pdbr_fifo #(.DEPTH(PROCS_PER_NODE), .IDW(LW)) u_fifo (
      .clk, .rst_n,
      .push(idbr_push && int'(idbr_node) == n), .push_id(idbr_local),
      .pop(q_pop), .head_valid(q_valid), .head_id(q_id),
      .full(q_full), .count(q_count));

    rnd_data_arb #(.PROCS(PROCS_PER_NODE)) u_data (
      .clk, .rst_n,
      .pdbr  (pdbr  [n*PROCS_PER_NODE +: PROCS_PER_NODE]),
      .pdfree(pdfree[n*PROCS_PER_NODE +: PROCS_PER_NODE]),
      .pdbg  (pdbg  [n*PROCS_PER_NODE +: PROCS_PER_NODE]),
      .idbr_valid(q_valid), .idbr_id(q_id), .idbr_pop(q_pop),
      .mdbr(mdbr[n]), .mdfree(mdfree[n]), .mdbg(mdbg[n]),
      .mask(dir_mask[n]), .stat_rec(stat_rec),
      .state(path_state[n]), .ptr(d_ptr), .owner(d_owner));

    arb_di_stat #(.NB_DIR(NB_DIR)) u_stat (
      .clk, .rst_n,
      .di_change(di_change[n]), .di_nochange(di_nochange[n]), .di_reset(di_reset[n]),
      .mask(dir_mask[n]), .stat_rec(stat_rec), .nb_busy(dir_busy[n]));
  end

endmodule
