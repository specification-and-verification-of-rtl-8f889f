// powerscale_top: the PowerScale arbitration subsystem.
//
// The arbiter (ps_arbiter) together with the parts of the system memory
// controller (SMC) that take part in arbitration, one set per data path:
// the data-in registers with their flow-control reports (smc_di_stat) and the
// requester that wins the data path for read returns (m_data_req). The
// processors, the memory array, the address bus command fields and the data
// crossbar are outside; their signals are ports.
//
// Processor side (index p, node p / PROCS_PER_NODE): request pulses abr,
// adbr, pdbr; grant pulses abg, pdbg; release pulses addrsend (command sent
// on the address bus) and pdfree (data path freed); datasend with ds_data
// writes one word into a DIR of the processor's path during its tenure.
// Memory side, per path: rd_req asks for one read return (the path is held
// for XFER_CYCLES cycles while mem_xfer is high); dir_wr_* copies DIR words
// to memory. The sticky overflow flags are never set by a correct system.
module powerscale_top #(
  parameter int unsigned N_NODES        = ps_pkg::N_NODES_DEF,
  parameter int unsigned PROCS_PER_NODE = ps_pkg::PROCS_PER_NODE_DEF,
  parameter int unsigned NB_DIR         = ps_pkg::NB_DIR_DEF,
  parameter int unsigned DATA_W         = ps_pkg::DATA_W_DEF,
  parameter int unsigned MAX_PEND       = 4,
  parameter int unsigned XFER_CYCLES    = 4,
  localparam int unsigned NPROC = N_NODES * PROCS_PER_NODE,
  localparam int unsigned CW    = $clog2(NB_DIR + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // processors
  input  logic [NPROC-1:0]                abr,
  input  logic [NPROC-1:0]                adbr,
  input  logic [NPROC-1:0]                pdbr,
  input  logic [NPROC-1:0]                addrsend,
  input  logic [NPROC-1:0]                pdfree,
  input  logic [NPROC-1:0]                datasend,
  input  logic [NPROC-1:0][DATA_W-1:0]    ds_data,
  output logic [NPROC-1:0]                abg,
  output logic [NPROC-1:0]                pdbg,
  // memory side, per data path
  input  logic [N_NODES-1:0]              rd_req,
  output logic [N_NODES-1:0]              mem_xfer,
  output logic [N_NODES-1:0]              dir_wr_valid,
  output logic [N_NODES-1:0][DATA_W-1:0]  dir_wr_data,
  input  logic [N_NODES-1:0]              dir_wr_ready,
  // status
  output logic                            addr_busy,
  output ps_pkg::dstate_e [N_NODES-1:0]   path_state,
  output logic [N_NODES-1:0]              dir_mask,
  output logic [N_NODES-1:0][CW-1:0]      dir_busy,
  output logic [N_NODES-1:0]              dir_overflow,
  output logic [N_NODES-1:0]              rd_overflow
);

  logic [N_NODES-1:0] mdbr, mdbg, mdfree, di_change, di_nochange, di_reset;
  logic [N_NODES-1:0][CW-1:0] arb_dir_busy;

  ps_arbiter #(.N_NODES(N_NODES), .PROCS_PER_NODE(PROCS_PER_NODE), .NB_DIR(NB_DIR)) u_arb (
    .clk, .rst_n, .abr, .adbr, .pdbr, .addrsend, .pdfree, .abg, .pdbg,
    .mdbr, .mdfree, .mdbg, .di_change, .di_nochange, .di_reset,
    .addr_busy, .dir_mask, .dir_busy(arb_dir_busy), .path_state);

  for (genvar n = 0; n < N_NODES; n++) begin : g_smc
    logic              p_send, p_free;
    logic [DATA_W-1:0] p_data;
    logic [$clog2(MAX_PEND + 1)-1:0] rd_pending;

    // Only the path owner sends, so the node's words can be OR-merged.
    always_comb begin
      p_data = '0;
      for (int unsigned l = 0; l < PROCS_PER_NODE; l++)
        if (datasend[n*PROCS_PER_NODE + l]) p_data |= ds_data[n*PROCS_PER_NODE + l];
    end
    assign p_send = |datasend[n*PROCS_PER_NODE +: PROCS_PER_NODE];
    assign p_free = |pdfree[n*PROCS_PER_NODE +: PROCS_PER_NODE];

    smc_di_stat #(.NB_DIR(NB_DIR), .DATA_W(DATA_W)) u_dirs (
      .clk, .rst_n, .datasend(p_send), .ds_data(p_data), .pdfree(p_free),
      .di_change(di_change[n]), .di_nochange(di_nochange[n]), .di_reset(di_reset[n]),
      .wr_valid(dir_wr_valid[n]), .wr_data(dir_wr_data[n]), .wr_ready(dir_wr_ready[n]),
      .nb_busy(dir_busy[n]), .overflow(dir_overflow[n]));

    m_data_req #(.MAX_PEND(MAX_PEND), .XFER_CYCLES(XFER_CYCLES)) u_mreq (
      .clk, .rst_n, .rd_req(rd_req[n]), .mdbr(mdbr[n]), .mdbg(mdbg[n]),
      .mdfree(mdfree[n]), .xfer(mem_xfer[n]), .pending(rd_pending),
      .overflow(rd_overflow[n]));

    // While the path is free to be granted, the arbiter's DIR count never
    // undercounts the DIRs in use (it may lag one cycle behind a copy).
    a_count_safe: assert property (@(posedge clk) disable iff (!rst_n)
                    path_state[n] == ps_pkg::D_IDLE |-> arb_dir_busy[n] >= dir_busy[n]);
    // Sending is only allowed while the path belongs to a processor.
    a_send_in_tenure: assert property (@(posedge clk) disable iff (!rst_n)
                        p_send |-> path_state[n] == ps_pkg::D_PROC);
  end

endmodule
