// ps_pkg: shared constants and types of the PowerScale bus arbiter.
//
// The defaults describe the full machine: five data paths (four processor
// nodes and the I/O node), two requesters per node, hence ten address bus
// requesters, and two data-in registers (DIRs) per data path in the memory
// controller. Data paths are 64 bits wide. The state encodings are this
// design's own choice.
package ps_pkg;

  localparam int unsigned N_NODES_DEF        = 5;   // data paths
  localparam int unsigned PROCS_PER_NODE_DEF = 2;   // processors per node
  localparam int unsigned NB_DIR_DEF         = 2;   // DIRs per data path
  localparam int unsigned DATA_W_DEF         = 64;  // data path width

  // Data path arbiter: who holds the path.
  typedef enum logic [1:0] {
    D_IDLE = 2'd0,  // path free, arbitration may take place
    D_PROC = 2'd1,  // a processor holds the path (PDBG given, waiting for PDFREE)
    D_WAIT = 2'd2,  // processor released the path; waiting for the DIR status report
    D_MEM  = 2'd3   // the memory controller holds the path (MDBG given, waiting for MDFREE)
  } dstate_e;

  // Memory-side data requester.
  typedef enum logic [1:0] {
    M_IDLE = 2'd0,  // nothing requested
    M_REQ  = 2'd1,  // MDBR issued, waiting for MDBG
    M_XFER = 2'd2   // path held, read data being returned
  } mstate_e;

endpackage
