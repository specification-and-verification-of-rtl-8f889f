// ps_proc_model: behavioural model of one processor's bus interface, for
// testbenches only.
//
// Two parts run side by side. The master issues, at random, one of three
// operations and waits for its grants: address-only (ABR, then ABG),
// intervention (PDBR, then PDBG) or write (ADBR, then ABG, then PDBG). After
// an ABG it sends its command over a few cycles and signals ADDRSEND. After a
// PDBG it hands the data path to the data sender and may start its next
// operation at once, before the path is freed. The data sender holds the path
// a few cycles, sends one word for a write (and sometimes for an
// intervention), and frees the path with PDFREE. Words are {ID, sequence
// number} so that a checker can follow them. All outputs change on the
// falling clock edge. `enable` low stops new operations.
module ps_proc_model #(
  parameter int ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        abg,
  input  logic        pdbg,
  output logic        abr,
  output logic        adbr,
  output logic        pdbr,
  output logic        addrsend,
  output logic        pdfree,
  output logic        datasend,
  output logic [63:0] ds_data,
  output logic        idle
);
  typedef enum int {IDLE, W_ABG, W_ABG_D, W_PDBG} st_e;
  st_e st = IDLE;
  int  a_hold = -1, d_hold = -1, d_at = -1;
  bit  d_word, was_write = 0;
  int  seq = 0;

  assign idle = (st == IDLE) && (a_hold < 0) && (d_hold < 0);

  initial begin
    {abr, adbr, pdbr, addrsend, pdfree, datasend} = '0;
    ds_data = '0;
    forever begin
      @(negedge clk);
      {abr, adbr, pdbr, addrsend, pdfree, datasend} = '0;
      if (!rst_n) continue;
      // grants seen this cycle
      if (abg) begin
        a_hold = $urandom_range(0, 3);
        st = (st == W_ABG_D) ? W_PDBG : IDLE;
      end
      if (pdbg) begin
        d_hold = $urandom_range(0, 4);
        d_at   = $urandom_range(0, d_hold);
        d_word = (st == W_PDBG && was_write) || ($urandom_range(0, 1) == 1);
        st = IDLE;
      end
      // address tenure
      if (a_hold == 0) addrsend = 1'b1;
      if (a_hold >= 0) a_hold--;
      // data tenure
      if (d_hold >= 0) begin
        if (d_word && d_hold == d_at) begin
          datasend = 1'b1;
          ds_data  = {32'(ID), 32'(seq)};
          seq++;
        end
        if (d_hold == 0) pdfree = 1'b1;
        d_hold--;
      end
      // next operation
      if (enable && st == IDLE && a_hold < 0 && !addrsend && $urandom_range(0, 7) == 0) begin
        case ($urandom_range(0, 2))
          0: begin abr  = 1'b1; st = W_ABG;   was_write = 0; end
          1: begin pdbr = 1'b1; st = W_PDBG;  was_write = 0; end
          default: begin adbr = 1'b1; st = W_ABG_D; was_write = 1; end
        endcase
      end
    end
  end

endmodule
