// rr_pick: the round-robin scan shared by the address and data arbiters.
//
// The arbiter keeps a circular list of devices and a current pointer. The
// scan starts at the pointer and returns the first device whose request bit
// is set, wrapping around the list. `found` is low when no device requests;
// `idx` then equals `ptr`. Purely combinational. `next` is the device after
// `idx` in the circular list, which is where the arbiter moves its pointer
// after a grant.
module rr_pick #(
  parameter int unsigned N  = 3,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] req,
  input  logic [W-1:0] ptr,
  output logic         found,
  output logic [W-1:0] idx,
  output logic [W-1:0] next
);

  // Position k of the scan is device ptr+k, wrapped by one subtraction
  // (ptr < N), so no divider is needed.
  always_comb begin
    logic [W:0] j;
    found = 1'b0;
    idx   = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      j = {1'b0, ptr} + (W+1)'(k);
      if (j >= (W+1)'(N)) j = j - (W+1)'(N);
      if (!found && req[j[W-1:0]]) begin
        found = 1'b1;
        idx   = j[W-1:0];
      end
    end
    next = (int'(idx) == N - 1) ? '0 : W'(int'(idx) + 1);
  end

endmodule
