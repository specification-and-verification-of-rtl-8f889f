// tb_rr_pick: checks the round-robin scan exhaustively for the default list
// of three devices and randomly for a list of ten. The expected device is
// found by walking the circular list from the pointer in the testbench.
module tb_rr_pick;
  int checks = 0, failures = 0;

  logic [2:0] req3;  logic [1:0] ptr3, idx3, nxt3; logic found3;
  logic [9:0] req10; logic [3:0] ptr10, idx10, nxt10; logic found10;

  rr_pick dut3 (.req(req3), .ptr(ptr3), .found(found3), .idx(idx3), .next(nxt3));
  rr_pick #(.N(10)) dut10 (.req(req10), .ptr(ptr10), .found(found10), .idx(idx10), .next(nxt10));

  task automatic expect_pick(input int n, input logic [15:0] r, input int p,
                             input logic f, input int i, input int nx);
    int e = -1;
    for (int k = 0; k < n; k++) if (e < 0 && r[(p + k) % n]) e = (p + k) % n;
    checks++;
    if ((e >= 0) != f || (e >= 0 && (i != e || nx != (e + 1) % n))) begin
      failures++;
      $display("FAIL n=%0d req=%b ptr=%0d: got found=%0b idx=%0d next=%0d, expected %0d",
               n, r, p, f, i, nx, e);
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++)
      for (int r = 0; r < 8; r++) begin
        req3 = 3'(r); ptr3 = 2'(p); #1;
        expect_pick(3, 16'(r), p, found3, int'(idx3), int'(nxt3));
      end
    for (int t = 0; t < 2000; t++) begin
      req10 = 10'($urandom); if (t % 7 == 0) req10 = '0;
      ptr10 = 4'($urandom_range(0, 9)); #1;
      expect_pick(10, 16'(req10), int'(ptr10), found10, int'(idx10), int'(nxt10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
