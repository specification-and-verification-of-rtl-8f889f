// tb_int_pdbr_fifo: random legal pushes and pops against a queue model, at
// the default depth of two and at depth five; checks head, valid, full and
// count every cycle and that entries leave in the order they came.
module tb_int_pdbr_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push2, pop2, hv2, full2; logic [0:0] pid2, hid2; logic [1:0] cnt2;
  logic push5, pop5, hv5, full5; logic [2:0] pid5, hid5; logic [3:0] cnt5;

  int_pdbr_fifo dut2 (.clk, .rst_n, .push(push2), .push_id(pid2), .pop(pop2),
                      .head_valid(hv2), .head_id(hid2), .full(full2), .count(cnt2));
  int_pdbr_fifo #(.DEPTH(5), .IDW(3)) dut5 (.clk, .rst_n, .push(push5), .push_id(pid5),
                      .pop(pop5), .head_valid(hv5), .head_id(hid5), .full(full5), .count(cnt5));

  int q2[$], q5[$];

  task automatic check(input string nm, input int q[$], input int depth,
                       input logic hv, input int hid, input logic full, input int cnt);
    checks++;
    if (hv != (q.size() > 0) || (q.size() > 0 && hid != q[0]) ||
        full != (q.size() == depth) || cnt != q.size()) begin
      failures++;
      $display("FAIL %s: hv=%0b hid=%0d full=%0b cnt=%0d, model size %0d head %0d",
               nm, hv, hid, full, cnt, q.size(), q.size() ? q[0] : -1);
    end
  endtask

  initial begin
    {push2, pop2, push5, pop5} = '0; pid2 = '0; pid5 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      check("d2", q2, 2, hv2, int'(hid2), full2, int'(cnt2));
      check("d5", q5, 5, hv5, int'(hid5), full5, int'(cnt5));
      pop2  = (q2.size() > 0) && ($urandom_range(0, 2) == 0);
      push2 = ((q2.size() < 2) || pop2) && ($urandom_range(0, 1) == 0);
      pid2  = 1'($urandom);
      pop5  = (q5.size() > 0) && ($urandom_range(0, 3) == 0);
      push5 = ((q5.size() < 5) || pop5) && ($urandom_range(0, 1) == 0);
      pid5  = 3'($urandom);
      if (pop2) void'(q2.pop_front());
      if (push2) q2.push_back(int'(pid2));
      if (pop5) void'(q5.pop_front());
      if (push5) q5.push_back(int'(pid5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
