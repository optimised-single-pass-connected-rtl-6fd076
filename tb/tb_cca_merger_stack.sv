// Self-checking test of cca_merger_stack with a depth of 8: random pushes
// and pops against a queue model (LIFO order, empty flag, top entry), then
// fills the stack past its depth and checks that the overflow flag is set
// and the extra pair dropped, and that clear empties it and drops the flag.
module tb_cca_merger_stack;
  localparam int DEPTH = 8, LW = 9;
  logic clk = 0, rst_n, clear, push, pop, empty, overflow;
  logic [LW-1:0] push_big, push_small, top_big, top_small;
  logic [2*LW-1:0] q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cca_merger_stack #(.DEPTH(DEPTH), .LW(LW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_state(logic exp_ovf);
    checks++;
    if (empty !== (q.size() == 0) || overflow !== exp_ovf ||
        (q.size() != 0 && {top_big, top_small} !== q[$])) begin
      failures++;
      if (failures < 10)
        $display("size %0d: empty %0d ovf %0d top %0d,%0d", q.size(), empty, overflow, top_big, top_small);
    end
  endtask

  initial begin
    rst_n = 0; clear = 0; push = 0; pop = 0; push_big = 0; push_small = 0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bit do_push;
      do_push = ($urandom % 2) && q.size() < DEPTH;
      push = do_push;
      pop  = !do_push && ($urandom % 2);
      push_big = LW'($urandom); push_small = LW'($urandom);
      @(negedge clk);
      if (push) q.push_back({push_big, push_small});
      else if (pop && q.size() != 0) void'(q.pop_back());
      push = 0; pop = 0;
      #1 expect_state(1'b0);
    end
    while (q.size() < DEPTH) begin
      push = 1; push_big = LW'($urandom); push_small = LW'($urandom);
      @(negedge clk);
      q.push_back({push_big, push_small});
    end
    push = 1; push_big = 1; push_small = 0;
    @(negedge clk) push = 0;
    #1 expect_state(1'b1);
    clear = 1;
    @(negedge clk) clear = 0;
    q.delete();
    #1 expect_state(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
