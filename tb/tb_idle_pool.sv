// tb_idle_pool: checks the idle-address stack. After the start-up fill the
// pool hands out every slot exactly once; released slots come back in
// last-in first-out order, as a reference stack predicts; `empty` is raised
// when all slots are taken. The fill time (NPKT cycles) is checked too.
module tb_idle_pool;
  localparam int NPKT = 256;
  logic clk = 0, rst_n = 0;
  logic ready, empty, pop = 0, push = 0;
  logic [7:0] pop_addr, push_addr = 0;
  int checks = 0, failures = 0;
  logic [7:0] stack [$];
  bit seen [NPKT];
  int cyc;

  idle_pool #(.NPKT(NPKT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    cyc = 0;
    @(negedge clk);
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == NPKT - 1 || cyc == NPKT, $sformatf("fill took %0d cycles", cyc));
    // take every slot
    for (int i = 0; i < NPKT; i++) begin
      check(!empty, "not empty while slots remain");
      check(!seen[pop_addr], $sformatf("slot %0d handed out twice", pop_addr));
      seen[pop_addr] = 1;
      stack.push_back(pop_addr);
      pop = 1; @(negedge clk); pop = 0;
    end
    check(empty, "empty after all slots taken");
    // random release / take, LIFO model of the free list
    stack.delete();
    for (int n = 0; n < 2000; n++) begin
      if (stack.size() == 0 || (($urandom % 2) == 0 && stack.size() < NPKT)) begin
        // release a slot that is in use: any value not on the free stack
        logic [7:0] a;
        do a = 8'($urandom); while (a inside {stack});
        push = 1; push_addr = a; @(negedge clk); push = 0;
        stack.push_back(a);
      end else begin
        check(pop_addr == stack[$], $sformatf("pop %0d exp %0d", pop_addr, stack[$]));
        void'(stack.pop_back());
        pop = 1; @(negedge clk); pop = 0;
      end
      check(empty == (stack.size() == 0), "empty flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
