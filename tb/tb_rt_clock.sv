// tb_rt_clock: checks that the real-time clock advances once every
// TICK_CYCLES cycles, wraps modulo 2^TBITS, and that tick marks the first
// cycle of each new value.
module tb_rt_clock;
  localparam int TBITS = 8, TICK = 20;
  logic clk = 0, rst_n = 0;
  logic [TBITS-1:0] t;
  logic tick;
  int checks = 0, failures = 0;

  rt_clock #(.TBITS(TBITS), .TICK_CYCLES(TICK)) dut (.clk, .rst_n, .t, .tick);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // cycle n after reset release: expected t = n / TICK mod 256
    for (int n = 0; n < 300 * TICK; n++) begin
      @(negedge clk);
      check(t == TBITS'(n / TICK), $sformatf("cycle %0d t=%0d", n, t));
      check(tick == (n % TICK == 0), $sformatf("cycle %0d tick=%0b", n, tick));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
