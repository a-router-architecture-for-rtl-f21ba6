// tb_be_input: sends best-effort packets with random signed x/y offsets and
// lengths through the flit input buffer under credit flow control (two
// credits, returned by ack), pops flits after random delays, and checks the
// flit boundaries, head/tail marks, the dimension-ordered route and the
// stepped offsets against a reference model.
module tb_be_input;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ack, flit_valid, pop = 0;
  logic [7:0] data = 0;
  flit_t flit;
  logic [2:0] route;
  int checks = 0, failures = 0;
  int credits = 2;
  // expected flits
  flit_t exp_f [$];
  logic [2:0] exp_r [$];
  int npk = 0;

  be_input dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && ack) credits++;

  // consumer
  initial begin
    forever begin
      @(negedge clk);
      if (flit_valid && ($urandom % 3 == 0)) begin
        flit_t e; logic [2:0] r;
        e = exp_f.pop_front(); r = exp_r.pop_front();
        check(flit.nbytes == e.nbytes && flit.head == e.head && flit.tail == e.tail,
              $sformatf("flit framing n=%0d h=%0b t=%0b exp n=%0d h=%0b t=%0b",
                        flit.nbytes, flit.head, flit.tail, e.nbytes, e.head, e.tail));
        for (int b = 0; b < int'(e.nbytes); b++)
          check(flit.data[8*b +: 8] == e.data[8*b +: 8], $sformatf("flit byte %0d", b));
        if (e.head) check(route == r, $sformatf("route %0d exp %0d", route, r));
        pop = 1; @(negedge clk); pop = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 60; p++) begin
      logic signed [7:0] x, y;
      logic [7:0] len;
      logic [7:0] pk [$];
      logic [2:0] r;
      x = 8'($signed($urandom % 7) - 3);
      y = 8'($signed($urandom % 7) - 3);
      len = 8'($urandom % 14);
      pk = {x, y, len};
      for (int i = 0; i < int'(len); i++) pk.push_back(8'($urandom));
      // reference routing
      r = 3'(PORT_LOCAL);
      if (x > 0)      begin r = 3'(PORT_XP); end
      else if (x < 0) begin r = 3'(PORT_XN); end
      else if (y > 0) begin r = 3'(PORT_YP); end
      else if (y < 0) begin r = 3'(PORT_YN); end
      // reference flits (with stepped offset)
      for (int s = 0; s < pk.size(); s += 5) begin
        flit_t f;
        f = '0;
        f.nbytes = 3'((pk.size() - s) >= 5 ? 5 : pk.size() - s);
        f.head = (s == 0);
        f.tail = (s + 5 >= pk.size());
        for (int b = 0; b < int'(f.nbytes); b++) f.data[8*b +: 8] = pk[s+b];
        if (s == 0) begin
          if (x > 0) f.data[7:0] = 8'(x - 1);
          else if (x < 0) f.data[7:0] = 8'(x + 1);
          else if (y > 0) f.data[15:8] = 8'(y - 1);
          else if (y < 0) f.data[15:8] = 8'(y + 1);
        end
        exp_f.push_back(f); exp_r.push_back(r);
      end
      // send, one flit per credit
      for (int s = 0; s < pk.size(); s += 5) begin
        while (credits == 0) @(negedge clk);
        credits--;
        for (int b = s; b < s + 5 && b < pk.size(); b++) begin
          @(negedge clk); valid = 1; data = pk[b];
        end
        @(negedge clk); valid = 0;
      end
      npk++;
    end
    while (exp_f.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(credits == 2, $sformatf("all credits returned (%0d)", credits));
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
