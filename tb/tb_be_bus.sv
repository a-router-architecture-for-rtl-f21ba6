// tb_be_bus: five inputs offer multi-flit best-effort packets to random
// outputs while the outputs accept flits at random. Each flit carries its
// source, packet and flit number, so the checks can see that every flit
// arrives once, in order, at its packet's output, and that the flits of two
// packets never interleave at one output (wormhole allocation).
module tb_be_bus;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic       in_valid [NPORTS];
  flit_t      in_flit  [NPORTS];
  logic [2:0] in_route [NPORTS];
  pmask_t in_pop, out_space, out_push;
  flit_t out_flit;
  int checks = 0, failures = 0;

  typedef struct { flit_t f; logic [2:0] r; } item_t;
  item_t srcq [NPORTS][$];
  int owner [NPORTS];        // source holding each output, -1 when free
  int next_seq [NPORTS];     // next expected flit sequence per source
  int delivered = 0, total = 0, blocked_heads = 0;

  be_bus dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk)
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = rst_n && srcq[i].size() != 0;
      in_flit[i]  = in_valid[i] ? srcq[i][0].f : '0;
      in_route[i] = in_valid[i] ? srcq[i][0].r : '0;
    end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      int seq;
      seq = 0;
      owner[i] = -1; next_seq[i] = 0;
      for (int p = 0; p < 25; p++) begin
        int nf; logic [2:0] r;
        nf = 1 + $urandom % 4; r = 3'($urandom % NPORTS);
        for (int k = 0; k < nf; k++) begin
          item_t it;
          it.f = '0;
          it.f.data[7:0] = 8'(i); it.f.data[23:8] = 16'(seq); it.f.data[31:24] = 8'(r);
          it.f.nbytes = 3'd5; it.f.head = (k == 0); it.f.tail = (k == nf - 1);
          it.r = r;
          srcq[i].push_back(it); seq++; total++;
        end
      end
    end
  end

  always @(negedge clk) out_space = pmask_t'($urandom);

  always @(posedge clk) if (rst_n) begin
    int src, o;
    if (out_push != '0) begin
      check($onehot(out_push), "one push per cycle");
      check($onehot(in_pop), "one pop per push");
      o = $clog2(out_push);
      src = int'(out_flit.data[7:0]);
      check(in_pop[src], "popped input is the flit's source");
      check((out_space & out_push) != '0, "pushed only into an output with space");
      check(int'(out_flit.data[31:24]) == o, $sformatf("flit from %0d to output %0d", src, o));
      check(int'(out_flit.data[23:8]) == next_seq[src], "flits in order");
      next_seq[src]++;
      if (out_flit.head) begin
        check(owner[o] == -1, $sformatf("head to output %0d while held by %0d", o, owner[o]));
        if (!out_flit.tail) owner[o] = src;
      end else begin
        check(owner[o] == src, $sformatf("body flit from %0d at output %0d held by %0d", src, o, owner[o]));
        if (out_flit.tail) owner[o] = -1;
      end
      void'(srcq[src].pop_front());
      delivered++;
    end else begin
      check(in_pop == '0, "no pop without push");
    end
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_flit[i].head && owner[in_route[i]] != -1 && owner[in_route[i]] != i)
        blocked_heads++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (delivered == total);
    check(delivered == total, "all flits delivered");
    check(blocked_heads > 0, "wormhole blocking occurred");
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
