// tb_sched_grouped: the grouped (logic-sharing) scheduler at full size, 256
// packets in groups of K = 4. Leaves are loaded and cleared at random while
// the time advances through rollover and the horizons change. A reference
// model follows the sequential scan: in cycle j after a launch it reads entry
// j of every group from its own copy of the leaf state and keeps a running
// minimum per group, then takes the minimum over the groups and applies the
// horizon. Checks that launches come every K cycles and rotate over the
// ports, that each answer appears K + 1 cycles after its launch with the same
// slot, early flag and l, that answers are withheld exactly when the best
// packet is early beyond the horizon or nothing is queued, and clr_last.
module tb_sched_grouped;
  import rt_pkg::*;
  localparam int NPKT = 256, K = 4, NG = NPKT / K, AW = 8, PW = 3;
  localparam int INELIG = 1 << 20;
  logic clk = 0, rst_n = 0;
  time_t t = '0;
  time_t horizon [NPORTS];
  logic wr_en = 0, clr_en = 0, clr_last;
  logic [AW-1:0] wr_addr = '0, clr_addr = '0;
  pmask_t wr_mask = '0;
  time_t wr_l = '0, wr_ld = '0;
  logic [PW-1:0] clr_port = '0;
  logic launch_valid, res_valid, res_early;
  logic [PW-1:0] launch_port, res_port;
  logic [AW-1:0] res_addr;
  time_t res_l;
  int checks = 0, failures = 0;

  pmask_t m_mask [NPKT];
  int     m_l [NPKT], m_d [NPKT];   // unwrapped
  int     tt;
  typedef struct { int due; bit v; int port; int addr; bit early; int l; } exp_t;
  exp_t pipe [$];
  int launches [NPORTS];
  int early_wins = 0, withheld = 0, ontime_wins = 0;
  // model of the operation in flight
  bit op_on = 0; int op_j = 0, op_port = 0, op_tt = 0, exp_port = 0;
  int bk [NG], ba [NG], bl [NG];

  sched_grouped #(.NPKT(NPKT), .K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int mkey(int i, int p, int now);
    if (!m_mask[i][p]) return INELIG;
    if (m_l[i] > now)  return 1000 + (m_l[i] - now);
    return m_l[i] + m_d[i] - now;
  endfunction

  initial begin
    for (int i = 0; i < NPKT; i++) begin m_mask[i] = '0; m_l[i] = 0; m_d[i] = 0; end
    for (int p = 0; p < NPORTS; p++) begin horizon[p] = time_t'(p * 3); launches[p] = 0; end
    tt = 250;
    t = time_t'(tt);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // (1) answers due in this cycle
      if (pipe.size() != 0 && pipe[0].due == c) begin
        exp_t e; e = pipe.pop_front();
        check(res_valid == e.v, $sformatf("cycle %0d port %0d valid %0b exp %0b", c, e.port, res_valid, e.v));
        if (e.v) begin
          check(int'(res_port) == e.port, "result port");
          check(int'(res_addr) == e.addr, $sformatf("winner %0d exp %0d", res_addr, e.addr));
          check(res_early == e.early, "early flag");
          check(res_l == time_t'(e.l), "logical arrival time");
          if (e.early) early_wins++; else ontime_wins++;
        end else withheld++;
      end else check(!res_valid, $sformatf("cycle %0d unexpected answer", c));
      // (2) time
      if (c % 20 == 19) begin tt++; t = time_t'(tt); end
      // (3) finish the scan: minimum over groups, horizon check
      if (op_on && op_j == K) begin
        exp_t e; int best, bg;
        best = bk[0]; bg = 0;
        for (int g = 1; g < NG; g++) if (bk[g] < best) begin best = bk[g]; bg = g; end
        e.due = c + 1; e.port = op_port; e.addr = ba[bg]; e.l = bl[bg];
        e.early = best >= 1000 && best < INELIG;
        e.v = best < INELIG && (!e.early || (best - 1000) <= int'(horizon[op_port]));
        pipe.push_back(e);
        op_on = 0;
      end
      // (4) launches
      check(launch_valid == (c % K == 0), $sformatf("cycle %0d launch %0b", c, launch_valid));
      if (launch_valid) begin
        check(int'(launch_port) == exp_port, "launch rotation");
        exp_port = (exp_port + 1) % NPORTS;
        launches[launch_port]++;
        op_on = 1; op_j = 0; op_port = int'(launch_port); op_tt = tt;
      end
      // (5) one entry of every group is read in this cycle
      if (op_on) begin
        for (int g = 0; g < NG; g++) begin
          int i, k;
          i = g * K + op_j;
          k = mkey(i, op_port, op_tt);
          if (op_j == 0 || k < bk[g]) begin bk[g] = k; ba[g] = i; bl[g] = m_l[i]; end
        end
        op_j++;
      end
      // (6) next stimulus: a heavy random load, then a sparse early one
      wr_en = 0; clr_en = 0;
      begin
        int xa; xa = -1;
        for (int i = 0; i < NPKT; i++)
          if (xa < 0 && m_mask[i] != '0 && m_l[i] + m_d[i] - tt <= 2) xa = i;
        if (xa >= 0) begin
          int p; p = 0;
          while (!m_mask[xa][p]) p++;
          clr_en = 1; clr_addr = AW'(xa); clr_port = PW'(p); #1;
          check(clr_last == ((m_mask[xa] & ~(pmask_t'(1) << p)) == '0), "clr_last");
          m_mask[xa][p] = 1'b0;
        end else if ($urandom % (c < 10000 ? 3 : 40) == 0) begin
          int a; a = $urandom % NPKT;
          if (m_mask[a] == '0) begin
            int d, off;
            d = 3 + $urandom % 38; off = int'($urandom % 60) - 20;
            if (off < 3 - d) off = 3 - d;
            if (c >= 10000) off = 1 + $urandom % 10;   // sparse, mostly early traffic
            wr_en = 1; wr_addr = AW'(a); wr_mask = pmask_t'(1 + $urandom % 31);
            m_mask[a] = wr_mask; m_l[a] = tt + off; m_d[a] = d;
            wr_l = time_t'(m_l[a]); wr_ld = time_t'(m_l[a] + d);
          end else begin
            int p; p = $urandom % NPORTS;
            clr_en = 1; clr_addr = AW'(a); clr_port = PW'(p); #1;
            check(clr_last == ((m_mask[a] & ~(pmask_t'(1) << p)) == '0), "clr_last");
            m_mask[a] = m_mask[a] & ~(pmask_t'(1) << p);
          end
        end
      end
      // (7) horizons
      if (c % 500 == 499) horizon[$urandom % NPORTS] = time_t'($urandom % 8);
    end
    for (int p = 0; p < NPORTS; p++)
      check(launches[p] >= 20000 / K / NPORTS - 1, $sformatf("port %0d launched %0d times", p, launches[p]));
    check(early_wins > 0 && ontime_wins > 0 && withheld > 0, $sformatf("cases: early %0d on-time %0d withheld %0d", early_wins, ontime_wins, withheld));
    $display("answers: on-time %0d, early %0d, withheld %0d", ontime_wins, early_wins, withheld);
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
