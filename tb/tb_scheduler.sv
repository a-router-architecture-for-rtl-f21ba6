// tb_scheduler: the shared comparator-tree scheduler at full size (256
// leaves, two pipeline stages). Leaves are loaded and cleared at random, the
// time advances with rollover and the horizons change, while a reference
// model searches all leaves directly for each launched operation. Checks that
// the rotating launches reach every port, that each answer appears exactly
// two cycles after its launch, and that it names the same packet (minimum
// key, lowest slot on ties), the same early flag and l, and is withheld when
// the best packet is early beyond the horizon. Also checks clr_last.
module tb_scheduler;
  import rt_pkg::*;
  localparam int NPKT = 256, AW = 8, PW = 3;
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
  int     tt;                       // unwrapped time
  typedef struct { bit v; int port; int addr; bit early; int l; } exp_t;
  exp_t pipe [$];
  int launches [NPORTS];
  int early_wins = 0, withheld = 0, ontime_wins = 0;

  scheduler #(.NPKT(NPKT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic exp_t model(int p);
    exp_t e; bit found; int bk; int ba;
    e.v = 0; found = 0; bk = 0; ba = 0; e.port = p; e.addr = 0; e.early = 0; e.l = 0;
    for (int i = 0; i < NPKT; i++) if (m_mask[i][p]) begin
      int k;
      if (m_l[i] > tt) k = 1000 + (m_l[i] - tt);
      else             k = m_l[i] + m_d[i] - tt;
      if (!found || k < bk) begin found = 1; bk = k; ba = i; end
    end
    if (found) begin
      e.addr = ba; e.early = (bk >= 1000); e.l = m_l[ba];
      e.v = !e.early || (bk - 1000) <= int'(horizon[p]);
    end
    return e;
  endfunction

  initial begin
    for (int i = 0; i < NPKT; i++) begin m_mask[i] = '0; m_l[i] = 0; m_d[i] = 0; end
    for (int p = 0; p < NPORTS; p++) horizon[p] = time_t'(p * 3);
    tt = 250;  // close to rollover
    t = time_t'(tt);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // (a) answer for the launch two cycles ago
      if (pipe.size() == 2) begin
        exp_t e; e = pipe.pop_front();
        check(res_valid == e.v, $sformatf("cycle %0d port %0d valid %0b exp %0b", c, e.port, res_valid, e.v));
        if (e.v) begin
          check(int'(res_port) == e.port, "result port");
          check(int'(res_addr) == e.addr, $sformatf("winner %0d exp %0d", res_addr, e.addr));
          check(res_early == e.early, "early flag");
          check(res_l == time_t'(e.l), "logical arrival time");
          if (e.early) early_wins++; else ontime_wins++;
        end else withheld++;
      end
      if (c % 20 == 19) begin tt++; t = time_t'(tt); end
      // (b) the operation launched in this cycle
      check(launch_valid, "launch every cycle");
      launches[launch_port]++;
      pipe.push_back(model(int'(launch_port)));
      // (c) next stimulus
      wr_en = 0; clr_en = 0;
      begin
        int xa; xa = -1;
        // a packet close to its deadline is cleared first, so every stored
        // packet stays inside the range the clock width can represent
        for (int i = 0; i < NPKT; i++)
          if (xa < 0 && m_mask[i] != '0 && m_l[i] + m_d[i] - tt <= 2) xa = i;
        if (xa >= 0) begin
          int p; p = 0;
          while (!m_mask[xa][p]) p++;
          clr_en = 1; clr_addr = AW'(xa); clr_port = PW'(p); #1;
          check(clr_last == ((m_mask[xa] & ~(pmask_t'(1) << p)) == '0), "clr_last");
          m_mask[xa][p] = 1'b0;
        end else if ($urandom % 3 == 0) begin
          int a; a = $urandom % NPKT;
          if (m_mask[a] == '0) begin
            int d, off;
            d = 3 + $urandom % 38; off = int'($urandom % 60) - 20;
            if (off < 3 - d) off = 3 - d;
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
      if (c % 500 == 499) horizon[$urandom % NPORTS] = time_t'($urandom % 8);
    end
    for (int p = 0; p < NPORTS; p++) check(launches[p] >= 3999, $sformatf("port %0d launched %0d times", p, launches[p]));
    check(early_wins > 0 && ontime_wins > 0 && withheld > 0, $sformatf("cases: early %0d on-time %0d withheld %0d", early_wins, ontime_wins, withheld));
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
