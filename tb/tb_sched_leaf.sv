// tb_sched_leaf: loads random packet state into one scheduler leaf and checks
// its sorting key for every port at random times, including times on both
// sides of clock rollover, against a reference computed from unwrapped
// integer times. Also checks clearing of port bits.
module tb_sched_leaf;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  pmask_t wr_mask = '0, clr = '0, port_sel = '0, mask;
  time_t wr_l = '0, wr_ld = '0, t = '0, l;
  skey_t key;
  int checks = 0, failures = 0;

  sched_leaf dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(mask == '0, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      int tt, ll, dd, off, m;
      // unwrapped times: the packet's l lies in [t-d, t+106], d <= 40
      tt  = 1000 + $urandom % 2000;
      dd  = $urandom % 41;
      off = int'($urandom % 147) - 40;     // l - t
      if (off < -dd) off = -dd;
      ll  = tt + off;
      m   = 1 + $urandom % 31;
      @(negedge clk);
      we = 1; wr_mask = pmask_t'(m); wr_l = time_t'(ll); wr_ld = time_t'(ll + dd);
      @(negedge clk);
      we = 0;
      t = time_t'(tt);
      for (int p = 0; p < NPORTS; p++) begin
        port_sel = pmask_t'(1) << p; #1;
        check(key.inelig == !m[p], "eligibility from mask");
        if (m[p]) begin
          if (ll > tt) check(key.early && key.val == time_t'(ll - tt), $sformatf("early key l=%0d t=%0d", ll, tt));
          else         check(!key.early && key.val == time_t'(ll + dd - tt), $sformatf("on-time key l=%0d d=%0d t=%0d", ll, dd, tt));
        end
      end
      // clear one port
      begin
        int p; p = $urandom % NPORTS;
        @(negedge clk); clr = pmask_t'(1) << p;
        @(negedge clk); clr = '0;
        check(mask == (pmask_t'(m) & ~(pmask_t'(1) << p)), "clear one port bit");
      end
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
