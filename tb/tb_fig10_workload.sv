// tb_fig10_workload: three time-constrained connections and a best-effort
// stream compete for one outgoing link (+x) whose horizon is 0. In units of
// 20-byte packet slots the connections have
//     connection 0: d = 8, I_min = 9
//     connection 1: d = 5, I_min = 7
//     connection 2: d = 3, I_min = 4
// and each has a continual backlog: packet i of connection c has logical
// arrival time l0 + i*I_min and is injected as soon as it is due. A
// best-effort source keeps the link saturated. Checks: no time-constrained
// packet starts before its logical arrival time (h = 0) and each finishes by
// its deadline l + d; each connection receives service in proportion to
// 1/I_min; best-effort traffic takes the remaining bandwidth, so the link is
// never idle once traffic flows. The byte counts per connection over the
// first 1000 cycles are printed for comparison with the original evaluation.
module tb_fig10_workload;
  import rt_pkg::*;
  localparam int RUN = 12000;    // cycles of measurement
  logic clk = 0, rst_n = 0;
  logic [7:0] link_in_data [4];
  logic link_in_strobe [4], link_in_vc [4], link_in_ack [4];
  logic [7:0] inj_be_data = 0, inj_tc_data = 0;
  logic inj_be_strobe = 0, inj_be_ack, inj_tc_strobe = 0;
  logic [7:0] tx_data [NPORTS];
  logic tx_strobe [NPORTS], tx_vc [NPORTS], tx_ack [NPORTS];
  logic ctrl_valid = 0;
  logic [2:0] ctrl_sel = 0;
  logic [7:0] ctrl_data = 0;
  time_t rt_time;
  int checks = 0, failures = 0, cyc = 0;

  rt_router dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int D [3] = '{8, 5, 3};
  int IMIN [3] = '{9, 7, 4};

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      link_in_data[i] = 8'd0; link_in_strobe[i] = 1'b0; link_in_vc[i] = 1'b0;
    end
  end

  // downstream of +x: consume flits and acknowledge them at once
  int fill = 0, pos = 0, blen = 0;
  logic ack1 = 0;
  always_comb for (int p = 0; p < NPORTS; p++) tx_ack[p] = (p == 1) ? ack1 : 1'b0;

  // measurement on +x
  int start_cyc = -1;
  int be_bytes = 0, be_1000 = 0, tc_bytes [3], tc_1000 [3], npk [3];
  int tcn = 0, idle = 0;
  logic [7:0] pk [TC_BYTES];
  int pk_first_t;
  always @(posedge clk) if (rst_n) begin
    ack1 <= 0;
    if (tx_strobe[1]) begin
      if (tx_vc[1] == VC_BE) begin
        if (start_cyc >= 0) be_bytes++;
        if (start_cyc >= 0 && cyc - start_cyc < 1000) be_1000++;
        if (pos == 2) blen = int'(tx_data[1]);
        fill++;
        if (fill == 5 || (pos >= 2 && pos == blen + 2)) begin fill = 0; ack1 <= 1; end
        pos = (pos >= 2 && pos == blen + 2) ? 0 : pos + 1;
      end else begin
        if (tcn == 0) pk_first_t = int'(rt_time);
        pk[tcn] = tx_data[1];
        tcn++;
        if (tcn == TC_BYTES) begin
          int c; time_t l;
          tcn = 0;
          c = int'(pk[2]);          // connection number carried in the payload
          l = pk[1] - time_t'(D[c]);   // outgoing header holds l + d
          check(time_t'(time_t'(pk_first_t) - l) < 8'd128, $sformatf("conn %0d packet started at t=%0d before l=%0d", c, pk_first_t, l));
          check(time_t'(pk[1] - rt_time) < 8'd128, $sformatf("conn %0d packet finished at t=%0d after deadline %0d", c, rt_time, pk[1]));
          npk[c]++;
          if (start_cyc >= 0) tc_bytes[c] += TC_BYTES;
          if (start_cyc >= 0 && cyc - start_cyc < 1000) tc_1000[c] += TC_BYTES;
        end
      end
    end else if (start_cyc >= 0) idle++;
  end

  task automatic ctrl(input logic [2:0] sel, input logic [7:0] d);
    @(negedge clk); ctrl_valid = 1; ctrl_sel = sel; ctrl_data = d;
    @(negedge clk); ctrl_valid = 0;
  endtask

  // byte stream of the time-constrained injection port
  logic [7:0] tcq [$];
  always @(negedge clk) begin
    inj_tc_strobe = tcq.size() != 0;
    if (tcq.size() != 0) inj_tc_data = tcq.pop_front();
  end

  // best-effort source: 100-byte packets to +x, credit flow control
  int credits = 2;
  always @(posedge clk) if (rst_n && inj_be_ack) credits++;
  initial begin
    wait (start_cyc >= 0);
    forever begin
      logic [7:0] b [$];
      b = {8'd1, 8'd0, 8'd97};
      for (int i = 0; i < 97; i++) b.push_back(8'(i));
      for (int i = 0; i < b.size(); i++) begin
        if (i % 5 == 0) begin
          @(negedge clk);
          while (credits == 0) begin inj_be_strobe = 0; @(negedge clk); end
          credits--;
        end else @(negedge clk);
        inj_be_strobe = 1; inj_be_data = b[i];
      end
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) begin tc_bytes[c] = 0; tc_1000[c] = 0; npk[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (dut.pool_ready);
    for (int c = 0; c < 3; c++) begin
      ctrl(0, 8'(c)); ctrl(1, 8'(c + 10)); ctrl(2, 8'(D[c])); ctrl(3, 8'b00010);
    end
    ctrl(4, 8'b00010); ctrl(5, 8'd0);            // horizon 0 on +x
    @(negedge clk);
    start_cyc = cyc;
    fork
      begin
        time_t l [3];
        int next [3];
        for (int c = 0; c < 3; c++) l[c] = rt_time + 8'd1;
        while (cyc - start_cyc < RUN) begin
          @(negedge clk);
          for (int c = 0; c < 3; c++)
            if (time_t'(l[c] - rt_time) > 8'd128 || time_t'(l[c] - rt_time) <= 8'd1) begin
              if (tcq.size() <= 1) begin
                for (int b = 0; b < TC_BYTES; b++)
                  tcq.push_back(b == 0 ? 8'(c) : b == 1 ? l[c] : b == 2 ? 8'(c) : 8'(b));
                l[c] = l[c] + time_t'(IMIN[c]);
              end
            end
        end
      end
    join
    begin
      int ticks;
      ticks = RUN / TICK_CYC;
      $display("first 1000 cycles: best-effort %0d bytes, connection 0 %0d, connection 1 %0d, connection 2 %0d",
               be_1000, tc_1000[0], tc_1000[1], tc_1000[2]);
      $display("%0d cycles: best-effort %0d bytes, connections %0d/%0d/%0d packets, idle %0d cycles",
               RUN, be_bytes, npk[0], npk[1], npk[2], idle);
      for (int c = 0; c < 3; c++)
        check(npk[c] >= ticks / IMIN[c] - 2 && npk[c] <= ticks / IMIN[c] + 2,
              $sformatf("connection %0d served %0d packets, expected about %0d", c, npk[c], ticks / IMIN[c]));
      check(be_bytes + (tc_bytes[0] + tc_bytes[1] + tc_bytes[2]) >= RUN - 200, "link kept busy");
      check(be_bytes > RUN * 4 / 10, "best-effort takes the remaining bandwidth");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TICK_CYC = 20;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
