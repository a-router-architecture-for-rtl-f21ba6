// tb_rt_router_grouped: the same end-to-end test as tb_rt_router, run on the
// router built with the logic-sharing scheduler (SCHED_K = 4: 64 groups of
// four leaves, each scanned by one comparator). Each port then gets a
// scheduling answer every 20 cycles instead of every 5; the test shows that
// all deadlines, latencies and mechanisms still hold.
//
// The +x output is looped back into the -x input and the +y output into the
// -y input, so a packet can cross the router three times, as in a multi-hop
// route: injection -> +x -> (-x in) -> +y -> (-y in) -> reception. The
// testbench plays the local processor (control writes, both injection ports,
// the reception port with flit acknowledgements) and a neighbour that sends
// time-constrained packets into the +x input and drains the -x and -y
// outputs.
//
// Parts:
//  1. best-effort wormhole packets over the three-hop loop: payload intact,
//     offsets stepped to zero, latency linear in length (one cycle per byte);
//  2. a time-constrained connection over two hops (table lookup, id
//     rewrite, deadline l+d added at each hop) ending in a multicast to the
//     reception port and the -y link;
//  3. a long periodic connection (more packets than slots, across clock
//     rollover), mixed with best-effort traffic and a backlog on the -y link
//     fed from two sources, with every packet checked against its deadline;
//  4. early packets: held with horizon 0, sent early within a horizon;
//  5. a packet for an unconfigured connection is dropped.
// Counted mechanisms, each required to occur: wormhole stall on a missing
// acknowledgement, flit-level pre-emption, early packet sent within the
// horizon, early packet held back, multicast, clock rollover, slot reuse,
// drop, back-to-back packets at full link rate.
module tb_rt_router_grouped;
  import rt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] link_in_data [4];
  logic link_in_strobe [4], link_in_vc [4], link_in_ack [4];
  logic [7:0] inj_be_data = 0, inj_tc_data;
  logic inj_be_strobe = 0, inj_be_ack, inj_tc_strobe;
  logic [7:0] tx_data [NPORTS];
  logic tx_strobe [NPORTS], tx_vc [NPORTS], tx_ack [NPORTS];
  logic ctrl_valid = 0;
  logic [2:0] ctrl_sel = 0;
  logic [7:0] ctrl_data = 0;
  time_t rt_time;
  int checks = 0, failures = 0;
  int cyc = 0;

  rt_router #(.SCHED_K(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- wiring: loopbacks and the external neighbour ----------------
  logic [7:0] nb_data;          // neighbour driving the +x input (port 1)
  logic nb_strobe;
  logic rx_ack0 = 0, hold_ack0 = 0;
  always_comb begin
    link_in_data[0] = nb_data;    link_in_strobe[0] = nb_strobe;    link_in_vc[0] = VC_TC;
    link_in_data[1] = tx_data[1]; link_in_strobe[1] = tx_strobe[1]; link_in_vc[1] = tx_vc[1];
    link_in_data[2] = 8'd0;       link_in_strobe[2] = 1'b0;         link_in_vc[2] = VC_BE;
    link_in_data[3] = tx_data[3]; link_in_strobe[3] = tx_strobe[3]; link_in_vc[3] = tx_vc[3];
    tx_ack[0] = rx_ack0;
    tx_ack[1] = link_in_ack[1];
    tx_ack[2] = 1'b0;
    tx_ack[3] = link_in_ack[3];
    tx_ack[4] = 1'b0;
  end

  // ---------------- counters of mechanisms ----------------
  int n_stall = 0, n_preempt = 0, n_early_sent = 0, n_early_held = 0, n_mcast = 0;
  int n_rollover = 0, n_reuse = 0, n_drop = 0, n_b2b = 0;
  time_t t_prev = '0;
  bit slot_used [256];
  logic m_pre [NPORTS], m_early [NPORTS], m_stall [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_mon
    assign m_pre[p]   = dut.g_out[p].u_out.ev_preempt;
    assign m_early[p] = dut.g_out[p].u_out.ev_early;
    assign m_stall[p] = dut.g_out[p].u_out.bcount != 0 && dut.g_out[p].u_out.bidx == 0 &&
                        dut.g_out[p].u_out.credits == 0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (m_pre[p]) n_preempt++;
      if (m_early[p]) n_early_sent++;
      if (m_stall[p]) n_stall++;
    end
    if (rt_time == 8'd0 && t_prev == 8'd255) n_rollover++;
    t_prev = rt_time;
    if (dut.pool_pop) begin
      if (slot_used[dut.pool_addr]) n_reuse++;
      slot_used[dut.pool_addr] = 1;
    end
  end

  // ---------------- reception port: best-effort and time-constrained ----------------
  logic [7:0] rx_be [$];
  int rx_be_last_cycle = 0;
  int be_flit_fill = 0, be_unacked = 0;
  typedef struct { logic [7:0] b [TC_BYTES]; int cyc; time_t t; } tcpkt_t;
  tcpkt_t rx_tc [NPORTS][$];
  tcpkt_t cur [NPORTS];
  int cur_n [NPORTS];
  int be_len0 = -1, be_pos0 = 0;
  always @(posedge clk) if (rst_n) begin
    rx_ack0 <= 0;
    for (int p = 0; p < NPORTS; p++)
      if (tx_strobe[p] && tx_vc[p] == VC_TC) begin
        cur[p].b[cur_n[p]] = tx_data[p];
        cur_n[p]++;
        if (cur_n[p] == TC_BYTES) begin
          cur[p].cyc = cyc; cur[p].t = rt_time;
          rx_tc[p].push_back(cur[p]); cur_n[p] = 0;
        end
      end
    if (tx_strobe[0] && tx_vc[0] == VC_BE) begin
      rx_be.push_back(tx_data[0]);
      rx_be_last_cycle = cyc;
      // flit framing on the reception side: 5 bytes, or the packet's end
      if (be_pos0 == 2) be_len0 = int'(tx_data[0]);
      be_flit_fill++;
      if (be_flit_fill == 5 || (be_pos0 >= 2 && be_pos0 == be_len0 + 2)) begin
        be_flit_fill = 0; be_unacked++;
      end
      be_pos0 = (be_pos0 >= 2 && be_pos0 == be_len0 + 2) ? 0 : be_pos0 + 1;
    end
    if (be_unacked > 0 && !hold_ack0) begin be_unacked--; rx_ack0 <= 1; end
  end

  // ---------------- processor tasks ----------------
  int be_credits = 2;
  always @(posedge clk) if (rst_n && inj_be_ack) be_credits++;

  task automatic ctrl(input logic [2:0] sel, input logic [7:0] d);
    @(negedge clk); ctrl_valid = 1; ctrl_sel = sel; ctrl_data = d;
    @(negedge clk); ctrl_valid = 0;
  endtask
  task automatic set_conn(input logic [7:0] in_id, out_id, d, mask);
    ctrl(0, in_id); ctrl(1, out_id); ctrl(2, d); ctrl(3, mask);
  endtask
  task automatic set_horizon(input logic [7:0] mask, h);
    ctrl(4, mask); ctrl(5, h);
  endtask

  // send a best-effort packet through the injection port, flit by flit
  task automatic send_be(input logic [7:0] pk [$]);
    for (int b = 0; b < pk.size(); b++) begin
      if (b % 5 == 0) begin
        @(negedge clk);
        while (be_credits == 0) begin inj_be_strobe = 0; @(negedge clk); end
        be_credits--;
      end else @(negedge clk);
      inj_be_strobe = 1; inj_be_data = pk[b];
    end
    @(negedge clk); inj_be_strobe = 0;
  endtask

  // time-constrained byte streams: a packet is queued whole and sent one
  // byte per cycle, back to back with the next queued packet
  logic [7:0] tcq [$], nbq [$];
  always @(negedge clk) begin
    inj_tc_strobe = tcq.size() != 0;
    if (tcq.size() != 0) inj_tc_data = tcq.pop_front();
    nb_strobe = nbq.size() != 0;
    if (nbq.size() != 0) nb_data = nbq.pop_front();
  end
  task automatic send_tc(input logic [7:0] id, input time_t l, input logic [7:0] tag);
    while (tcq.size() > 1) @(negedge clk);
    for (int b = 0; b < TC_BYTES; b++)
      tcq.push_back((b == 0) ? id : (b == 1) ? l : (b == 2) ? tag : 8'(b * 7 + tag));
  endtask
  task automatic send_tc_nb(input logic [7:0] id, input time_t l, input logic [7:0] tag);
    while (nbq.size() > 1) @(negedge clk);
    for (int b = 0; b < TC_BYTES; b++)
      nbq.push_back((b == 0) ? id : (b == 1) ? l : (b == 2) ? tag : 8'(b * 7 + tag));
  endtask

  function automatic bit body_ok(tcpkt_t p, logic [7:0] tag);
    for (int b = 3; b < TC_BYTES; b++) if (p.b[b] != 8'(b * 7 + tag)) return 0;
    return p.b[2] == tag;
  endfunction

  // ---------------- the test ----------------
  int lat [3];
  initial begin
    for (int p = 0; p < NPORTS; p++) cur_n[p] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (dut.pool_ready);

    // ---- 1. best-effort packets over the three-hop loop ----
    begin
      int sizes [3] = '{10, 30, 60};
      for (int k = 0; k < 3; k++) begin
        logic [7:0] pk [$];
        int t0, n0;
        pk = {8'd1, 8'd1, 8'(sizes[k] - 3)};
        for (int i = 3; i < sizes[k]; i++) pk.push_back(8'(i + k));
        n0 = rx_be.size();
        @(negedge clk); t0 = cyc;
        send_be(pk);
        wait (rx_be.size() == n0 + sizes[k]);
        lat[k] = rx_be_last_cycle - t0;
        check(rx_be[n0] == 8'd0 && rx_be[n0+1] == 8'd0, "offsets reach zero at the destination");
        check(rx_be[n0+2] == 8'(sizes[k] - 3), "length byte");
        for (int i = 3; i < sizes[k]; i++) check(rx_be[n0+i] == 8'(i + k), "best-effort payload");
        $display("best-effort %0d-byte packet over three hops: %0d cycles", sizes[k], lat[k]);
        repeat (20) @(negedge clk);
      end
      check(lat[1] - lat[0] == 20 && lat[2] - lat[1] == 30, "latency grows one cycle per byte");
      for (int k = 0; k < 3; k++) check(lat[k] == sizes[k] + 22, $sformatf("three-hop latency %0d for %0d bytes (expected b + 22)", lat[k], sizes[k]));
    end

    // ---- 2. two-hop time-constrained connection ending in a multicast ----
    set_conn(8'd5, 8'd6, 8'd4, 8'b00010);     // injection: id 5 -> +x, d = 4
    set_conn(8'd6, 8'd7, 8'd3, 8'b10001);     // after loop: id 6 -> reception and -y, d = 3
    begin
      time_t l0;
      l0 = rt_time;
      send_tc(8'd5, l0, 8'h33);
      wait (rx_tc[0].size() == 1 && rx_tc[4].size() == 1);
      for (int p = 0; p < NPORTS; p += 4) begin
        check(rx_tc[p][0].b[0] == 8'd7, "connection id rewritten at both hops");
        check(rx_tc[p][0].b[1] == 8'(l0 + 7), "deadline l+d accumulated over two hops");
        check(body_ok(rx_tc[p][0], 8'h33), "time-constrained payload");
        check(time_t'(rx_tc[p][0].t - l0) <= 8'd7, "delivered by the end-to-end deadline");
      end
      n_mcast++;
      rx_tc[0].delete(); rx_tc[4].delete();
    end

    // ---- 5. unconfigured connection is dropped ----
    begin
      int n;
      n = 0;
      send_tc(8'd200, rt_time, 8'h44);
      repeat (200) @(negedge clk);
      n = rx_tc[0].size() + rx_tc[2].size() + rx_tc[4].size();
      check(n == 0, "packet of an unconfigured connection not forwarded");
      if (n == 0) n_drop++;
    end

    // ---- 4. early packets: held with h = 0, sent early within h ----
    set_conn(8'd20, 8'd21, 8'd10, 8'b00001);  // injection straight to reception
    begin
      time_t l1;
      l1 = rt_time + 8'd5;
      send_tc(8'd20, l1, 8'h55);               // horizon of port 0 is 0
      repeat (60) @(negedge clk);
      check(rx_tc[0].size() == 0, "early packet held back with horizon 0");
      if (rx_tc[0].size() == 0) n_early_held++;
      wait (rx_tc[0].size() == 1);
      check(rx_tc[0][0].t == l1 || rx_tc[0][0].t == l1 + 8'd1, "sent when its logical arrival time comes");
      check(body_ok(rx_tc[0][0], 8'h55), "payload of the early packet");
      rx_tc[0].delete();
      set_horizon(8'b00001, 8'd6);
      l1 = rt_time + 8'd5;
      send_tc(8'd20, l1, 8'h56);
      wait (rx_tc[0].size() == 1);
      $display("early packet with l=%0d and horizon 6 completed at t=%0d", l1, rx_tc[0][0].t);
      check(time_t'(l1 - rx_tc[0][0].t) >= 8'd2 && time_t'(l1 - rx_tc[0][0].t) < 8'd128, "sent ahead of its logical arrival time within the horizon");
      rx_tc[0].delete();
      set_horizon(8'b00001, 8'd0);
    end

    // ---- 3. periodic traffic, best-effort mix, backlog, rollover, reuse ----
    set_conn(8'd30, 8'd31, 8'd6, 8'b10000);   // injection -> -y link, d = 6
    set_conn(8'd40, 8'd41, 8'd6, 8'b10000);   // neighbour on +x input -> -y link, d = 6
    set_conn(8'd50, 8'd51, 8'd8, 8'b00010);   // injection -> +x ... loops back
    set_conn(8'd51, 8'd52, 8'd8, 8'b00001);   // ... then to reception, d = 8
    fork
      // periodic connections 50 (two hops, to reception) and 30 (to -y),
      // one packet every two ticks each, sharing the injection port
      begin
        time_t l;
        l = rt_time + 8'd2;
        for (int i = 0; i < 150; i++) begin
          while (time_t'(l - rt_time) < 8'd128 && time_t'(l - rt_time) > 8'd1) @(negedge clk);
          send_tc(8'd50, l, 8'(i));
          send_tc(8'd30, l + 8'd1, 8'(i));
          l = l + 8'd2;
        end
      end
      begin
        time_t l;
        l = rt_time + 8'd2;
        for (int i = 0; i < 150; i++) begin
          while (time_t'(l - rt_time) < 8'd128 && time_t'(l - rt_time) > 8'd1) @(negedge clk);
          send_tc_nb(8'd40, l, 8'(i + 100));
          l = l + 8'd2;
        end
      end
      // best-effort packets over the loop, with the reception acknowledgements
      // held now and then to stall the wormhole
      begin
        for (int i = 0; i < 40; i++) begin
          logic [7:0] pk [$];
          pk = {8'd1, 8'd1, 8'd37};
          for (int j = 0; j < 37; j++) pk.push_back(8'(j ^ i));
          send_be(pk);
          if (i % 8 == 3) begin hold_ack0 = 1; repeat (60) @(negedge clk); hold_ack0 = 0; end
        end
      end
    join
    repeat (600) @(negedge clk);
    // periodic connection: every packet in order, on time
    check(rx_tc[0].size() == 150, $sformatf("periodic packets received %0d", rx_tc[0].size()));
    for (int i = 0; i < rx_tc[0].size(); i++) begin
      check(rx_tc[0][i].b[0] == 8'd52 && body_ok(rx_tc[0][i], 8'(i)), $sformatf("periodic packet %0d", i));
      // deadline at the second hop: l + 16 (b[1] carries it); sent no later
      check(time_t'(rx_tc[0][i].b[1] - rx_tc[0][i].t) < 8'd128, $sformatf("packet %0d met its deadline", i));
    end
    // -y link: both sources, on time, back to back while backlogged
    check(rx_tc[4].size() == 300, $sformatf("-y packets %0d", rx_tc[4].size()));
    for (int i = 0; i < rx_tc[4].size(); i++) begin
      check(time_t'(rx_tc[4][i].b[1] - rx_tc[4][i].t) < 8'd128, $sformatf("-y packet %0d met its deadline", i));
      if (i > 0 && rx_tc[4][i].cyc - rx_tc[4][i-1].cyc == TC_BYTES) n_b2b++;
    end
    // best-effort: all bytes arrived
    check(rx_be.size() == 100 + 40 * 40, $sformatf("best-effort bytes %0d", rx_be.size()));

    $display("mechanisms: stall=%0d preempt=%0d early_sent=%0d early_held=%0d multicast=%0d rollover=%0d reuse=%0d drop=%0d back_to_back=%0d",
             n_stall, n_preempt, n_early_sent, n_early_held, n_mcast, n_rollover, n_reuse, n_drop, n_b2b);
    check(n_stall > 0, "wormhole stall occurred");
    check(n_preempt > 0, "flit-level pre-emption occurred");
    check(n_early_sent > 0, "early packet sent within horizon");
    check(n_early_held > 0, "early packet held");
    check(n_mcast > 0, "multicast");
    check(n_rollover > 0, "clock rollover");
    check(n_reuse > 0, "packet slot reuse");
    check(n_drop > 0, "drop of unconfigured connection");
    check(n_b2b > 20, "back-to-back packets at full link rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
