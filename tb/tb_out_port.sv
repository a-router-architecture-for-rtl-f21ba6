// tb_out_port: one output port between a scheduler model, a packet-memory
// model and a downstream receiver that returns flit acknowledgements.
// Phase A: a continuous best-effort stream with an on-time time-constrained
// packet: the packet must go out as 20 consecutive bytes, pre-empting the
// best-effort flit in progress. Phase B: an early packet within the horizon
// with the best-effort stream still running: it must wait until the
// best-effort bytes stop or its logical arrival time comes. Throughout: both
// byte streams arrive complete and in order, at most two flits are ever
// unacknowledged downstream, and a stale scheduler answer offered right
// after a packet was read is ignored.
module tb_out_port;
  import rt_pkg::*;
  localparam int AW = 8, PW = 3;
  logic clk = 0, rst_n = 0;
  logic [PW-1:0] my_port = PW'(1);
  time_t t = '0;
  logic launch_valid = 0, res_valid = 0;
  logic [PW-1:0] launch_port = '0, res_port = '0;
  logic [AW-1:0] res_addr = '0;
  time_t res_l = '0;
  logic rd_req, rd_gnt = 0, rd_valid = 0;
  logic [AW:0] rd_addr;
  chunk_t rd_data = '0;
  logic be_push = 0, be_space;
  flit_t be_flit = '0;
  logic [7:0] tx_data;
  logic tx_strobe, tx_vc, tx_ack = 0;
  logic ev_preempt, ev_early;
  int checks = 0, failures = 0;

  out_port #(.NPKT(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  chunk_t mem [512];
  logic [7:0] exp_tc [$], exp_be [$];
  int pkt_q [$];            // slots the scheduler model offers next
  time_t pkt_l [256];
  int cyc = 0, be_outstanding = 0, be_in_flit = 0, be_flit_len [$];
  int tc_first [$], tc_last [$], tc_run = 0, tc_start = 0;
  int preempts = 0, last_be_cycle = -1, stale_offered = 0;
  bit be_stream = 0, fast_ack = 0, phase_a = 1;

  // ---- scheduler model: rotating launches, answer two cycles later ----
  int lp = 0;
  int pend [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    res_valid <= 0;
    if (pend.size() == 3) begin
      int a; a = pend.pop_front();
      if (a >= 0) begin res_valid <= 1; res_port <= my_port; res_addr <= AW'(a); res_l <= pkt_l[a]; end
    end
    launch_valid <= 1; launch_port <= PW'(lp);
    pend.push_back((lp == 1 && pkt_q.size() != 0) ? pkt_q[0] : -1);
    lp = (lp + 1) % 5;
  end

  // ---- memory model: grant after a short wait, data one cycle later ----
  always @(posedge clk) if (rst_n) begin
    rd_valid <= rd_gnt;
    rd_data  <= mem[rd_addr];
    rd_gnt   <= 0;
    if (rd_req && !rd_gnt && ($urandom % 2 == 0)) begin
      rd_gnt <= 1;
      if (rd_addr[0]) begin
        // the packet is now read: the scheduler will not offer it again,
        // but an answer already in its pipeline may still name it
        check(pkt_q.size() != 0 && rd_addr[AW:1] == AW'(pkt_q[0]), "reads the offered packet");
        void'(pkt_q.pop_front());
        pend[1] = int'(rd_addr[AW:1]);   // stale answer, launched before the read
        stale_offered++;
      end
    end
  end

  // ---- downstream receiver ----
  always @(posedge clk) if (rst_n) begin
    tx_ack <= 0;
    if (tx_strobe) begin
      if (tx_vc == VC_TC) begin
        check(exp_tc.size() != 0 && tx_data == exp_tc[0], "time-constrained byte in order");
        void'(exp_tc.pop_front());
        if (tc_run == 0) tc_start = cyc;
        tc_run++;
        if (tc_run == TC_BYTES) begin tc_first.push_back(tc_start); tc_last.push_back(cyc); tc_run = 0; end
      end else begin
        check(exp_be.size() != 0 && tx_data == exp_be[0], "best-effort byte in order");
        void'(exp_be.pop_front());
        if (be_in_flit == 0) begin
          be_outstanding++;
          check(be_outstanding <= 2, "at most two unacknowledged flits");
        end
        if (phase_a && tc_run != 0) check(0, "best-effort byte inside an on-time packet");
        be_in_flit++;
        if (be_in_flit == be_flit_len[0]) begin be_in_flit = 0; void'(be_flit_len.pop_front()); end
        last_be_cycle = cyc;
      end
    end
    if (ev_preempt) preempts++;
    // consume a buffered flit now and then and acknowledge it
    if (be_outstanding > (be_in_flit != 0 ? 1 : 0) && (fast_ack || $urandom % 3 == 0)) begin
      be_outstanding--; tx_ack <= 1;
    end
  end

  // ---- best-effort flit source ----
  always @(negedge clk) begin
    be_push = 0;
    if (be_stream && be_space) begin
      flit_t f;
      f = '0; f.nbytes = 3'd5; f.head = 0; f.tail = 0;
      for (int b = 0; b < 5; b++) begin f.data[8*b +: 8] = 8'($urandom); exp_be.push_back(f.data[8*b +: 8]); end
      be_flit_len.push_back(5);
      be_flit = f; be_push = 1;
    end
  end

  task automatic add_packet(int slot, time_t l);
    chunk_t c0, c1;
    c0 = {$urandom, $urandom, $urandom}; c1 = {$urandom, $urandom, $urandom};
    mem[{AW'(slot), 1'b0}] = c0; mem[{AW'(slot), 1'b1}] = c1;
    for (int b = 0; b < 10; b++) exp_tc.push_back(c0[8*b +: 8]);
    for (int b = 0; b < 10; b++) exp_tc.push_back(c1[8*b +: 8]);
    pkt_l[slot] = l;
    pkt_q.push_back(slot);
  endtask

  initial begin
    t = 8'd100;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Phase A: best-effort stream, then an on-time packet (l < t)
    be_stream = 1;
    repeat (40) @(negedge clk);
    add_packet(7, 8'd90);
    add_packet(9, 8'd100);
    wait (tc_last.size() == 2);
    for (int i = 0; i < 2; i++)
      check(tc_last[i] - tc_first[i] == TC_BYTES - 1, $sformatf("on-time packet %0d sent in %0d cycles", i, tc_last[i] - tc_first[i] + 1));
    check(preempts > 0, "best-effort traffic pre-empted");
    // Phase B: early packet (l = t + 3) while best-effort keeps flowing;
    // acknowledgements come at once, so best-effort bytes never pause
    phase_a = 0; fast_ack = 1;
    repeat (20) @(negedge clk);
    add_packet(12, 8'd103);
    repeat (200) @(negedge clk);
    check(tc_last.size() == 2, "early packet waits behind best-effort traffic");
    be_stream = 0;
    wait (exp_be.size() == 0);
    wait (tc_last.size() == 3);
    check(tc_first[2] >= last_be_cycle, "early packet sent once best-effort traffic stopped");
    // Phase C: early packet becomes on-time while best-effort flows
    be_stream = 1;
    repeat (20) @(negedge clk);
    add_packet(13, 8'd105);
    repeat (100) @(negedge clk);
    check(tc_last.size() == 3, "early packet still waiting");
    t = 8'd105;
    repeat (60) @(negedge clk);
    check(tc_last.size() == 4 && tc_last[3] - tc_first[3] == TC_BYTES - 1, "packet sent at once when on-time");
    be_stream = 0;
    wait (exp_be.size() == 0 && exp_tc.size() == 0);
    check(stale_offered >= 4, "stale answers were offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
