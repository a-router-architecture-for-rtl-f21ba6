// tb_mem_ctrl: the packet-memory controller with the real connection table,
// idle-address pool and packet memory around it, and a reference model of the
// scheduler leaves. Five writers store time-constrained packets (unicast,
// multicast and one unconfigured connection) while five readers fetch every
// packet queued for them. Checks: the stored header carries the outgoing
// connection id and the deadline l+d; the leaf is loaded only with the second
// chunk and with the table's mask, l and l+d; a read returns the stored chunk
// one cycle after its grant; a slot returns to the pool only after its last
// port has read it; unconfigured packets are not stored; no requester waits
// more than ten grants.
module tb_mem_ctrl;
  import rt_pkg::*;
  localparam int NPKT = 256, AW = 8, PW = 3;
  logic clk = 0, rst_n = 0;
  logic   wr_req [NPORTS], wr_first [NPORTS];
  chunk_t wr_chunk [NPORTS];
  pmask_t wr_gnt, rd_gnt, rd_valid;
  logic   rd_req [NPORTS];
  logic [AW:0] rd_addr [NPORTS];
  chunk_t rd_data;
  logic [7:0] ct_id;
  conn_entry_t ct_entry;
  logic pool_ready, pool_empty, pool_pop, pool_push;
  logic [AW-1:0] pool_addr, pool_push_addr;
  logic mem_en, mem_we;
  logic [AW:0] mem_addr;
  chunk_t mem_wdata, mem_rdata;
  logic leaf_we, leaf_clr, leaf_clr_last;
  logic [AW-1:0] leaf_addr, leaf_clr_addr;
  pmask_t leaf_mask;
  time_t leaf_l, leaf_ld;
  logic [PW-1:0] leaf_clr_port;
  logic ct_we = 0;
  logic [7:0] ct_wid = 0;
  conn_entry_t ct_wentry = '0;
  int checks = 0, failures = 0;

  mem_ctrl dut (.*);
  conn_table u_ct (.clk, .rst_n, .wr_en(ct_we), .wr_id(ct_wid), .wr_entry(ct_wentry), .rd_id(ct_id), .rd_entry(ct_entry));
  idle_pool u_pool (.clk, .rst_n, .ready(pool_ready), .empty(pool_empty), .pop(pool_pop), .pop_addr(pool_addr),
                    .push(pool_push), .push_addr(pool_push_addr));
  packet_memory u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  conn_entry_t ctab [8];
  pmask_t m_mask [NPKT];                // leaf model
  chunk_t m_c0 [NPKT], m_c1 [NPKT];     // expected memory content
  int     todo [NPORTS][$];             // slots each reader must fetch
  int     in_use [NPKT];
  int     stored = 0, dropped_sent = 0, reads_done = 0, frees = 0, mcast = 0;
  chunk_t pend_c1 [NPORTS];

  assign leaf_clr_last = (m_mask[leaf_clr_addr] & ~(pmask_t'(1) << leaf_clr_port)) == '0;

  // leaf, pool and grant observation
  always @(posedge clk) if (rst_n) begin
    if (leaf_we) begin
      int s; s = int'(leaf_addr);
      check(m_mask[s] == '0, "leaf loaded into a free slot");
      m_mask[s] = leaf_mask;
      stored++;
      if (!$onehot(leaf_mask)) mcast++;
      for (int p = 0; p < NPORTS; p++) if (leaf_mask[p]) todo[p].push_back(s);
    end
    if (leaf_clr) begin
      m_mask[leaf_clr_addr][leaf_clr_port] = 1'b0;
      check(pool_push == (m_mask[leaf_clr_addr] == '0), "slot released exactly when its last port read it");
      if (pool_push) frees++;
    end
  end

  // writers
  for (genvar w = 0; w < NPORTS; w++) begin : g_w
    initial begin
      wr_req[w] = 0; wr_first[w] = 0; wr_chunk[w] = '0;
      wait (rst_n);
      for (int n = 0; n < 12; n++) begin
        int cid, l, wait_c;
        bit rdy;
        chunk_t c0, c1;
        cid = (w == 4 && n == 5) ? 7 : $urandom % 7;   // id 7 is unconfigured
        l = $urandom % 256;
        c0 = {$urandom, $urandom, $urandom};
        c0[7:0] = 8'(cid); c0[15:8] = 8'(l);
        c1 = {$urandom, $urandom, $urandom};
        for (int h = 0; h < 2; h++) begin
          @(negedge clk);
          wr_req[w] = 1; wr_first[w] = (h == 0); wr_chunk[w] = h == 0 ? c0 : c1;
          wait_c = 0; rdy = pool_ready;
          do begin @(posedge clk); wait_c++; end while (!wr_gnt[w]);
          if (rdy) check(wait_c <= 11, $sformatf("writer %0d waited %0d", w, wait_c));
          if (h == 0) begin
            if (ctab[cid].mask != '0) begin
              int s;
              chunk_t e;
              s = int'(pool_addr);
              e = c0;
              e[7:0] = ctab[cid].out_id; e[15:8] = 8'(l) + ctab[cid].d;
              check(mem_we && mem_addr == {pool_addr, 1'b0} && mem_wdata == e, "header rewritten and stored");
              check(!leaf_we, "leaf not loaded with the first chunk");
              m_c0[s] = e; m_c1[s] = c1;
              check(in_use[s] == 0, "slot not in use");
              in_use[s] = 1;
            end else begin
              check(!mem_en && !pool_pop, "unconfigured connection not stored");
              dropped_sent++;
            end
          end else if (ctab[cid].mask != '0) begin
            check(leaf_we && leaf_mask == ctab[cid].mask && leaf_l == 8'(l) &&
                  leaf_ld == 8'(l) + ctab[cid].d, "leaf loaded with mask, l, l+d");
          end
          @(negedge clk); wr_req[w] = 0;
        end
      end
    end
  end

  // readers
  for (genvar r = 0; r < NPORTS; r++) begin : g_r
    initial begin
      rd_req[r] = 0; rd_addr[r] = '0;
      forever begin
        int s;
        @(negedge clk);
        if (todo[r].size() != 0) begin
          s = todo[r].pop_front();
          repeat ($urandom % 4) @(negedge clk);
          for (int h = 0; h < 2; h++) begin
            rd_req[r] = 1; rd_addr[r] = {AW'(s), h[0]};
            do @(posedge clk); while (!rd_gnt[r]);
            @(negedge clk); rd_req[r] = 0;
            check(rd_valid[r], "read data one cycle after grant");
            check(rd_data == (h == 0 ? m_c0[s] : m_c1[s]), $sformatf("port %0d read slot %0d chunk %0d", r, s, h));
          end
          if (m_mask[s] == '0) in_use[s] = 0;
          reads_done++;
        end
      end
    end
  end

  initial begin
    // connection ids 0..6 configured, 7 left empty
    for (int i = 0; i < 8; i++) ctab[i] = '{out_id: 8'(100 + i), d: 8'(i * 5 + 1), mask: (i == 7) ? 5'b0 : (i == 3 ? 5'b10110 : (i == 5 ? 5'b11111 : 5'(1 << (i % 5))))};
    for (int i = 0; i < NPKT; i++) begin m_mask[i] = '0; in_use[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); ct_we = 1; ct_wid = 8'(i); ct_wentry = ctab[i];
    end
    @(negedge clk); ct_we = 0;
    repeat (3000) @(negedge clk);
    check(stored == 59 && dropped_sent == 1, $sformatf("stored %0d dropped %0d", stored, dropped_sent));
    check(mcast > 0, "multicast packets stored");
    check(frees == stored, $sformatf("slots freed %0d of %0d", frees, stored));
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
