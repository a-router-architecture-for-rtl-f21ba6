// rt_router: single-chip router for mixed real-time and best-effort traffic
// in a two-dimensional mesh.
//
// Five ports: port 0 connects to the local processor, ports 1..4 are the +x,
// -x, +y and -y links. Every link is byte-wide with a strobe and a virtual
// channel bit (1 = time-constrained, 0 = best-effort) and a flit
// acknowledgement running back. The local processor has a separate injection
// port per traffic class (inj_be_*, inj_tc_*), a reception port (tx_* index
// 0) and a byte-wide control interface (ctrl_*).
//
// Best-effort path: be_input flit buffers (two five-byte flits per input,
// dimension-ordered routing) -> be_bus (one flit per cycle, round-robin,
// wormhole allocation) -> out_port flit FIFO -> link, with per-flit
// acknowledgements. Time-constrained path: tc_input chunk buffers -> mem_ctrl
// (round-robin access to the shared packet_memory, header rewrite through
// conn_table, slot allocation from idle_pool) -> scheduler leaves; the shared
// pipelined comparator-tree scheduler then picks, for each output port in
// turn, the on-time packet with the earliest deadline, or failing that the
// early packet nearest its eligibility time if within the port's horizon;
// out_port reads the packet from memory and sends it with priority over
// best-effort bytes when on-time, below them when early. rt_clock advances
// the packet-time clock every TICK_CYCLES cycles.
//
// Parameter defaults are the document's prototype: 256 packet slots, 256
// connections, 8-bit clock, two-stage scheduler pipeline. SCHED_K > 1 swaps
// in the logic-sharing scheduler (sched_grouped, groups of SCHED_K leaves
// scanned by one comparator), which answers each port less often.
module rt_router
  import rt_pkg::*;
#(
  parameter int NPKT        = 256,
  parameter int NCONN       = 256,
  parameter int TICK_CYCLES = 20,
  parameter int SPLIT       = 4,
  parameter int SCHED_K     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // incoming mesh links, index 0..3 = ports 1..4
  input  logic [7:0]  link_in_data   [4],
  input  logic        link_in_strobe [4],
  input  logic        link_in_vc     [4],
  output logic        link_in_ack    [4],
  // local injection ports
  input  logic [7:0]  inj_be_data,
  input  logic        inj_be_strobe,
  output logic        inj_be_ack,
  input  logic [7:0]  inj_tc_data,
  input  logic        inj_tc_strobe,
  // reception port (0) and outgoing mesh links (1..4)
  output logic [7:0]  tx_data   [NPORTS],
  output logic        tx_strobe [NPORTS],
  output logic        tx_vc     [NPORTS],
  input  logic        tx_ack    [NPORTS],
  // control interface
  input  logic        ctrl_valid,
  input  logic [2:0]  ctrl_sel,
  input  logic [7:0]  ctrl_data,
  // current real-time clock, for observation
  output time_t       rt_time
);
  localparam int AW = $clog2(NPKT);
  localparam int PW = $clog2(NPORTS);

  // ---------------- clock and control ----------------
  time_t t;
  logic  tick;
  rt_clock #(.TBITS(TBITS), .TICK_CYCLES(TICK_CYCLES)) u_clock (.clk, .rst_n, .t, .tick);
  assign rt_time = t;

  logic        ct_we;
  logic [7:0]  ct_wid;
  conn_entry_t ct_wentry;
  time_t       horizon [NPORTS];
  ctrl_if u_ctrl (.clk, .rst_n, .ctrl_valid, .ctrl_sel, .ctrl_data,
                  .ct_we, .ct_id(ct_wid), .ct_entry(ct_wentry), .horizon);

  logic [7:0]  ct_rid;
  conn_entry_t ct_rentry;
  conn_table #(.NCONN(NCONN)) u_ctab (.clk, .rst_n, .wr_en(ct_we), .wr_id(ct_wid),
    .wr_entry(ct_wentry), .rd_id(ct_rid), .rd_entry(ct_rentry));

  // ---------------- input side ----------------
  logic       be_v [NPORTS], tc_v [NPORTS];
  logic [7:0] be_d [NPORTS], tc_d [NPORTS];
  logic       be_ack [NPORTS];

  always_comb begin
    be_v[0] = inj_be_strobe;  be_d[0] = inj_be_data;
    tc_v[0] = inj_tc_strobe;  tc_d[0] = inj_tc_data;
    inj_be_ack = be_ack[0];
    for (int p = 1; p < NPORTS; p++) begin
      be_v[p] = link_in_strobe[p-1] && (link_in_vc[p-1] == VC_BE);
      tc_v[p] = link_in_strobe[p-1] && (link_in_vc[p-1] == VC_TC);
      be_d[p] = link_in_data[p-1];
      tc_d[p] = link_in_data[p-1];
      link_in_ack[p-1] = be_ack[p];
    end
  end

  logic       in_fv [NPORTS];
  flit_t      in_f  [NPORTS];
  logic [2:0] in_r  [NPORTS];
  pmask_t     in_pop;
  logic       wr_req [NPORTS], wr_first [NPORTS];
  chunk_t     wr_chunk [NPORTS];
  pmask_t     wr_gnt;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    be_input u_be (.clk, .rst_n, .valid(be_v[p]), .data(be_d[p]), .ack(be_ack[p]),
                   .flit_valid(in_fv[p]), .flit(in_f[p]), .route(in_r[p]), .pop(in_pop[p]));
    tc_input u_tc (.clk, .rst_n, .valid(tc_v[p]), .data(tc_d[p]), .req(wr_req[p]),
                   .chunk(wr_chunk[p]), .first(wr_first[p]), .gnt(wr_gnt[p]));
  end

  // ---------------- best-effort bus ----------------
  pmask_t out_space, out_push;
  flit_t  bus_flit;
  be_bus u_bus (.clk, .rst_n, .in_valid(in_fv), .in_flit(in_f), .in_route(in_r),
                .in_pop, .out_space, .out_push, .out_flit(bus_flit));

  // ---------------- time-constrained storage ----------------
  logic          pool_ready, pool_empty, pool_pop, pool_push;
  logic [AW-1:0] pool_addr, pool_push_addr;
  idle_pool #(.NPKT(NPKT)) u_pool (.clk, .rst_n, .ready(pool_ready), .empty(pool_empty),
    .pop(pool_pop), .pop_addr(pool_addr), .push(pool_push), .push_addr(pool_push_addr));

  logic          mem_en, mem_we;
  logic [AW:0]   mem_addr;
  chunk_t        mem_wdata, mem_rdata;
  packet_memory #(.NPKT(NPKT), .CHUNK_BYTES(CHUNK_BYTES)) u_mem (.clk, .en(mem_en), .we(mem_we),
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  logic          rd_req [NPORTS];
  logic [AW:0]   rd_addr [NPORTS];
  pmask_t        rd_gnt, rd_valid;
  chunk_t        rd_data;
  logic          leaf_we, leaf_clr, leaf_clr_last;
  logic [AW-1:0] leaf_addr, leaf_clr_addr;
  logic [PW-1:0] leaf_clr_port;
  pmask_t        leaf_mask;
  time_t         leaf_l, leaf_ld;

  mem_ctrl #(.NPKT(NPKT)) u_mctl (.clk, .rst_n,
    .wr_req, .wr_chunk, .wr_first, .wr_gnt,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .ct_id(ct_rid), .ct_entry(ct_rentry),
    .pool_ready, .pool_pop, .pool_addr, .pool_push, .pool_push_addr,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .leaf_we, .leaf_addr, .leaf_mask, .leaf_l, .leaf_ld,
    .leaf_clr, .leaf_clr_addr, .leaf_clr_port, .leaf_clr_last);

  // ---------------- scheduler ----------------
  logic          launch_valid, res_valid, res_early;
  logic [PW-1:0] launch_port, res_port;
  logic [AW-1:0] res_addr;
  time_t         res_l;
  if (SCHED_K <= 1) begin : g_tree
    scheduler #(.NPKT(NPKT), .SPLIT(SPLIT)) u_sched (.clk, .rst_n, .t, .horizon,
      .wr_en(leaf_we), .wr_addr(leaf_addr), .wr_mask(leaf_mask), .wr_l(leaf_l), .wr_ld(leaf_ld),
      .clr_en(leaf_clr), .clr_addr(leaf_clr_addr), .clr_port(leaf_clr_port), .clr_last(leaf_clr_last),
      .launch_valid, .launch_port, .res_valid, .res_port, .res_addr, .res_early, .res_l);
  end else begin : g_grouped
    sched_grouped #(.NPKT(NPKT), .K(SCHED_K)) u_sched (.clk, .rst_n, .t, .horizon,
      .wr_en(leaf_we), .wr_addr(leaf_addr), .wr_mask(leaf_mask), .wr_l(leaf_l), .wr_ld(leaf_ld),
      .clr_en(leaf_clr), .clr_addr(leaf_clr_addr), .clr_port(leaf_clr_port), .clr_last(leaf_clr_last),
      .launch_valid, .launch_port, .res_valid, .res_port, .res_addr, .res_early, .res_l);
  end

  // ---------------- output ports ----------------
  logic ev_preempt [NPORTS], ev_early [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    out_port #(.NPKT(NPKT)) u_out (.clk, .rst_n, .my_port(PW'(p)), .t,
      .launch_valid, .launch_port, .res_valid, .res_port, .res_addr, .res_l,
      .rd_req(rd_req[p]), .rd_addr(rd_addr[p]), .rd_gnt(rd_gnt[p]),
      .rd_valid(rd_valid[p]), .rd_data,
      .be_push(out_push[p]), .be_flit(bus_flit), .be_space(out_space[p]),
      .tx_data(tx_data[p]), .tx_strobe(tx_strobe[p]), .tx_vc(tx_vc[p]), .tx_ack(tx_ack[p]),
      .ev_preempt(ev_preempt[p]), .ev_early(ev_early[p]));
  end

  a_pool_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
    pool_pop |-> !pool_empty);
endmodule
