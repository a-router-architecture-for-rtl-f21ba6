// mem_ctrl: access control for the shared time-constrained packet memory.
//
// Ten requesters share the single-ported memory one 10-byte chunk per cycle,
// served round-robin on demand: the five input buffers write (requesters
// 0..4) and the five output ports read (requesters 5..9). This matches the
// aggregate rate of ten byte-wide ports. What a grant does:
//   header chunk write  - looks up the incoming connection id in the
//       connection table, replaces it with the outgoing id, replaces the
//       logical arrival time l with the deadline l+d (the next router's
//       logical arrival time), takes a free slot from the idle-address pool
//       and stores the chunk there. A connection whose port mask is zero is
//       not stored (the packet is dropped).
//   second chunk write  - stores the chunk in the same slot and then loads the
//       slot's scheduler leaf with the port mask, l and l+d, so a packet is
//       only schedulable once it is completely stored (store-and-forward).
//   chunk read          - reads {slot, chunk}; data reaches the port one
//       cycle later. On the second chunk the port's mask bit in the leaf is
//       cleared, and if no other port still needs the packet the slot goes
//       back to the pool; a multicast packet is stored once and freed after
//       its last port has read it.
// Writes wait until the pool has finished its start-up fill. The rewrite of
// the header, the shared memory and the round-robin arbitration follow the
// document; the request/grant signalling is this design's choice.
module mem_ctrl
  import rt_pkg::*;
#(
  parameter int NPKT = 256,
  localparam int AW = $clog2(NPKT),
  localparam int PW = $clog2(NPORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input buffers
  input  logic          wr_req   [NPORTS],
  input  chunk_t        wr_chunk [NPORTS],
  input  logic          wr_first [NPORTS],
  output pmask_t        wr_gnt,
  // output ports
  input  logic          rd_req   [NPORTS],
  input  logic [AW:0]   rd_addr  [NPORTS],
  output pmask_t        rd_gnt,
  output pmask_t        rd_valid,
  output chunk_t        rd_data,
  // connection table
  output logic [7:0]    ct_id,
  input  conn_entry_t   ct_entry,
  // idle-address pool
  input  logic          pool_ready,
  output logic          pool_pop,
  input  logic [AW-1:0] pool_addr,
  output logic          pool_push,
  output logic [AW-1:0] pool_push_addr,
  // packet memory
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW:0]   mem_addr,
  output chunk_t        mem_wdata,
  input  chunk_t        mem_rdata,
  // scheduler leaves
  output logic          leaf_we,
  output logic [AW-1:0] leaf_addr,
  output pmask_t        leaf_mask,
  output time_t         leaf_l,
  output time_t         leaf_ld,
  output logic          leaf_clr,
  output logic [AW-1:0] leaf_clr_addr,
  output logic [PW-1:0] leaf_clr_port,
  input  logic          leaf_clr_last
);
  localparam int NR = 2 * NPORTS;

  // per-input state of the packet being stored
  logic [AW-1:0] cur_addr [NPORTS];
  time_t         cur_l    [NPORTS];
  time_t         cur_ld   [NPORTS];
  pmask_t        cur_mask [NPORTS];

  logic [NR-1:0]         req, gnt;
  logic [$clog2(NR)-1:0] gi;
  logic                  any;
  logic [PW-1:0]         port;
  logic                  is_rd;
  pmask_t                rd_valid_q;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      req[i]          = wr_req[i] && pool_ready;
      req[NPORTS + i] = rd_req[i];
    end
  end

  rr_arbiter #(.N(NR)) u_arb (.clk, .rst_n, .req, .adv(1'b1), .gnt, .gnt_idx(gi), .any);

  always_comb begin
    is_rd  = (int'(gi) >= NPORTS);
    port   = is_rd ? PW'(int'(gi) - NPORTS) : PW'(gi);
    wr_gnt = gnt[NPORTS-1:0];
    rd_gnt = gnt[NR-1:NPORTS];
  end

  // header rewrite for a granted first chunk
  chunk_t hdr_chunk;
  time_t  in_l, in_ld;
  logic   store;
  always_comb begin
    ct_id     = wr_chunk[port][7:0];
    in_l      = wr_chunk[port][15:8];
    in_ld     = in_l + ct_entry.d;
    hdr_chunk = wr_chunk[port];
    hdr_chunk[7:0]  = ct_entry.out_id;
    hdr_chunk[15:8] = in_ld;
    store     = wr_first[port] ? (ct_entry.mask != '0) : (cur_mask[port] != '0);
  end

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = wr_chunk[port];
    pool_pop  = 1'b0;
    leaf_we   = 1'b0;
    leaf_addr = cur_addr[port];
    leaf_mask = cur_mask[port];
    leaf_l    = cur_l[port];
    leaf_ld   = cur_ld[port];
    leaf_clr      = 1'b0;
    leaf_clr_addr = rd_addr[port][AW:1];
    leaf_clr_port = port;
    pool_push      = 1'b0;
    pool_push_addr = rd_addr[port][AW:1];
    if (any) begin
      if (is_rd) begin
        mem_en   = 1'b1;
        mem_addr = rd_addr[port];
        if (rd_addr[port][0]) begin
          leaf_clr  = 1'b1;
          pool_push = leaf_clr_last;
        end
      end else if (store) begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        if (wr_first[port]) begin
          pool_pop  = 1'b1;
          mem_addr  = {pool_addr, 1'b0};
          mem_wdata = hdr_chunk;
        end else begin
          mem_addr  = {cur_addr[port], 1'b1};
          leaf_we   = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_q <= '0;
      for (int i = 0; i < NPORTS; i++) begin
        cur_addr[i] <= '0;
        cur_l[i]    <= '0;
        cur_ld[i]   <= '0;
        cur_mask[i] <= '0;
      end
    end else begin
      rd_valid_q <= rd_gnt;
      if (any && !is_rd && wr_first[port]) begin
        cur_addr[port] <= pool_addr;
        cur_l[port]    <= in_l;
        cur_ld[port]   <= in_ld;
        cur_mask[port] <= ct_entry.mask;
      end
    end
  end

  assign rd_valid = rd_valid_q;
  assign rd_data  = mem_rdata;

  a_pool_ok: assert property (@(posedge clk) disable iff (!rst_n)
    pool_pop |-> pool_ready);
endmodule
