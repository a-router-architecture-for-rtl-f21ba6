// out_port: one outgoing port (a mesh link, or the local reception port).
//
// The link is shared by two virtual channels and arbitrated byte by byte:
//   1. an on-time time-constrained packet (l <= t) goes first,
//   2. then best-effort flits,
//   3. then an early time-constrained packet that the scheduler accepted
//      because it lies within the port's horizon.
// Each byte is sent with tx_strobe and tx_vc (1 = time-constrained), so a
// best-effort flit can be pre-empted between any two bytes.
//
// Time-constrained side: two 20-byte packet slots. When a slot is free the
// port takes the scheduler's next answer for it (res_*), then reads the two
// 10-byte chunks of that packet from the shared memory (rd_req/rd_gnt, data
// one cycle after the grant on rd_valid/rd_data). The grant of the second
// chunk is where the memory controller clears this port's bit in the
// packet's scheduler leaf; the port then ignores scheduler answers until its
// next turn has been launched (launch_*), since answers already in the
// pipeline may still name that packet. Slots are sent in the order taken,
// so one packet can be read while the other is on the link.
//
// Best-effort side: a FIFO of BE_FLITS flits filled from the best-effort bus
// (space tells the bus there is room). A credit counter, preset to the
// downstream input buffer size CREDITS, is decremented when the first byte of
// a flit leaves and incremented on each tx_ack pulse. Outputs are registered.
// The priority order and the flit acknowledgement follow the document; the
// slot count, the credit counter and byte-level pre-emption are this design's
// reading of it.
module out_port
  import rt_pkg::*;
#(
  parameter int CREDITS  = 2,
  parameter int BE_FLITS = 2,
  parameter int NPKT     = 256,
  localparam int AW = $clog2(NPKT),
  localparam int PW = $clog2(NPORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] my_port,
  input  time_t         t,
  // scheduler
  input  logic          launch_valid,
  input  logic [PW-1:0] launch_port,
  input  logic          res_valid,
  input  logic [PW-1:0] res_port,
  input  logic [AW-1:0] res_addr,
  input  time_t         res_l,
  // packet memory reads
  output logic          rd_req,
  output logic [AW:0]   rd_addr,   // {slot, chunk}
  input  logic          rd_gnt,
  input  logic          rd_valid,
  input  chunk_t        rd_data,
  // best-effort bus
  input  logic          be_push,
  input  flit_t         be_flit,
  output logic          be_space,
  // link
  output logic [7:0]    tx_data,
  output logic          tx_strobe,
  output logic          tx_vc,
  input  logic          tx_ack,
  // status, for observation
  output logic          ev_preempt,
  output logic          ev_early
);
  localparam int QW = $clog2(BE_FLITS + 1);
  localparam int FW = (BE_FLITS > 1) ? $clog2(BE_FLITS) : 1;
  localparam int CRW = $clog2(CREDITS + 1);

  // ---------------- time-constrained slots ----------------
  logic              s_full  [2];               // slot holds a packet
  logic [1:0]        s_have  [2];               // chunks present
  logic [AW-1:0]     s_addr  [2];
  time_t             s_l     [2];
  chunk_t            s_data  [2][2];
  logic              rd_slot;                   // slot being read
  logic              reading;                   // a read sequence is active
  logic              rd_chunk;                  // chunk requested next
  logic              pend_slot, pend_chunk;     // chunk whose data arrives next cycle
  logic              tx_slot;                   // slot being sent
  logic [4:0]        tx_idx;                    // byte index 0..19
  logic              need_fresh;
  logic              take;
  logic              wr_slot;

  // slot to fill next: the one behind the slot on the link, or the link
  // slot itself when that is empty
  assign wr_slot = s_full[tx_slot] ? ~tx_slot : tx_slot;
  assign take = res_valid && res_port == my_port && !need_fresh && !reading &&
                !s_full[wr_slot];

  assign rd_req  = reading;
  assign rd_addr = {s_addr[rd_slot], rd_chunk};

  // ---------------- best-effort FIFO ----------------
  flit_t           bq [BE_FLITS];
  logic [QW-1:0]   bcount;
  logic [FW-1:0]   brd, bwr;
  logic [2:0]      bidx;                         // next byte of the head flit
  logic [CRW-1:0]  credits;

  assign be_space = (bcount < QW'(BE_FLITS));

  // ---------------- arbitration ----------------
  logic   tc_avail, tc_ontime, be_avail, sel_tc, sel_be;
  logic [7:0] tc_byte, be_byte;
  flit_t  bh;

  always_comb begin
    bh        = bq[brd];
    tc_avail  = s_full[tx_slot] && s_have[tx_slot][tx_idx >= 5'd10];
    tc_ontime = !is_early(s_l[tx_slot], t);
    be_avail  = (bcount != '0) && (bidx != '0 || credits != '0);
    sel_tc    = tc_avail && (tc_ontime || !be_avail);
    sel_be    = be_avail && !sel_tc;
    tc_byte   = (tx_idx >= 5'd10) ? s_data[tx_slot][1][8*(tx_idx-5'd10) +: 8]
                                  : s_data[tx_slot][0][8*tx_idx +: 8];
    be_byte   = bh.data[8*bidx +: 8];
  end

  logic be_flit_done;
  assign be_flit_done = sel_be && (bidx == bh.nbytes - 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        s_full[s] <= 1'b0;
        s_have[s] <= '0;
        s_addr[s] <= '0;
        s_l[s]    <= '0;
      end
      rd_slot    <= 1'b0;
      reading    <= 1'b0;
      rd_chunk   <= 1'b0;
      pend_slot  <= 1'b0;
      pend_chunk <= 1'b0;
      tx_slot    <= 1'b0;
      tx_idx     <= '0;
      need_fresh <= 1'b0;
      bcount     <= '0;
      brd        <= '0;
      bwr        <= '0;
      bidx       <= '0;
      credits    <= CRW'(CREDITS);
      tx_data    <= '0;
      tx_strobe  <= 1'b0;
      tx_vc      <= 1'b0;
      ev_preempt <= 1'b0;
      ev_early   <= 1'b0;
    end else begin
      // scheduler answer
      if (launch_valid && launch_port == my_port) need_fresh <= 1'b0;
      if (take) begin
        s_full[wr_slot] <= 1'b1;
        s_have[wr_slot] <= '0;
        s_addr[wr_slot] <= res_addr;
        s_l[wr_slot]    <= res_l;
        rd_slot         <= wr_slot;
        rd_chunk        <= 1'b0;
        reading         <= 1'b1;
      end
      // memory reads
      if (rd_gnt) begin
        pend_slot  <= rd_slot;
        pend_chunk <= rd_chunk;
        if (rd_chunk) begin
          reading    <= 1'b0;
          need_fresh <= 1'b1;
        end
        rd_chunk <= 1'b1;
      end
      if (rd_valid) begin
        s_data[pend_slot][pend_chunk]  <= rd_data;
        s_have[pend_slot][pend_chunk]  <= 1'b1;
      end
      // link
      tx_strobe  <= sel_tc || sel_be;
      tx_vc      <= sel_tc ? VC_TC : VC_BE;
      tx_data    <= sel_tc ? tc_byte : be_byte;
      ev_preempt <= sel_tc && be_avail;
      ev_early   <= sel_tc && !tc_ontime;
      if (sel_tc) begin
        if (tx_idx == 5'(TC_BYTES - 1)) begin
          tx_idx          <= '0;
          s_full[tx_slot] <= 1'b0;
          tx_slot         <= ~tx_slot;
        end else begin
          tx_idx <= tx_idx + 5'd1;
        end
      end
      if (sel_be) begin
        bidx <= be_flit_done ? '0 : bidx + 3'd1;
        if (be_flit_done) brd <= (brd == FW'(BE_FLITS - 1)) ? '0 : brd + 1'b1;
      end
      credits <= credits + CRW'(tx_ack) - CRW'(sel_be && bidx == '0);
      if (be_push) begin
        bq[bwr] <= be_flit;
        bwr     <= (bwr == FW'(BE_FLITS - 1)) ? '0 : bwr + 1'b1;
      end
      bcount <= bcount + QW'(be_push) - QW'(be_flit_done);
    end
  end

  a_bq_ok:    assert property (@(posedge clk) disable iff (!rst_n) be_push |-> be_space);
  a_cred_ok:  assert property (@(posedge clk) disable iff (!rst_n) !(tx_ack && credits == CRW'(CREDITS)));
endmodule
