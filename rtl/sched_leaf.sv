// sched_leaf: one leaf of the link scheduler's comparator tree.
//
// Stores the per-packet state of one packet-memory slot: the bit mask of
// output ports still to transmit the packet, its logical arrival time l and its
// deadline l+d. A mask of zero means the slot is empty. For the port selected
// by the one-hot `port_sel` it forms the sorting key against the current time
// t (all arithmetic modulo 2^TBITS):
//   not queued for the port   -> inelig = 1
//   early   (l > t)           -> early = 1, val = l - t
//   on-time (l <= t)          -> early = 0, val = (l + d) - t  (laxity)
// so a plain unsigned comparison of {inelig, early, val} ranks on-time
// packets by deadline ahead of early packets ranked by eligibility time, even
// across clock rollover, provided d < 2^(TBITS-1) and d+h of the previous hop
// is below 2^(TBITS-1). `we` loads a new packet (from the input decode);
// `clr` clears mask bits when ports have read the packet. The key is
// combinational. The state fields and the key layout follow the document.
module sched_leaf
  import rt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  pmask_t wr_mask,
  input  time_t  wr_l,
  input  time_t  wr_ld,
  input  pmask_t clr,
  input  pmask_t port_sel,
  input  time_t  t,
  output skey_t  key,
  output pmask_t mask,
  output time_t  l
);
  time_t ld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mask <= '0;
    else if (we)   mask <= wr_mask;
    else           mask <= mask & ~clr;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      l  <= wr_l;
      ld <= wr_ld;
    end
  end

  always_comb begin
    key.inelig = ~|(mask & port_sel);
    key.early  = is_early(l, t);
    key.val    = key.early ? time_t'(l - t) : time_t'(ld - t);
  end
endmodule
