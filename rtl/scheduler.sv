// scheduler: time-constrained link scheduler shared by all output ports.
//
// Holds one sched_leaf per packet-memory slot and a comparator tree over them.
// The tree does not store keys, so the five output ports take turns using it:
// in every cycle one port (rotating 0,1,2,3,4,0,...) launches a scheduling
// operation. The leaves compute that port's keys from the current time t,
// and the tree finds the minimum. The tree is cut into two pipeline stages by
// one row of registers after the first SPLIT levels (NPKT >> SPLIT
// key/address pairs). At the top, a final check accepts the winner if it is
// on-time, or early but within the port's horizon (l - t <= h); otherwise the
// port has nothing to send on its time-constrained channel. Timing: an
// operation launched in cycle c (launch_valid/launch_port) gives a one-cycle
// res_valid pulse for that port in cycle c+2 with the winning slot, whether it
// is early, and its logical arrival time l. Each port therefore gets a fresh
// answer every NPORTS cycles.
//
// Leaf state is written through a single write port (a new packet, from the
// memory controller) and cleared through a single clear port (a port finished
// reading a packet); clr_last tells whether that clear empties the slot, in
// which case the caller returns the slot to the idle-address pool. The shared
// tree, the leaf contents, the key format and the two-stage pipeline follow
// the document; the rotation order and where the register row sits are this
// design's choices.
module scheduler
  import rt_pkg::*;
#(
  parameter int NPKT  = 256,
  parameter int SPLIT = 4,
  localparam int AW = $clog2(NPKT),
  localparam int NG = NPKT >> SPLIT,
  localparam int GS = 1 << SPLIT,
  localparam int PW = $clog2(NPORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  time_t         t,
  input  time_t         horizon [NPORTS],
  // leaf write (new packet)
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pmask_t        wr_mask,
  input  time_t         wr_l,
  input  time_t         wr_ld,
  // leaf clear (port has read the packet)
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr,
  input  logic [PW-1:0] clr_port,
  output logic          clr_last,
  // launch of a scheduling operation
  output logic          launch_valid,
  output logic [PW-1:0] launch_port,
  // result
  output logic          res_valid,
  output logic [PW-1:0] res_port,
  output logic [AW-1:0] res_addr,
  output logic          res_early,
  output time_t         res_l
);
  pmask_t                  leaf_mask [NPKT];
  time_t                   leaf_l    [NPKT];
  skey_t  [NPKT-1:0]       leaf_key;
  logic   [NPKT-1:0][AW-1:0] leaf_idx;
  logic   [PW-1:0]         lp;
  pmask_t                  port_sel;

  // ---- launch: rotate over the ports -------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         lp <= '0;
    else if (lp == PW'(NPORTS - 1))     lp <= '0;
    else                                lp <= lp + 1'b1;
  end
  assign launch_valid = 1'b1;
  assign launch_port  = lp;
  assign port_sel     = pmask_t'(1) << lp;

  // ---- leaves --------------------------------------------------------------
  for (genvar i = 0; i < NPKT; i++) begin : g_leaf
    sched_leaf u_leaf (
      .clk, .rst_n,
      .we      (wr_en && wr_addr == AW'(i)),
      .wr_mask, .wr_l, .wr_ld,
      .clr     ((clr_en && clr_addr == AW'(i)) ? (pmask_t'(1) << clr_port) : '0),
      .port_sel, .t,
      .key     (leaf_key[i]),
      .mask    (leaf_mask[i]),
      .l       (leaf_l[i])
    );
    assign leaf_idx[i] = AW'(i);
  end

  assign clr_last = ((leaf_mask[clr_addr] & ~(pmask_t'(1) << clr_port)) == '0);

  // ---- stage 1: first SPLIT levels, one subtree per group ------------------
  skey_t [NG-1:0]         s1_key;
  logic  [NG-1:0][AW-1:0] s1_idx;
  for (genvar g = 0; g < NG; g++) begin : g_sub
    cmp_tree #(.M(GS), .AW(AW)) u_sub (
      .key  (leaf_key[g*GS +: GS]),
      .idx  (leaf_idx[g*GS +: GS]),
      .key_o(s1_key[g]),
      .idx_o(s1_idx[g])
    );
  end

  skey_t [NG-1:0]         p_key;
  logic  [NG-1:0][AW-1:0] p_idx;
  logic  [PW-1:0]         p_port;
  logic                   p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_port  <= '0;
      p_key   <= '0;
      p_idx   <= '0;
    end else begin
      p_valid <= launch_valid;
      p_port  <= lp;
      p_key   <= s1_key;
      p_idx   <= s1_idx;
    end
  end

  // ---- stage 2: remaining levels and the horizon check ---------------------
  skey_t         win_key;
  logic [AW-1:0] win_idx;
  logic          win_ok;
  cmp_tree #(.M(NG), .AW(AW)) u_top (.key(p_key), .idx(p_idx), .key_o(win_key), .idx_o(win_idx));

  assign win_ok = !win_key.inelig && (!win_key.early || win_key.val <= horizon[p_port]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_port  <= '0;
      res_addr  <= '0;
      res_early <= 1'b0;
      res_l     <= '0;
    end else begin
      res_valid <= p_valid && win_ok;
      res_port  <= p_port;
      res_addr  <= win_idx;
      res_early <= win_key.early;
      res_l     <= leaf_l[win_idx];
    end
  end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && clr_en && wr_addr == clr_addr));
endmodule
