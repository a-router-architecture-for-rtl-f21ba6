// sched_grouped: link scheduler with shared comparator logic at the base.
//
// Same job and interface as `scheduler`: find, for one output port at a
// time, the stored time-constrained packet with the smallest sorting key
// {ineligible, early, l - t or (l + d) - t}, and hand it to the port if it is
// on-time or early within the port's horizon. Here the NPKT leaves are packed
// into NPKT/K groups. Each group keeps the state of its K packets (port mask,
// l, l + d) in a small register file and owns a single comparator: during an
// operation it reads one entry per cycle and keeps a running minimum, so the
// scan of a group takes K cycles. A combinational tree over the NPKT/K group
// minima and the horizon check follow, so an operation has K + 1 + lg(NPKT/K)
// levels of delay but only about 2*NPKT/K comparators.
//
// Timing: an operation is launched every K cycles (launch_valid for one
// cycle), rotating over the ports 0..4. The port and the time t are sampled
// at the launch. Entry j of every group is read in cycle j after the launch,
// so a write or clear of an entry already read is seen only by the next
// operation. The result (res_valid pulse, port, slot, early flag, l) appears
// K + 1 cycles after the launch. Slot s lives in group s / K as entry s % K.
// Ties go to the lower slot. Leaf writes, clears and clr_last work as in
// `scheduler`.
//
// The grouping, the sequential scan with one comparator per group and the
// delay formula follow the document's logic-sharing variant; the entry order
// of the scan, sampling t at launch and the single-stage tree above the groups
// are this design's choices. K must be a power of two of at least 2.
module sched_grouped
  import rt_pkg::*;
#(
  parameter int NPKT = 256,
  parameter int K    = 4,
  localparam int AW = $clog2(NPKT),
  localparam int NG = NPKT / K,
  localparam int KW = $clog2(K),
  localparam int PW = $clog2(NPORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  time_t         t,
  input  time_t         horizon [NPORTS],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pmask_t        wr_mask,
  input  time_t         wr_l,
  input  time_t         wr_ld,
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr,
  input  logic [PW-1:0] clr_port,
  output logic          clr_last,
  output logic          launch_valid,
  output logic [PW-1:0] launch_port,
  output logic          res_valid,
  output logic [PW-1:0] res_port,
  output logic [AW-1:0] res_addr,
  output logic          res_early,
  output time_t         res_l
);
  // ---- operation sequencing ------------------------------------------------
  logic [KW-1:0] cnt;        // entry read in this cycle
  logic [PW-1:0] lp;         // port of the next launch
  logic [PW-1:0] op_port;
  time_t         op_t;
  logic [PW-1:0] s_port;     // port and time the groups use in this cycle
  time_t         s_t;
  pmask_t        s_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      lp      <= '0;
      op_port <= '0;
      op_t    <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '0) begin
        op_port <= lp;
        op_t    <= t;
        lp      <= (lp == PW'(NPORTS - 1)) ? '0 : lp + 1'b1;
      end
    end
  end
  assign launch_valid = (cnt == '0);
  assign launch_port  = lp;
  assign s_port       = (cnt == '0) ? lp : op_port;
  assign s_t          = (cnt == '0) ? t  : op_t;
  assign s_sel        = pmask_t'(1) << s_port;

  // ---- groups: register file plus one comparator each ------------------------
  skey_t [NG-1:0]         g_key;
  logic  [NG-1:0][AW-1:0] g_idx;
  time_t                  g_l   [NG];
  pmask_t                 g_cmask [NG];   // mask of the entry named by clr_addr

  for (genvar g = 0; g < NG; g++) begin : g_grp
    pmask_t rf_mask [K];
    time_t  rf_l    [K];
    time_t  rf_ld   [K];
    skey_t  cur;
    logic   sel_wr, sel_clr;

    assign sel_wr  = wr_en  && (wr_addr  >> KW) == AW'(g);
    assign sel_clr = clr_en && (clr_addr >> KW) == AW'(g);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < K; j++) rf_mask[j] <= '0;
      end else begin
        if (sel_wr) rf_mask[wr_addr[KW-1:0]] <= wr_mask;
        if (sel_clr && !(sel_wr && wr_addr == clr_addr))
          rf_mask[clr_addr[KW-1:0]] <= rf_mask[clr_addr[KW-1:0]] & ~(pmask_t'(1) << clr_port);
      end
    end
    always_ff @(posedge clk) begin
      if (sel_wr) begin
        rf_l[wr_addr[KW-1:0]]  <= wr_l;
        rf_ld[wr_addr[KW-1:0]] <= wr_ld;
      end
    end
    assign g_cmask[g] = rf_mask[clr_addr[KW-1:0]];

    // the group's single comparator: entry cnt against the running minimum
    always_comb begin
      cur.inelig = ~|(rf_mask[cnt] & s_sel);
      cur.early  = is_early(rf_l[cnt], s_t);
      cur.val    = cur.early ? time_t'(rf_l[cnt] - s_t) : time_t'(rf_ld[cnt] - s_t);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        g_key[g] <= '0;
        g_idx[g] <= '0;
        g_l[g]   <= '0;
      end else if (cnt == '0 || !key_le(g_key[g], cur)) begin
        g_key[g] <= cur;
        g_idx[g] <= AW'(g * K) | AW'(cnt);
        g_l[g]   <= rf_l[cnt];
      end
    end
  end

  assign clr_last = ((g_cmask[clr_addr[AW-1:KW]] & ~(pmask_t'(1) << clr_port)) == '0);

  // ---- tree over the group minima and horizon check --------------------------
  // The group registers hold the finished minima in the cycle after the last
  // entry was read, which is also the launch cycle of the next operation.
  logic          fin_valid;
  logic [PW-1:0] fin_port;
  skey_t         win_key;
  logic [AW-1:0] win_idx;
  logic          win_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin_valid <= 1'b0;
      fin_port  <= '0;
    end else begin
      fin_valid <= (cnt == KW'(K - 1));
      fin_port  <= s_port;
    end
  end

  cmp_tree #(.M(NG), .AW(AW)) u_top (.key(g_key), .idx(g_idx), .key_o(win_key), .idx_o(win_idx));
  assign win_ok = !win_key.inelig && (!win_key.early || win_key.val <= horizon[fin_port]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_port  <= '0;
      res_addr  <= '0;
      res_early <= 1'b0;
      res_l     <= '0;
    end else begin
      res_valid <= fin_valid && win_ok;
      res_port  <= fin_port;
      res_addr  <= win_idx;
      res_early <= win_key.early;
      res_l     <= g_l[win_idx[AW-1:KW]];
    end
  end

  initial assert (K >= 2 && (1 << KW) == K && NPKT % K == 0)
    else $error("K must be a power of two, at least 2, dividing NPKT");
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && clr_en && wr_addr == clr_addr));
endmodule
