// be_bus: the five-byte-wide best-effort bus inside the router.
//
// Each cycle the bus moves at most one flit from an input flit buffer to an
// output flit buffer. Inputs compete round-robin. Wormhole switching is kept
// by allocating an output port to one input from the packet's head flit until
// its tail flit: a head flit may go only to a free output, a body or tail
// flit only to the output its packet holds, and every flit only to an output
// with buffer space. The combinational result in a cycle: in_pop (one-hot)
// tells the chosen input to drop its flit, out_push (one-hot) tells the
// output to take out_flit. The shared bus and round-robin service follow the
// document; the allocation bookkeeping is this design's choice.
module be_bus
  import rt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid [NPORTS],
  input  flit_t      in_flit  [NPORTS],
  input  logic [2:0] in_route [NPORTS],
  output pmask_t     in_pop,
  input  pmask_t     out_space,
  output pmask_t     out_push,
  output flit_t      out_flit
);
  localparam int PW = $clog2(NPORTS);

  pmask_t         out_busy;                // output allocated to a packet
  logic [2:0]     in_alloc [NPORTS];       // output held by input's packet
  pmask_t         elig, gnt;
  logic [PW-1:0]  gi;
  logic           any;
  logic [2:0]     dest [NPORTS];

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      dest[i] = in_flit[i].head ? in_route[i] : in_alloc[i];
      elig[i] = in_valid[i] && out_space[dest[i]] &&
                (!in_flit[i].head || !out_busy[dest[i]]);
    end
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk, .rst_n, .req(elig), .adv(1'b1), .gnt, .gnt_idx(gi), .any
  );

  always_comb begin
    in_pop   = gnt;
    out_push = any ? (pmask_t'(1) << dest[gi]) : '0;
    out_flit = in_flit[gi];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy <= '0;
      for (int i = 0; i < NPORTS; i++) in_alloc[i] <= '0;
    end else if (any) begin
      if (in_flit[gi].head && !in_flit[gi].tail) begin
        out_busy[dest[gi]] <= 1'b1;
        in_alloc[gi]       <= dest[gi];
      end else if (in_flit[gi].tail) begin
        out_busy[dest[gi]] <= 1'b0;
      end
    end
  end
endmodule
