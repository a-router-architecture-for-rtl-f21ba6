// rr_arbiter: N-way round-robin arbiter.
//
// Grants one requester per cycle, searching from the one after the last
// winner, so every persistent requester is served within N grants. `gnt` is
// one-hot and combinational from `req`; the priority pointer moves when `adv`
// is high and a grant is given.
module rr_arbiter #(
  parameter int N = 5,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          adv,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          any
);
  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (!any && req[i]) begin
        any     = 1'b1;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          last <= IW'(N - 1);
    else if (adv && any) last <= gnt_idx;
  end
endmodule
