// cmp_tree: combinational binary comparator tree.
//
// Reduces M sorting keys (M a power of two) to the smallest one and its index.
// The M - 1 comparators are laid out as a heap: node n compares the winners
// of nodes 2n+1 and 2n+2, and the inputs sit at nodes M-1 .. 2M-2 in order,
// so the left child always covers the lower-numbered inputs. On equal keys
// the left (lower-numbered) input wins. Depth is log2(M) comparators; there is
// no register inside, the caller places pipeline registers around it.
module cmp_tree
  import rt_pkg::*;
#(
  parameter int M  = 16,
  parameter int AW = 8
) (
  input  skey_t  [M-1:0]         key,
  input  logic   [M-1:0][AW-1:0] idx,
  output skey_t                  key_o,
  output logic   [AW-1:0]        idx_o
);
  skey_t [2*M-2:0]         nk;
  logic  [2*M-2:0][AW-1:0] ni;

  for (genvar i = 0; i < M; i++) begin : g_in
    assign nk[M-1+i] = key[i];
    assign ni[M-1+i] = idx[i];
  end

  for (genvar n = 0; n < M - 1; n++) begin : g_node
    logic left;
    assign left  = key_le(nk[2*n+1], nk[2*n+2]);
    assign nk[n] = left ? nk[2*n+1] : nk[2*n+2];
    assign ni[n] = left ? ni[2*n+1] : ni[2*n+2];
  end

  assign key_o = nk[0];
  assign idx_o = ni[0];
endmodule
