// bts_network: general binary-tree-structured (BTS) selection network.
//
// A general BTS network over N variables fully decodes the 2**N points of its
// input space. Each node has exactly two branches, one enabled by a variable
// x_i and the other by its complement; the leaves are driven by constants, so
// any N-variable function is realised by choosing the 2**N constants. In a
// pass-transistor layout every branch is one transistor; here every node is
// written as the two branch terms (x & upper) | (~x & lower), one per
// transistor, which keeps the one-path-per-state structure visible.
//
// Variable order follows the tree drawings: sel[N-1] (x_1) controls the node
// nearest the output and sel[0] (x_N) the nodes next to the constants, so the
// constant selected is consts[sel] with x_1 as the most significant bit.
// Purely combinational; the path depth is N nodes.
module bts_network #(
  parameter int unsigned N = 3   // number of decoded variables (Figure 1: 3)
) (
  input  logic [(1<<N)-1:0] consts,  // leaf constants, index = {x_1 .. x_N}
  input  logic [N-1:0]      sel,     // sel[N-1] = x_1 ... sel[0] = x_N
  output logic              y        // constant on the one enabled path
);

  for (genvar l = 1; l <= N; l++) begin : g_lvl
    // level l has 2**(N-l) nodes; level N is the output node
    logic [(1<<(N-l))-1:0] node;
    for (genvar k = 0; k < (1 << (N - l)); k++) begin : g_node
      if (l == 1) begin : g_leaf
        assign node[k] = (sel[0] & consts[2*k+1]) | (~sel[0] & consts[2*k]);
      end else begin : g_inner
        assign node[k] = (sel[l-1] & g_lvl[l-1].node[2*k+1])
                       | (~sel[l-1] & g_lvl[l-1].node[2*k]);
      end
    end
  end

  assign y = g_lvl[N].node[0];

endmodule
