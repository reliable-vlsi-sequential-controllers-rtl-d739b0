// input_switch_matrix: input-state selection for one state variable.
//
// For every present state S_s the matrix holds one destination-code bit per
// input column (N_s1 .. N_sM for the state variable this copy serves). The
// input state I_1..I_M is one-hot: the asserted I_j closes the switch of
// column j in every row, so each row passes the bit of the active column on
// to the leaf of the BTS network that decodes S_s. The pass switches sharing a
// row node are modelled as a wired OR of (I_j & N_sj); with no input asserted
// every row passes 0, which is the code of S_0 (a choice of this design: an
// undriven node has no logic value). Purely combinational.
module input_switch_matrix #(
  parameter int unsigned N = 3,  // state variables (Figure 3: 3)
  parameter int unsigned M = 3   // input states     (Figure 3: 3)
) (
  input  logic [M-1:0]             in_state,  // one-hot, in_state[j-1] = I_j
  input  logic [(1<<N)-1:0][M-1:0] consts,    // consts[s][j-1] = N_sj bit
  output logic [(1<<N)-1:0]        row_bits   // bit passed for each state row
);

  always_comb begin
    for (int unsigned s = 0; s < (1 << N); s++) begin
      row_bits[s] = |(consts[s] & in_state);
    end
  end

endmodule
