// fault_detector: real-time detection of fault states.
//
// With a minimum distance-two state assignment every specified state has
// even parity and a single fault in one state-variable circuit leaves the
// machine in an odd-parity (fault) state. The detector flags odd parity over
// the state variables, combinationally, within the clock period in which the
// fault state is held. Two constructions give the same function:
//   DET_XOR  one exclusive-or over the N state variables (smallest area);
//   DET_BTS  a general BTS network identical to a state-variable network,
//            whose 2**N leaf constants are 1 for the odd-parity codes
//            (fastest to design, since the layout is reused).
// Which one to build is a parameter; XOR is the default here.
module fault_detector
  import rsc_pkg::*;
#(
  parameter int unsigned N    = 4,        // state variables (Table 4: 4)
  parameter det_mode_e   MODE = DET_XOR   // construction
) (
  input  logic [N-1:0] state,  // present state y_1..y_N
  output logic         fault   // 1 = state is a fault state
);

  if (MODE == DET_XOR) begin : g_xor
    assign fault = ^state;
  end else begin : g_bts
    logic [(1<<N)-1:0] fault_map;
    always_comb begin
      for (int unsigned s = 0; s < (1 << N); s++) fault_map[s] = odd_parity(s, N);
    end
    bts_network #(.N(N)) u_bts (
      .consts (fault_map),
      .sel    (state),
      .y      (fault)
    );
  end

endmodule
