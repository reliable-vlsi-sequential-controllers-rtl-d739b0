// rsc_top: fault-tolerant controller built from K = NF+1 fail-safe
// reliable_controller copies.
//
// Every copy receives the same input state, the same programming writes and
// the same cycle-test line, so all run the same flow table in lock step. Each
// copy has its own, unshared next-state networks, detector and outputs. When
// the program is fail-safe (faults lead only to fault states with safe
// outputs), one safe_combiner gate per output bit masks up to NF faulty
// copies: OR when the safe output value is 0, AND when it is 1. Each copy's
// state and fault flag are brought out so a supervisor can see which copy
// failed and reprogram around it.
//
// Timing is that of reliable_controller: outs and fault follow the state
// loaded at each rising edge, combinationally.
module rsc_top
  import rsc_pkg::*;
#(
  parameter int unsigned N           = 4,       // state variables per copy
  parameter int unsigned M           = 3,       // input states
  parameter int unsigned P           = 2,       // output bits (assumed)
  parameter int unsigned NF          = 1,       // faults tolerated
  parameter det_mode_e   DET_MODE    = DET_XOR,
  parameter comb_mode_e  COMB_MODE   = COMB_OR,
  parameter int unsigned RESET_STATE = 5,
  parameter int unsigned TEST_STATE  = 5,
  parameter int unsigned TEST_COL    = 0,
  parameter int unsigned TEST_BIT    = 0,
  parameter int unsigned K           = NF + 1,
  parameter int unsigned CW          = (M > 1) ? $clog2(M) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic [M-1:0]        in_state,
  input  logic                cycle_test,
  input  logic                dc_we,
  input  logic [N-1:0]        dc_state,
  input  logic [CW-1:0]       dc_col,
  input  logic [N-1:0]        dc_code,
  input  logic                ow_we,
  input  logic [N-1:0]        ow_state,
  input  logic [P-1:0]        ow_data,
  output logic [P-1:0]        outs,        // combined, fault-tolerant outputs
  output logic [K-1:0][N-1:0] copy_state,  // present state of each copy
  output logic [K-1:0]        copy_fault,  // fault-state flag of each copy
  output logic [K-1:0][P-1:0] copy_outs    // outputs of each copy
);

  for (genvar c = 0; c < K; c++) begin : g_copy
    reliable_controller #(
      .N(N), .M(M), .P(P), .DET_MODE(DET_MODE), .RESET_STATE(RESET_STATE),
      .TEST_STATE(TEST_STATE), .TEST_COL(TEST_COL), .TEST_BIT(TEST_BIT), .CW(CW)
    ) u_ctrl (
      .clk        (clk),
      .rst_n      (rst_n),
      .init       (init),
      .in_state   (in_state),
      .cycle_test (cycle_test),
      .dc_we      (dc_we),
      .dc_state   (dc_state),
      .dc_col     (dc_col),
      .dc_code    (dc_code),
      .ow_we      (ow_we),
      .ow_state   (ow_state),
      .ow_data    (ow_data),
      .state      (copy_state[c]),
      .next_state (),            // used only for observation
      .fault      (copy_fault[c]),
      .outs       (copy_outs[c])
    );
  end

  safe_combiner #(.K(K), .P(P), .MODE(COMB_MODE)) u_comb (
    .outs_in (copy_outs),
    .outs    (outs)
  );

endmodule
