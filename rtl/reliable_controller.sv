// reliable_controller: one programmable sequential controller with real-time
// fault detection.
//
// Datapath: program_store -> sm_core (N state-variable circuits, each an
// input switch matrix, a BTS network and a D flip-flop) -> state, plus
// fault_detector and output_logic on the present state. The flow table is
// entirely in the store, so the same hardware is a plain controller, a safe
// one (unused states programmed to return to specified states), a
// fault-detecting one (distance-two assignment, detector flags odd parity), a
// fail-safe one (S_0 and its neighbours are fault states, every fault state
// goes to S_0, outputs safe there) or an adaptive one (the store is rewritten
// to move transitions off a faulty path). cycle_test inverts one constant of
// one next-state network, which drives the machine into a fault state; with
// fault states programmed to cycle among themselves this checks the detector
// off-line.
//
// Interface: in_state is the one-hot input state (I_j = bit j-1; at most one
// bit set, checked by an assertion). state, fault and outs are valid in the
// cycle after the rising edge that loads a state. Programming writes take
// effect at the next rising edge. rst_n clears the store and loads
// RESET_STATE; init reloads RESET_STATE synchronously, which holds the machine
// still while it is programmed. Reset, init and the default RESET_STATE
// (0101, the first state of the 7-state example assignment) are choices of
// this design.
module reliable_controller
  import rsc_pkg::*;
#(
  parameter int unsigned N           = 4,      // state variables (Table 4: 4)
  parameter int unsigned M           = 3,      // input states (Figure 3: 3)
  parameter int unsigned P           = 2,      // output bits (assumed)
  parameter det_mode_e   DET_MODE    = DET_XOR,
  parameter int unsigned RESET_STATE = 5,      // 0101
  parameter int unsigned TEST_STATE  = 5,      // cycle-test constant: row
  parameter int unsigned TEST_COL    = 0,      //   column (I_1)
  parameter int unsigned TEST_BIT    = 0,      //   state bit (y_N)
  parameter int unsigned CW          = (M > 1) ? $clog2(M) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic [M-1:0]    in_state,
  input  logic            cycle_test,
  input  logic            dc_we,
  input  logic [N-1:0]    dc_state,
  input  logic [CW-1:0]   dc_col,
  input  logic [N-1:0]    dc_code,
  input  logic            ow_we,
  input  logic [N-1:0]    ow_state,
  input  logic [P-1:0]    ow_data,
  output logic [N-1:0]    state,
  output logic [N-1:0]    next_state,
  output logic            fault,
  output logic [P-1:0]    outs
);

  logic [(1<<N)-1:0][M-1:0][N-1:0] dest_codes;
  logic [(1<<N)-1:0][P-1:0]        out_table;

  program_store #(.N(N), .M(M), .P(P), .CW(CW)) u_store (
    .clk        (clk),
    .rst_n      (rst_n),
    .dc_we      (dc_we),
    .dc_state   (dc_state),
    .dc_col     (dc_col),
    .dc_code    (dc_code),
    .ow_we      (ow_we),
    .ow_state   (ow_state),
    .ow_data    (ow_data),
    .dest_codes (dest_codes),
    .out_table  (out_table)
  );

  sm_core #(
    .N(N), .M(M), .RESET_STATE(RESET_STATE),
    .TEST_STATE(TEST_STATE), .TEST_COL(TEST_COL), .TEST_BIT(TEST_BIT)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .in_state   (in_state),
    .dest_codes (dest_codes),
    .cycle_test (cycle_test),
    .next_state (next_state),
    .state      (state)
  );

  fault_detector #(.N(N), .MODE(DET_MODE)) u_detect (
    .state (state),
    .fault (fault)
  );

  output_logic #(.N(N), .P(P)) u_out (
    .state     (state),
    .out_table (out_table),
    .outs      (outs)
  );

  // One input state at a time: two closed columns would short two constants.
  a_input_onehot: assert property (@(posedge clk) $onehot0(in_state))
    else $error("more than one input state asserted: %b", in_state);

endmodule
