// sm_core: the next-state machine of a programmable synchronous controller.
//
// N identical state_variable_cell circuits, one per state variable, share the
// one-hot input state and the present state vector. Cell k (bit N-k of the
// state, y_k) takes bit N-k of every destination code, so the flow table
// exists only as the dest_codes constants: dest_codes[s][j-1] is the code of
// the next state of S_s under input I_j. Any flow table with up to 2**N
// states and M inputs runs on the same hardware; one present state and one
// input select one pass path per cell, which delivers the next-state code to
// the flip-flops. Since no logic is shared between state variables, a single
// fault inside one cell can corrupt at most one state bit.
//
// Cycle test: while cycle_test is 1, the single constant at row TEST_STATE,
// column TEST_COL of the cell for state bit TEST_BIT is inverted. Entering
// that transition then lands at distance one from the programmed next state,
// i.e. in a fault state of a distance-two assignment, so the fault detector
// can be exercised off-line. The inverted position is a parameter of this
// design.
//
// Timing: next_state is combinational; state takes it at each rising edge.
// rst_n (asynchronous) and init (synchronous) load RESET_STATE.
module sm_core #(
  parameter int unsigned N           = 3,  // state variables (Figure 3: 3)
  parameter int unsigned M           = 3,  // input states     (Figure 3: 3)
  parameter int unsigned RESET_STATE = 0,  // state code after reset
  parameter int unsigned TEST_STATE  = 0,  // row of the cycle-test constant
  parameter int unsigned TEST_COL    = 0,  // input column (0 = I_1)
  parameter int unsigned TEST_BIT    = 0   // state bit (0 = y_N)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            init,
  input  logic [M-1:0]                    in_state,   // one-hot, bit j-1 = I_j
  input  logic [(1<<N)-1:0][M-1:0][N-1:0] dest_codes, // next-state code table
  input  logic                            cycle_test, // invert the test constant
  output logic [N-1:0]                    next_state, // Y_1..Y_N (combinational)
  output logic [N-1:0]                    state       // y_1..y_N, y_1 = MSB
);

  localparam int unsigned NS = 1 << N;
  localparam logic [N-1:0] RESET_CODE = N'(RESET_STATE);

  for (genvar b = 0; b < N; b++) begin : g_var
    logic [NS-1:0][M-1:0] consts;

    always_comb begin
      for (int unsigned s = 0; s < NS; s++) begin
        for (int unsigned j = 0; j < M; j++) begin
          consts[s][j] = dest_codes[s][j][b];
        end
      end
      if (b == TEST_BIT) begin
        consts[TEST_STATE][TEST_COL] = dest_codes[TEST_STATE][TEST_COL][b] ^ cycle_test;
      end
    end

    state_variable_cell #(.N(N), .M(M), .RESET_VAL(RESET_CODE[b])) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .init     (init),
      .in_state (in_state),
      .y        (state),
      .consts   (consts),
      .d        (next_state[b]),
      .q        (state[b])
    );
  end

endmodule
