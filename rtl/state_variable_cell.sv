// state_variable_cell: the complete circuit for one next-state variable Y_i.
//
// It is the input switch matrix, a general BTS network over the present state
// y and a D flip-flop. The matrix turns the M x 2**N destination-code bits of
// this variable into one bit per present state (the column of the active
// input state); the BTS network passes the bit of the present-state row to
// the flip-flop, which loads it on the rising clock edge. Every state
// variable of a controller uses an identical copy; only the constants differ.
// The circuit depends on no particular flow table, state assignment or
// flip-flop type beyond the D flip-flop of the block diagram.
//
// Timing: d (the next-state value Y_i) is combinational from in_state, y and
// consts; q (y_i) changes one clock after. rst_n (asynchronous, active low)
// and init (synchronous, active high) load RESET_VAL; both are choices of
// this design, the architecture itself defines no reset.
module state_variable_cell #(
  parameter int unsigned N = 3,          // state variables (Figure 3: 3)
  parameter int unsigned M = 3,          // input states     (Figure 3: 3)
  parameter logic        RESET_VAL = 1'b0 // value of y_i after reset
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic [M-1:0]             in_state,  // one-hot input state
  input  logic [N-1:0]             y,         // present state, y[N-1] = y_1
  input  logic [(1<<N)-1:0][M-1:0] consts,    // destination-code bits of Y_i
  output logic                     d,         // next-state value Y_i
  output logic                     q          // state variable y_i
);

  logic [(1<<N)-1:0] row_bits;

  input_switch_matrix #(.N(N), .M(M)) u_matrix (
    .in_state (in_state),
    .consts   (consts),
    .row_bits (row_bits)
  );

  bts_network #(.N(N)) u_bts (
    .consts (row_bits),
    .sel    (y),
    .y      (d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (init) q <= RESET_VAL;
    else           q <= d;
  end

endmodule
