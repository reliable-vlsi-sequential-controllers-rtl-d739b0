// program_store: the rewritable constants that define the flow table.
//
// The destination codes feeding the input switch matrices (and the output
// words feeding the output networks) are held in registers instead of being
// tied to supply lines, so the flow table can be changed at any time: to load
// a new controller program, to give fault states fail-safe or cycle-test
// entries, or to steer transitions away from a pass path found faulty
// (adaptive operation). All entries are read in parallel every cycle.
//
// Write ports (one entry per clock each, taking effect at the rising edge):
//   dc_we/dc_state/dc_col/dc_code  next-state code of S_dc_state under I_(dc_col+1)
//   ow_we/ow_state/ow_data         output word of S_ow_state
// rst_n (asynchronous, active low) clears every entry to 0: every next state
// becomes S_0 and every output 0, the fail-safe entries. Register storage,
// the two write ports and the reset value are choices of this design.
module program_store #(
  parameter int unsigned N  = 4,                    // state variables
  parameter int unsigned M  = 3,                    // input states
  parameter int unsigned P  = 2,                    // output bits (assumed)
  parameter int unsigned CW = (M > 1) ? $clog2(M) : 1  // column index width
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            dc_we,
  input  logic [N-1:0]                    dc_state,
  input  logic [CW-1:0]                   dc_col,
  input  logic [N-1:0]                    dc_code,
  input  logic                            ow_we,
  input  logic [N-1:0]                    ow_state,
  input  logic [P-1:0]                    ow_data,
  output logic [(1<<N)-1:0][M-1:0][N-1:0] dest_codes,
  output logic [(1<<N)-1:0][P-1:0]        out_table
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dest_codes <= '0;
      out_table  <= '0;
    end else begin
      if (dc_we && (int'(dc_col) < M)) dest_codes[dc_state][dc_col] <= dc_code;
      if (ow_we) out_table[ow_state] <= ow_data;
    end
  end

endmodule
