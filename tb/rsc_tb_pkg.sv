// rsc_tb_pkg: reference flow tables and state assignments used by the
// controller testbenches.
//
// T1_NEXT is the six-state, three-input example flow table (states A..F as
// 0..5, next state under I_1, I_2, I_3). With the minimum-variable state
// assignment A=000 .. F=101 it is the example of the three-variable design.
// D2_CODE is a distance-two (even parity, never 0000) assignment of the same
// six states in four variables, with D2_SPARE the one even code left over as
// a spare state. T4_CODE holds the codes of the seven-state fail-safe
// example, whose state k+1 follows state k and state 1 follows state 7.
// F5_CYCLE is the order in which the eight odd-parity fault states are
// visited when they are programmed to cycle for the checker self-test.
package rsc_tb_pkg;

  localparam int T1_NEXT [6][3] = '{
    '{2, 1, 0},   // A: C B A
    '{3, 2, 1},   // B: D C B
    '{4, 3, 2},   // C: E D C
    '{5, 4, 3},   // D: F E D
    '{0, 5, 4},   // E: A F E
    '{1, 0, 5}    // F: B A F
  };

  localparam logic [3:0] D2_CODE [6] = '{4'b0101, 4'b1111, 4'b1100, 4'b1010, 4'b1001, 4'b0110};
  localparam logic [3:0] D2_SPARE    = 4'b0011;

  localparam logic [3:0] T4_CODE [7] = '{4'b0101, 4'b1111, 4'b1100, 4'b1010,
                                         4'b1001, 4'b0110, 4'b0011};

  localparam logic [3:0] F5_CYCLE [8] = '{4'b0001, 4'b0010, 4'b0100, 4'b0111,
                                          4'b1101, 4'b1110, 4'b1000, 4'b1011};

  function automatic int unsigned popcount(input logic [31:0] v);
    int unsigned c = 0;
    for (int b = 0; b < 32; b++) c += v[b];
    return c;
  endfunction

endpackage
