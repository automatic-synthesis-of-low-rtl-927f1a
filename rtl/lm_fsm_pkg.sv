// Shared types and constants of the locally-Moore gated-clock example machine.
//
// The machine is the three-state Mealy controller S0/S1/S2 with two inputs
// {in1, in2} and two outputs {out1, out2}, after its states S1 and S2 have been
// split so that each state with a chosen self-loop is a Moore-state (every edge
// entering it carries the same output).  The five states and their three-bit
// codes {v1, v2, v3} are those of the published example:
//   LM0 = 000, LM1a = 001, LM2a = 010, LM1b = 011, LM2b = 110.
// The three unused codes 100, 101 and 111 are never reached from reset.
//
// The activation function is given as a list of cubes over the five signals
// {in1, in2, v1, v2, v3} (inputs in the two most significant positions).  A
// cube is a CARE mask and a VALUE: the cube is true when (x & CARE) == VALUE.
// The default list is the complete activation function f_a of the example:
//   f_a = in2 v1'v2'v3' + in1 in2' v1'v2'v3'     (LM0 self-loops -1 and 10)
//       + in2 v1'v2 v3  + in1 in2' v1'v2 v3      (LM1b self-loops -1 and 10)
//       + in1 in2' v1 v2 v3'                      (LM2b self-loop 10)
package lm_fsm_pkg;

  localparam int unsigned IN_W  = 2;  // {in1, in2}
  localparam int unsigned OUT_W = 2;  // {out1, out2}
  localparam int unsigned ST_W  = 3;  // {v1, v2, v3}
  localparam int unsigned FA_W  = IN_W + ST_W;

  typedef enum logic [ST_W-1:0] {
    LM0  = 3'b000,
    LM1A = 3'b001,
    LM2A = 3'b010,
    LM1B = 3'b011,
    LM2B = 3'b110
  } lm_state_e;

  // Reset state of the machine (s0 = S0 of the original Mealy machine).
  localparam lm_state_e RESET_STATE = LM0;

  // Complete activation function of the example, five cubes.
  localparam int unsigned FA_FULL_N = 5;
  localparam logic [FA_FULL_N-1:0][FA_W-1:0] FA_FULL_CARE = {
    5'b01_111,  // in2 . LM0
    5'b11_111,  // in1 in2' . LM0
    5'b01_111,  // in2 . LM1b
    5'b11_111,  // in1 in2' . LM1b
    5'b11_111   // in1 in2' . LM2b
  };
  localparam logic [FA_FULL_N-1:0][FA_W-1:0] FA_FULL_VAL = {
    5'b01_000,
    5'b10_000,
    5'b01_011,
    5'b10_011,
    5'b10_110
  };

endpackage
