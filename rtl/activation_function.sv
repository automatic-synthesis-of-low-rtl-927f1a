// Activation function of a gated-clock FSM.
//
// fa_o is 1 when the machine is about to take a self-loop of a Moore-state:
// the next state equals the present one and the output cannot change, so the
// coming clock edge can be suppressed.  It is evaluated from the primary
// inputs (before the input register) and the next-state lines, i.e. from the
// values the registers would load at the coming edge; no FSM output is used.
//
// The function is a two-level sum of N_CUBES cubes over {in, next_state}
// (inputs in the most significant bits).  Cube k is true when
// ({in_i, st_next_i} & CARE[k]) == VAL[k].  Any subset of the cubes of the
// complete activation function f_a is a valid subfunction F_a: it stops the
// clock less often but costs less logic.  The default is the complete f_a of
// the published example; the cube encoding is this design's own.
//
// Purely combinational; its delay adds to the critical path in front of the
// clock-gating latch.
module activation_function
  import lm_fsm_pkg::*;
#(
  parameter int unsigned                    IN_WIDTH = IN_W,
  parameter int unsigned                    ST_WIDTH = ST_W,
  parameter int unsigned                    N_CUBES  = FA_FULL_N,
  parameter logic [N_CUBES-1:0][IN_WIDTH+ST_WIDTH-1:0] CARE = FA_FULL_CARE,
  parameter logic [N_CUBES-1:0][IN_WIDTH+ST_WIDTH-1:0] VAL  = FA_FULL_VAL
) (
  input  logic [IN_WIDTH-1:0] in_i,
  input  logic [ST_WIDTH-1:0] st_next_i,
  output logic                fa_o
);

  logic [IN_WIDTH+ST_WIDTH-1:0] x;
  logic [N_CUBES-1:0]           cube_hit;

  assign x = {in_i, st_next_i};

  always_comb begin
    for (int unsigned k = 0; k < N_CUBES; k++) begin
      cube_hit[k] = ((x & CARE[k]) == VAL[k]);
    end
  end

  assign fa_o = |cube_hit;

endmodule
