// Locally-Moore gated-clock finite-state machine (top level).
//
// The example Mealy controller (three states, inputs {in1,in2}, outputs
// {out1,out2}) is implemented as its locally-Moore equivalent with a stopped
// clock whenever it is about to stay in a Moore-state through a self-loop:
//
//   in_i ──► fsm_registers ──► lm_fsm_logic ──► out_o
//              ▲   (GCLK)         │ st_next
//              └──────────────────┤
//   in_i, st_next ──► activation_function ──► clock_gate (latch + AND) ──► GCLK
//
// The registers hold the inputs and the state and are clocked by the local
// clock GCLK.  The activation function looks at the unregistered inputs and
// the next-state lines, i.e. at what the registers would load at the coming
// edge.  When it is 1, that edge is suppressed: the registers keep their old
// contents, which already produce the same next state and the same output,
// so the machine behaves exactly as if it had been clocked.  Outputs follow
// the registered inputs, one clock after the primary inputs.  Note that while
// the clock is stopped the state register may still hold the predecessor of
// the Moore-state (e.g. LM1a while the machine idles in LM1b); the machine's
// state is then the one on the next-state lines.
//
// FA_N/FA_CARE/FA_VAL choose the cover of the activation function; the
// default is the complete f_a of the example.  Any subset of its cubes (a
// reduced activation function) keeps the behaviour and only stops the clock
// less often.  This wiring follows the published structure; the reset style
// and the observation ports (st_o, st_next_o, fa_o, clk_stop_o, gclk_o) are
// this design's own.
module gated_clock_fsm
  import lm_fsm_pkg::*;
#(
  parameter int unsigned                    FA_N    = FA_FULL_N,
  parameter logic [FA_N-1:0][FA_W-1:0]      FA_CARE = FA_FULL_CARE,
  parameter logic [FA_N-1:0][FA_W-1:0]      FA_VAL  = FA_FULL_VAL
) (
  input  logic             clk_i,       // global clock CLK
  input  logic             rst_ni,      // asynchronous active-low reset
  input  logic [IN_W-1:0]  in_i,        // primary inputs {in1, in2}
  output logic [OUT_W-1:0] out_o,       // outputs {out1, out2}
  output logic [ST_W-1:0]  st_o,        // present state (register)
  output logic [ST_W-1:0]  st_next_o,   // next-state lines
  output logic             fa_o,        // activation function
  output logic             clk_stop_o,  // latched activation (1 = edge suppressed)
  output logic             gclk_o       // local clock GCLK
);

  logic [IN_W-1:0] in_q;

  clock_gate u_clock_gate (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .fa_i     (fa_o),
    .fa_lat_o (clk_stop_o),
    .gclk_o   (gclk_o)
  );

  fsm_registers #(
    .IN_W   (IN_W),
    .ST_W   (ST_W),
    .RST_IN ('0),
    .RST_ST (RESET_STATE)
  ) u_registers (
    .clk_i  (gclk_o),
    .rst_ni (rst_ni),
    .in_d_i (in_i),
    .st_d_i (st_next_o),
    .in_q_o (in_q),
    .st_q_o (st_o)
  );

  lm_fsm_logic u_logic (
    .in_i      (in_q),
    .st_i      (st_o),
    .st_next_o (st_next_o),
    .out_o     (out_o)
  );

  activation_function #(
    .IN_WIDTH (IN_W),
    .ST_WIDTH (ST_W),
    .N_CUBES  (FA_N),
    .CARE     (FA_CARE),
    .VAL      (FA_VAL)
  ) u_activation (
    .in_i      (in_i),
    .st_next_i (st_next_o),
    .fa_o      (fa_o)
  );

  // A stopped edge is only safe when the machine is about to stay in a
  // Moore-state: any cover given in FA_CARE/FA_VAL must be a subfunction of
  // the complete activation function.
  a_stop_in_moore_state : assert property (
    @(posedge clk_i) disable iff (!rst_ni)
      clk_stop_o |-> st_next_o inside {LM0, LM1B, LM2B}
  ) else $error("clock stopped outside a Moore-state self-loop");

endmodule
