// Next-state and output logic of the locally-Moore example machine.
//
// The original controller is a three-state Mealy machine.  Its states S1 and
// S2 each have self-loops; S1 and S2 are split into an "a" copy that keeps
// all original incoming edges and a "b" copy that is entered only through the
// chosen self-loop class and repeats it as its own self-loop.  The b copies
// and LM0 are Moore-states, which is what lets the activation function decide
// from inputs and next state alone that nothing will change.
//
// Transition table (input {in1,in2} / output {out1,out2}, '-' = any):
//   LM0 : -1/00 -> LM0   10/00 -> LM0   00/01 -> LM1a
//   LM1a: -1/01 -> LM1b  10/01 -> LM1b  00/10 -> LM2a
//   LM1b: -1/01 -> LM1b  10/01 -> LM1b  00/10 -> LM2a
//   LM2a: 01/-1 -> LM2a  10/10 -> LM2b  00/00 -> LM0   11/11 -> LM1a
//   LM2b: 01/-1 -> LM2a  10/10 -> LM2b  00/00 -> LM0   11/11 -> LM1a
// The table and the state codes follow the published example.  Where the
// specification leaves out1 unspecified (edges 01/-1) this logic drives 0,
// and the unused state codes behave like LM0; both are choices of this design
// (a synthesis flow may use these don't-cares, and the activation function's
// ON-set, to simplify the logic further).
//
// Purely combinational: in_i and st_i come from the input and state
// registers; st_next_o feeds the state register and the activation function.
module lm_fsm_logic
  import lm_fsm_pkg::*;
(
  input  logic [IN_W-1:0]  in_i,
  input  logic [ST_W-1:0]  st_i,
  output logic [ST_W-1:0]  st_next_o,
  output logic [OUT_W-1:0] out_o
);

  logic in1, in2;
  assign in1 = in_i[1];
  assign in2 = in_i[0];

  always_comb begin
    st_next_o = LM0;
    out_o     = 2'b00;
    unique case (st_i)
      LM1A, LM1B: begin
        if (in2 || in1) begin          // -1 and 10
          st_next_o = LM1B;
          out_o     = 2'b01;
        end else begin                 // 00
          st_next_o = LM2A;
          out_o     = 2'b10;
        end
      end
      LM2A, LM2B: begin
        unique case ({in1, in2})
          2'b01: begin st_next_o = LM2A; out_o = 2'b01; end
          2'b10: begin st_next_o = LM2B; out_o = 2'b10; end
          2'b00: begin st_next_o = LM0;  out_o = 2'b00; end
          default: begin st_next_o = LM1A; out_o = 2'b11; end
        endcase
      end
      default: begin                   // LM0 and unused codes
        if (in2 || in1) begin          // -1 and 10
          st_next_o = LM0;
          out_o     = 2'b00;
        end else begin                 // 00
          st_next_o = LM1A;
          out_o     = 2'b01;
        end
      end
    endcase
  end

endmodule
