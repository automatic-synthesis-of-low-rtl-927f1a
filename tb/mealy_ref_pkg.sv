// Reference model of the original three-state Mealy controller, used by the
// testbenches to check the locally-Moore gated-clock implementation.
//
// Transition table (input {in1,in2} / output {out1,out2}, '-' = unspecified):
//   S0: -1/-0 -> S0   10/00 -> S0   00/01 -> S1
//   S1: -1/01 -> S1   10/01 -> S1   00/10 -> S2
//   S2: 10/10 -> S2   01/-1 -> S2   00/00 -> S0   11/11 -> S1
// ref_step returns the next state, the output and a care mask for the output
// (a 0 bit marks an unspecified output bit).  lm_to_mealy maps a state code of
// the split machine back to the original state it was split from.
package mealy_ref_pkg;

  typedef struct packed {
    logic [1:0] next;
    logic [1:0] out;
    logic [1:0] care;
  } ref_edge_t;

  function automatic ref_edge_t ref_step(input logic [1:0] s, input logic [1:0] in);
    ref_edge_t e;
    e.care = 2'b11;
    unique case (s)
      2'd0: begin
        if (in[0])          begin e.next = 2'd0; e.out = 2'b00; e.care = 2'b01; end
        else if (in[1])     begin e.next = 2'd0; e.out = 2'b00; end
        else                begin e.next = 2'd1; e.out = 2'b01; end
      end
      2'd1: begin
        if (in != 2'b00)    begin e.next = 2'd1; e.out = 2'b01; end
        else                begin e.next = 2'd2; e.out = 2'b10; end
      end
      default: begin
        unique case (in)
          2'b10:   begin e.next = 2'd2; e.out = 2'b10; end
          2'b01:   begin e.next = 2'd2; e.out = 2'b01; e.care = 2'b01; end
          2'b00:   begin e.next = 2'd0; e.out = 2'b00; end
          default: begin e.next = 2'd1; e.out = 2'b11; end
        endcase
      end
    endcase
    return e;
  endfunction

  // State codes of the split machine: 000 LM0, 001 LM1a, 011 LM1b,
  // 010 LM2a, 110 LM2b.  Returns 3 for a code that is not a state.
  function automatic logic [1:0] lm_to_mealy(input logic [2:0] code);
    unique case (code)
      3'b000:          return 2'd0;
      3'b001, 3'b011:  return 2'd1;
      3'b010, 3'b110:  return 2'd2;
      default:         return 2'd3;
    endcase
  endfunction

endpackage
