// Exhaustive check of the locally-Moore next-state and output logic.
//
// For every state code and input value the testbench checks:
//  - the exact next state of the split machine, from an edge list written
//    down independently of the RTL;
//  - equivalence with the original Mealy machine: the split state maps back
//    to the original next state and the output agrees on all specified bits;
//  - the Moore property of LM0, LM1b and LM2b: every edge entering one of
//    them carries the same output.
module tb_lm_fsm_logic;
  import mealy_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [1:0] in;
  logic [2:0] st, st_next;
  logic [1:0] out;

  lm_fsm_logic dut (.in_i(in), .st_i(st), .st_next_o(st_next), .out_o(out));

  // Expected next state per (state, input), input index = {in1,in2}.
  function automatic logic [2:0] exp_next(input logic [2:0] s, input logic [1:0] i);
    unique case (s)
      3'b000:         return (i == 2'b00) ? 3'b001 : 3'b000;
      3'b001, 3'b011: return (i == 2'b00) ? 3'b010 : 3'b011;
      3'b010, 3'b110: begin
        unique case (i)
          2'b01:   return 3'b010;
          2'b10:   return 3'b110;
          2'b00:   return 3'b000;
          default: return 3'b001;
        endcase
      end
      default:        return 3'bxxx;
    endcase
  endfunction

  logic       moore_seen [3];
  logic [1:0] moore_out  [3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: st=%b in=%b next=%b out=%b", what, st, in, st_next, out);
    end
  endtask

  initial begin
    ref_edge_t e;
    int idx;
    foreach (moore_seen[k]) moore_seen[k] = 1'b0;
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 4; i++) begin
        st = 3'(s);
        in = 2'(i);
        #1;
        if (lm_to_mealy(st) == 2'd3) continue;   // unused code
        check(st_next == exp_next(st, in), "next state");
        e = ref_step(lm_to_mealy(st), in);
        check(lm_to_mealy(st_next) == e.next, "Mealy next state");
        check(((out ^ e.out) & e.care) == 2'b00, "Mealy output");
        idx = (st_next == 3'b000) ? 0 : (st_next == 3'b011) ? 1 : (st_next == 3'b110) ? 2 : -1;
        if (idx >= 0) begin
          if (moore_seen[idx]) check(out == moore_out[idx], "Moore-state output");
          moore_seen[idx] = 1'b1;
          moore_out[idx]  = out;
        end
      end
    end
    check(moore_out[0] == 2'b00 && moore_out[1] == 2'b01 && moore_out[2] == 2'b10,
          "Moore-state output values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
