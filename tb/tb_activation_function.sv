// Exhaustive check of the activation function.
//
// The expected value is derived from the split machine's transition table,
// not from the cube list: f_a is 1 exactly when the next state is a
// Moore-state (LM0, LM1b, LM2b) and the input makes it loop on itself.  A
// second instance with a reduced cover (only the two LM0 cubes) must be a
// subfunction: true only for LM0 self-loops.
module tb_activation_function;
  import lm_fsm_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [1:0] in;
  logic [2:0] ns;
  logic       fa_full, fa_red;

  activation_function dut_full (.in_i(in), .st_next_i(ns), .fa_o(fa_full));

  activation_function #(
    .N_CUBES (2),
    .CARE    ({5'b01_111, 5'b11_111}),
    .VAL     ({5'b01_000, 5'b10_000})
  ) dut_red (.in_i(in), .st_next_i(ns), .fa_o(fa_red));

  function automatic bit self_loop(input logic [2:0] s, input logic [1:0] i);
    unique case (s)
      3'b000, 3'b011: return i != 2'b00;   // LM0, LM1b: -1 and 10
      3'b110:         return i == 2'b10;   // LM2b: 10
      default:        return 1'b0;         // Mealy-states and unused codes
    endcase
  endfunction

  initial begin
    int n_on = 0;
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 4; i++) begin
        ns = 3'(s);
        in = 2'(i);
        #1;
        checks++;
        if (fa_full !== self_loop(ns, in)) begin
          failures++;
          $display("FAIL full f_a ns=%b in=%b fa=%b", ns, in, fa_full);
        end
        checks++;
        if (fa_red !== (self_loop(ns, in) && ns == 3'b000)) begin
          failures++;
          $display("FAIL reduced F_a ns=%b in=%b fa=%b", ns, in, fa_red);
        end
        n_on += int'(fa_full);
      end
    end
    // ON-set size: three input values loop in LM0, three in LM1b, one in LM2b.
    checks++;
    if (n_on != 7) begin
      failures++;
      $display("FAIL f_a ON-set size %0d, expected 7", n_on);
    end
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
