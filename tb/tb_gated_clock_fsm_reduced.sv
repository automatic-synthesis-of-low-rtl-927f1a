// End-to-end test of the gated-clock FSM with a reduced activation function
// F_a: only the two cubes of LM0 (the idle state of the controller) are
// kept, in the way a cost-constrained choice of a subfunction would keep the
// most probable, cheapest idle condition.  Any subfunction of f_a must leave
// the behaviour unchanged and only stop the clock less often.
//
// Checks are those of the full test: equivalence with the original Mealy
// machine on every cycle, registers held on every suppressed edge, and the
// fraction of suppressed edges with uniform inputs, here the probability that
// the next state is LM0 (1/4) times the probability of an LM0 self-loop
// input (3/4): 3/16; with P(in1)=0.7, P(in2)=0.5 it is 3/16 * 0.85 = 0.1594.
// The clock must never stop in LM1b or LM2b.
module tb_gated_clock_fsm_reduced;
  import mealy_ref_pkg::*;

  localparam int N_UNIFORM  = 20000;
  localparam int N_BIASED   = 10000;
  localparam int N_REACTIVE = 10000;
  localparam int N_TOTAL    = N_UNIFORM + N_BIASED + N_REACTIVE;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [1:0] in = 2'b00;
  logic [1:0] out;
  logic [2:0] st3, st_next3;
  logic       fa, clk_stop, gclk;

  gated_clock_fsm #(
    .FA_N    (2),
    .FA_CARE ({5'b01_111, 5'b11_111}),
    .FA_VAL  ({5'b01_000, 5'b10_000})
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .in_i(in), .out_o(out), .st_o(st3),
    .st_next_o(st_next3), .fa_o(fa), .clk_stop_o(clk_stop), .gclk_o(gclk)
  );

  // Reference: original Mealy machine with registered inputs.
  logic [1:0] ref_in_q, ref_s;
  ref_edge_t  ref_e;
  assign ref_e = ref_step(ref_s, ref_in_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_in_q <= 2'b00;
      ref_s    <= 2'd0;
    end else begin
      ref_in_q <= in;
      ref_s    <= ref_e.next;
    end
  end

  always #5 clk = ~clk;

  // Mechanism counters
  int n_edges = 0, n_stopped = 0, n_gclk = 0;
  int n_stop_lm0 = 0, n_stop_lm1b = 0, n_stop_lm2b = 0;
  int n_enter_lm1b = 0, n_enter_lm2b = 0, n_lm2a_loop = 0, n_reset = 0;
  int win_edges = 0, win_stopped = 0;

  always @(posedge gclk) n_gclk++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: in=%b st=%b ns=%b out=%b | ref s=%0d in_q=%b ns=%0d out=%b care=%b",
                 what, $time, in, st3, st_next3, out, ref_s, ref_in_q, ref_e.next, ref_e.out, ref_e.care);
    end
  endtask

  // Compare just before each rising edge and record what the edge will do.
  task automatic compare_and_count();
    logic [2:0] st_before;
    logic [2:0] ns_before;
    bit stop;
    check(((out ^ ref_e.out) & ref_e.care) == 2'b00, "output");
    check(lm_to_mealy(st_next3) == ref_e.next, "next state");
    stop = clk_stop;
    st_before = st3;
    ns_before = st_next3;
    check(stop == fa, "latched activation equals f_a");
    if (stop) begin
      unique case (st_next3)
        3'b000: n_stop_lm0++;
        3'b011: n_stop_lm1b++;
        3'b110: n_stop_lm2b++;
        default: check(1'b0, "clock stopped outside a Moore-state");
      endcase
    end
    if (st_next3 == 3'b011 && st3 != 3'b011) n_enter_lm1b++;
    if (st_next3 == 3'b110 && st3 != 3'b110) n_enter_lm2b++;
    if (st3 == 3'b010 && st_next3 == 3'b010) begin
      n_lm2a_loop++;
      check(!fa, "no stop on a Mealy-state self-loop");
    end
    n_edges++;
    n_stopped += int'(stop);
    win_edges++;
    win_stopped += int'(stop);
    @(posedge clk);
    #1;
    if (stop) check(st3 == st_before, "registers hold on a suppressed edge");
    else      check(st3 == ns_before, "registers load on a local clock edge");
  endtask

  task automatic one_cycle(input logic [1:0] value);
    @(negedge clk);
    #2 in = value;
    #2;   // 1 ns before the rising edge
    compare_and_count();
  endtask

  function automatic logic [1:0] biased_input();
    logic i1, i2;
    i1 = ($urandom % 10) < 7;
    i2 = ($urandom % 2) == 1;
    return {i1, i2};
  endfunction

  initial begin
    real frac;
    #1 rst_n = 1'b0;
    #7 rst_n = 1'b1;
    n_reset++;
    // The input register resets to 00, so the reset state LM0 shows the
    // output of its 00 edge.
    check(st3 == 3'b000 && out == 2'b01 && st_next3 == 3'b001, "reset state");
    // Latency: an input shows at the output one rising edge after it is applied.
    one_cycle(2'b00);
    check(out == 2'b10 && st3 == 3'b001, "LM1a with input 00");
    @(negedge clk);
    #2 in = 2'b11;
    #1;
    check(out == 2'b10, "input not visible before the edge");
    #1 compare_and_count();
    check(out == 2'b11 && st3 == 3'b010, "output 11 one edge after input 11");

    win_edges = 0;
    win_stopped = 0;
    for (int n = 0; n < N_UNIFORM; n++) begin
      one_cycle(2'($urandom));
      if (n == N_UNIFORM / 2) begin
        // asynchronous reset in the middle of operation
        @(negedge clk);
        #1 rst_n = 1'b0;
        in = 2'b00;
        #2;
        check(st3 == 3'b000 && out == 2'b01, "asynchronous reset");
        rst_n = 1'b1;
        n_reset++;
      end
    end
    frac = real'(win_stopped) / real'(win_edges);
    $display("uniform inputs: %0d of %0d edges suppressed (%f, expected 0.1875)",
             win_stopped, win_edges, frac);
    check(frac > 3.0/16.0 - 0.02 && frac < 3.0/16.0 + 0.02, "fraction of stopped edges");

    win_edges = 0;
    win_stopped = 0;
    for (int n = 0; n < N_BIASED; n++) one_cycle(biased_input());
    frac = real'(win_stopped) / real'(win_edges);
    $display("biased inputs: %0d of %0d edges suppressed (%f, expected 0.159)",
             win_stopped, win_edges, frac);
    check(frac > 0.159375 - 0.02 && frac < 0.159375 + 0.02, "fraction of stopped edges, biased inputs");

    win_edges = 0;
    win_stopped = 0;
    for (int n = 0; n < N_REACTIVE; ) begin
      logic [1:0] v;
      int run;
      v = 2'($urandom);
      run = 1 + int'($urandom % 40);
      for (int k = 0; k < run && n < N_REACTIVE; k++, n++) one_cycle(v);
    end
    $display("reactive inputs: %0d of %0d edges suppressed", win_stopped, win_edges);

    // Every rising edge of the global clock after reset is either passed to
    // the local clock or stopped (two extra edges come from the reset cycles).
    check(n_gclk + n_stopped >= n_edges && n_gclk + n_stopped <= n_edges + 2,
          "local clock edges plus stopped edges cover all edges");
    $display("stopped in LM0 %0d, LM1b %0d, LM2b %0d; entered LM1b %0d, LM2b %0d; LM2a loops %0d; resets %0d",
             n_stop_lm0, n_stop_lm1b, n_stop_lm2b, n_enter_lm1b, n_enter_lm2b, n_lm2a_loop, n_reset);
    check(n_stop_lm0 > 0,   "clock stopped in LM0");
    check(n_stop_lm1b == 0, "clock never stopped in LM1b");
    check(n_stop_lm2b == 0, "clock never stopped in LM2b");
    check(n_enter_lm1b > 0, "split state LM1b entered");
    check(n_enter_lm2b > 0, "split state LM2b entered");
    check(n_lm2a_loop > 0,  "Mealy-state self-loop taken with clock running");
    check(n_reset > 1,      "reset during operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((N_TOTAL + 1000) * 10 * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
