// Timing check of the latch-based clock gate.
//
// The global clock has a 10 ns period, 5 ns low and 5 ns high.
// Each period applies one scenario on the activation input and counts the
// rising and falling edges of the local clock in that period:
//   enable      fa = 0 during the low phase            -> one full pulse
//   stop        fa = 1 during the low phase            -> no pulse
//   high glitch fa = 0, then a 1 ns pulse while high   -> one full pulse
//   late rise   fa = 0, then rises while clk is high   -> this pulse full,
//                                                         next one stopped
//   low glitch  fa = 1 pulse of 1 ns inside low phase  -> one full pulse
//   reset       fa = 1 but reset held                  -> one full pulse
// A full pulse means exactly one rising and one falling edge, the falling one
// at the falling edge of the global clock (no early drop).
module tb_clock_gate;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fa = 1'b0;
  logic fa_lat, gclk;

  int n_rise = 0;
  int n_fall = 0;
  int n_scn  = 0;

  clock_gate dut (.clk_i(clk), .rst_ni(rst_n), .fa_i(fa), .fa_lat_o(fa_lat), .gclk_o(gclk));

  always @(posedge gclk) n_rise++;
  always @(negedge gclk) n_fall++;

  // Called right after a falling edge of clk; takes 1 ns of the low phase.
  task automatic expect_edges(input int rise, input int fall, input string what);
    #1;
    checks++;
    n_scn++;
    if (n_rise != rise || n_fall != fall) begin
      failures++;
      $display("FAIL %s: gclk rose %0d fell %0d times, expected %0d/%0d", what, n_rise, n_fall, rise, fall);
    end
    n_rise = 0;
    n_fall = 0;
  endtask

  // One period starting at the beginning of the low phase.
  // fa_low: value during low phase; glitch_hi/glitch_lo: 1 ns pulse times.
  task automatic period(input logic fa_low, input logic glitch_lo, input logic glitch_hi,
                        input logic rise_hi);
    fa = fa_low;
    if (glitch_lo) begin
      #1 fa = 1'b1;
      #1 fa = fa_low;
      #2 clk = 1'b1;
    end else begin
      #4 clk = 1'b1;
    end
    if (glitch_hi) begin
      #1 fa = 1'b1;
      #1 fa = fa_low;
      #1;
      checks++;
      if (gclk !== 1'b1) begin
        failures++;
        $display("FAIL local clock dropped after glitch at %0t", $time);
      end
      #2 clk = 1'b0;
    end else if (rise_hi) begin
      #2 fa = 1'b1;
      #1;
      checks++;
      if (gclk !== 1'b1) begin
        failures++;
        $display("FAIL local clock dropped when f_a rose at %0t", $time);
      end
      #2 clk = 1'b0;
    end else begin
      #5 clk = 1'b0;
    end
  endtask

  initial begin
    // Reset held: the gate must pass the clock although fa = 1.  Edges at
    // time 0 (power-up values settling) are not counted.
    fa = 1'b1;
    #1;
    n_rise = 0;
    n_fall = 0;
    #4 clk = 1'b1;
    #5 clk = 1'b0;
    expect_edges(1, 1, "reset forces the clock on");
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      period(1'b0, 1'b0, 1'b0, 1'b0); expect_edges(1, 1, "enable");
      period(1'b1, 1'b0, 1'b0, 1'b0); expect_edges(0, 0, "stop");
      period(1'b0, 1'b0, 1'b1, 1'b0); expect_edges(1, 1, "glitch while clock high");
      period(1'b0, 1'b0, 1'b0, 1'b1); expect_edges(1, 1, "f_a rises while clock high");
      // f_a is still 1 from the previous period during this low phase
      fa = 1'b1;
      #4 clk = 1'b1;
      #5 clk = 1'b0;
      expect_edges(0, 0, "stopped after late rise");
      period(1'b0, 1'b1, 1'b0, 1'b0); expect_edges(1, 1, "glitch while clock low");
      period(1'b1, 1'b0, 1'b0, 1'b0); expect_edges(0, 0, "stop again");
    end
    checks++;
    if (n_scn != 22) begin
      failures++;
      $display("FAIL ran %0d scenarios", n_scn);
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
