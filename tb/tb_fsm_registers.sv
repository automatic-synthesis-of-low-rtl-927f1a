// Check of the input/state register bank: rising-edge load, hold between
// edges, and asynchronous reset that acts without any clock edge.
module tb_fsm_registers;

  localparam int unsigned IN_W = 2;
  localparam int unsigned ST_W = 3;
  localparam logic [IN_W-1:0] RIN = 2'b10;
  localparam logic [ST_W-1:0] RST = 3'b101;

  int checks = 0;
  int failures = 0;

  logic            clk = 1'b0;
  logic            rst_n = 1'b1;
  logic [IN_W-1:0] in_d, in_q;
  logic [ST_W-1:0] st_d, st_q;
  logic [IN_W-1:0] exp_in;
  logic [ST_W-1:0] exp_st;

  fsm_registers #(.IN_W(IN_W), .ST_W(ST_W), .RST_IN(RIN), .RST_ST(RST)) dut (
    .clk_i(clk), .rst_ni(rst_n), .in_d_i(in_d), .st_d_i(st_d),
    .in_q_o(in_q), .st_q_o(st_q)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: in_q=%b st_q=%b exp %b %b", what, $time, in_q, st_q, exp_in, exp_st);
    end
  endtask

  initial begin
    in_d = '0;
    st_d = '0;
    #1 rst_n = 1'b0;
    #2;
    check(in_q == RIN && st_q == RST, "reset value");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      in_d = IN_W'($urandom);
      st_d = ST_W'($urandom);
      exp_in = in_d;
      exp_st = st_d;
      #2 clk = 1'b1;            // rising edge loads
      #1;
      check(in_q == exp_in && st_q == exp_st, "load on rising edge");
      in_d = ~in_d;             // change data while clock is high
      st_d = ~st_d;
      #2 clk = 1'b0;
      #1;
      check(in_q == exp_in && st_q == exp_st, "hold between edges");
      if (n % 37 == 20) begin
        // asynchronous reset with the clock held low
        rst_n = 1'b0;
        #1;
        check(in_q == RIN && st_q == RST, "asynchronous reset");
        #1 rst_n = 1'b1;
        #1;
        check(in_q == RIN && st_q == RST, "reset value held after release");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
