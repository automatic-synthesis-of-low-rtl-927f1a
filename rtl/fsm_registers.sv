// Input and state register bank of a flip-flop based FSM.
//
// The FSM model used here keeps flip-flops on its primary inputs as well as on
// its state lines, so the combinational logic only ever sees registered
// values and the outputs lag the inputs by one clock cycle.  Both registers
// load on the rising edge of clk_i.  In the gated-clock machine clk_i is the
// local clock GCLK: a suppressed edge leaves inputs and state unchanged.
//
// Reset is asynchronous and active low, so it takes effect even while the
// local clock is stopped; it loads RST_IN into the input register and
// RST_ST into the state register.  The reset values and the reset style are
// choices of this design.
//
// Interface: in_d_i/st_d_i are sampled, in_q_o/st_q_o are the register
// contents.  Latency: one clk_i edge.
module fsm_registers #(
  parameter int unsigned      IN_W   = 2,
  parameter int unsigned      ST_W   = 3,
  parameter logic [IN_W-1:0]  RST_IN = '0,
  parameter logic [ST_W-1:0]  RST_ST = '0
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [IN_W-1:0] in_d_i,
  input  logic [ST_W-1:0] st_d_i,
  output logic [IN_W-1:0] in_q_o,
  output logic [ST_W-1:0] st_q_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      in_q_o <= RST_IN;
      st_q_o <= RST_ST;
    end else begin
      in_q_o <= in_d_i;
      st_q_o <= st_d_i;
    end
  end

endmodule
