// pe: one weight-stationary processing element.
//
// The PE keeps one weight in a register. Each cycle it passes the incoming
// activation to its right-hand neighbour and the incoming partial sum plus
// activation*weight to the PE below; both outputs are registered, so data
// advances one PE per cycle in each direction. A new weight is latched when
// w_load is high. The weight-stationary dataflow is the document's; operand
// widths (signed 8-bit activations and weights, 32-bit partial sums) are
// this design's choice.
module pe #(
  parameter int AW = 8,
  parameter int PW = 32
) (
  input  logic                 clk,
  input  logic                 w_load,
  input  logic signed [AW-1:0] w_in,
  input  logic signed [AW-1:0] act_in,
  input  logic signed [PW-1:0] ps_in,
  output logic signed [AW-1:0] act_out,
  output logic signed [PW-1:0] ps_out
);
  logic signed [AW-1:0]   w_q;
  logic signed [2*AW-1:0] prod;

  assign prod = act_in * w_q;

  always_ff @(posedge clk) begin
    if (w_load) w_q <= w_in;
    act_out <= act_in;
    ps_out  <= ps_in + PW'(prod);
  end
endmodule
