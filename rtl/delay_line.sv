// delay_line: a W-bit shift register of D stages (D = 0 is a plain wire).
// Used to skew array inputs and deskew array outputs. No reset: the
// contents are only read once valid data has passed through.
module delay_line #(
  parameter int W = 8,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
    assign dout = stage[D-1];
  end
endmodule
