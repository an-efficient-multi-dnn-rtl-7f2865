// simd_vector_unit: lane-parallel post-processing of the array's results.
//
// Each of the LANES lanes takes one 32-bit result per input vector. With
// relu_en the lane clamps negative values to zero. With pool_len = N > 1 the
// unit max-pools over N consecutive input vectors (one output per N inputs,
// lane by lane); pool_len of 0 or 1 passes every vector. Output is
// registered: out_valid follows the completing input by one cycle. clear
// restarts the pooling window. The document names activation and pooling as
// the unit's jobs; the choice of ReLU and 1-D max pooling over consecutive
// output vectors is this design's.
module simd_vector_unit #(
  parameter int LANES = 32,
  parameter int W     = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               relu_en,
  input  logic [7:0]         pool_len,
  input  logic               in_valid,
  input  logic [LANES*W-1:0] in_vec,
  output logic               out_valid,
  output logic [LANES*W-1:0] out_vec
);
  logic [LANES*W-1:0] act_vec;   // after activation
  logic [LANES*W-1:0] max_q;     // running maximum of the current window
  logic [LANES*W-1:0] max_next;
  logic [7:0]         cnt_q;     // inputs already in the window
  logic               last;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [W-1:0] v;
      v = in_vec[l*W +: W];
      if (relu_en && v < 0) v = '0;
      act_vec[l*W +: W] = v;
      if (cnt_q == 0 || $signed(v) > $signed(max_q[l*W +: W]))
        max_next[l*W +: W] = v;
      else
        max_next[l*W +: W] = max_q[l*W +: W];
    end
  end

  assign last = (pool_len <= 8'd1) || (cnt_q == pool_len - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && last && !clear;
      if (clear)                cnt_q <= '0;
      else if (in_valid)        cnt_q <= last ? 8'd0 : cnt_q + 8'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      max_q   <= max_next;
      out_vec <= (pool_len <= 8'd1) ? act_vec : max_next;
    end
  end
endmodule
