// systolic_array: ROWS x COLS weight-stationary systolic array.
//
// Weights are loaded one row per cycle: w_load with w_row = i writes w_vec
// (COLS weights) into row i. During computation one activation vector
// (ROWS values, one per array row) and one partial-sum vector (COLS values,
// the sums entering the top of each column) are accepted per cycle when
// in_valid is high. Activations move right along the rows and partial sums
// move down the columns, so column j produces
//   out[j] = ps_in[j] + sum_i act[i] * w[i][j].
// Inputs are skewed inside the block (row i delayed i cycles, column j's
// partial sum delayed j cycles) and outputs deskewed (column j delayed
// COLS-1-j cycles), so the caller sees whole vectors: the result of an input
// accepted in cycle t appears with out_valid in cycle t + ROWS + COLS - 1.
// The array never stalls; gaps in in_valid travel through as bubbles.
// Skew/deskew registers at the edge of the array are this design's choice;
// the document gives the weight-stationary organisation.
module systolic_array #(
  parameter int ROWS = 32,
  parameter int COLS = 32,
  parameter int AW   = 8,
  parameter int PW   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_load,
  input  logic [$clog2(ROWS)-1:0] w_row,
  input  logic [COLS*AW-1:0]      w_vec,
  input  logic                    in_valid,
  input  logic [ROWS*AW-1:0]      act_vec,
  input  logic [COLS*PW-1:0]      ps_vec,
  output logic                    out_valid,
  output logic [COLS*PW-1:0]      out_vec
);
  localparam int LAT = ROWS + COLS - 1;

  logic [AW-1:0] act_h [ROWS][COLS+1];  // activation entering PE (i,j) from the left
  logic [PW-1:0] ps_v  [ROWS+1][COLS];  // partial sum entering PE (i,j) from above

  for (genvar i = 0; i < ROWS; i++) begin : g_act_skew
    delay_line #(.W(AW), .D(i)) u_skew (
      .clk (clk), .din(act_vec[i*AW +: AW]), .dout(act_h[i][0])
    );
  end

  for (genvar j = 0; j < COLS; j++) begin : g_ps_skew
    delay_line #(.W(PW), .D(j)) u_skew (
      .clk (clk), .din(ps_vec[j*PW +: PW]), .dout(ps_v[0][j])
    );
    delay_line #(.W(PW), .D(COLS-1-j)) u_deskew (
      .clk (clk), .din(ps_v[ROWS][j]), .dout(out_vec[j*PW +: PW])
    );
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      pe #(.AW(AW), .PW(PW)) u_pe (
        .clk     (clk),
        .w_load  (w_load && (w_row == i[$clog2(ROWS)-1:0])),
        .w_in    (w_vec[j*AW +: AW]),
        .act_in  (act_h[i][j]),
        .ps_in   (ps_v[i][j]),
        .act_out (act_h[i][j+1]),
        .ps_out  (ps_v[i+1][j])
      );
    end
  end

  // Valid travels alongside with the fixed latency of the array.
  logic [LAT-1:0] vld_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_sr <= '0;
    else        vld_sr <= {vld_sr[LAT-2:0], in_valid};
  end
  assign out_valid = vld_sr[LAT-1];
endmodule
