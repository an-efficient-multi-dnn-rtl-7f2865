// tb_simd_vector_unit: random vectors through the SIMD unit in four
// settings (pass, ReLU, max-pool of 3, ReLU + max-pool of 2). Expected
// outputs are computed here lane by lane; each output must come one cycle
// after the input that completes its window.
module tb_simd_vector_unit;
  localparam int LANES = 4, W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic               clear, relu_en, in_valid, out_valid;
  logic [7:0]         pool_len;
  logic [LANES*W-1:0] in_vec, out_vec;

  simd_vector_unit #(.LANES(LANES), .W(W)) dut (.*);

  logic [LANES*W-1:0] exp_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [LANES*W-1:0] e;
        e = exp_q.pop_front();
        if (e !== out_vec) begin failures++; $display("exp %h got %h", e, out_vec); end
      end
    end
  end

  task automatic run(input bit relu, input int pl, input int nvec);
    logic signed [W-1:0] mx [LANES];
    int k;
    @(negedge clk);
    relu_en = relu; pool_len = 8'(pl); clear = 1; in_valid = 0;
    @(negedge clk);
    clear = 0;
    k = 0;
    for (int n = 0; n < nvec; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int l = 0; l < LANES; l++) in_vec[l*W +: W] = W'($urandom_range(0, 2000)) - 32'sd1000;
      if (in_valid) begin
        for (int l = 0; l < LANES; l++) begin
          logic signed [W-1:0] v;
          v = $signed(in_vec[l*W +: W]);
          if (relu && v < 0) v = 0;
          if (k == 0 || v > mx[l]) mx[l] = v;
        end
        k++;
        if (pl <= 1 || k == pl) begin
          logic [LANES*W-1:0] e;
          for (int l = 0; l < LANES; l++) e[l*W +: W] = mx[l];
          exp_q.push_back(e);
          k = 0;
        end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
  endtask

  initial begin
    clear = 0; relu_en = 0; in_valid = 0; pool_len = 0; in_vec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 1, 200);
    run(1, 0, 200);
    run(0, 3, 300);
    run(1, 2, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
