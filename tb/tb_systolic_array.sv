// tb_systolic_array: a 5x3 array (rectangular, to catch row/column mix-ups)
// gets random weights, then a stream of random activation and partial-sum
// vectors with random gaps. Each output vector must equal
// ps_in + act x W, computed here independently, and must appear exactly
// ROWS + COLS - 1 cycles after its input.
module tb_systolic_array;
  localparam int ROWS = 5, COLS = 3, AW = 8, PW = 32, N = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic                    w_load, in_valid, out_valid;
  logic [$clog2(ROWS)-1:0] w_row;
  logic [COLS*AW-1:0]      w_vec;
  logic [ROWS*AW-1:0]      act_vec;
  logic [COLS*PW-1:0]      ps_vec, out_vec;

  systolic_array #(.ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW)) dut (.*);

  logic signed [AW-1:0] W [ROWS][COLS];
  logic [COLS*PW-1:0]   exp_q [$];
  int                   t_in [$];
  int                   cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        logic [COLS*PW-1:0] e;
        int t0;
        e = exp_q.pop_front();
        t0 = t_in.pop_front();
        if (out_vec !== e) begin
          failures++; $display("data mismatch exp %h got %h", e, out_vec);
        end
        if (cyc - t0 != ROWS + COLS - 1) begin
          failures++; $display("latency %0d", cyc - t0);
        end
      end
    end
  end

  initial begin
    w_load = 0; in_valid = 0; w_row = '0; w_vec = '0; act_vec = '0; ps_vec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk);
      w_load = 1; w_row = i[$clog2(ROWS)-1:0];
      for (int j = 0; j < COLS; j++) begin
        W[i][j] = AW'($urandom);
        w_vec[j*AW +: AW] = W[i][j];
      end
    end
    @(negedge clk); w_load = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < ROWS; i++) act_vec[i*AW +: AW] = AW'($urandom);
      for (int j = 0; j < COLS; j++) ps_vec[j*PW +: PW] = PW'($urandom_range(0, 100000));
      if (in_valid) begin
        logic [COLS*PW-1:0] e;
        for (int j = 0; j < COLS; j++) begin
          logic signed [PW-1:0] s;
          s = $signed(ps_vec[j*PW +: PW]);
          for (int i = 0; i < ROWS; i++) s += $signed(act_vec[i*AW +: AW]) * W[i][j];
          e[j*PW +: PW] = s;
        end
        exp_q.push_back(e);
        t_in.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (ROWS + COLS + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
