// tb_pe: checks one weight-stationary PE against a reference model.
// Random weights are loaded now and then; every cycle random activations
// and partial sums go in, and one cycle later act_out must equal the
// activation and ps_out the partial sum plus activation * current weight.
module tb_pe;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               w_load;
  logic signed [7:0]  w_in, act_in, act_out;
  logic signed [31:0] ps_in, ps_out;

  pe #(.AW(8), .PW(32)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0]  w_ref, a_prev;
    logic signed [31:0] p_prev;
    w_load = 1'b1; w_in = 8'sd3; act_in = '0; ps_in = '0;
    @(posedge clk); #1;
    w_ref = 8'sd3; w_load = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      act_in = 8'($urandom);
      ps_in  = 32'($urandom_range(0, 200000)) - 32'sd100000;
      a_prev = act_in; p_prev = ps_in;
      @(posedge clk); #1;
      checks++;
      if (act_out !== a_prev || ps_out !== p_prev + a_prev * w_ref) begin
        failures++;
        $display("mismatch n=%0d act=%0d w=%0d ps=%0d got %0d/%0d", n, a_prev, w_ref, p_prev, act_out, ps_out);
      end
      if (n % 50 == 7) begin
        w_in = 8'($urandom); w_load = 1'b1;
        @(posedge clk); #1;
        w_ref = w_in; w_load = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
