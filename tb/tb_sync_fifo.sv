// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty, full, almost_full and count after every cycle.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8, AF_SLACK = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic                   push, pop, empty, full, almost_full;
  logic [W-1:0]           din, dout;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.W(W), .DEPTH(DEPTH), .AF_SLACK(AF_SLACK)) dut (.*);

  logic [W-1:0] model [$];
  int n_full = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) ||
          almost_full !== (model.size() >= DEPTH - AF_SLACK) || int'(count) != model.size() ||
          (model.size() > 0 && dout !== model[0])) begin
        failures++;
        $display("state mismatch size=%0d count=%0d empty=%0b full=%0b", model.size(), count, empty, full);
      end
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      push = !full  && ($urandom_range(0, 9) < ((n / 500) % 2 != 0 ? 3 : 7));
      pop  = !empty && ($urandom_range(0, 9) < ((n / 500) % 2 != 0 ? 7 : 3));
      din  = W'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
