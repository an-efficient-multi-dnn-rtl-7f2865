// tb_router_controller: random register writes (in and out of range,
// other address regions) against a model; every router's configuration
// output and every read-back are compared with the model.
module tb_router_controller;
  import mdnn_pkg::*;
  localparam int NUM = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic        cfg_we;
  logic [15:0] cfg_waddr, cfg_raddr;
  logic [31:0] cfg_wdata, cfg_rdata;
  router_cfg_t rcfg [NUM];

  router_controller #(.NUM(NUM)) dut (.*);

  logic [17:0] model [NUM];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_waddr = '0; cfg_wdata = '0; cfg_raddr = '0;
    for (int r = 0; r < NUM; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cfg_we    = 1'($urandom);
      cfg_waddr = {($urandom_range(0, 3) == 0) ? 4'h1 : 4'h0, 12'($urandom_range(0, NUM + 1) * 4)};
      cfg_wdata = $urandom;
      cfg_raddr = {4'h0, 12'($urandom_range(0, NUM + 1) * 4)};
      // combinational read before this cycle's write takes effect
      #1;
      checks++;
      if (32'(cfg_raddr[11:2]) < NUM) begin
        if (cfg_rdata !== {14'd0, model[$clog2(NUM)'(cfg_raddr[11:2])]}) begin failures++; $display("read mismatch"); end
      end else if (cfg_rdata !== '0) begin failures++; $display("out-of-range read"); end
      @(posedge clk);
      if (cfg_we && cfg_waddr[15:12] == 4'h0 && 32'(cfg_waddr[11:2]) < NUM)
        model[$clog2(NUM)'(cfg_waddr[11:2])] = cfg_wdata[17:0];
      #1;
      for (int r = 0; r < NUM; r++) begin
        checks++;
        if (rcfg[r] !== model[r]) begin failures++; $display("cfg %0d mismatch", r); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
