// tb_glb_cluster_controller: random writes to the stream, result-base and
// command registers of every cluster against a model; checks the command
// outputs, the one-cycle go pulses and the read-back of all registers
// including the busy bits.
module tb_glb_cluster_controller;
  import mdnn_pkg::*;
  localparam int NUM = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic        cfg_we;
  logic [15:0] cfg_waddr, cfg_raddr;
  logic [31:0] cfg_wdata, cfg_rdata;
  glb_stream_t wt_cmd [NUM], act_cmd [NUM], ps_cmd [NUM];
  logic [15:0] out_base [NUM];
  logic [3:0]  go [NUM];
  logic [2:0]  busy [NUM];

  glb_cluster_controller #(.NUM(NUM)) dut (.*);

  logic [31:0] m [NUM][4];
  logic [3:0]  m_go [NUM];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_waddr = '0; cfg_wdata = '0; cfg_raddr = '0;
    for (int g = 0; g < NUM; g++) begin busy[g] = '0; for (int k = 0; k < 4; k++) m[g][k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int wg, wr, rg, rr;
      @(negedge clk);
      wg = $urandom_range(0, NUM); wr = $urandom_range(0, 5);
      rg = $urandom_range(0, NUM); rr = $urandom_range(0, 4);
      cfg_we    = 1'($urandom);
      cfg_waddr = {4'h2, 12'(wg * 32 + wr * 4)};
      cfg_wdata = $urandom;
      cfg_raddr = {4'h2, 12'(rg * 32 + rr * 4)};
      for (int g = 0; g < NUM; g++) busy[g] = 3'($urandom);
      #1;
      checks++;
      if (rg < NUM) begin
        logic [31:0] e;
        e = (rr == 4) ? {29'd0, busy[rg]} : (rr == 3) ? {16'd0, m[rg][3][15:0]} : m[rg][rr];
        if (cfg_rdata !== e) begin failures++; $display("read mismatch g%0d r%0d", rg, rr); end
      end else if (cfg_rdata !== '0) begin failures++; $display("out-of-range read"); end
      for (int g = 0; g < NUM; g++) m_go[g] = '0;
      if (cfg_we && wg < NUM) begin
        if (wr < 4) m[wg][wr] = cfg_wdata;
        else if (wr == 4) m_go[wg] = cfg_wdata[3:0];
      end
      @(posedge clk); #1;
      for (int g = 0; g < NUM; g++) begin
        checks++;
        if (wt_cmd[g] !== m[g][0] || act_cmd[g] !== m[g][1] || ps_cmd[g] !== m[g][2] ||
            out_base[g] !== m[g][3][15:0] || go[g] !== m_go[g]) begin
          failures++; $display("cluster %0d outputs mismatch", g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
