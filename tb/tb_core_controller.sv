// tb_core_controller: random configuration writes, start commands and
// done pulses against a model. Checks each core's configuration, that a
// start command gives exactly one start pulse on the next cycle, and the
// busy/done status read-back (done sticky until the next start).
module tb_core_controller;
  import mdnn_pkg::*;
  localparam int NUM = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic        cfg_we;
  logic [15:0] cfg_waddr, cfg_raddr;
  logic [31:0] cfg_wdata, cfg_rdata;
  core_cfg_t   ccfg [NUM];
  logic [NUM-1:0] start, busy, done;

  core_controller #(.NUM(NUM)) dut (.*);

  logic [30:0]    m_cfg [NUM];
  logic [NUM-1:0] m_done, m_start;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_waddr = '0; cfg_wdata = '0; cfg_raddr = '0; busy = '0; done = '0;
    for (int c = 0; c < NUM; c++) m_cfg[c] = '0;
    m_done = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int wc, rc;
      @(negedge clk);
      wc = $urandom_range(0, NUM);
      rc = $urandom_range(0, NUM);
      cfg_we    = 1'($urandom);
      cfg_waddr = {4'h1, 12'(wc * 8 + ($urandom_range(0, 1) * 4))};
      cfg_wdata = $urandom;
      cfg_raddr = {4'h1, 12'(rc * 8 + ($urandom_range(0, 1) * 4))};
      busy = NUM'($urandom);
      done = ($urandom_range(0, 3) == 0) ? NUM'($urandom) : '0;
      #1;
      checks++;
      if (rc < NUM) begin
        logic [31:0] e;
        e = cfg_raddr[2] ? {30'd0, m_done[rc], busy[rc]} : {1'b0, m_cfg[rc]};
        if (cfg_rdata !== e) begin failures++; $display("read mismatch %h %h", cfg_rdata, e); end
      end else if (cfg_rdata !== '0) begin failures++; $display("out-of-range read"); end
      m_start = '0;
      m_done |= done;
      if (cfg_we && wc < NUM) begin
        if (!cfg_waddr[2]) m_cfg[wc] = cfg_wdata[30:0];
        else if (cfg_wdata[0]) begin m_start[wc] = 1; m_done[wc] = 0; end
      end
      @(posedge clk); #1;
      checks++;
      if (start !== m_start) begin failures++; $display("start mismatch"); end
      for (int c = 0; c < NUM; c++) begin
        checks++;
        if (ccfg[c] !== m_cfg[c]) begin failures++; $display("cfg %0d mismatch", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
