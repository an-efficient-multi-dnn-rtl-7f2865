// tb_glb_cluster: fills the three buffers through the write port, streams
// each back out under random ready, writes results from the core side while
// the crossbar is also writing (results must win and the crossbar must see
// wr_ready low), and reads results back through the host port. Every word
// is compared with a model of the buffers.
module tb_glb_cluster;
  import mdnn_pkg::*;
  localparam int ROWS = 3, COLS = 2, AW = 8, PW = 32, WD = 16, AD = 32, PD = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0, conflicts = 0;

  logic wr_valid, wr_ready;
  glb_bank_e wr_bank;
  logic [15:0] wr_addr, out_base, rd_addr;
  logic [COLS*PW-1:0] wr_data, ps_data, out_data, rd_data;
  glb_stream_t wt_cmd, act_cmd, ps_cmd;
  logic [3:0] go;
  logic [2:0] busy;
  logic wt_valid, wt_ready, act_valid, act_ready, ps_valid, ps_ready, out_valid;
  logic [COLS*AW-1:0] wt_data;
  logic [ROWS*AW-1:0] act_data;

  glb_cluster #(.ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW),
                .WT_DEPTH(WD), .ACT_DEPTH(AD), .PS_DEPTH(PD)) dut (.*);

  logic [COLS*AW-1:0] m_wt  [WD];
  logic [ROWS*AW-1:0] m_act [AD];
  logic [COLS*PW-1:0] m_ps  [PD];
  logic [COLS*AW-1:0] exp_wt [$];
  logic [ROWS*AW-1:0] exp_act [$];
  logic [COLS*PW-1:0] exp_ps [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (wt_valid) begin
        checks++;
        if (exp_wt.size() == 0 || wt_data !== exp_wt.pop_front()) begin failures++; $display("wt stream"); end
      end
      if (act_valid) begin
        checks++;
        if (exp_act.size() == 0 || act_data !== exp_act.pop_front()) begin failures++; $display("act stream"); end
      end
      if (ps_valid) begin
        checks++;
        if (exp_ps.size() == 0 || ps_data !== exp_ps.pop_front()) begin failures++; $display("ps stream"); end
      end
    end
  end

  task automatic fill(input glb_bank_e b, input int depth);
    for (int a = 0; a < depth; a++) begin
      @(negedge clk);
      wr_valid = 1; wr_bank = b; wr_addr = 16'(a);
      wr_data = {$urandom, $urandom};
      case (b)
        BANK_WT:  m_wt[a]  = wr_data[COLS*AW-1:0];
        BANK_ACT: m_act[a] = wr_data[ROWS*AW-1:0];
        default:  m_ps[a]  = wr_data;
      endcase
    end
    @(negedge clk); wr_valid = 0;
  endtask

  initial begin
    wr_valid = 0; wr_bank = BANK_WT; wr_addr = '0; wr_data = '0; out_base = '0; rd_addr = '0;
    wt_cmd = '0; act_cmd = '0; ps_cmd = '0; go = '0; out_valid = 0; out_data = '0;
    wt_ready = 0; act_ready = 0; ps_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fill(BANK_WT, WD); fill(BANK_ACT, AD); fill(BANK_PS, PD);
    // stream three windows out at once
    wt_cmd = '{len: 16'd10, base: 16'd3};
    act_cmd = '{len: 16'd20, base: 16'd5};
    ps_cmd = '{len: 16'd12, base: 16'd17};
    for (int k = 0; k < 10; k++) exp_wt.push_back(m_wt[3 + k]);
    for (int k = 0; k < 20; k++) exp_act.push_back(m_act[5 + k]);
    for (int k = 0; k < 12; k++) exp_ps.push_back(m_ps[17 + k]);
    @(negedge clk); go = 4'b0111;
    @(negedge clk); go = '0;
    checks++;
    if (busy !== 3'b111) begin failures++; $display("busy not set"); end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wt_ready = 1'($urandom); act_ready = 1'($urandom); ps_ready = 1'($urandom);
    end
    wt_ready = 0; act_ready = 0; ps_ready = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (busy !== 3'b000 || exp_wt.size() + exp_act.size() + exp_ps.size() != 0) begin
      failures++; $display("streams incomplete");
    end
    // results from the core at base 8 while the crossbar writes the ps bank
    out_base = 16'd8;
    @(negedge clk); go = 4'b1000;
    @(negedge clk); go = '0;
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      out_valid = 1'($urandom);
      out_data = {$urandom, $urandom};
      wr_valid = 1; wr_bank = BANK_PS; wr_addr = 16'($urandom_range(20, 31)); wr_data = {$urandom, $urandom};
      #1;
      checks++;
      if (wr_ready === out_valid) begin failures++; $display("wr_ready should be !out_valid"); end
      if (out_valid) begin
        m_ps[8 + conflicts] = out_data;
        conflicts++;
      end else begin
        m_ps[$clog2(PD)'(wr_addr)] = wr_data;
      end
    end
    @(negedge clk); out_valid = 0; wr_valid = 0;
    for (int a = 0; a < PD; a++) begin
      @(negedge clk); rd_addr = 16'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== m_ps[a]) begin failures++; $display("readback %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
