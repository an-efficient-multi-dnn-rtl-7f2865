// tb_core: one 4x3 core in its two modes.
//  1. Independent mode: weights, activations and partial sums stream from
//     a modelled GLB cluster (valid/ready, random gaps); results go through
//     the SIMD unit (ReLU, then a second run with max-pool of 2) back to the
//     GLB side.
//  2. Fusion mode: activations and partial sums arrive from the router with
//     random gaps and honour the core's stop signals (a two-cycle stop delay
//     models the NoC); activations are forwarded and the results leave on
//     the router, whose stop is toggled at random.
// All results are compared with ps + act x W computed here.
module tb_core;
  import mdnn_pkg::*;
  localparam int ROWS = 4, COLS = 3, AW = 8, PW = 32, LINK_W = COLS * PW;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  core_cfg_t cfg;
  logic start, busy, done;
  logic glb_wt_valid, glb_wt_ready, glb_act_valid, glb_act_ready, glb_ps_valid, glb_ps_ready;
  logic [COLS*AW-1:0] glb_wt_data;
  logic [ROWS*AW-1:0] glb_act_data;
  logic [COLS*PW-1:0] glb_ps_data, glb_out_data;
  logic glb_out_valid;
  logic rt_act_in_valid, rt_act_in_stop, rt_ps_in_valid, rt_ps_in_stop;
  logic [LINK_W-1:0] rt_act_in_data, rt_ps_in_data, rt_act_out_data, rt_ps_out_data;
  logic rt_act_out_valid, rt_act_out_stop, rt_ps_out_valid, rt_ps_out_stop;

  core #(.ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW), .IN_DEPTH(16), .RT_SLACK(6)) dut (.*);

  logic signed [AW-1:0] W [ROWS][COLS];
  logic [COLS*AW-1:0] wt_q [$];
  logic [ROWS*AW-1:0] act_q [$], act_fwd_exp [$];
  logic [COLS*PW-1:0] ps_q [$], out_exp [$], rt_exp [$];
  logic [2:0] act_stop_d, ps_stop_d;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS*PW-1:0] mac(input logic [ROWS*AW-1:0] a, input logic [COLS*PW-1:0] p);
    logic [COLS*PW-1:0] r;
    for (int j = 0; j < COLS; j++) begin
      logic signed [PW-1:0] s;
      s = $signed(p[j*PW +: PW]);
      for (int i = 0; i < ROWS; i++) s += $signed(a[i*AW +: AW]) * W[i][j];
      r[j*PW +: PW] = s;
    end
    return r;
  endfunction

  // GLB-side and router-side producers
  always @(posedge clk) begin
    act_stop_d <= {act_stop_d[1:0], rt_act_in_stop};
    ps_stop_d  <= {ps_stop_d[1:0],  rt_ps_in_stop};
  end
  always @(negedge clk) begin
    glb_wt_valid = 0; glb_act_valid = 0; glb_ps_valid = 0; rt_act_in_valid = 0; rt_ps_in_valid = 0;
    if (rst_n) begin
      if (glb_wt_ready && wt_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        glb_wt_valid = 1; glb_wt_data = wt_q.pop_front();
      end
      if (!cfg.act_from_router) begin
        if (glb_act_ready && act_q.size() > 0 && $urandom_range(0, 3) != 0) begin
          glb_act_valid = 1; glb_act_data = act_q.pop_front();
        end
      end else if (!act_stop_d[2] && act_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        rt_act_in_valid = 1; rt_act_in_data = LINK_W'(act_q.pop_front());
      end
      if (cfg.ps_src == PS_GLB) begin
        if (glb_ps_ready && ps_q.size() > 0 && $urandom_range(0, 3) != 0) begin
          glb_ps_valid = 1; glb_ps_data = ps_q.pop_front();
        end
      end else if (cfg.ps_src == PS_ROUTER && !ps_stop_d[2] && ps_q.size() > 0 && $urandom_range(0, 4) != 0) begin
        rt_ps_in_valid = 1; rt_ps_in_data = ps_q.pop_front();
      end
      rt_act_out_stop = ($urandom_range(0, 3) == 0);
      rt_ps_out_stop  = ($urandom_range(0, 2) == 0);
    end
  end

  // consumers
  always @(posedge clk) begin
    if (rst_n && glb_out_valid) begin
      checks++;
      if (out_exp.size() == 0 || glb_out_data !== out_exp[0]) begin
        failures++; $display("GLB result mismatch got %h", glb_out_data);
      end
      if (out_exp.size() > 0) void'(out_exp.pop_front());
    end
    if (rst_n && rt_ps_out_valid) begin
      checks++;
      if (rt_exp.size() == 0 || rt_ps_out_data !== rt_exp[0]) begin
        failures++; $display("router result mismatch got %h", rt_ps_out_data);
      end
      if (rt_exp.size() > 0) void'(rt_exp.pop_front());
    end
    if (rst_n && rt_act_out_valid) begin
      checks++;
      if (act_fwd_exp.size() == 0 || rt_act_out_data[ROWS*AW-1:0] !== act_fwd_exp[0]) begin
        failures++; $display("forwarded activation mismatch");
      end
      if (act_fwd_exp.size() > 0) void'(act_fwd_exp.pop_front());
    end
  end

  task automatic run(input core_cfg_t c, input int pool);
    logic signed [PW-1:0] mx [COLS];
    int k;
    k = 0;
    if (c.load_weights) begin
      for (int i = 0; i < ROWS; i++) begin
        logic [COLS*AW-1:0] v;
        for (int j = 0; j < COLS; j++) begin W[i][j] = AW'($urandom); v[j*AW +: AW] = W[i][j]; end
        wt_q.push_back(v);
      end
    end
    for (int n = 0; n < int'(c.num_vec); n++) begin
      logic [ROWS*AW-1:0] a;
      logic [COLS*PW-1:0] p, r;
      for (int i = 0; i < ROWS; i++) a[i*AW +: AW] = AW'($urandom);
      for (int j = 0; j < COLS; j++) p[j*PW +: PW] = PW'($urandom_range(0, 4000)) - 32'd2000;
      act_q.push_back(a);
      if (c.act_fwd) act_fwd_exp.push_back(a);
      if (c.ps_src != PS_ZERO) ps_q.push_back(p); else p = '0;
      r = mac(a, p);
      if (c.ps_to_router) rt_exp.push_back(r);
      else begin
        for (int j = 0; j < COLS; j++) begin
          logic signed [PW-1:0] v;
          v = $signed(r[j*PW +: PW]);
          if (c.relu_en && v < 0) v = 0;
          if (k == 0 || v > mx[j]) mx[j] = v;
        end
        k++;
        if (pool <= 1 || k == pool) begin
          for (int j = 0; j < COLS; j++) r[j*PW +: PW] = mx[j];
          out_exp.push_back(r);
          k = 0;
        end
      end
    end
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (out_exp.size() + rt_exp.size() + act_fwd_exp.size() != 0) begin
      failures++; $display("results missing");
    end
  endtask

  initial begin
    core_cfg_t c;
    cfg = '0; start = 0; rt_act_out_stop = 0; rt_ps_out_stop = 0;
    glb_wt_data = '0; glb_act_data = '0; glb_ps_data = '0; rt_act_in_data = '0; rt_ps_in_data = '0;
    act_stop_d = '0; ps_stop_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // independent mode, reloaded partial sums, ReLU
    c = '0; c.load_weights = 1; c.ps_src = PS_GLB; c.relu_en = 1; c.num_vec = 16'd60;
    run(c, 1);
    // independent mode, same weights, zero partial sums, max-pool 2
    c = '0; c.ps_src = PS_ZERO; c.pool_len = 8'd2; c.num_vec = 16'd40;
    run(c, 2);
    // fusion mode: everything through the router
    c = '0; c.load_weights = 1; c.act_from_router = 1; c.ps_src = PS_ROUTER;
    c.ps_to_router = 1; c.act_fwd = 1; c.num_vec = 16'd120;
    run(c, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
