// tb_core_level_ctrl: the controller against modelled FIFOs and array.
// The FIFO occupancies are counters here, the array a fixed-latency delay
// line of fire, and data arrives at random. Checked: weight rows are loaded
// in order 0..ROWS-1 from a non-empty FIFO; fire only happens when
// activations (and partial sums when needed) are present and the forward
// link is not stopped; the partial-sum FIFO never overflows; nothing is
// popped to a stopped router; exactly num_vec vectors are fired and
// drained; done pulses once, two cycles after the last drain.
module tb_core_level_ctrl;
  import mdnn_pkg::*;
  localparam int ROWS = 4, PS_DEPTH = 6, LAT = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  core_cfg_t               cfg, cfg_q;
  logic                    start, busy, done, wt_empty, wt_pop, w_load;
  logic [$clog2(ROWS)-1:0] w_row;
  logic                    act_empty, ld_empty, act_out_stop, sa_out_valid, fire, ld_pop;
  logic [15:0]             ps_count;
  logic                    ps_empty, ps_out_stop, ps_pop, simd_clear;

  core_level_ctrl #(.ROWS(ROWS), .PS_DEPTH(PS_DEPTH)) dut (.*);

  int wt_n, act_n, ld_n, ps_n, fires, pops, rows_loaded, done_n, last_pop_cyc, cyc;
  logic [LAT-1:0] lat_sr;

  assign wt_empty     = (wt_n == 0);
  assign act_empty    = (act_n == 0);
  assign ld_empty     = (ld_n == 0);
  assign ps_empty     = (ps_n == 0);
  assign ps_count     = 16'(ps_n);
  assign sa_out_valid = lat_sr[LAT-1];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      lat_sr <= '0;
    end else begin
      cyc++;
      lat_sr <= {lat_sr[LAT-2:0], fire};
      if (wt_pop) begin
        checks++;
        if (wt_empty || int'(w_row) != rows_loaded || !w_load) begin
          failures++; $display("bad weight load row %0d", w_row);
        end
        rows_loaded++;
      end
      if (fire) begin
        checks++;
        if (act_empty || (cfg_q.ps_src != PS_ZERO && ld_empty) || (cfg_q.act_fwd && act_out_stop)) begin
          failures++; $display("fire without data");
        end
        if (ld_pop != (cfg_q.ps_src != PS_ZERO)) begin failures++; $display("ld_pop wrong"); end
        fires++;
      end
      if (ps_pop) begin
        checks++;
        if (ps_empty || (cfg_q.ps_to_router && ps_out_stop)) begin failures++; $display("bad pop"); end
        pops++;
        last_pop_cyc = cyc;
      end
      if (ld_pop && ld_n <= 0) begin failures++; $display("load FIFO underflow"); end
      if (sa_out_valid && ps_n >= PS_DEPTH) begin failures++; $display("ps fifo overflow"); end
      if (done) begin
        done_n++;
        checks++;
        if (cyc - last_pop_cyc != 2) begin failures++; $display("done timing %0d", cyc - last_pop_cyc); end
      end
      wt_n  <= wt_n  - int'(wt_pop)  + int'($urandom_range(0, 2) == 0);
      act_n <= act_n - int'(fire)    + int'($urandom_range(0, 1) == 0);
      ld_n  <= ld_n  - int'(ld_pop)  + int'($urandom_range(0, 4) == 0);
      ps_n  <= ps_n  - int'(ps_pop)  + int'(sa_out_valid);
      act_out_stop <= ($urandom_range(0, 4) == 0);
      ps_out_stop  <= ($urandom_range(0, 1) == 0);
    end
  end

  task automatic run(input core_cfg_t c);
    fires = 0; pops = 0; rows_loaded = 0; done_n = 0;
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (fires != int'(c.num_vec) || pops != int'(c.num_vec) || done_n != 1 ||
        rows_loaded != (c.load_weights ? ROWS : 0)) begin
      failures++;
      $display("counts: fires %0d pops %0d done %0d rows %0d", fires, pops, done_n, rows_loaded);
    end
  endtask

  initial begin
    core_cfg_t c;
    cfg = '0; start = 0; wt_n = 0; act_n = 0; ld_n = 0; ps_n = 0; cyc = 0;
    act_out_stop = 0; ps_out_stop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c = '0; c.load_weights = 1; c.num_vec = 16'd20; c.ps_src = PS_GLB; c.act_fwd = 1;
    run(c);
    c = '0; c.num_vec = 16'd40; c.ps_src = PS_ZERO; c.ps_to_router = 1;
    run(c);
    c = '0; c.load_weights = 1; c.num_vec = 16'd15; c.ps_src = PS_ROUTER;
    run(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
