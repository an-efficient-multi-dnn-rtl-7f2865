// core_level_ctrl: the controller inside one core.
//
// On start it latches the core configuration and, if asked to, loads a new
// weight tile: ROWS weight vectors are popped from the weight FIFO and
// written into the array one row per cycle. It then fires the array once per
// cycle whenever every FIFO the configuration needs holds data (activations,
// plus reloaded or incoming partial sums), the forwarded-activation link is
// not stopped, and the partial-sum FIFO has room for everything already in
// the array. It does not care when data arrives, only that it is there,
// which is how the core tolerates differing NoC latencies. Results are
// drained from the partial-sum FIFO to the router (when the link is not
// stopped) or to the SIMD unit. When num_vec results have left, done pulses
// two cycles later (after the SIMD unit and the buffer write).
// The FIFO-gated start is the document's; the state sequence, the room
// check and the done timing are this design's choice.
module core_level_ctrl
  import mdnn_pkg::*;
#(
  parameter int ROWS     = 32,
  parameter int PS_DEPTH = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  core_cfg_t               cfg,
  input  logic                    start,
  output core_cfg_t               cfg_q,
  output logic                    busy,
  output logic                    done,
  // weight load
  input  logic                    wt_empty,
  output logic                    wt_pop,
  output logic                    w_load,
  output logic [$clog2(ROWS)-1:0] w_row,
  // compute
  input  logic                    act_empty,
  input  logic                    ld_empty,
  input  logic                    act_out_stop,
  input  logic [15:0]             ps_count,
  input  logic                    sa_out_valid,
  output logic                    fire,
  output logic                    ld_pop,
  // drain
  input  logic                    ps_empty,
  input  logic                    ps_out_stop,
  output logic                    ps_pop,
  output logic                    simd_clear
);
  typedef enum logic [2:0] {S_IDLE, S_LOADW, S_RUN, S_FLUSH, S_DONE} state_e;
  state_e state;

  logic [15:0] issued, retired, inflight;
  logic [$clog2(ROWS)-1:0] row_cnt;

  logic need_ld;
  assign need_ld = (cfg_q.ps_src != PS_ZERO);

  assign wt_pop = (state == S_LOADW) && !wt_empty;
  assign w_load = wt_pop;
  assign w_row  = row_cnt;

  assign fire = (state == S_RUN) && (issued != cfg_q.num_vec) && !act_empty &&
                (!need_ld || !ld_empty) && (!cfg_q.act_fwd || !act_out_stop) &&
                (32'(ps_count) + 32'(inflight) < PS_DEPTH);
  assign ld_pop = fire && need_ld;

  assign ps_pop = (state == S_RUN) && !ps_empty && (!cfg_q.ps_to_router || !ps_out_stop);

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign simd_clear = start && (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cfg_q    <= '0;
      issued   <= '0;
      retired  <= '0;
      inflight <= '0;
      row_cnt  <= '0;
    end else begin
      inflight <= inflight + 16'(fire) - 16'(sa_out_valid);
      if (fire)   issued  <= issued + 16'd1;
      if (ps_pop) retired <= retired + 16'd1;
      unique case (state)
        S_IDLE: if (start) begin
          cfg_q   <= cfg;
          issued  <= '0;
          retired <= '0;
          row_cnt <= '0;
          state   <= cfg.load_weights ? S_LOADW : S_RUN;
        end
        S_LOADW: if (wt_pop) begin
          row_cnt <= row_cnt + 1'b1;
          if (row_cnt == ($clog2(ROWS))'(ROWS - 1)) state <= S_RUN;
        end
        S_RUN: if (retired + 16'(ps_pop) == cfg_q.num_vec) state <= S_FLUSH;
        S_FLUSH: state <= S_DONE;
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_fire_needs_act: assert property (@(posedge clk) disable iff (!rst_n) fire |-> !act_empty);
endmodule
