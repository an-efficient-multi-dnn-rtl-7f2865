// core: one compute core of the accelerator.
//
// A weight-stationary ROWS x COLS systolic array fed by four FIFOs and
// followed by a SIMD vector unit, under a core-level controller.
//   * Weight FIFO  <- GLB cluster (weight vectors, one array row each).
//   * Act FIFO     <- GLB cluster (independent mode) or router (fusion mode),
//                     chosen by cfg.act_from_router.
//   * Load FIFO    <- GLB cluster or router, the partial sums that enter the
//                     top of the array (cfg.ps_src; PS_ZERO feeds zeros).
//   * PartialSum FIFO <- bottom of the array; drained to the router (to the
//                     array below, vertical fusion) or through the SIMD unit
//                     to the GLB cluster.
// When cfg.act_fwd is set, every activation vector the array consumes is
// also sent to the router (one cycle later), so the array to the right can
// share it (horizontal fusion).
// Handshakes: GLB streams use valid/ready; a ready drops while two entries
// are still free, covering the buffer's one-cycle read. Router links are
// valid plus a backwards stop: each FIFO fed by the router raises stop when
// fewer than RT_SLACK entries are free, covering the round trip of the stop
// through the routers. Router links are LINK_W = COLS*PW bits wide, and
// activations use the low ROWS*AW bits; the upper bits of the forwarded
// activation link are driven to zero.
// The block structure follows the document's core figure; FIFO depths,
// handshakes and widths are this design's choice.
module core
  import mdnn_pkg::*;
#(
  parameter int ROWS       = 32,
  parameter int COLS       = 32,
  parameter int AW         = 8,
  parameter int PW         = 32,
  parameter int IN_DEPTH   = 64,
  parameter int RT_SLACK   = 24,
  parameter int PS_DEPTH   = 2 * (ROWS + COLS),
  parameter int LINK_W     = COLS * PW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration from the core controller
  input  core_cfg_t            cfg,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // GLB cluster streams
  input  logic                 glb_wt_valid,
  input  logic [COLS*AW-1:0]   glb_wt_data,
  output logic                 glb_wt_ready,
  input  logic                 glb_act_valid,
  input  logic [ROWS*AW-1:0]   glb_act_data,
  output logic                 glb_act_ready,
  input  logic                 glb_ps_valid,
  input  logic [COLS*PW-1:0]   glb_ps_data,
  output logic                 glb_ps_ready,
  output logic                 glb_out_valid,
  output logic [COLS*PW-1:0]   glb_out_data,
  // router: data into the core
  input  logic                 rt_act_in_valid,
  input  logic [LINK_W-1:0]    rt_act_in_data,
  output logic                 rt_act_in_stop,
  input  logic                 rt_ps_in_valid,
  input  logic [LINK_W-1:0]    rt_ps_in_data,
  output logic                 rt_ps_in_stop,
  // router: data out of the core
  output logic                 rt_act_out_valid,
  output logic [LINK_W-1:0]    rt_act_out_data,
  input  logic                 rt_act_out_stop,
  output logic                 rt_ps_out_valid,
  output logic [LINK_W-1:0]    rt_ps_out_data,
  input  logic                 rt_ps_out_stop
);
  localparam int AF = (RT_SLACK > 2) ? RT_SLACK : 2;

  core_cfg_t cfg_q;
  core_cfg_t cfg_sel;  // configuration that steers the input muxes
  assign cfg_sel = busy ? cfg_q : cfg;

  // ---------------- weight FIFO ----------------
  logic               wt_empty, wt_full, wt_af, wt_pop;
  logic [COLS*AW-1:0] wt_dout;
  logic [$clog2(IN_DEPTH):0] wt_cnt;
  sync_fifo #(.W(COLS*AW), .DEPTH(IN_DEPTH), .AF_SLACK(2)) u_wt_fifo (
    .clk, .rst_n, .push(glb_wt_valid), .din(glb_wt_data), .pop(wt_pop),
    .dout(wt_dout), .empty(wt_empty), .full(wt_full), .almost_full(wt_af), .count(wt_cnt)
  );
  assign glb_wt_ready = !wt_af;

  // ---------------- activation FIFO (GLB / router mux) ----------------
  logic               act_push, act_empty, act_full, act_af, fire;
  logic [ROWS*AW-1:0] act_din, act_dout;
  logic [$clog2(IN_DEPTH):0] act_cnt;
  always_comb begin
    if (cfg_sel.act_from_router) begin
      act_push = rt_act_in_valid;
      act_din  = rt_act_in_data[ROWS*AW-1:0];
    end else begin
      act_push = glb_act_valid;
      act_din  = glb_act_data;
    end
  end
  sync_fifo #(.W(ROWS*AW), .DEPTH(IN_DEPTH), .AF_SLACK(AF)) u_act_fifo (
    .clk, .rst_n, .push(act_push), .din(act_din), .pop(fire),
    .dout(act_dout), .empty(act_empty), .full(act_full), .almost_full(act_af), .count(act_cnt)
  );
  assign glb_act_ready  = !act_af && !cfg_sel.act_from_router;
  assign rt_act_in_stop = act_af;

  // ---------------- load FIFO (partial sums entering the array) ----------------
  logic               ld_push, ld_empty, ld_full, ld_af, ld_pop;
  logic [COLS*PW-1:0] ld_din, ld_dout;
  logic [$clog2(IN_DEPTH):0] ld_cnt;
  always_comb begin
    if (cfg_sel.ps_src == PS_ROUTER) begin
      ld_push = rt_ps_in_valid;
      ld_din  = rt_ps_in_data[COLS*PW-1:0];
    end else begin
      ld_push = glb_ps_valid && (cfg_sel.ps_src == PS_GLB);
      ld_din  = glb_ps_data;
    end
  end
  sync_fifo #(.W(COLS*PW), .DEPTH(IN_DEPTH), .AF_SLACK(AF)) u_ld_fifo (
    .clk, .rst_n, .push(ld_push), .din(ld_din), .pop(ld_pop),
    .dout(ld_dout), .empty(ld_empty), .full(ld_full), .almost_full(ld_af), .count(ld_cnt)
  );
  assign glb_ps_ready  = !ld_af && (cfg_sel.ps_src == PS_GLB);
  assign rt_ps_in_stop = ld_af;

  // ---------------- systolic array ----------------
  logic                    w_load, sa_out_valid;
  logic [$clog2(ROWS)-1:0] w_row;
  logic [COLS*PW-1:0]      sa_out;
  systolic_array #(.ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW)) u_sa (
    .clk, .rst_n, .w_load, .w_row, .w_vec(wt_dout),
    .in_valid (fire),
    .act_vec  (act_dout),
    .ps_vec   ((cfg_q.ps_src == PS_ZERO) ? '0 : ld_dout),
    .out_valid(sa_out_valid),
    .out_vec  (sa_out)
  );

  // ---------------- partial-sum FIFO ----------------
  logic               ps_pop, ps_empty, ps_full, ps_af;
  logic [COLS*PW-1:0] ps_dout;
  logic [$clog2(PS_DEPTH):0] ps_cnt;
  sync_fifo #(.W(COLS*PW), .DEPTH(PS_DEPTH), .AF_SLACK(1)) u_ps_fifo (
    .clk, .rst_n, .push(sa_out_valid), .din(sa_out), .pop(ps_pop),
    .dout(ps_dout), .empty(ps_empty), .full(ps_full), .almost_full(ps_af), .count(ps_cnt)
  );

  // ---------------- controller ----------------
  logic simd_clear;
  core_level_ctrl #(.ROWS(ROWS), .PS_DEPTH(PS_DEPTH)) u_ctrl (
    .clk, .rst_n, .cfg, .start, .cfg_q, .busy, .done,
    .wt_empty, .wt_pop, .w_load, .w_row,
    .act_empty, .ld_empty, .act_out_stop(rt_act_out_stop),
    .ps_count(16'(ps_cnt)), .sa_out_valid, .fire, .ld_pop,
    .ps_empty, .ps_out_stop(rt_ps_out_stop), .ps_pop, .simd_clear
  );

  // ---------------- outputs to the router (registered) ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_act_out_valid <= 1'b0;
      rt_ps_out_valid  <= 1'b0;
    end else begin
      rt_act_out_valid <= fire && cfg_q.act_fwd;
      rt_ps_out_valid  <= ps_pop && cfg_q.ps_to_router;
    end
  end
  always_ff @(posedge clk) begin
    if (fire)   rt_act_out_data <= LINK_W'(act_dout);
    if (ps_pop) rt_ps_out_data  <= LINK_W'(ps_dout);
  end

  // ---------------- SIMD vector unit -> GLB ----------------
  simd_vector_unit #(.LANES(COLS), .W(PW)) u_simd (
    .clk, .rst_n, .clear(simd_clear), .relu_en(cfg_q.relu_en), .pool_len(cfg_q.pool_len),
    .in_valid (ps_pop && !cfg_q.ps_to_router),
    .in_vec   (ps_dout),
    .out_valid(glb_out_valid),
    .out_vec  (glb_out_data)
  );

  initial begin
    assert (ROWS * AW <= LINK_W) else $error("activation vector wider than a router link");
  end
endmodule
