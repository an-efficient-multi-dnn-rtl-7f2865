// mdnn_accel: multi-core DNN accelerator built from small systolic arrays.
//
// GRID_R x GRID_C tiles, each a core (weight-stationary ROWS x COLS systolic
// array with FIFOs and a SIMD unit), its GLB cluster and its router. The
// routers form a mesh whose rows and columns are closed into rings, so
// every router has four neighbours. By configuring the routers, several
// cores are fused into one larger array of any shape: a core's activations
// are forwarded to the core on its right (horizontal fusion, the two arrays
// share inputs and compute different output channels) and a core's partial
// sums are sent to the core below (vertical fusion, the arrays split the
// reduction). Different groups of cores can run different networks at the
// same time.
// Around the tiles: an AXI4-Lite slave through which the host configures
// the router, core and GLB cluster controllers (register map in mdnn_pkg),
// and a crossbar that delivers words from NUM_DDR DDR-side write ports to
// any GLB cluster. The DDR controller itself is outside this block: its
// side of the crossbar is brought out as ports (ddr_*). Results are read
// back through res_* (one-cycle latency) and each core reports busy/done.
// The tile organisation, the ring-augmented mesh, the controller set and
// the crossbar are the document's; the defaults (4x4 cores of 32x32 PEs)
// are its evaluated configuration. Widths, buffer depths, the register
// map and the handshakes are this design's choice.
module mdnn_accel
  import mdnn_pkg::*;
#(
  parameter int GRID_R    = 4,
  parameter int GRID_C    = 4,
  parameter int ROWS      = 32,
  parameter int COLS      = 32,
  parameter int AW        = 8,
  parameter int PW        = 32,
  parameter int NUM_DDR   = 1,
  parameter int WT_DEPTH  = 256,
  parameter int ACT_DEPTH = 1024,
  parameter int PS_DEPTH  = 1024,
  parameter int NC        = GRID_R * GRID_C,
  parameter int CW        = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite configuration port (host CPU)
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [15:0]        s_awaddr,
  input  logic               s_wvalid,
  output logic               s_wready,
  input  logic [31:0]        s_wdata,
  input  logic [3:0]         s_wstrb,
  output logic               s_bvalid,
  input  logic               s_bready,
  output logic [1:0]         s_bresp,
  input  logic               s_arvalid,
  output logic               s_arready,
  input  logic [15:0]        s_araddr,
  output logic               s_rvalid,
  input  logic               s_rready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  // DDR-controller side of the crossbar
  input  logic [NUM_DDR-1:0] ddr_wr_valid,
  output logic [NUM_DDR-1:0] ddr_wr_ready,
  input  logic [CW-1:0]      ddr_wr_dest [NUM_DDR],
  input  glb_bank_e          ddr_wr_bank [NUM_DDR],
  input  logic [15:0]        ddr_wr_addr [NUM_DDR],
  input  logic [COLS*PW-1:0] ddr_wr_data [NUM_DDR],
  // result read-back
  input  logic [CW-1:0]      res_cluster,
  input  logic [15:0]        res_addr,
  output logic [COLS*PW-1:0] res_data,
  // status
  output logic [NC-1:0]      core_busy,
  output logic [NC-1:0]      core_done
);
  localparam int LINK_W = COLS * PW;
  localparam int XPW    = 2 + 16 + COLS * PW;

  // ---------------- configuration ----------------
  logic        cfg_we;
  logic [15:0] cfg_waddr, cfg_raddr;
  logic [31:0] cfg_wdata, rtr_rdata, core_rdata, glb_rdata;

  axi_lite_cfg #(.ADDR_W(16)) u_axi (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr, .rtr_rdata, .core_rdata, .glb_rdata
  );

  router_cfg_t rcfg [NC];
  router_controller #(.NUM(NC)) u_rtr_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr,
    .cfg_rdata(rtr_rdata), .rcfg
  );

  core_cfg_t       ccfg [NC];
  logic [NC-1:0]   cstart;
  core_controller #(.NUM(NC)) u_core_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr,
    .cfg_rdata(core_rdata), .ccfg, .start(cstart), .busy(core_busy), .done(core_done)
  );

  glb_stream_t wt_cmd [NC], act_cmd [NC], ps_cmd [NC];
  logic [15:0] out_base [NC];
  logic [3:0]  glb_go   [NC];
  logic [2:0]  glb_busy [NC];
  glb_cluster_controller #(.NUM(NC)) u_glb_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_raddr,
    .cfg_rdata(glb_rdata), .wt_cmd, .act_cmd, .ps_cmd, .out_base, .go(glb_go), .busy(glb_busy)
  );

  // ---------------- crossbar ----------------
  logic [XPW-1:0] x_in_payload  [NUM_DDR];
  logic [XPW-1:0] x_out_payload [NC];
  logic [NC-1:0]  x_out_valid, x_out_ready;
  for (genvar p = 0; p < NUM_DDR; p++) begin : g_xin
    assign x_in_payload[p] = {ddr_wr_bank[p], ddr_wr_addr[p], ddr_wr_data[p]};
  end
  crossbar #(.NUM_IN(NUM_DDR), .NUM_OUT(NC), .PW(XPW), .DW(CW)) u_xbar (
    .clk, .rst_n, .in_valid(ddr_wr_valid), .in_dest(ddr_wr_dest), .in_payload(x_in_payload),
    .in_ready(ddr_wr_ready), .out_valid(x_out_valid), .out_payload(x_out_payload),
    .out_ready(x_out_ready)
  );

  // ---------------- NoC links ----------------
  logic [3:0]        r_in_valid [NC], r_in_stop [NC], r_out_valid [NC], r_out_stop [NC];
  logic [LINK_W-1:0] r_in_data  [NC][4];
  logic [LINK_W-1:0] r_out_data [NC][4];
  logic [COLS*PW-1:0] res_q [NC];

  for (genvar r = 0; r < GRID_R; r++) begin : g_row
    for (genvar c = 0; c < GRID_C; c++) begin : g_col
      localparam int N  = r * GRID_C + c;
      localparam int NU = ((r + GRID_R - 1) % GRID_R) * GRID_C + c;
      localparam int ND = ((r + 1) % GRID_R) * GRID_C + c;
      localparam int NL = r * GRID_C + (c + GRID_C - 1) % GRID_C;
      localparam int NR = r * GRID_C + (c + 1) % GRID_C;

      // ring-augmented mesh: each input is the facing output of the neighbour
      assign r_in_valid[N][DIR_U] = r_out_valid[NU][DIR_D];
      assign r_in_data[N][DIR_U]  = r_out_data[NU][DIR_D];
      assign r_in_valid[N][DIR_D] = r_out_valid[ND][DIR_U];
      assign r_in_data[N][DIR_D]  = r_out_data[ND][DIR_U];
      assign r_in_valid[N][DIR_L] = r_out_valid[NL][DIR_R];
      assign r_in_data[N][DIR_L]  = r_out_data[NL][DIR_R];
      assign r_in_valid[N][DIR_R] = r_out_valid[NR][DIR_L];
      assign r_in_data[N][DIR_R]  = r_out_data[NR][DIR_L];
      assign r_out_stop[N][DIR_U] = r_in_stop[NU][DIR_D];
      assign r_out_stop[N][DIR_D] = r_in_stop[ND][DIR_U];
      assign r_out_stop[N][DIR_L] = r_in_stop[NL][DIR_R];
      assign r_out_stop[N][DIR_R] = r_in_stop[NR][DIR_L];

      // tile wires
      logic               wt_v, wt_r, act_v, act_r, ps_v, ps_r, out_v;
      logic [COLS*AW-1:0] wt_d;
      logic [ROWS*AW-1:0] act_d;
      logic [COLS*PW-1:0] ps_d, out_d;
      logic               cai_v, cai_s, cpi_v, cpi_s, cao_v, cao_s, cpo_v, cpo_s;
      logic [LINK_W-1:0]  cai_d, cpi_d, cao_d, cpo_d;
      logic               xw_ready;

      assign x_out_ready[N] = xw_ready;

      glb_cluster #(
        .ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW),
        .WT_DEPTH(WT_DEPTH), .ACT_DEPTH(ACT_DEPTH), .PS_DEPTH(PS_DEPTH)
      ) u_glb (
        .clk, .rst_n,
        .wr_valid (x_out_valid[N]),
        .wr_ready (xw_ready),
        .wr_bank  (glb_bank_e'(x_out_payload[N][XPW-1 -: 2])),
        .wr_addr  (x_out_payload[N][COLS*PW +: 16]),
        .wr_data  (x_out_payload[N][COLS*PW-1:0]),
        .wt_cmd   (wt_cmd[N]), .act_cmd(act_cmd[N]), .ps_cmd(ps_cmd[N]),
        .out_base (out_base[N]), .go(glb_go[N]), .busy(glb_busy[N]),
        .wt_valid (wt_v),  .wt_data (wt_d),  .wt_ready (wt_r),
        .act_valid(act_v), .act_data(act_d), .act_ready(act_r),
        .ps_valid (ps_v),  .ps_data (ps_d),  .ps_ready (ps_r),
        .out_valid(out_v), .out_data(out_d),
        .rd_addr  (res_addr), .rd_data(res_q[N])
      );

      core #(.ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW), .LINK_W(LINK_W)) u_core (
        .clk, .rst_n,
        .cfg (ccfg[N]), .start(cstart[N]), .busy(core_busy[N]), .done(core_done[N]),
        .glb_wt_valid (wt_v),  .glb_wt_data (wt_d),  .glb_wt_ready (wt_r),
        .glb_act_valid(act_v), .glb_act_data(act_d), .glb_act_ready(act_r),
        .glb_ps_valid (ps_v),  .glb_ps_data (ps_d),  .glb_ps_ready (ps_r),
        .glb_out_valid(out_v), .glb_out_data(out_d),
        .rt_act_in_valid (cai_v), .rt_act_in_data (cai_d), .rt_act_in_stop (cai_s),
        .rt_ps_in_valid  (cpi_v), .rt_ps_in_data  (cpi_d), .rt_ps_in_stop  (cpi_s),
        .rt_act_out_valid(cao_v), .rt_act_out_data(cao_d), .rt_act_out_stop(cao_s),
        .rt_ps_out_valid (cpo_v), .rt_ps_out_data (cpo_d), .rt_ps_out_stop (cpo_s)
      );

      router #(.LINK_W(LINK_W)) u_router (
        .clk, .rst_n, .cfg(rcfg[N]),
        .in_valid (r_in_valid[N]),  .in_data (r_in_data[N]),  .in_stop (r_in_stop[N]),
        .out_valid(r_out_valid[N]), .out_data(r_out_data[N]), .out_stop(r_out_stop[N]),
        .core_act_out_valid(cao_v), .core_act_out_data(cao_d), .core_act_out_stop(cao_s),
        .core_ps_out_valid (cpo_v), .core_ps_out_data (cpo_d), .core_ps_out_stop (cpo_s),
        .core_act_in_valid (cai_v), .core_act_in_data (cai_d), .core_act_in_stop (cai_s),
        .core_ps_in_valid  (cpi_v), .core_ps_in_data  (cpi_d), .core_ps_in_stop  (cpi_s)
      );
    end
  end

  // result read-back: cluster select registered alongside the buffer read
  logic [CW-1:0] res_sel_q;
  always_ff @(posedge clk) res_sel_q <= res_cluster;
  assign res_data = res_q[res_sel_q];
endmodule
