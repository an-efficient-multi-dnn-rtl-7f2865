// mdnn_pkg: types and constants shared by the multi-systolic-array accelerator.
//
// Router selects: every router output (four neighbour links and the two
// inputs of its core) picks one source. Neighbour outputs can take any
// neighbour input except their own direction, or one of the core's two
// outputs (activations or partial sums); the two core inputs take a
// neighbour input. Activations and partial sums share one link because two
// fused arrays only ever exchange one of them.
//
// Core configuration: whether the core runs on its own buffer (independent
// mode) or takes activations and/or partial sums from the router (fusion
// mode), where its partial sums go, and the post-processing to apply.
//
// Register map (byte addresses on the AXI4-Lite configuration port):
//   0x0000 + 4*r            router r configuration (router_cfg_t)
//   0x1000 + 8*c            core c configuration (core_cfg_t)
//   0x1004 + 8*c            write: bit0 starts core c; read: bit0 busy, bit1 done
//   0x2000 + 32*g + 0/4/8   GLB cluster g weight/activation/psum stream {len, base}
//   0x2000 + 32*g + 12      GLB cluster g result write base
//   0x2000 + 32*g + 16      write: bit0/1/2 start weight/act/psum stream, bit3
//                           restarts the result pointer; read: stream busy bits
// The split of the register space is this design's own choice.
package mdnn_pkg;

  typedef enum logic [2:0] {
    SEL_NONE     = 3'd0,
    SEL_U        = 3'd1,
    SEL_D        = 3'd2,
    SEL_L        = 3'd3,
    SEL_R        = 3'd4,
    SEL_CORE_ACT = 3'd5,
    SEL_CORE_PS  = 3'd6
  } rt_sel_e;

  // Direction indices of router link arrays.
  localparam int DIR_U = 0;
  localparam int DIR_D = 1;
  localparam int DIR_L = 2;
  localparam int DIR_R = 3;

  typedef struct packed {
    rt_sel_e core_act_sel;  // neighbour that feeds the core's activation input
    rt_sel_e core_ps_sel;   // neighbour that feeds the core's partial-sum input
    rt_sel_e out_u;         // source of the link towards the upper router
    rt_sel_e out_d;         // ... the lower router
    rt_sel_e out_l;         // ... the left router
    rt_sel_e out_r;         // ... the right router
  } router_cfg_t;

  typedef enum logic [1:0] {
    PS_ZERO   = 2'd0,  // array starts from zero partial sums
    PS_GLB    = 2'd1,  // partial sums reloaded from the core's own GLB cluster
    PS_ROUTER = 2'd2   // partial sums from the array above (vertical fusion)
  } ps_src_e;

  typedef struct packed {
    logic        act_from_router;  // 1: fusion mode activation source
    ps_src_e     ps_src;
    logic        ps_to_router;     // 1: results go down the NoC, else SIMD -> GLB
    logic        act_fwd;          // 1: forward consumed activations to the router
    logic        load_weights;     // 1: load a new weight tile before computing
    logic        relu_en;          // SIMD: ReLU
    logic [7:0]  pool_len;         // SIMD: max-pooling window, 0 or 1 = none
    logic [15:0] num_vec;          // activation vectors to process
  } core_cfg_t;

  typedef struct packed {
    logic [15:0] len;
    logic [15:0] base;
  } glb_stream_t;

  typedef enum logic [1:0] {
    BANK_WT  = 2'd0,
    BANK_ACT = 2'd1,
    BANK_PS  = 2'd2
  } glb_bank_e;

  localparam logic [15:0] RTR_BASE  = 16'h0000;
  localparam logic [15:0] CORE_BASE = 16'h1000;
  localparam logic [15:0] GLB_BASE  = 16'h2000;

endpackage
