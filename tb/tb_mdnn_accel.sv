// tb_mdnn_accel: end-to-end test of the accelerator on the full 4x4 grid
// with 4x4 PEs per core, two DDR-side ports and small buffers. The
// scenario and its checks are described in mdnn_tb_body.svh.
module tb_mdnn_accel;
  import mdnn_pkg::*;
  localparam int GRID_R = 4, GRID_C = 4, ROWS = 4, COLS = 4, AW = 8, PW = 32, NUM_DDR = 2, N = 60;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [15:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [NUM_DDR-1:0] ddr_wr_valid, ddr_wr_ready;
  logic [3:0]  ddr_wr_dest [NUM_DDR];
  glb_bank_e   ddr_wr_bank [NUM_DDR];
  logic [15:0] ddr_wr_addr [NUM_DDR];
  logic [COLS*PW-1:0] ddr_wr_data [NUM_DDR];
  logic [3:0]  res_cluster;
  logic [15:0] res_addr;
  logic [COLS*PW-1:0] res_data;
  logic [15:0] core_busy, core_done;

  mdnn_accel #(
    .GRID_R(GRID_R), .GRID_C(GRID_C), .ROWS(ROWS), .COLS(COLS), .AW(AW), .PW(PW),
    .NUM_DDR(NUM_DDR), .WT_DEPTH(16), .ACT_DEPTH(64), .PS_DEPTH(128)
  ) dut (.*);

  `include "mdnn_tb_body.svh"
endmodule
