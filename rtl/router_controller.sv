// router_controller: holds the routing configuration of every router.
//
// One 32-bit register per router (router_cfg_t in the low 18 bits) at byte
// address 0x0000 + 4*r of the configuration space; writing it re-routes
// the NoC at run time, which is how arrays are fused into new shapes
// between execution steps. Registers reset to "no route". Reads are
// combinational on cfg_raddr. The document says the fusion is set by
// configuring the router controller at run time; the register format is
// this design's choice.
module router_controller
  import mdnn_pkg::*;
#(
  parameter int NUM = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [15:0] cfg_waddr,
  input  logic [31:0] cfg_wdata,
  input  logic [15:0] cfg_raddr,
  output logic [31:0] cfg_rdata,
  output router_cfg_t rcfg [NUM]
);
  localparam int IW = (NUM > 1) ? $clog2(NUM) : 1;

  logic hit_w, hit_r;
  assign hit_w = cfg_we && (cfg_waddr[15:12] == RTR_BASE[15:12]) &&
                 (32'(cfg_waddr[11:2]) < NUM);
  assign hit_r = (cfg_raddr[15:12] == RTR_BASE[15:12]) && (32'(cfg_raddr[11:2]) < NUM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM; r++) rcfg[r] <= '0;
    end else if (hit_w) begin
      rcfg[cfg_waddr[IW+1:2]] <= router_cfg_t'(cfg_wdata[$bits(router_cfg_t)-1:0]);
    end
  end

  assign cfg_rdata = hit_r ? 32'(rcfg[cfg_raddr[IW+1:2]]) : '0;
endmodule
