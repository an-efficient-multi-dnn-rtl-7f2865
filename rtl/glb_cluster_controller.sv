// glb_cluster_controller: streaming commands for every GLB cluster.
//
// Per cluster g (block of 32 bytes at 0x2000 + 32*g): three stream
// registers {len[31:16], base[15:0]} for the weight, activation and
// partial-sum streams into the core (offsets 0, 4, 8), the result write
// base (offset 12), and a command register (offset 16) whose bits 0..2
// start the weight/act/psum streams and bit 3 restarts the result pointer;
// reading it returns the clusters' stream-busy bits. Start bits become
// one-cycle pulses. The document names a GLB cluster controller; what it
// holds is this design's choice.
module glb_cluster_controller
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
  output glb_stream_t wt_cmd   [NUM],
  output glb_stream_t act_cmd  [NUM],
  output glb_stream_t ps_cmd   [NUM],
  output logic [15:0] out_base [NUM],
  output logic [3:0]  go       [NUM],
  input  logic [2:0]  busy     [NUM]
);
  localparam int IW = (NUM > 1) ? $clog2(NUM) : 1;

  logic          hit_w, hit_r;
  logic [IW-1:0] widx, ridx;
  assign widx  = cfg_waddr[IW+4:5];
  assign ridx  = cfg_raddr[IW+4:5];
  assign hit_w = cfg_we && (cfg_waddr[15:12] == GLB_BASE[15:12]) && (32'(cfg_waddr[11:5]) < NUM);
  assign hit_r = (cfg_raddr[15:12] == GLB_BASE[15:12]) && (32'(cfg_raddr[11:5]) < NUM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NUM; g++) begin
        wt_cmd[g]   <= '0;
        act_cmd[g]  <= '0;
        ps_cmd[g]   <= '0;
        out_base[g] <= '0;
        go[g]       <= '0;
      end
    end else begin
      for (int g = 0; g < NUM; g++) go[g] <= '0;
      if (hit_w) begin
        unique case (cfg_waddr[4:2])
          3'd0: wt_cmd[widx]   <= glb_stream_t'(cfg_wdata);
          3'd1: act_cmd[widx]  <= glb_stream_t'(cfg_wdata);
          3'd2: ps_cmd[widx]   <= glb_stream_t'(cfg_wdata);
          3'd3: out_base[widx] <= cfg_wdata[15:0];
          3'd4: go[widx]       <= cfg_wdata[3:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (hit_r) begin
      unique case (cfg_raddr[4:2])
        3'd0: cfg_rdata = wt_cmd[ridx];
        3'd1: cfg_rdata = act_cmd[ridx];
        3'd2: cfg_rdata = ps_cmd[ridx];
        3'd3: cfg_rdata = {16'd0, out_base[ridx]};
        3'd4: cfg_rdata = {29'd0, busy[ridx]};
        default: ;
      endcase
    end
  end
endmodule
