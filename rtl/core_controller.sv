// core_controller: per-core configuration, start and status registers.
//
// For core c, the register at 0x1000 + 8*c holds its core_cfg_t (low 31
// bits). Writing bit 0 of 0x1004 + 8*c pulses start for that core. Reading
// 0x1004 + 8*c returns bit 0 busy and bit 1 done; done is set by the core's
// done pulse and cleared by the next start. Reads are combinational on
// cfg_raddr. The document names a core controller configured by the CPU;
// its registers are this design's choice.
module core_controller
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
  output core_cfg_t   ccfg  [NUM],
  output logic [NUM-1:0] start,
  input  logic [NUM-1:0] busy,
  input  logic [NUM-1:0] done
);
  localparam int IW = (NUM > 1) ? $clog2(NUM) : 1;

  logic [NUM-1:0] done_q;
  logic           hit_w, hit_r;
  logic [IW-1:0]  widx, ridx;

  assign widx  = cfg_waddr[IW+2:3];
  assign ridx  = cfg_raddr[IW+2:3];
  assign hit_w = cfg_we && (cfg_waddr[15:12] == CORE_BASE[15:12]) && (32'(cfg_waddr[11:3]) < NUM);
  assign hit_r = (cfg_raddr[15:12] == CORE_BASE[15:12]) && (32'(cfg_raddr[11:3]) < NUM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM; c++) ccfg[c] <= '0;
      start  <= '0;
      done_q <= '0;
    end else begin
      start  <= '0;
      done_q <= done_q | done;
      if (hit_w) begin
        if (!cfg_waddr[2]) begin
          ccfg[widx] <= core_cfg_t'(cfg_wdata[$bits(core_cfg_t)-1:0]);
        end else if (cfg_wdata[0]) begin
          start[widx]  <= 1'b1;
          done_q[widx] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (hit_r) begin
      if (!cfg_raddr[2]) cfg_rdata = 32'(ccfg[ridx]);
      else               cfg_rdata = {30'd0, done_q[ridx], busy[ridx]};
    end
  end
endmodule
