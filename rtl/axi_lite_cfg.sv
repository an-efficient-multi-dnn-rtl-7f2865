// axi_lite_cfg: AXI4-Lite slave through which the host CPU configures the
// router, GLB cluster and core controllers.
//
// A write is accepted once both its address and data have arrived (they
// may come in either order); it becomes a one-cycle cfg_we pulse with the
// byte address and the 32-bit word, and the OKAY response follows in the
// next cycle. A read samples the selected controller's rdata in the cycle
// its address is accepted and returns it the cycle after. Bits [13:12] of
// the address choose the controller (0 router, 1 core, 2 GLB cluster);
// other regions read as zero. Only whole 32-bit words are written: WSTRB is
// ignored. The document only says the CPU configures the controllers over
// AXI; the register layout and this slave are this design's own.
module axi_lite_cfg #(
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  input  logic              s_arvalid,
  output logic              s_arready,
  input  logic [ADDR_W-1:0] s_araddr,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  // register bus towards the controllers
  output logic              cfg_we,
  output logic [15:0]       cfg_waddr,
  output logic [31:0]       cfg_wdata,
  output logic [15:0]       cfg_raddr,
  input  logic [31:0]       rtr_rdata,
  input  logic [31:0]       core_rdata,
  input  logic [31:0]       glb_rdata
);
  logic              aw_full, w_full;
  logic [ADDR_W-1:0] aw_q;
  logic [31:0]       w_q;

  assign s_awready = !aw_full && !s_bvalid;
  assign s_wready  = !w_full  && !s_bvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  logic do_write;
  assign do_write = aw_full && w_full && !s_bvalid;

  assign cfg_we    = do_write;
  assign cfg_waddr = 16'(aw_q);
  assign cfg_wdata = w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_full  <= 1'b0;
      w_full   <= 1'b0;
      s_bvalid <= 1'b0;
    end else begin
      if (s_awvalid && s_awready) aw_full <= 1'b1;
      if (s_wvalid && s_wready)   w_full  <= 1'b1;
      if (do_write) begin
        aw_full  <= 1'b0;
        w_full   <= 1'b0;
        s_bvalid <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_awvalid && s_awready) aw_q <= s_awaddr;
    if (s_wvalid && s_wready)   w_q  <= s_wdata;
  end

  // Reads
  logic [31:0] rd_sel;
  assign s_arready = !s_rvalid;
  assign cfg_raddr = 16'(s_araddr);
  always_comb begin
    unique case (cfg_raddr[13:12])
      2'd0:    rd_sel = rtr_rdata;
      2'd1:    rd_sel = core_rdata;
      2'd2:    rd_sel = glb_rdata;
      default: rd_sel = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else if (s_arvalid && s_arready) begin
      s_rvalid <= 1'b1;
      s_rdata  <= rd_sel;
    end else if (s_rvalid && s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

  a_bresp_held: assert property (@(posedge clk) disable iff (!rst_n)
                                 s_bvalid && !s_bready |=> s_bvalid);
  a_rdata_held: assert property (@(posedge clk) disable iff (!rst_n)
                                 s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
