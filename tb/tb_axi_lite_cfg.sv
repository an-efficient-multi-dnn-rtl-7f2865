// tb_axi_lite_cfg: AXI4-Lite writes with address and data in either order
// and random gaps, and reads with random response back-pressure. Checks
// that each write produces exactly one cfg_we pulse with its address and
// data, one OKAY response held until taken, and that each read returns the
// word of the region its address selects, held until taken.
module tb_axi_lite_cfg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [15:0] s_awaddr, s_araddr;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic        cfg_we;
  logic [15:0] cfg_waddr, cfg_raddr;
  logic [31:0] cfg_wdata, rtr_rdata, core_rdata, glb_rdata;

  axi_lite_cfg #(.ADDR_W(16)) dut (.*);

  // region read data is a function of the address
  assign rtr_rdata  = {16'hA000, cfg_raddr};
  assign core_rdata = {16'hB000, cfg_raddr};
  assign glb_rdata  = {16'hC000, cfg_raddr};

  logic [47:0] we_seen [$];
  always @(posedge clk) if (rst_n && cfg_we) we_seen.push_back({cfg_waddr, cfg_wdata});

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [15:0] a, input logic [31:0] d);
    bit aw_done, w_done;
    int gap;
    aw_done = 0; w_done = 0;
    gap = $urandom_range(0, 2);
    @(negedge clk);
    s_awvalid = ($urandom_range(0, 1) == 1); s_awaddr = a;
    s_wvalid  = !s_awvalid || ($urandom_range(0, 1) == 1); s_wdata = d;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (s_awvalid && s_awready) aw_done = 1;
      if (s_wvalid && s_wready)   w_done  = 1;
      @(negedge clk);
      if (aw_done) s_awvalid = 0; else s_awvalid = 1;
      if (w_done)  s_wvalid  = 0; else s_wvalid  = 1;
    end
    s_bready = 0;
    while (!s_bvalid) @(negedge clk);
    repeat (gap) begin
      @(negedge clk);
      checks++;
      if (!s_bvalid) begin failures++; $display("bvalid dropped"); end
    end
    s_bready = 1;
    @(negedge clk);
    s_bready = 0;
    checks++;
    if (we_seen.size() != 1 || we_seen[0] !== {a, d} || s_bresp != 2'b00) begin
      failures++; $display("write %h=%h seen %0d", a, d, we_seen.size());
    end
    we_seen.delete();
  endtask

  task automatic axi_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0; s_araddr = 16'($urandom);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    checks++;
    if (!s_rvalid) begin failures++; $display("no rvalid"); end
    d = s_rdata;
    s_rready = 1;
    @(negedge clk);
    s_rready = 0;
  endtask

  initial begin
    logic [31:0] d, e;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = '0; s_araddr = '0; s_wdata = '0; s_wstrb = 4'hF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] a;
      a = {2'b00, 2'($urandom_range(0, 3)), 12'($urandom)};
      axi_write(a, $urandom);
      axi_read(a, d);
      case (a[13:12])
        2'd0: e = {16'hA000, a};
        2'd1: e = {16'hB000, a};
        2'd2: e = {16'hC000, a};
        default: e = '0;
      endcase
      checks++;
      if (d !== e) begin failures++; $display("read %h got %h exp %h", a, d, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
