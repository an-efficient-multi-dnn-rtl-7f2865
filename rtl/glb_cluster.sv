// glb_cluster: the global buffer cluster attached to one core.
//
// Three single-write buffers: weights (WT_DEPTH words of COLS*AW bits),
// activations (ACT_DEPTH words of ROWS*AW bits) and partial sums / results
// (PS_DEPTH words of COLS*PW bits). The crossbar fills them with data from
// DDR (wr_* port, one word per cycle, word address in wr_addr). Three
// stream engines, started by the GLB cluster controller, read the weight,
// activation and partial-sum buffers out to the core's FIFOs (valid one
// cycle after the read; the core's ready keeps room for that). Results from
// the core's SIMD unit are written into the partial-sum buffer at
// consecutive addresses starting at out_base (go[3] restarts the pointer);
// they take priority over the crossbar, which sees wr_ready low in any
// cycle a result is written. A
// second read port (rd_addr/rd_data, one-cycle latency) returns results to
// the host side. Buffer depths and organisation are this design's choice:
// the document only says the cluster caches DDR data and intermediate
// results.
module glb_cluster
  import mdnn_pkg::*;
#(
  parameter int ROWS      = 32,
  parameter int COLS      = 32,
  parameter int AW        = 8,
  parameter int PW        = 32,
  parameter int WT_DEPTH  = 256,
  parameter int ACT_DEPTH = 1024,
  parameter int PS_DEPTH  = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // fill from the crossbar
  input  logic               wr_valid,
  output logic               wr_ready,
  input  glb_bank_e          wr_bank,
  input  logic [15:0]        wr_addr,
  input  logic [COLS*PW-1:0] wr_data,
  // commands from the GLB cluster controller
  input  glb_stream_t        wt_cmd,
  input  glb_stream_t        act_cmd,
  input  glb_stream_t        ps_cmd,
  input  logic [15:0]        out_base,
  input  logic [3:0]         go,
  output logic [2:0]         busy,
  // streams to the core
  output logic               wt_valid,
  output logic [COLS*AW-1:0] wt_data,
  input  logic               wt_ready,
  output logic               act_valid,
  output logic [ROWS*AW-1:0] act_data,
  input  logic               act_ready,
  output logic               ps_valid,
  output logic [COLS*PW-1:0] ps_data,
  input  logic               ps_ready,
  // results from the core
  input  logic               out_valid,
  input  logic [COLS*PW-1:0] out_data,
  // result read-back
  input  logic [15:0]        rd_addr,
  output logic [COLS*PW-1:0] rd_data
);
  localparam int WA = $clog2(WT_DEPTH);
  localparam int AA = $clog2(ACT_DEPTH);
  localparam int PA = $clog2(PS_DEPTH);

  logic [COLS*AW-1:0] wt_mem  [WT_DEPTH];
  logic [ROWS*AW-1:0] act_mem [ACT_DEPTH];
  logic [COLS*PW-1:0] ps_mem  [PS_DEPTH];

  // ---------------- stream engines ----------------
  logic          wt_rd, act_rd, ps_rd;
  logic [WA-1:0] wt_ra;
  logic [AA-1:0] act_ra;
  logic [PA-1:0] ps_ra;

  glb_stream #(.AW_ADDR(WA)) u_wt_stream (
    .clk, .rst_n, .start(go[0]), .base(wt_cmd.base), .len(wt_cmd.len),
    .ready(wt_ready), .rd_en(wt_rd), .rd_addr(wt_ra), .busy(busy[0])
  );
  glb_stream #(.AW_ADDR(AA)) u_act_stream (
    .clk, .rst_n, .start(go[1]), .base(act_cmd.base), .len(act_cmd.len),
    .ready(act_ready), .rd_en(act_rd), .rd_addr(act_ra), .busy(busy[1])
  );
  glb_stream #(.AW_ADDR(PA)) u_ps_stream (
    .clk, .rst_n, .start(go[2]), .base(ps_cmd.base), .len(ps_cmd.len),
    .ready(ps_ready), .rd_en(ps_rd), .rd_addr(ps_ra), .busy(busy[2])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wt_valid  <= 1'b0;
      act_valid <= 1'b0;
      ps_valid  <= 1'b0;
    end else begin
      wt_valid  <= wt_rd;
      act_valid <= act_rd;
      ps_valid  <= ps_rd;
    end
  end

  always_ff @(posedge clk) begin
    if (wt_rd)  wt_data  <= wt_mem[wt_ra];
    if (act_rd) act_data <= act_mem[act_ra];
    if (ps_rd)  ps_data  <= ps_mem[ps_ra];
    rd_data <= ps_mem[rd_addr[PA-1:0]];
  end

  // ---------------- writes ----------------
  logic [15:0] out_ptr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         out_ptr <= '0;
    else if (go[3])     out_ptr <= out_base;
    else if (out_valid) out_ptr <= out_ptr + 16'd1;
  end

  assign wr_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (wr_valid && wr_bank == BANK_WT)  wt_mem[wr_addr[WA-1:0]]  <= wr_data[COLS*AW-1:0];
    if (wr_valid && wr_bank == BANK_ACT) act_mem[wr_addr[AA-1:0]] <= wr_data[ROWS*AW-1:0];
    if (out_valid)
      ps_mem[out_ptr[PA-1:0]] <= out_data;
    else if (wr_valid && wr_bank == BANK_PS)
      ps_mem[wr_addr[PA-1:0]] <= wr_data;
  end
endmodule
