// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The core uses these (activation, weight, load and partial-sum FIFOs) to
// absorb the differing NoC latencies between fused cores: a core only
// computes when every FIFO it needs holds data. dout shows the oldest entry
// whenever empty is low; pop removes it. almost_full rises when fewer than
// AF_SLACK entries are free, so a producer several pipeline stages away can
// stop in time. Push when full and pop when empty are errors (asserted).
// Depths and the almost-full threshold are this design's choice.
module sync_fifo #(
  parameter int W        = 32,
  parameter int DEPTH    = 16,
  parameter int AF_SLACK = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           din,
  input  logic                   pop,
  output logic [W-1:0]           dout,
  output logic                   empty,
  output logic                   full,
  output logic                   almost_full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int PTRW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]    mem [DEPTH];
  logic [PTRW-1:0] wr_ptr, rd_ptr;

  function automatic logic [PTRW-1:0] inc(input logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full)  wr_ptr <= inc(wr_ptr);
      if (pop  && !empty) rd_ptr <= inc(rd_ptr);
      count <= count + ($clog2(DEPTH)+1)'(push && !full) - ($clog2(DEPTH)+1)'(pop && !empty);
    end
  end

  assign dout        = mem[rd_ptr];
  assign empty       = (count == 0);
  assign full        = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign almost_full = (count >= ($clog2(DEPTH)+1)'(DEPTH - AF_SLACK));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
