// glb_stream: address generator that streams len consecutive buffer words,
// starting at base, towards a consumer with valid/ready.
//
// start loads base and len; while words remain and ready is high it issues
// one read per cycle (rd_en, rd_addr). The buffer answers one cycle later,
// so the consumer's ready must already account for one word in flight.
// busy is high until the last read has been issued.
module glb_stream #(
  parameter int AW_ADDR = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [15:0]        base,
  input  logic [15:0]        len,
  input  logic               ready,
  output logic               rd_en,
  output logic [AW_ADDR-1:0] rd_addr,
  output logic               busy
);
  logic [15:0] ptr, remain;

  assign busy    = (remain != 0);
  assign rd_en   = busy && ready;
  assign rd_addr = AW_ADDR'(ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      remain <= '0;
    end else if (start) begin
      ptr    <= base;
      remain <= len;
    end else if (rd_en) begin
      ptr    <= ptr + 16'd1;
      remain <= remain - 16'd1;
    end
  end
endmodule
