// crossbar: connects the DDR-side write ports to the GLB clusters.
//
// NUM_IN source ports, each a valid/ready stream of payloads tagged with the
// number of the destination cluster, and NUM_OUT destination ports. Every
// destination has its own round-robin arbiter, so sources aimed at
// different clusters pass in the same cycle and sources aimed at the same
// cluster take turns. Purely combinational between source and destination;
// the pointer of an arbiter moves past the winner after each transfer.
// The document places a crossbar between the DDR controller and the GLB
// clusters; the port count, tagging and arbitration are this design's
// choice.
module crossbar #(
  parameter int NUM_IN  = 1,
  parameter int NUM_OUT = 16,
  parameter int PW      = 64,
  parameter int DW      = (NUM_OUT > 1) ? $clog2(NUM_OUT) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_IN-1:0]    in_valid,
  input  logic [DW-1:0]        in_dest    [NUM_IN],
  input  logic [PW-1:0]        in_payload [NUM_IN],
  output logic [NUM_IN-1:0]    in_ready,
  output logic [NUM_OUT-1:0]   out_valid,
  output logic [PW-1:0]        out_payload [NUM_OUT],
  input  logic [NUM_OUT-1:0]   out_ready
);
  localparam int IW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic [IW-1:0] rr    [NUM_OUT];  // highest-priority source per destination
  logic [IW-1:0] grant [NUM_OUT];
  logic [NUM_OUT-1:0] any;

  always_comb begin
    in_ready = '0;
    for (int o = 0; o < NUM_OUT; o++) begin
      any[o]         = 1'b0;
      grant[o]       = rr[o];
      out_payload[o] = in_payload[0];
      for (int k = 0; k < NUM_IN; k++) begin
        int i;
        i = (int'(rr[o]) + k) % NUM_IN;
        if (!any[o] && in_valid[i] && int'(in_dest[i]) == o) begin
          any[o]   = 1'b1;
          grant[o] = IW'(i);
        end
      end
      out_valid[o] = any[o];
      if (any[o]) begin
        out_payload[o]  = in_payload[grant[o]];
        in_ready[grant[o]] = out_ready[o];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_OUT; o++) rr[o] <= '0;
    end else begin
      for (int o = 0; o < NUM_OUT; o++)
        if (any[o] && out_ready[o])
          rr[o] <= (int'(grant[o]) == NUM_IN - 1) ? '0 : grant[o] + 1'b1;
    end
  end
endmodule
