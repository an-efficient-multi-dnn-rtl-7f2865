// tb_crossbar: three sources send tagged payloads to five destinations
// with random valid and random destination ready. Checks that each
// destination receives exactly the payloads addressed to it, in order per
// source, that a source is only told ready when its payload was taken, and
// that contending sources are all served (round robin).
module tb_crossbar;
  localparam int NI = 3, NO = 5, PW = 16, DW = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0, contention = 0;

  logic [NI-1:0] in_valid, in_ready;
  logic [DW-1:0] in_dest [NI];
  logic [PW-1:0] in_payload [NI];
  logic [NO-1:0] out_valid, out_ready;
  logic [PW-1:0] out_payload [NO];

  crossbar #(.NUM_IN(NI), .NUM_OUT(NO), .PW(PW), .DW(DW)) dut (.*);

  logic [PW-1:0] sent [NO][NI][$];
  int            seq [NI];
  int            served [NI];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NI; i++) begin in_dest[i] = '0; in_payload[i] = '0; seq[i] = 0; served[i] = 0; end
    in_valid = '0; out_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i]   = ($urandom_range(0, 3) != 0);
          in_dest[i]    = DW'($urandom_range(0, NO - 1));
          in_payload[i] = {2'(i), 14'(seq[i]++)};
        end
      end
      out_ready = NO'($urandom);
      #1;
      // contention: two sources valid for the same destination
      for (int a = 0; a < NI; a++) for (int b = a + 1; b < NI; b++)
        if (in_valid[a] && in_valid[b] && in_dest[a] == in_dest[b]) contention++;
      for (int o = 0; o < NO; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int src_i;
          src_i = int'(out_payload[o][PW-1 -: 2]);
          checks++;
          if (!(in_valid[src_i] && in_ready[src_i] && int'(in_dest[src_i]) == o &&
                in_payload[src_i] == out_payload[o])) begin
            failures++; $display("dest %0d got payload not from a ready source", o);
          end
          served[src_i]++;
        end
      end
      for (int i = 0; i < NI; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          int o;
          o = int'(in_dest[i]);
          checks++;
          if (!(out_valid[o] && out_ready[o] && out_payload[o] == in_payload[i])) begin
            failures++; $display("source %0d ready but payload not delivered", i);
          end
        end
      end
    end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (served[i] < 300) begin failures++; $display("source %0d starved (%0d)", i, served[i]); end
    end
    checks++;
    if (contention == 0) begin failures++; $display("no contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
