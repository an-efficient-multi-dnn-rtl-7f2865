// tb_router: random routing configurations (including illegal ones, which
// must route nothing) and random traffic. Each cycle the tb predicts, from
// the previous cycle's inputs and configuration, every registered output:
// the four neighbour links, the core's two inputs, and the stop signals
// returned to each source (OR of the stops of all outputs using it).
// Also checks that one source can be multicast to several outputs.
module tb_router;
  import mdnn_pkg::*;
  localparam int LINK_W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0, multicast = 0;

  router_cfg_t       cfg;
  logic [3:0]        in_valid, in_stop, out_valid, out_stop;
  logic [LINK_W-1:0] in_data [4];
  logic [LINK_W-1:0] out_data [4];
  logic              core_act_out_valid, core_act_out_stop, core_ps_out_valid, core_ps_out_stop;
  logic [LINK_W-1:0] core_act_out_data, core_ps_out_data, core_act_in_data, core_ps_in_data;
  logic              core_act_in_valid, core_act_in_stop, core_ps_in_valid, core_ps_in_stop;

  router #(.LINK_W(LINK_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: value of a source
  function automatic void src(input rt_sel_e s, output logic v, output logic [LINK_W-1:0] d);
    v = 0; d = 'x;
    case (s)
      SEL_U: begin v = in_valid[0]; d = in_data[0]; end
      SEL_D: begin v = in_valid[1]; d = in_data[1]; end
      SEL_L: begin v = in_valid[2]; d = in_data[2]; end
      SEL_R: begin v = in_valid[3]; d = in_data[3]; end
      SEL_CORE_ACT: begin v = core_act_out_valid; d = core_act_out_data; end
      SEL_CORE_PS:  begin v = core_ps_out_valid;  d = core_ps_out_data; end
      default: ;
    endcase
  endfunction

  function automatic rt_sel_e rnd_sel();
    return rt_sel_e'($urandom_range(0, 7) % 7);
  endfunction

  initial begin
    rt_sel_e os [4];
    rt_sel_e cs [2];
    logic ev [6];
    logic [LINK_W-1:0] ed [6];
    logic [3:0] e_in_stop;
    logic e_act_stop, e_ps_stop;
    cfg = '0; in_valid = '0; out_stop = '0; core_act_out_valid = 0; core_ps_out_valid = 0;
    core_act_in_stop = 0; core_ps_in_stop = 0;
    for (int d = 0; d < 4; d++) in_data[d] = '0;
    core_act_out_data = '0; core_ps_out_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 20 == 0) begin
        cfg.out_u = rnd_sel(); cfg.out_d = rnd_sel(); cfg.out_l = rnd_sel(); cfg.out_r = rnd_sel();
        cfg.core_act_sel = rnd_sel(); cfg.core_ps_sel = rnd_sel();
      end
      in_valid = 4'($urandom); out_stop = 4'($urandom);
      for (int d = 0; d < 4; d++) in_data[d] = LINK_W'($urandom);
      core_act_out_valid = 1'($urandom); core_ps_out_valid = 1'($urandom);
      core_act_out_data = LINK_W'($urandom); core_ps_out_data = LINK_W'($urandom);
      core_act_in_stop = 1'($urandom); core_ps_in_stop = 1'($urandom);
      // predict
      os[0] = cfg.out_u; os[1] = cfg.out_d; os[2] = cfg.out_l; os[3] = cfg.out_r;
      if (os[0] == SEL_U) os[0] = SEL_NONE;
      if (os[1] == SEL_D) os[1] = SEL_NONE;
      if (os[2] == SEL_L) os[2] = SEL_NONE;
      if (os[3] == SEL_R) os[3] = SEL_NONE;
      cs[0] = cfg.core_act_sel; cs[1] = cfg.core_ps_sel;
      for (int k = 0; k < 2; k++) if (cs[k] == SEL_CORE_ACT || cs[k] == SEL_CORE_PS) cs[k] = SEL_NONE;
      for (int o = 0; o < 4; o++) src(os[o], ev[o], ed[o]);
      src(cs[0], ev[4], ed[4]);
      src(cs[1], ev[5], ed[5]);
      e_in_stop = '0; e_act_stop = 0; e_ps_stop = 0;
      for (int o = 0; o < 6; o++) begin
        rt_sel_e s;
        logic st;
        s  = (o < 4) ? os[o] : cs[o-4];
        st = (o < 4) ? out_stop[o] : (o == 4 ? core_act_in_stop : core_ps_in_stop);
        case (s)
          SEL_U: e_in_stop[0] |= st;
          SEL_D: e_in_stop[1] |= st;
          SEL_L: e_in_stop[2] |= st;
          SEL_R: e_in_stop[3] |= st;
          SEL_CORE_ACT: e_act_stop |= st;
          SEL_CORE_PS:  e_ps_stop  |= st;
          default: ;
        endcase
      end
      for (int a = 0; a < 6; a++) for (int b = a + 1; b < 6; b++) begin
        rt_sel_e sa, sb;
        sa = (a < 4) ? os[a] : cs[a-4];
        sb = (b < 4) ? os[b] : cs[b-4];
        if (sa != SEL_NONE && sa == sb) multicast++;
      end
      @(posedge clk); #1;
      for (int o = 0; o < 4; o++) begin
        checks++;
        if (out_valid[o] !== ev[o] || (ev[o] && out_data[o] !== ed[o])) begin
          failures++; $display("n=%0d out %0d mismatch sel %0d", n, o, os[o]);
        end
      end
      checks += 3;
      if (core_act_in_valid !== ev[4] || (ev[4] && core_act_in_data !== ed[4])) begin failures++; $display("core act in"); end
      if (core_ps_in_valid !== ev[5] || (ev[5] && core_ps_in_data !== ed[5])) begin failures++; $display("core ps in"); end
      if (in_stop !== e_in_stop || core_act_out_stop !== e_act_stop || core_ps_out_stop !== e_ps_stop) begin
        failures++; $display("stop mismatch %b/%b", in_stop, e_in_stop);
      end
    end
    checks++;
    if (multicast == 0) begin failures++; $display("no multicast seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
