// router: the NoC router attached to every core.
//
// Four neighbour links (up, down, left, right) and the core's four ports.
// Each link carries one shared bus that holds either activations or partial
// sums, never both at once, as a valid bit plus LINK_W data bits. Per the
// configuration in cfg:
//   * the core's activation input and partial-sum input each take one
//     neighbour input (U, D, L or R);
//   * each neighbour output takes one of the other three neighbour inputs
//     (pass-through), or the core's activation output or partial-sum output.
// One source may feed several outputs at once (multicast of shared
// activations). All outputs are registered: one cycle per router.
// Flow control: every consumer drives a stop signal back. The stop sent to
// a source is the OR of the stops of all outputs currently selecting it,
// registered, so it also costs one cycle per router on its way back.
// The port set and the selection sources follow the document's router
// figure; the registered hop and the stop signal are this design's choice.
module router
  import mdnn_pkg::*;
#(
  parameter int LINK_W = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  router_cfg_t       cfg,
  // neighbour links, indexed DIR_U/DIR_D/DIR_L/DIR_R
  input  logic [3:0]        in_valid,
  input  logic [LINK_W-1:0] in_data [4],
  output logic [3:0]        in_stop,
  output logic [3:0]        out_valid,
  output logic [LINK_W-1:0] out_data [4],
  input  logic [3:0]        out_stop,
  // from the core
  input  logic              core_act_out_valid,
  input  logic [LINK_W-1:0] core_act_out_data,
  output logic              core_act_out_stop,
  input  logic              core_ps_out_valid,
  input  logic [LINK_W-1:0] core_ps_out_data,
  output logic              core_ps_out_stop,
  // to the core
  output logic              core_act_in_valid,
  output logic [LINK_W-1:0] core_act_in_data,
  input  logic              core_act_in_stop,
  output logic              core_ps_in_valid,
  output logic [LINK_W-1:0] core_ps_in_data,
  input  logic              core_ps_in_stop
);
  rt_sel_e out_sel [4];
  assign out_sel[DIR_U] = cfg.out_u;
  assign out_sel[DIR_D] = cfg.out_d;
  assign out_sel[DIR_L] = cfg.out_l;
  assign out_sel[DIR_R] = cfg.out_r;

  // A neighbour output may not select its own direction.
  function automatic logic legal(input rt_sel_e s, input int d);
    return !((s == SEL_U && d == DIR_U) || (s == SEL_D && d == DIR_D) ||
             (s == SEL_L && d == DIR_L) || (s == SEL_R && d == DIR_R));
  endfunction

  function automatic int sel_dir(input rt_sel_e s);
    case (s)
      SEL_U:   return DIR_U;
      SEL_D:   return DIR_D;
      SEL_L:   return DIR_L;
      SEL_R:   return DIR_R;
      default: return -1;
    endcase
  endfunction

  logic              nxt_valid [6];
  logic [LINK_W-1:0] nxt_data  [6];
  rt_sel_e           sel       [6];  // 0..3 neighbour outputs, 4 core act in, 5 core ps in
  logic              stop_of   [6];

  always_comb begin
    for (int o = 0; o < 4; o++) sel[o] = legal(out_sel[o], o) ? out_sel[o] : SEL_NONE;
    sel[4] = (cfg.core_act_sel inside {SEL_U, SEL_D, SEL_L, SEL_R}) ? cfg.core_act_sel : SEL_NONE;
    sel[5] = (cfg.core_ps_sel  inside {SEL_U, SEL_D, SEL_L, SEL_R}) ? cfg.core_ps_sel  : SEL_NONE;
    for (int o = 0; o < 4; o++) stop_of[o] = out_stop[o];
    stop_of[4] = core_act_in_stop;
    stop_of[5] = core_ps_in_stop;
    for (int o = 0; o < 6; o++) begin
      nxt_valid[o] = 1'b0;
      nxt_data[o]  = core_act_out_data;
      case (sel[o])
        SEL_U, SEL_D, SEL_L, SEL_R: begin
          nxt_valid[o] = in_valid[sel_dir(sel[o])];
          nxt_data[o]  = in_data[sel_dir(sel[o])];
        end
        SEL_CORE_ACT: begin
          nxt_valid[o] = core_act_out_valid;
          nxt_data[o]  = core_act_out_data;
        end
        SEL_CORE_PS: begin
          nxt_valid[o] = core_ps_out_valid;
          nxt_data[o]  = core_ps_out_data;
        end
        default: ;
      endcase
    end
  end

  // Backward stop: OR over every output that selects the source.
  logic [3:0] in_stop_d;
  logic       act_stop_d, ps_stop_d;
  always_comb begin
    in_stop_d  = '0;
    act_stop_d = 1'b0;
    ps_stop_d  = 1'b0;
    for (int o = 0; o < 6; o++) begin
      case (sel[o])
        SEL_U:        in_stop_d[DIR_U] |= stop_of[o];
        SEL_D:        in_stop_d[DIR_D] |= stop_of[o];
        SEL_L:        in_stop_d[DIR_L] |= stop_of[o];
        SEL_R:        in_stop_d[DIR_R] |= stop_of[o];
        SEL_CORE_ACT: act_stop_d       |= stop_of[o];
        SEL_CORE_PS:  ps_stop_d        |= stop_of[o];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid         <= '0;
      core_act_in_valid <= 1'b0;
      core_ps_in_valid  <= 1'b0;
      in_stop           <= '0;
      core_act_out_stop <= 1'b0;
      core_ps_out_stop  <= 1'b0;
    end else begin
      for (int o = 0; o < 4; o++) out_valid[o] <= nxt_valid[o];
      core_act_in_valid <= nxt_valid[4];
      core_ps_in_valid  <= nxt_valid[5];
      in_stop           <= in_stop_d;
      core_act_out_stop <= act_stop_d;
      core_ps_out_stop  <= ps_stop_d;
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < 4; o++) out_data[o] <= nxt_data[o];
    core_act_in_data <= nxt_data[4];
    core_ps_in_data  <= nxt_data[5];
  end
endmodule
