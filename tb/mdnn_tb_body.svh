// Shared body of the end-to-end accelerator testbenches. The including
// module defines GRID_R, GRID_C, ROWS, COLS, AW, PW, NUM_DDR and N (vectors
// per core), declares the DUT's port signals listed below, and
// instantiates mdnn_accel as `dut`.
//
// Scenario, on a 4x4 grid (tile index = 4*row + col):
//  Step 1, three groups at once:
//   * "L" shape (cf. layer step 2 of the paper's compiler example): core A
//     (0,1) sends its partial sums down to core B (1,1) (vertical fusion);
//     B forwards its activations right to C (1,2), whose router both hands
//     them to C and passes them on to D (1,3) (horizontal fusion, multicast).
//     B's activation stream is started late, so A's partial sums pile up in
//     B's load FIFO: stop flows back to A, and B holds partial sums while it
//     waits for activations.
//   * Ring pair: core E (3,0) sends partial sums down the wrap-around link
//     to core F (0,0).
//   * Independent core G (2,2): partial sums reloaded from its buffer,
//     ReLU and max-pool of 2 in the SIMD unit.
//  Step 2, after re-routing (mode switch): A forwards activations right to
//   core H (0,2); both compute with zero partial sums.
// Data goes in through both DDR-side ports (so the crossbar arbitrates),
// configuration through AXI4-Lite, results come back through res_*.
// Every result word is compared with a model computed here, and each
// mechanism above is counted; one that never happens is a failure.

  localparam int NC = GRID_R * GRID_C;
  localparam int CW = $clog2(NC);
  localparam int TA = 1, TB = 5, TCc = 6, TD = 7, TE = 12, TF = 0, TG = 10, TH = 2;
  localparam int OUT_BASE = 64;

  int checks = 0, failures = 0;
  int n_hfuse = 0, n_vfuse = 0, n_ring = 0, n_stop = 0, n_wait = 0, n_pool_in = 0,
      n_pool_out = 0, n_xbar_wait = 0, n_mode = 0, n_reload = 0, n_multicast = 0;

  logic signed [AW-1:0] W   [NC][ROWS][COLS];
  logic [ROWS*AW-1:0]   ACT [NC][N];
  logic [COLS*PW-1:0]   PSI [NC][N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_row[1].g_col[1].u_core.rt_act_out_valid) n_hfuse++;
      if (dut.g_row[1].g_col[1].u_core.rt_ps_in_valid)   n_vfuse++;
      if (dut.r_out_valid[TE][1])                         n_ring++;
      if (dut.g_row[0].g_col[1].u_core.rt_ps_out_stop)   n_stop++;
      if (dut.g_row[1].g_col[1].u_core.u_ctrl.state == 3'd2 &&
          dut.g_row[1].g_col[1].u_core.act_empty != dut.g_row[1].g_col[1].u_core.ld_empty) n_wait++;
      if (dut.g_row[1].g_col[2].u_core.rt_act_in_valid && dut.r_out_valid[TCc][3]) n_multicast++;
      if (dut.g_row[2].g_col[2].u_core.ps_pop)           n_pool_in++;
      if (dut.g_row[2].g_col[2].u_core.glb_out_valid)    n_pool_out++;
      if (dut.g_row[2].g_col[2].u_core.ld_pop)           n_reload++;
      for (int p = 0; p < NUM_DDR; p++) if (ddr_wr_valid[p] && !ddr_wr_ready[p]) n_xbar_wait++;
    end
  end

  // ---------------- host-side tasks ----------------
  task automatic axi_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_wstrb = 4'hF;
    @(posedge clk);
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic axi_rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    @(negedge clk);
    s_arvalid = 0;
    s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
    s_rready = 0;
  endtask

  // Two DDR-side ports fed from one queue each; word = {dest, bank, addr, data}
  typedef struct { int dest; glb_bank_e bank; int addr; logic [COLS*PW-1:0] data; } ddr_word_t;
  ddr_word_t ddr_q [NUM_DDR][$];

  task automatic ddr_push(input int dest, input glb_bank_e bank, input int addr, input logic [COLS*PW-1:0] data);
    ddr_word_t w;
    w.dest = dest; w.bank = bank; w.addr = addr; w.data = data;
    ddr_q[$urandom_range(0, NUM_DDR - 1)].push_back(w);
  endtask

  task automatic ddr_drain();
    bit busy_q;
    busy_q = 1;
    while (busy_q) begin
      @(negedge clk);
      busy_q = 0;
      for (int p = 0; p < NUM_DDR; p++) begin
        if (ddr_wr_valid[p] && ddr_wr_ready_s[p]) void'(ddr_q[p].pop_front());
        ddr_wr_valid[p] = (ddr_q[p].size() > 0);
        if (ddr_q[p].size() > 0) begin
          ddr_wr_dest[p] = CW'(ddr_q[p][0].dest);
          ddr_wr_bank[p] = ddr_q[p][0].bank;
          ddr_wr_addr[p] = 16'(ddr_q[p][0].addr);
          ddr_wr_data[p] = ddr_q[p][0].data;
          busy_q = 1;
        end
      end
    end
  endtask

  // ready sampled just before the clock edge
  logic [NUM_DDR-1:0] ddr_wr_ready_s;
  always @(posedge clk) ddr_wr_ready_s <= ddr_wr_ready;

  function automatic logic [31:0] rcfg(input rt_sel_e ca, input rt_sel_e cp, input rt_sel_e u,
                                       input rt_sel_e d, input rt_sel_e l, input rt_sel_e r);
    router_cfg_t c;
    c.core_act_sel = ca; c.core_ps_sel = cp; c.out_u = u; c.out_d = d; c.out_l = l; c.out_r = r;
    return 32'(c);
  endfunction

  function automatic logic [31:0] ccfg(input bit afr, input ps_src_e pss, input bit ptr, input bit fwd,
                                       input bit lw, input bit relu, input int pool, input int nv);
    core_cfg_t c;
    c.act_from_router = afr; c.ps_src = pss; c.ps_to_router = ptr; c.act_fwd = fwd;
    c.load_weights = lw; c.relu_en = relu; c.pool_len = 8'(pool); c.num_vec = 16'(nv);
    return 32'(c);
  endfunction

  task automatic glb_stream(input int g, input int which, input int base, input int len);
    axi_wr(16'h2000 + 16'(32 * g + 4 * which), {16'(len), 16'(base)});
  endtask

  function automatic logic [COLS*PW-1:0] mac(input int core, input logic [ROWS*AW-1:0] a,
                                            input logic [COLS*PW-1:0] p);
    logic [COLS*PW-1:0] r;
    for (int j = 0; j < COLS; j++) begin
      logic signed [PW-1:0] s;
      s = $signed(p[j*PW +: PW]);
      for (int i = 0; i < ROWS; i++) s += $signed(a[i*AW +: AW]) * W[core][i][j];
      r[j*PW +: PW] = s;
    end
    return r;
  endfunction

  task automatic check_results(input int g, input int base, input logic [COLS*PW-1:0] exp [$], input string tag);
    for (int n = 0; n < exp.size(); n++) begin
      @(negedge clk);
      res_cluster = CW'(g); res_addr = 16'(base + n);
      @(negedge clk);
      checks++;
      if (res_data !== exp[n]) begin
        failures++;
        if (n < 2) $display("%s result %0d mismatch: got %h exp %h", tag, n, res_data, exp[n]);
      end
    end
  endtask

  task automatic wait_done(input int core);
    logic [31:0] st;
    int guard;
    guard = 0;
    do begin
      axi_rd(16'h1004 + 16'(8 * core), st);
      guard++;
    end while (!st[1] && guard < 20000);
    checks++;
    if (!st[1]) begin failures++; $display("core %0d never done", core); end
  endtask

  initial begin
    logic [COLS*PW-1:0] expA [$], expB [$], expC [$], expD [$], expF [$], expG [$], expA2 [$], expH [$];
    logic [31:0] rd;
    int users [8];
    users = '{TA, TB, TCc, TD, TE, TF, TG, TH};
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = '0; s_araddr = '0; s_wdata = '0; s_wstrb = '0;
    res_cluster = '0; res_addr = '0;
    for (int p = 0; p < NUM_DDR; p++) begin
      ddr_wr_valid[p] = 0; ddr_wr_dest[p] = '0; ddr_wr_bank[p] = BANK_WT; ddr_wr_addr[p] = '0; ddr_wr_data[p] = '0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---------------- data ----------------
    foreach (users[u]) begin
      int g;
      g = users[u];
      for (int i = 0; i < ROWS; i++) begin
        logic [COLS*PW-1:0] v;
        v = '0;
        for (int j = 0; j < COLS; j++) begin W[g][i][j] = AW'($urandom); v[j*AW +: AW] = W[g][i][j]; end
        ddr_push(g, BANK_WT, i, v);
      end
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < ROWS; i++) ACT[g][n][i*AW +: AW] = AW'($urandom);
        for (int j = 0; j < COLS; j++) PSI[g][n][j*PW +: PW] = PW'($urandom_range(0, 20000)) - 32'd10000;
        ddr_push(g, BANK_ACT, n, (COLS*PW)'(ACT[g][n]));
        if (g == TG) ddr_push(g, BANK_PS, n, PSI[g][n]);
      end
    end
    ddr_drain();

    // ---------------- step 1 configuration ----------------
    axi_wr(16'h0000 + 16'(4 * TA),  rcfg(SEL_NONE, SEL_NONE, SEL_NONE, SEL_CORE_PS, SEL_NONE, SEL_NONE));
    axi_wr(16'h0000 + 16'(4 * TB),  rcfg(SEL_NONE, SEL_U,    SEL_NONE, SEL_NONE, SEL_NONE, SEL_CORE_ACT));
    axi_wr(16'h0000 + 16'(4 * TCc), rcfg(SEL_L,    SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE, SEL_L));
    axi_wr(16'h0000 + 16'(4 * TD),  rcfg(SEL_L,    SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE));
    axi_wr(16'h0000 + 16'(4 * TE),  rcfg(SEL_NONE, SEL_NONE, SEL_NONE, SEL_CORE_PS, SEL_NONE, SEL_NONE));
    axi_wr(16'h0000 + 16'(4 * TF),  rcfg(SEL_NONE, SEL_U,    SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE));
    axi_rd(16'h0000 + 16'(4 * TB), rd);
    checks++;
    if (rd !== rcfg(SEL_NONE, SEL_U, SEL_NONE, SEL_NONE, SEL_NONE, SEL_CORE_ACT)) begin
      failures++; $display("router register read-back");
    end
    //                         afr ps_src     p2r fwd lw relu pool nv
    axi_wr(16'h1000 + 16'(8 * TA),  ccfg(0, PS_ZERO,   1, 0, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TB),  ccfg(0, PS_ROUTER, 0, 1, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TCc), ccfg(1, PS_ZERO,   0, 0, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TD),  ccfg(1, PS_ZERO,   0, 0, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TE),  ccfg(0, PS_ZERO,   1, 0, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TF),  ccfg(0, PS_ROUTER, 0, 0, 1, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TG),  ccfg(0, PS_GLB,    0, 0, 1, 1, 2, N));
    foreach (users[u]) begin
      int g;
      g = users[u];
      if (g == TH) continue;
      glb_stream(g, 0, 0, ROWS);
      glb_stream(g, 1, 0, (g == TCc || g == TD) ? 0 : N);
      glb_stream(g, 2, 0, (g == TG) ? N : 0);
      axi_wr(16'h2000 + 16'(32 * g + 12), OUT_BASE);
      axi_wr(16'h2000 + 16'(32 * g + 16), (g == TB) ? 32'b1001 : 32'b1111);
      axi_wr(16'h1004 + 16'(8 * g), 32'd1);
    end
    repeat (4 * (ROWS + COLS) + 100) @(posedge clk);
    glb_stream(TB, 1, 0, N);
    axi_wr(16'h2000 + 16'(32 * TB + 16), 32'b0010);

    foreach (users[u]) if (users[u] != TH) wait_done(users[u]);

    for (int n = 0; n < N; n++) begin
      logic [COLS*PW-1:0] a, f;
      a = mac(TA, ACT[TA][n], '0);
      expA.push_back(a);
      expB.push_back(mac(TB, ACT[TB][n], a));
      expC.push_back(mac(TCc, ACT[TB][n], '0));
      expD.push_back(mac(TD, ACT[TB][n], '0));
      f = mac(TE, ACT[TE][n], '0);
      expF.push_back(mac(TF, ACT[TF][n], f));
    end
    for (int n = 0; n + 1 < N; n += 2) begin
      logic [COLS*PW-1:0] r0, r1, r;
      r0 = mac(TG, ACT[TG][n], PSI[TG][n]);
      r1 = mac(TG, ACT[TG][n+1], PSI[TG][n+1]);
      for (int j = 0; j < COLS; j++) begin
        logic signed [PW-1:0] v0, v1;
        v0 = $signed(r0[j*PW +: PW]); v1 = $signed(r1[j*PW +: PW]);
        if (v0 < 0) v0 = 0;
        if (v1 < 0) v1 = 0;
        r[j*PW +: PW] = (v0 > v1) ? v0 : v1;
      end
      expG.push_back(r);
    end
    check_results(TB, OUT_BASE, expB, "B");
    check_results(TCc, OUT_BASE, expC, "C");
    check_results(TD, OUT_BASE, expD, "D");
    check_results(TF, OUT_BASE, expF, "F");
    check_results(TG, OUT_BASE, expG, "G");

    // ---------------- step 2: new shape ----------------
    for (int r = 0; r < NC; r++) axi_wr(16'(4 * r), 32'd0);
    axi_wr(16'h0000 + 16'(4 * TA), rcfg(SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE, SEL_CORE_ACT));
    axi_wr(16'h0000 + 16'(4 * TH), rcfg(SEL_L,    SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE, SEL_NONE));
    axi_wr(16'h1000 + 16'(8 * TA), ccfg(0, PS_ZERO, 0, 1, 0, 0, 0, N));
    axi_wr(16'h1000 + 16'(8 * TH), ccfg(1, PS_ZERO, 0, 0, 1, 0, 0, N));
    glb_stream(TA, 1, 0, N);
    axi_wr(16'h2000 + 16'(32 * TA + 12), OUT_BASE);
    axi_wr(16'h2000 + 16'(32 * TA + 16), 32'b1010);
    glb_stream(TH, 0, 0, ROWS);
    axi_wr(16'h2000 + 16'(32 * TH + 12), OUT_BASE);
    axi_wr(16'h2000 + 16'(32 * TH + 16), 32'b1001);
    axi_wr(16'h1004 + 16'(8 * TH), 32'd1);
    axi_wr(16'h1004 + 16'(8 * TA), 32'd1);
    wait_done(TA);
    wait_done(TH);
    n_mode++;
    for (int n = 0; n < N; n++) begin
      expA2.push_back(mac(TA, ACT[TA][n], '0));
      expH.push_back(mac(TH, ACT[TA][n], '0));
    end
    check_results(TA, OUT_BASE, expA2, "A step 2");
    check_results(TH, OUT_BASE, expH, "H step 2");

    // ---------------- mechanisms ----------------
    $display("horizontal fusion %0d, vertical fusion %0d, ring link %0d, stop %0d, wait for input %0d",
             n_hfuse, n_vfuse, n_ring, n_stop, n_wait);
    $display("multicast %0d, psum reload %0d, pool in/out %0d/%0d, crossbar waits %0d, mode switches %0d",
             n_multicast, n_reload, n_pool_in, n_pool_out, n_xbar_wait, n_mode);
    checks += 10;
    if (n_hfuse == 0)     begin failures++; $display("no horizontal fusion"); end
    if (n_vfuse == 0)     begin failures++; $display("no vertical fusion"); end
    if (n_ring == 0)      begin failures++; $display("ring link unused"); end
    if (n_stop == 0)      begin failures++; $display("no backpressure"); end
    if (n_wait == 0)      begin failures++; $display("never waited for input"); end
    if (n_multicast == 0) begin failures++; $display("no multicast"); end
    if (n_reload == 0)    begin failures++; $display("no partial-sum reload"); end
    if (n_pool_out == 0 || n_pool_out * 2 != n_pool_in) begin failures++; $display("pooling"); end
    if (n_xbar_wait == 0 && NUM_DDR > 1) begin failures++; $display("no crossbar contention"); end
    if (n_mode == 0)      begin failures++; $display("no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
