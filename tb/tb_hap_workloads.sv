// tb_hap_workloads: layer GEMMs of common DNN models on the HAP core at
// its default size (16 x 32 array, L = 16, R = 8, blending window up to 3).
//
// Each job is one pair of 16-row activation tiles times a K x 32 weight
// tile, with K taken from a layer of a common model: DeiT-S attention
// projections (K = 384), ViT-B attention projections (K = 768, with 4-bit
// and with 8-bit weights), the ViT-B MLP down-projection (K = 3072), an
// OPT-1.3B attention projection (K = 2048) and a 3 x 3 x 256 convolution of
// ResNet18 / VGG19 (K = 2304, run without dynamic zero-points as for a layer
// after ReLU). The activation precisions are drawn from a fixed long-tailed
// distribution with a mean of about 4.4 bits (P(1..8) = 4, 9, 16, 23, 22,
// 14, 8, 4 %); this is synthetic data standing in for real layer statistics.
//
// For every job the testbench compares all 1024 outputs with
//     y[t][i][j] = sum_k (q[t][i][k] + dzp[t][k] - Za) * w[k][j],
// checks the lane and iteration counters, and works out the lane
// utilisation the array would reach without reordering (iteration j takes
// group j of every submatrix and lasts as long as the widest). The reorder
// engine must do at least as well; both figures are printed.
module tb_hap_workloads;
  import hap_pkg::*;

  localparam int L      = L_DEF;
  localparam int M      = M_DEF;
  localparam int N      = N_DEF;
  localparam int BA     = BA_DEF;
  localparam int TPJ    = M / BA;
  localparam int AW     = AW_DEF;
  localparam int ACC_W  = ACC_W_DEF;
  localparam int PAW    = $clog2(PREC_DEPTH_DEF);
  localparam int OAW    = $clog2(TPJ * M);
  localparam int LW     = $clog2(L);
  localparam int KL_MAX = 192;
  localparam int K_MAX  = L * KL_MAX;
  localparam int DZP_BASE = TPJ * KL_MAX * BA;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic                          host_we;
  buf_sel_e                      host_sel;
  logic [LW-1:0]                 host_lane;
  logic [AW-1:0]                 host_addr;
  logic [N*8-1:0]                host_wdata;
  logic                          start;
  logic [PAW:0]                  cfg_kl;
  logic                          cfg_wgt8, cfg_dzp_en;
  logic [AW-1:0]                 cfg_wgt_base, cfg_dzp_base;
  logic [TPJ-1:0][PAW-1:0]       cfg_prec_base;
  logic [TPJ-1:0][L-1:0][AW-1:0] cfg_act_base;
  logic [N-1:0][ACC_W-1:0]       ps;
  logic                          busy, done;
  logic                          ob_re;
  logic [OAW-1:0]                ob_raddr;
  logic [N-1:0][ACC_W-1:0]       ob_rdata;
  logic [31:0] n_match_exact, n_match_blend, n_exc_full, n_exc_drain;
  logic [31:0] n_iter, n_pa_cycles, n_pd_cycles, n_agg_steps, n_lane_busy, n_lane_slots;

  hap_top dut (.*);

  int checks = 0, failures = 0;
  int jobs = 0;

  // reference data
  int q   [TPJ][M][K_MAX];
  int p   [TPJ][K_MAX];
  int dz  [TPJ][K_MAX];
  int w   [K_MAX][N];
  int za;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(input buf_sel_e sel, input int lane, input int addr,
                            input logic [N*8-1:0] data);
    @(negedge clk);
    host_we    = 1'b1;
    host_sel   = sel;
    host_lane  = LW'(lane);
    host_addr  = AW'(addr);
    host_wdata = data;
    @(posedge clk);
    #1 host_we = 1'b0;
  endtask

  // long-tailed precision distribution, percentages for precisions 1..8
  function automatic int draw_prec();
    int pct [8] = '{4, 9, 16, 23, 22, 14, 8, 4};
    int r, acc;
    r = $urandom_range(0, 99);
    acc = 0;
    for (int b = 0; b < 8; b++) begin
      acc += pct[b];
      if (r < acc) return b + 1;
    end
    return 8;
  endfunction

  task automatic run_job(input string name, input int kl, input bit wgt8, input bit dzp_en);
    int k_tot, nib, acur, lane_work, t0, t1, cycles, k, naive_slots, mx;
    logic [N*8-1:0] word;
    longint exp_y, sumw;
    k_tot = L * kl;
    nib   = wgt8 ? 2 : 1;
    za    = $urandom_range(0, 255);
    // ---- draw data ----
    for (int k = 0; k < k_tot; k++)
      for (int c = 0; c < N; c++)
        w[k][c] = wgt8 ? $urandom_range(0, 255) - 128 : $urandom_range(0, 15) - 8;
    lane_work = 0;
    for (int t = 0; t < TPJ; t++)
      for (int k = 0; k < k_tot; k++) begin
        p[t][k]  = draw_prec();
        dz[t][k] = $urandom_range(0, (1 << BA) - 1);
        lane_work += p[t][k] * nib;
        for (int i = 0; i < M; i++) q[t][i][k] = $urandom_range(0, (1 << p[t][k]) - 1);
      end
    // ---- load buffers ----
    for (int l = 0; l < L; l++) begin
      for (int t = 0; t < TPJ; t++) begin
        acur = t * KL_MAX * BA;
        cfg_act_base[t][l] = AW'(acur);
        cfg_prec_base[t]   = PAW'(t * KL_MAX);
        for (int j = 0; j < kl; j++) begin
          k = l * kl + j;
          host_write(BUF_PREC, l, t * KL_MAX + j, (N*8)'(p[t][k] - 1));
          for (int b = 0; b < p[t][k]; b++) begin
            word = '0;
            for (int i = 0; i < M; i++) word[i] = q[t][i][k][b];
            host_write(BUF_ACT, l, acur, word);
            acur++;
          end
        end
      end
      for (int j = 0; j < kl; j++) begin
        k = l * kl + j;
        word = '0;
        for (int c = 0; c < N; c++) word[c*8 +: 8] = 8'(w[k][c]);
        host_write(BUF_WGT, l, j, word);
        word = '0;
        for (int t = 0; t < TPJ; t++) word[t*BA +: BA] = BA'(dz[t][k]);
        host_write(BUF_ACT, l, DZP_BASE + j, word);
      end
    end
    for (int c = 0; c < N; c++) begin
      sumw = 0;
      for (int k = 0; k < k_tot; k++) sumw += w[k][c];
      ps[c] = ACC_W'(-za * sumw);
    end
    // ---- run ----
    @(negedge clk);
    cfg_kl       = (PAW+1)'(kl);
    cfg_wgt8     = wgt8;
    cfg_dzp_en   = dzp_en;
    cfg_wgt_base = '0;
    cfg_dzp_base = AW'(DZP_BASE);
    start        = 1'b1;
    @(posedge clk);
    t0 = cyc;
    #1 start     = 1'b0;
    do @(posedge clk); while (!done);
    t1 = cyc;
    cycles = t1 - t0;
    // ---- compare results ----
    for (int t = 0; t < TPJ; t++)
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        ob_re    = 1'b1;
        ob_raddr = OAW'(t * M + i);
        @(negedge clk);
        ob_re    = 1'b0;
        for (int c = 0; c < N; c++) begin
          exp_y = 0;
          for (int k = 0; k < k_tot; k++)
            exp_y += longint'(q[t][i][k] + (dzp_en ? dz[t][k] : 0) - za) * w[k][c];
          check(ob_rdata[c] == ACC_W'(exp_y),
                $sformatf("%s t%0d row %0d col %0d: got %0d exp %0d",
                          name, t, i, c, $signed(ob_rdata[c]), exp_y));
        end
      end
    // ---- cycle and event checks ----
    check(n_lane_busy == 32'(lane_work), $sformatf("lane-busy %0d exp %0d", n_lane_busy, lane_work));
    check(n_lane_slots == n_pa_cycles * L, "lane slots");
    check(n_iter == 32'(TPJ * kl), $sformatf("iterations %0d exp %0d", n_iter, TPJ * kl));
    check(n_iter == n_match_exact + n_match_blend + n_exc_full + n_exc_drain, "dispatch kinds");
    check(n_pd_cycles == 32'(dzp_en ? kl * nib : 0), "P_D cycles");
    check(n_agg_steps == 32'(dzp_en ? $clog2(BA) : 0), "aggregation steps");
    check(cycles >= int'(n_pa_cycles + n_pd_cycles + n_agg_steps) + TPJ * M,
          $sformatf("job cycles %0d below compute", cycles));
    check(cycles <= int'(n_pa_cycles + n_pd_cycles + n_agg_steps) + TPJ * (M + 8 + 2 * 8) + 8,
          $sformatf("job cycles %0d above bound", cycles));
    // utilisation without reordering
    naive_slots = 0;
    for (int t = 0; t < TPJ; t++)
      for (int j = 0; j < kl; j++) begin
        mx = 0;
        for (int l = 0; l < L; l++) if (p[t][l * kl + j] > mx) mx = p[t][l * kl + j];
        naive_slots += L * mx * nib;
      end
    check(longint'(n_lane_busy) * naive_slots >= longint'(lane_work) * n_lane_slots,
          $sformatf("%s: reordered utilisation below the unreordered one", name));
    $display("%s: K=%0d wgt8=%0d cycles=%0d P_A cycles=%0d util=%0d%% (without reordering %0d%%) exact=%0d blend=%0d excfull=%0d excdrain=%0d",
             name, k_tot, wgt8, cycles, n_pa_cycles, 100 * n_lane_busy / n_lane_slots,
             100 * lane_work / naive_slots, n_match_exact, n_match_blend, n_exc_full, n_exc_drain);
    jobs++;
  endtask

  initial begin
    #(10 * 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    host_we = 1'b0; host_sel = BUF_ACT; host_lane = '0; host_addr = '0; host_wdata = '0;
    start = 1'b0; cfg_kl = '0; cfg_wgt8 = 1'b0; cfg_dzp_en = 1'b0;
    cfg_wgt_base = '0; cfg_dzp_base = '0; cfg_prec_base = '0; cfg_act_base = '0; ps = '0;
    ob_re = 1'b0; ob_raddr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_job("DeiT-S attention projection", 24, 1'b0, 1'b1);
    run_job("ViT-B attention projection", 48, 1'b0, 1'b1);
    run_job("ViT-B attention projection, 8-bit weights", 48, 1'b1, 1'b1);
    run_job("ViT-B MLP down-projection", 192, 1'b0, 1'b1);
    run_job("OPT-1.3B attention projection", 128, 1'b0, 1'b1);
    run_job("ResNet18 / VGG19 3x3x256 convolution, DZP off", 144, 1'b0, 1'b0);
    check(jobs == 6, "all jobs ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
