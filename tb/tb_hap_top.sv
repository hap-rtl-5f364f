// tb_hap_top: end-to-end test of the HAP core at its default size
// (16 x 32 array, L = 16, R = 8, precision-blending window up to 3).
//
// For each job the testbench draws, independently of the design, two M-row
// activation tiles in DAR form (per input channel k a precision p_k, values
// below 2^p_k and a dynamic zero-point), a weight tile (4-bit or 8-bit
// signed), a static zero-point Za, and loads them through the host port in
// the layout the core expects. It then runs the job and compares every
// output with
//     y[t][i][j] = sum_k (q[t][i][k] + dzp[t][k] - Za) * w[k][j]
// where the static term P_S = -Za * sum_k w[k][j] is given on the ps port.
//
// Jobs cover: widely spread precisions (pages fill up without a match, so
// full-page exceptions), narrowly spread precisions (matches inside a
// blending window), equal precisions (exact matches only, with an exact
// cycle count against the schedule), 8-bit weights (two nibble cycles per bit) and a layer with
// dynamic zero-points disabled. Cycle checks: the lane-busy count equals
// the sum of all group precisions (times two for 8-bit weights), the P_D
// pass takes K/L (x2) cycles and log2(8) aggregation steps, and the whole job
// lies between its compute cycles and compute plus write-back and pipeline
// overhead. Every mechanism must have occurred at least once.
module tb_hap_top;
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
  localparam int KL_MAX = 16;
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
  int cnt_exact = 0, cnt_blend = 0, cnt_exc_full = 0, cnt_exc_drain = 0;
  int cnt_wgt8 = 0, cnt_dzp = 0, cnt_nodzp = 0, cnt_idle_lane = 0;

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

  // mode 0: precisions 1..8 uniform; 1: 4..6; 2: all equal to 5; 3: 1..3
  function automatic int draw_prec(input int mode);
    case (mode)
      0: return 1 + $urandom_range(0, 7);
      1: return 4 + $urandom_range(0, 2);
      2: return 5;
      default: return 1 + $urandom_range(0, 2);
    endcase
  endfunction

  task automatic run_job(input int kl, input bit wgt8, input bit dzp_en, input int mode);
    int k_tot, nib, acur, lane_work, t0, t1, cycles, k;
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
        p[t][k]  = draw_prec(mode);
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
                $sformatf("job mode %0d t%0d row %0d col %0d: got %0d exp %0d",
                          mode, t, i, c, $signed(ob_rdata[c]), exp_y));
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
    if (mode == 2) begin
      check(n_pa_cycles == 32'(TPJ * kl * 5 * nib), "equal precisions: P_A cycles");
      check(n_match_exact == 32'(TPJ * kl), "equal precisions: all exact matches");
      // cycles from the edge that samples start to the edge that raises done:
      // P_D pass with its clear, pipeline, aggregation and capture cycles,
      // then per tile clear, engine start-up (4), iterations, pipeline and
      // write-back of M rows
      check(cycles == (dzp_en ? 1 + kl * nib + 1 + $clog2(BA) + 1 : 0)
                      + TPJ * (1 + 4 + kl * 5 * nib + 2 + 1 + M) - 1,
            $sformatf("equal precisions: job cycles %0d", cycles));
    end
    $display("job mode=%0d kl=%0d wgt8=%0d dzp=%0d: cycles=%0d pa=%0d util=%0d%% exact=%0d blend=%0d excfull=%0d excdrain=%0d",
             mode, kl, wgt8, dzp_en, cycles, n_pa_cycles, 100 * n_lane_busy / n_lane_slots,
             n_match_exact, n_match_blend, n_exc_full, n_exc_drain);
    cnt_exact     += n_match_exact;
    cnt_blend     += n_match_blend;
    cnt_exc_full  += n_exc_full;
    cnt_exc_drain += n_exc_drain;
    if (wgt8) cnt_wgt8++;
    if (dzp_en && n_agg_steps != 0) cnt_dzp++;
    if (!dzp_en) cnt_nodzp++;
    if (n_lane_busy < n_lane_slots) cnt_idle_lane++;
  endtask

  initial begin
    #(10 * 200000);
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
    run_job(16, 1'b0, 1'b1, 0);   // spread precisions
    run_job(16, 1'b0, 1'b1, 1);   // narrow spread: blending
    run_job(8,  1'b0, 1'b1, 2);   // equal precisions
    run_job(12, 1'b1, 1'b1, 1);   // 8-bit weights
    run_job(10, 1'b0, 1'b0, 3);   // dynamic zero-points disabled
    check(cnt_exact > 0,     "mechanism: exact match");
    check(cnt_blend > 0,     "mechanism: blended match");
    check(cnt_exc_full > 0,  "mechanism: exception with full pages");
    check(cnt_exc_drain > 0, "mechanism: exception at end of input");
    check(cnt_wgt8 > 0,      "mechanism: 8-bit weight mode");
    check(cnt_dzp > 0,       "mechanism: DZP pass and aggregation");
    check(cnt_nodzp > 0,     "mechanism: DZP disabled");
    check(cnt_idle_lane > 0, "mechanism: idle lanes in blended iterations");
    $display("mechanisms: exact=%0d blend=%0d exc_full=%0d exc_drain=%0d wgt8=%0d dzp=%0d nodzp=%0d idle=%0d",
             cnt_exact, cnt_blend, cnt_exc_full, cnt_exc_drain, cnt_wgt8, cnt_dzp, cnt_nodzp, cnt_idle_lane);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
