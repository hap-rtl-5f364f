// tb_hap_reorder_engine: self-checking test of the reorder engine with
// L = 4 submatrices, R = 8 entries per page, B = 8, blending window up to 3.
//
// Behavioural precision buffers (one-cycle read) hold random codes. For each
// run the engine is started with random bases; dsp_ready is random or held
// high. Every dispatched iteration is checked against the buffer contents:
// each lane's entry has the precision stored for it, the weight address
// base + j and the activation address base + sum of the earlier precisions
// of that lane; every entry of every lane is dispatched exactly once; the
// iteration length equals the largest lane precision; the counters add up
// to the number of iterations. Runs with equal precisions must match exactly
// every time and, with dsp_ready high, dispatch one iteration per cycle;
// runs with precisions spread over 1..8 must raise full-page exceptions;
// runs with precisions in a narrow band must produce blended matches.
module tb_hap_reorder_engine;
  localparam int L = 4, B = 8, R = 8, WS = 3, AW = 12, PAW = 10;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                  start, stats_clr, busy, done;
  logic [PAW-1:0]        prec_base;
  logic [AW-1:0]         wgt_base;
  logic [L-1:0][AW-1:0]  act_base;
  logic [PAW:0]          count;
  logic [L-1:0]          pb_re;
  logic [L-1:0][PAW-1:0] pb_addr;
  logic [L-1:0][2:0]     pb_rdata;
  logic                  dsp_valid, dsp_ready;
  logic [3:0]            dsp_gprec;
  logic [L-1:0][3:0]     dsp_prec;
  logic [L-1:0][AW-1:0]  dsp_waddr, dsp_aaddr;
  logic [31:0]           n_match_exact, n_match_blend, n_exc_full, n_exc_drain;

  hap_reorder_engine #(.L(L), .B(B), .R(R), .WS_MAX(WS), .AW(AW), .PAW(PAW)) dut (.*);

  logic [2:0] pmem [L][1 << PAW];
  always_ff @(posedge clk)
    for (int l = 0; l < L; l++) if (pb_re[l]) pb_rdata[l] <= pmem[l][pb_addr[l]];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int tot_exact = 0, tot_blend = 0, tot_full = 0, tot_drain = 0;

  initial begin
    int cnt, ndisp, c, first_c, last_c, mx, mn, j;
    int aoff [L][64];
    bit seen [L][64];
    rst_n = 0; start = 0; stats_clr = 0; prec_base = 0; wgt_base = 0; act_base = 0; count = 0;
    dsp_ready = 0; pb_rdata = '0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 24; rep++) begin
      int mode;
      bit rdy_hi;
      mode = rep % 3;    // 0 spread, 1 narrow band, 2 equal
      rdy_hi = (rep % 2 == 0);
      cnt = $urandom_range(9, 60);
      prec_base = PAW'($urandom_range(0, 900));
      wgt_base = AW'($urandom);
      for (int l = 0; l < L; l++) begin
        act_base[l] = AW'($urandom);
        aoff[l][0] = 0;
        for (int k = 0; k < cnt; k++) begin
          int p;
          p = mode == 0 ? $urandom_range(1, 8) : mode == 1 ? $urandom_range(3, 5) : 4;
          pmem[l][prec_base + k] = 3'(p - 1);
          aoff[l][k+1] = aoff[l][k] + p;
          seen[l][k] = 0;
        end
      end
      count = (PAW+1)'(cnt);
      @(negedge clk);
      start = 1; stats_clr = 1;
      @(negedge clk);
      start = 0; stats_clr = 0;
      ndisp = 0; c = 0; first_c = -1; last_c = -1;
      while (!done && c < 2000) begin
        dsp_ready = rdy_hi ? 1'b1 : 1'($urandom);
        #1;
        if (dsp_valid && dsp_ready) begin
          mx = 0; mn = 99;
          for (int l = 0; l < L; l++) begin
            j = int'(dsp_waddr[l]) - int'(wgt_base);
            if (j < 0) j += (1 << AW);
            check(j < cnt && !seen[l][j], "entry dispatched once");
            if (j < cnt) begin
              seen[l][j] = 1;
              check(int'(dsp_prec[l]) == int'(pmem[l][prec_base + j]) + 1, "lane precision");
              check(dsp_aaddr[l] == AW'(act_base[l] + aoff[l][j]), "activation address");
            end
            if (dsp_prec[l] > mx) mx = dsp_prec[l];
            if (dsp_prec[l] < mn) mn = dsp_prec[l];
          end
          check(int'(dsp_gprec) == mx, "iteration length = largest lane precision");
          if (first_c < 0) first_c = c;
          last_c = c;
          ndisp++;
        end
        @(negedge clk);
        c++;
      end
      dsp_ready = 0;
      check(done, "done");
      check(ndisp == cnt, $sformatf("iterations %0d exp %0d", ndisp, cnt));
      for (int l = 0; l < L; l++) for (int k = 0; k < cnt; k++) check(seen[l][k], "all entries dispatched");
      check(n_match_exact + n_match_blend + n_exc_full + n_exc_drain == 32'(ndisp), "counters add up");
      if (mode == 2) begin
        check(n_match_exact == 32'(cnt), "equal precisions: exact matches");
        if (rdy_hi) check(last_c - first_c == cnt - 1, "one dispatch per cycle");
      end
      tot_exact += n_match_exact; tot_blend += n_match_blend;
      tot_full += n_exc_full; tot_drain += n_exc_drain;
    end
    check(tot_full > 0, "full-page exceptions seen");
    check(tot_drain > 0, "end-of-input exceptions seen");
    check(tot_blend > 0, "blended matches seen");
    $display("exact=%0d blend=%0d full=%0d drain=%0d", tot_exact, tot_blend, tot_full, tot_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
