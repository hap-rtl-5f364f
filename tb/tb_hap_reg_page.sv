// tb_hap_reg_page: self-checking test of one register page.
//
// Directed part (B = 3, R = 4, blending window up to 2): the page is loaded
// with the four entries of the first page in the reorder-engine example of
// the design description, (1, 0x09, 0x82), (2, 0x0a, 0x83), (2, 0x0e, 0x85),
// (3, 0x11, 0x87). The precision-3 entry is dispatched by an exception
// (highest precision), leaving the example's valid entries; then a match on
// precision 2 must select entry 2 (0x0e / 0x85), the entry marked in the
// example. Random part (B = 8, R = 8, window 3): random cache-ins and
// dispatches against a model that holds the entries as a list; events,
// exception precision, match precision retrieval and the retrieved
// addresses are compared every cycle.
module tb_hap_reg_page;
  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- small page, example of the description ----------------
  logic        s_clear, s_wr, s_mv, s_den, s_hit;
  logic [1:0]  s_wprec, s_exc, s_mp, s_dprec, s_idx;
  logic [11:0] s_wa, s_aa, s_dwa, s_daa;
  logic [1:0][2:0] s_ev;
  logic [2:0]  s_cnt;
  hap_reg_page #(.R(4), .B(3), .WS_MAX(2), .AW(12)) u_small (
    .clk(clk), .rst_n(rst_n), .clear(s_clear), .wr_en(s_wr), .wr_prec(s_wprec),
    .wr_waddr(s_wa), .wr_aaddr(s_aa), .ev(s_ev), .exc_prec(s_exc), .count(s_cnt),
    .match_valid(s_mv), .match_prec(s_mp), .dsp_en(s_den), .dsp_prec(s_dprec),
    .dsp_hit(s_hit), .dsp_idx(s_idx), .dsp_waddr(s_dwa), .dsp_aaddr(s_daa));

  // ---------------- default-size page, random ----------------
  localparam int R = 8, B = 8, WS = 3;
  logic        clear, wr_en, match_valid, dsp_en, dsp_hit;
  logic [3:0]  wr_prec, exc_prec, match_prec, dsp_prec;
  logic [11:0] wr_waddr, wr_aaddr, dsp_waddr, dsp_aaddr;
  logic [WS-1:0][B-1:0] ev;
  logic [3:0]  count;
  logic [2:0]  dsp_idx;
  hap_reg_page #(.R(R), .B(B), .WS_MAX(WS), .AW(12)) u_page (.*);

  typedef struct { int prec; int wa; int aa; } ent_t;
  ent_t lst [$];

  initial begin
    int mp, best, n;
    rst_n = 0;
    s_clear = 0; s_wr = 0; s_mv = 0; s_den = 0; s_wprec = 0; s_mp = 0; s_wa = 0; s_aa = 0;
    clear = 0; wr_en = 0; match_valid = 0; dsp_en = 0; wr_prec = 1; match_prec = 0;
    wr_waddr = 0; wr_aaddr = 0;
    @(negedge clk); @(negedge clk); rst_n = 1;
    // ---- directed ----
    s_wr = 1;
    s_wprec = 1; s_wa = 12'h09; s_aa = 12'h82; @(negedge clk);
    s_wprec = 2; s_wa = 12'h0a; s_aa = 12'h83; @(negedge clk);
    s_wprec = 2; s_wa = 12'h0e; s_aa = 12'h85; @(negedge clk);
    s_wprec = 3; s_wa = 12'h11; s_aa = 12'h87; @(negedge clk);
    s_wr = 0;
    check(s_cnt == 4, "example: four entries");
    check(s_exc == 3, "example: exception precision 3");
    s_mv = 0; s_den = 1; #1;
    check(s_dprec == 3 && s_idx == 3 && s_dwa == 12'h11 && s_daa == 12'h87, "example: exception dispatch");
    @(negedge clk);
    s_den = 0;
    check(s_ev[0] == 3'b011, "example: exact events E1 E2");
    check(s_ev[1] == 3'b111, "example: blended events");
    s_mv = 1; s_mp = 2; #1;
    check(s_dprec == 2 && s_hit && s_idx == 2, "example: match on precision 2 selects entry 2");
    check(s_dwa == 12'h0e && s_daa == 12'h85, "example: retrieved addresses 0x0e 0x85");
    s_mp = 3; #1;
    check(s_dprec == 2, "example: blended match 3 -> page precision 2");
    // ---- random ----
    for (n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en = (lst.size() < R) && ($urandom_range(0, 99) < 55);
      wr_prec = 4'($urandom_range(1, B));
      wr_waddr = 12'($urandom); wr_aaddr = 12'($urandom);
      dsp_en = 0;
      match_valid = 1'($urandom);
      mp = $urandom_range(1, B);
      match_prec = 4'(mp);
      #1;
      // model: events
      for (int w = 0; w < WS; w++)
        for (int b = 1; b <= B; b++) begin
          bit e; e = 0;
          foreach (lst[i]) if (lst[i].prec <= b && b - lst[i].prec <= w) e = 1;
          check(ev[w][b-1] == e, $sformatf("ev w%0d b%0d", w, b));
        end
      best = 0;
      foreach (lst[i]) if (lst[i].prec > best) best = lst[i].prec;
      check(exc_prec == 4'(best), "exception precision");
      check(count == 4'(lst.size()), "count");
      if (match_valid) begin
        best = 0;
        foreach (lst[i]) if (lst[i].prec <= mp && mp - lst[i].prec < WS && lst[i].prec > best) best = lst[i].prec;
      end
      check(dsp_prec == 4'(best), "dispatch precision");
      if (best != 0 && $urandom_range(0, 99) < 45) begin
        bit found; found = 0;
        foreach (lst[i]) if (lst[i].prec == best && lst[i].wa == dsp_waddr && lst[i].aa == dsp_aaddr && !found) begin
          found = 1; lst.delete(i);
        end
        check(found && dsp_hit, "dispatched entry is a page entry of that precision");
        dsp_en = 1;
      end
      if (wr_en) lst.push_back('{prec: wr_prec, wa: wr_waddr, aa: wr_aaddr});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
