// tb_hap_global_check: self-checking test of the global match check.
//
// Directed case from the reorder-engine example of the design description
// (B = 3, L = 2, window up to 2): page 1 holds precisions {1, 2}, page 2
// {1, 2, 3}; precision 2 is matched exactly, and the exception precision is
// 3. Random part at the default size (L = 16, B = 8, window 3): random
// precision sets per page, page events derived from them, and the expected
// decision worked out directly: the smallest window w for which some
// precision b has, on every page, a precision in b-w+1..b; the highest such
// b; and the highest precision on any page.
module tb_hap_global_check;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [1:0][1:0][2:0] s_ev;
  logic s_mv; logic [1:0] s_mp, s_ws, s_exc;
  hap_global_check #(.L(2), .B(3), .WS_MAX(2)) u_small (
    .page_ev(s_ev), .match_valid(s_mv), .match_prec(s_mp), .match_ws(s_ws), .exc_prec(s_exc));

  localparam int L = 16, B = 8, WS = 3;
  logic [L-1:0][WS-1:0][B-1:0] page_ev;
  logic match_valid; logic [3:0] match_prec; logic [1:0] match_ws; logic [3:0] exc_prec;
  hap_global_check #(.L(L), .B(B), .WS_MAX(WS)) u_dut (.*);

  bit pres [L][B+1];

  initial begin
    // page 1: {1,2}; page 2: {1,2,3}; ev[w][b-1]
    s_ev[0][0] = 3'b011; s_ev[0][1] = 3'b111;
    s_ev[1][0] = 3'b111; s_ev[1][1] = 3'b111;
    #1;
    check(s_mv && s_mp == 2 && s_ws == 1, "example: exact match on precision 2");
    check(s_exc == 3, "example: exception precision 3");
    s_ev[0][0] = 3'b001; s_ev[0][1] = 3'b011;   // page 1 holds only {1}
    s_ev[1][0] = 3'b110; s_ev[1][1] = 3'b111;   // page 2 holds {2,3}
    #1;
    check(s_mv && s_mp == 2 && s_ws == 2, "blended match on precision 2 with window 2");
    for (int n = 0; n < 5000; n++) begin
      int density, exp_ws, exp_p, exp_exc;
      density = $urandom_range(1, 6);
      for (int l = 0; l < L; l++) begin
        for (int b = 1; b <= B; b++) pres[l][b] = ($urandom_range(0, 9) < density);
        for (int w = 0; w < WS; w++)
          for (int b = 1; b <= B; b++) begin
            page_ev[l][w][b-1] = 0;
            for (int bb = 1; bb <= b; bb++) if (b - bb <= w && pres[l][bb]) page_ev[l][w][b-1] = 1;
          end
      end
      exp_ws = 0; exp_p = 0; exp_exc = 0;
      for (int w = WS; w >= 1; w--)
        for (int b = 1; b <= B; b++) begin
          bit all; all = 1;
          for (int l = 0; l < L; l++) begin
            bit any; any = 0;
            for (int bb = b - w + 1; bb <= b; bb++) if (bb >= 1 && pres[l][bb]) any = 1;
            if (!any) all = 0;
          end
          if (all) begin
            if (exp_ws != w) begin exp_ws = w; exp_p = b; end
            else if (b > exp_p) exp_p = b;
          end
        end
      for (int l = 0; l < L; l++) for (int b = 1; b <= B; b++) if (pres[l][b] && b > exp_exc) exp_exc = b;
      #1;
      check(match_valid == (exp_ws != 0), "match valid");
      if (exp_ws != 0) check(match_prec == 4'(exp_p) && match_ws == 2'(exp_ws),
                             $sformatf("match got p%0d ws%0d exp p%0d ws%0d", match_prec, match_ws, exp_p, exp_ws));
      check(exc_prec == 4'(exp_exc), "exception precision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
