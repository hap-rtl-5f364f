// tb_hap_pe_array: self-checking test of the PE array at a small size
// (8 x 3 PEs, L = 2, aggregation groups of BA = 4 rows).
//
// Random accumulate cycles use a different shift offset per row and check
// every accumulator against a model of row r, column c:
//   sum_l act_bits[l][r] * nibble(wgt_nib[l][c]) << offset[r].
// Then the aggregation steps are applied and checked: after step 0 PE r
// holds PR_r + PR_(r-1), after step 1 the sum of its whole group of four
// rows (wrapping inside the group, as in the four-row example of the design
// description).
module tb_hap_pe_array;
  import hap_pkg::*;
  localparam int M = 8, N = 3, L = 2, BA = 4;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  pe_op_e                    op;
  logic [L-1:0][M-1:0]       act_bits;
  logic [L-1:0][N-1:0][3:0]  wgt_nib;
  logic                      is_signed;
  logic [M-1:0][3:0]         offset;
  logic [1:0]                agg_step;
  logic [M-1:0][N-1:0][31:0] acc;

  hap_pe_array #(.M(M), .N(N), .L(L), .BA(BA)) dut (.*);

  int checks = 0, failures = 0;
  longint model [M][N];
  longint prev  [M][N];
  longint orig  [M][N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 1'b0; op = PE_HOLD; act_bits = '0; wgt_nib = '0; is_signed = 0; offset = '0; agg_step = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      op = PE_CLEAR;
      @(negedge clk);
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) model[r][c] = 0;
      for (int n = 0; n < 6; n++) begin
        op = PE_ACC;
        is_signed = 1'($urandom);
        for (int l = 0; l < L; l++) begin
          act_bits[l] = M'($urandom);
          for (int c = 0; c < N; c++) wgt_nib[l][c] = 4'($urandom);
        end
        for (int r = 0; r < M; r++) offset[r] = 4'($urandom_range(0, 11));
        for (int r = 0; r < M; r++)
          for (int c = 0; c < N; c++)
            for (int l = 0; l < L; l++)
              if (act_bits[l][r])
                model[r][c] += (is_signed ? longint'($signed(wgt_nib[l][c])) : longint'(wgt_nib[l][c])) <<< offset[r];
        @(negedge clk);
      end
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++)
        check(acc[r][c] == 32'(model[r][c]), $sformatf("acc r%0d c%0d", r, c));
      // aggregation step 0: add row r-1 (within group)
      op = PE_AGG; agg_step = 2'd0;
      prev = model;
      orig = model;
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++)
        model[r][c] = prev[r][c] + prev[(r / BA) * BA + ((r % BA) + BA - 1) % BA][c];
      @(negedge clk);
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++)
        check(acc[r][c] == 32'(model[r][c]), $sformatf("agg0 r%0d c%0d", r, c));
      agg_step = 2'd1;
      prev = model;
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++)
        model[r][c] = prev[r][c] + prev[(r / BA) * BA + ((r % BA) + BA - 2) % BA][c];
      @(negedge clk);
      op = PE_HOLD;
      for (int r = 0; r < M; r++) for (int c = 0; c < N; c++) begin
        longint gsum;
        check(acc[r][c] == 32'(model[r][c]), $sformatf("agg1 r%0d c%0d", r, c));
        gsum = 0;
        for (int i = 0; i < BA; i++) gsum += orig[(r / BA) * BA + i][c];
        check(acc[r][c] == 32'(gsum), $sformatf("group sum r%0d c%0d", r, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
