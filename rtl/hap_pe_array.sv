// hap_pe_array: M x N output-stationary array of HAP processing engines.
//
// PE (r, c) accumulates output element (r, c) of a GEMM tile. Row r receives,
// from each of the L submatrices, one activation bit: act_bits[l][r]. Column c
// receives, from each submatrix, one weight nibble: wgt_nib[l][c]. So
// activations are broadcast along rows and weights down columns. All PEs
// share op and is_signed; the shift offset is given per row, because in the
// dynamic-zero-point (DZP) pass each row handles a different bit
// significance of the DZP vectors, while in the variable-precision pass all
// rows use the same one.
//
// Aggregation paths: the rows are split into groups of BA consecutive rows.
// With op = PE_AGG and agg_step = s, PE (r, c) adds the accumulator of the PE
// 2^s rows above it in the same group, wrapping around inside the group.
// After log2(BA) such steps (s = 0, 1, ...) every PE of a group holds the sum
// of the group's partial results. The wrap-around pattern follows the
// aggregation example of the design description (row i first adds row i-1,
// then row i-2, in a group of four).
//
// Timing: as hap_pe, one cycle from inputs to accumulators.
module hap_pe_array
  import hap_pkg::*;
#(
  parameter int unsigned M     = M_DEF,
  parameter int unsigned N     = N_DEF,
  parameter int unsigned L     = L_DEF,
  parameter int unsigned BA    = BA_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF,
  parameter int unsigned SHW   = 4,
  localparam int unsigned STW  = (BA > 2) ? $clog2(BA) : 1
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  pe_op_e                        op,
  input  logic [L-1:0][M-1:0]           act_bits,
  input  logic [L-1:0][N-1:0][NIB-1:0]  wgt_nib,
  input  logic                          is_signed,
  input  logic [M-1:0][SHW-1:0]         offset,
  input  logic [STW-1:0]                agg_step,
  output logic [M-1:0][N-1:0][ACC_W-1:0] acc
);

  // row whose accumulator row r adds in aggregation step s
  function automatic int unsigned agg_src(int unsigned r, int unsigned s);
    return (r / BA) * BA + (((r % BA) + BA - ((1 << s) % BA)) % BA);
  endfunction

  initial begin
    assert (M % BA == 0) else $error("M must be a multiple of BA");
  end

  for (genvar r = 0; r < M; r++) begin : g_row
    // partial result selected for the aggregation step (multiplexer over
    // the log2(BA) fixed paths of this row)
    logic [N-1:0][ACC_W-1:0] partial_row;
    always_comb begin
      partial_row = '0;
      for (int s = 0; s < STW; s++) begin
        if (agg_step == STW'(s)) partial_row = acc[agg_src(r, s)];
      end
    end

    logic [L-1:0] row_bits;
    always_comb begin
      for (int l = 0; l < L; l++) row_bits[l] = act_bits[l][r];
    end

    for (genvar c = 0; c < N; c++) begin : g_col
      logic [L-1:0][NIB-1:0] col_nib;
      logic signed [ACC_W-1:0] acc_c;
      always_comb begin
        for (int l = 0; l < L; l++) col_nib[l] = wgt_nib[l][c];
      end

      hap_pe #(.L(L), .ACC_W(ACC_W), .SHW(SHW)) u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .op         (op),
        .act_bit    (row_bits),
        .wgt_nib    (col_nib),
        .is_signed  (is_signed),
        .offset     (offset[r]),
        .partial_in (signed'(partial_row[c])),
        .acc        (acc_c)
      );
      assign acc[r][c] = acc_c;
    end
  end

endmodule
