// hap_pe: one processing engine of the HAP array.
//
// The PE holds L bit-serial multipliers. Multiplier l multiplies one
// activation bit act_bit[l] by a 4-bit weight nibble wgt_nib[l]: the product
// is the nibble or zero. The nibble is read as signed or unsigned according
// to is_signed, so one sign-extension bit serves both halves of an 8-bit
// weight (the signed upper half and the unsigned lower half are processed in
// two consecutive cycles). An adder tree sums the L products, a common left
// shifter applies the bit significance given by offset, and the sum is added
// into a 32-bit accumulator. A multiplexer in front of the accumulator adder
// selects either this local result or partial_in, the accumulator of another
// PE, which is how partial results of the dynamic-zero-point term are
// aggregated across rows.
//
// Structure (multipliers, adder tree, shifter, 32-bit accumulator, selection
// mux) follows the design description; the operation encoding (pe_op_e) and
// the synchronous, active-low reset are this implementation's choice.
//
// Timing: all inputs are sampled at the rising clock edge; acc shows the
// result one cycle after the operation is applied.
module hap_pe
  import hap_pkg::*;
#(
  parameter int unsigned L     = L_DEF,
  parameter int unsigned ACC_W = ACC_W_DEF,
  parameter int unsigned SHW   = 4            // offset width, shifts 0..15
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  pe_op_e                  op,
  input  logic [L-1:0]            act_bit,
  input  logic [L-1:0][NIB-1:0]   wgt_nib,
  input  logic                    is_signed,
  input  logic [SHW-1:0]          offset,
  input  logic signed [ACC_W-1:0] partial_in,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned SUM_W = NIB + 1 + $clog2(L);

  logic signed [NIB:0]       prod [L];
  logic signed [SUM_W-1:0]   tree_sum;
  logic signed [ACC_W-1:0]   shifted;
  logic signed [ACC_W-1:0]   addend;

  // bit-serial multipliers with configurable sign extension
  always_comb begin
    for (int l = 0; l < L; l++) begin
      prod[l] = act_bit[l] ? signed'({is_signed & wgt_nib[l][NIB-1], wgt_nib[l]})
                           : '0;
    end
  end

  // adder tree
  always_comb begin
    tree_sum = '0;
    for (int l = 0; l < L; l++) tree_sum += SUM_W'(prod[l]);
  end

  // common left shifter
  assign shifted = ACC_W'(tree_sum) <<< offset;

  // selection between local result and partial result of another PE
  assign addend = (op == PE_AGG) ? partial_in : shifted;

  always_ff @(posedge clk) begin
    if (!rst_n || op == PE_CLEAR) acc <= '0;
    else if (op == PE_ACC || op == PE_AGG) acc <= acc + addend;
  end

endmodule
