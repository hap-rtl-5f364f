// tb_hap_pe: self-checking test of one processing engine.
//
// Drives random activation bits, weight nibbles, sign mode and shift
// offsets with PE_ACC, plus clears, holds and aggregation of a random
// partial result, and compares the accumulator every cycle with a model
// that sums act_bit[l] * nibble[l] (nibble read as signed or unsigned),
// shifted left by the offset.
module tb_hap_pe;
  import hap_pkg::*;
  localparam int L = L_DEF;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  pe_op_e               op;
  logic [L-1:0]         act_bit;
  logic [L-1:0][3:0]    wgt_nib;
  logic                 is_signed;
  logic [3:0]           offset;
  logic signed [31:0]   partial_in;
  logic signed [31:0]   acc;

  hap_pe #(.L(L)) dut (.*);

  int checks = 0, failures = 0;
  longint model;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    rst_n = 1'b0; op = PE_HOLD; act_bit = '0; wgt_nib = '0; is_signed = 1'b0;
    offset = '0; partial_in = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = $urandom_range(0, 99);
      op = r < 5 ? PE_CLEAR : r < 12 ? PE_HOLD : r < 20 ? PE_AGG : PE_ACC;
      act_bit    = L'($urandom);
      for (int l = 0; l < L; l++) wgt_nib[l] = 4'($urandom);
      is_signed  = 1'($urandom);
      offset     = 4'($urandom_range(0, 11));
      partial_in = 32'($signed($urandom_range(0, 200000)) - 100000);
      s = 0;
      for (int l = 0; l < L; l++)
        if (act_bit[l]) s += is_signed ? longint'($signed(wgt_nib[l])) : longint'(wgt_nib[l]);
      case (op)
        PE_CLEAR: model = 0;
        PE_ACC:   model = model + (s <<< offset);
        PE_AGG:   model = model + partial_in;
        default:  ;
      endcase
      @(negedge clk);
      checks++;
      if (acc != 32'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d op=%0d got %0d exp %0d", n, op, acc, model);
      end
      model = longint'(acc);  // track in 32 bits
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
