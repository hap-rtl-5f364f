// hap_addr_gen: precision loading and address generation for one submatrix
// of the reorder engine.
//
// A submatrix is a run of count activation column groups (and the matching
// weight rows) stored contiguously. On start the block takes the base
// addresses and then streams one entry per column group: its precision, its
// weight-row address and its activation address. The precision comes from
// the precision buffer as a log2(B)-bit code, precision = code + 1. The
// weight address grows by a constant 1 per entry (one buffer word per weight
// row); the activation address grows by the precision just loaded, because a
// column group of precision b occupies b bit-plane words. Both rules follow
// the design description; the "code + 1" encoding (a group whose values are
// all equal is sent at precision 1) is this implementation's choice.
//
// Interface: out_valid / out_ready handshake, one entry per cycle at most.
// Timing: the precision buffer has a one-cycle read that holds its output
// while pb_re is low, so a fetched entry stays on out_* until it is taken.
// The first entry is valid two cycles after start. done is high once all
// count entries have been taken (and while idle after reset).
module hap_addr_gen
  import hap_pkg::*;
#(
  parameter int unsigned B     = BA_DEF,
  parameter int unsigned AW    = AW_DEF,
  parameter int unsigned PAW   = $clog2(PREC_DEPTH_DEF),
  localparam int unsigned CW   = $clog2(B),      // metadata code width
  localparam int unsigned PW   = $clog2(B + 1)   // precision value width
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [PAW-1:0]  prec_base,
  input  logic [AW-1:0]   wgt_base,
  input  logic [AW-1:0]   act_base,
  input  logic [PAW:0]    count,
  // precision buffer read port
  output logic            pb_re,
  output logic [PAW-1:0]  pb_addr,
  input  logic [CW-1:0]   pb_rdata,
  // generated entries
  output logic            out_valid,
  output logic [PW-1:0]   out_prec,
  output logic [AW-1:0]   out_waddr,
  output logic [AW-1:0]   out_aaddr,
  input  logic            out_ready,
  output logic            done
);

  logic [PAW:0]   remaining;   // reads still to issue
  logic [PAW-1:0] rd_ptr;
  logic           rd_pending;  // a fetched precision sits on pb_rdata
  logic [AW-1:0]  wcur, acur;

  logic take;
  assign take      = out_valid && out_ready;
  assign pb_re     = (remaining != 0) && (!rd_pending || out_ready) && !start;
  assign pb_addr   = rd_ptr;
  assign out_valid = rd_pending;
  assign out_prec  = PW'(pb_rdata) + PW'(1);
  assign out_waddr = wcur;
  assign out_aaddr = acur;
  assign done      = (remaining == 0) && !rd_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining  <= '0;
      rd_ptr     <= '0;
      rd_pending <= 1'b0;
      wcur       <= '0;
      acur       <= '0;
    end else if (start) begin
      remaining  <= count;
      rd_ptr     <= prec_base;
      rd_pending <= 1'b0;
      wcur       <= wgt_base;
      acur       <= act_base;
    end else begin
      if (pb_re) begin
        remaining <= remaining - 1'b1;
        rd_ptr    <= rd_ptr + 1'b1;
      end
      if (pb_re)     rd_pending <= 1'b1;
      else if (take) rd_pending <= 1'b0;
      if (take) begin
        wcur <= wcur + AW'(1);
        acur <= acur + AW'(out_prec);
      end
    end
  end

endmodule
