// hap_reg_page: register page of one submatrix in the reorder engine, with
// the page-local parts of the dispatcher.
//
// Storage: R entries, each a 4-bit tag (valid flag + log2(B)-bit precision
// code, precision = code + 1) and 24 bits of data (weight-row address and
// activation address). A cache-in writes the lowest-numbered free entry.
//
// Page logic, all combinational on the current entries:
//  * event generation: a decoder-OR network gives pres[b] = "some valid entry
//    has precision b". Precision blending then gives ev[w][b] = E(b, ws=w+1):
//    some valid entry has a precision b' with 0 <= b - b' < ws.
//  * exception precision: the highest precision on the page.
//  * precision retrieval: for the global match precision g, a window mask
//    keeps precisions g-WS_MAX+1 .. g, and the highest present one is the
//    page match precision.
//  * dispatch precision: the page match precision when match_valid, else the
//    page exception precision.
//  * associative matching: the valid entries whose precision equals the
//    dispatch precision; a priority encoder takes the highest index, as in
//    the dispatch example of the design description.
//  * address retrieval: that entry's addresses appear on dsp_waddr/dsp_aaddr.
// With dsp_en the selected entry is invalidated at the next clock edge.
//
// These steps follow the design description of the reorder engine; the
// choice of the lowest free entry for cache-in is this implementation's.
//
// Timing: outputs are combinational from the registered entries; writes and
// invalidations take effect at the rising edge. count is the number of
// valid entries. A cache-in to a full page is ignored (asserted against).
module hap_reg_page
  import hap_pkg::*;
#(
  parameter int unsigned R      = R_DEF,
  parameter int unsigned B      = BA_DEF,
  parameter int unsigned WS_MAX = WSMAX_DEF,
  parameter int unsigned AW     = AW_DEF,
  localparam int unsigned CW    = $clog2(B),
  localparam int unsigned PW    = $clog2(B + 1),
  localparam int unsigned IW    = (R > 1) ? $clog2(R) : 1
)(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  // cache-in
  input  logic                         wr_en,
  input  logic [PW-1:0]                wr_prec,
  input  logic [AW-1:0]                wr_waddr,
  input  logic [AW-1:0]                wr_aaddr,
  // page events, ev[w][b-1] = E(b, ws = w+1)
  output logic [WS_MAX-1:0][B-1:0]     ev,
  output logic [PW-1:0]                exc_prec,
  output logic [$clog2(R+1)-1:0]       count,
  // dispatch
  input  logic                         match_valid,
  input  logic [PW-1:0]                match_prec,
  input  logic                         dsp_en,
  output logic [PW-1:0]                dsp_prec,
  output logic                         dsp_hit,
  output logic [IW-1:0]                dsp_idx,
  output logic [AW-1:0]                dsp_waddr,
  output logic [AW-1:0]                dsp_aaddr
);

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] code;
    logic [AW-1:0] waddr;
    logic [AW-1:0] aaddr;
  } entry_t;

  entry_t ent [R];

  // ---------------- event generation ----------------
  logic [B-1:0] pres;
  always_comb begin
    pres = '0;
    for (int i = 0; i < R; i++)
      if (ent[i].valid) pres[ent[i].code] = 1'b1;   // decoder, ORed over entries
  end

  always_comb begin
    for (int w = 0; w < WS_MAX; w++) begin
      for (int b = 0; b < B; b++) begin
        ev[w][b] = 1'b0;
        for (int d = 0; d <= w; d++)
          if (b - d >= 0) ev[w][b] = ev[w][b] | pres[b - d];
      end
    end
  end

  // ---------------- exception precision ----------------
  always_comb begin
    exc_prec = '0;
    for (int b = 0; b < B; b++)
      if (pres[b]) exc_prec = PW'(b + 1);
  end

  // ---------------- precision retrieval ----------------
  logic [PW-1:0] page_match_prec;
  always_comb begin
    page_match_prec = '0;
    for (int b = 0; b < B; b++) begin
      // mask: b+1 in [match_prec - WS_MAX + 1, match_prec]
      if (pres[b] && (b + 1 <= int'(match_prec)) && (b + WS_MAX >= int'(match_prec)))
        page_match_prec = PW'(b + 1);
    end
  end

  assign dsp_prec = match_valid ? page_match_prec : exc_prec;

  // ---------------- associative matching / address retrieval ----------------
  always_comb begin
    dsp_hit = 1'b0;
    dsp_idx = '0;
    for (int i = 0; i < R; i++) begin
      if (ent[i].valid && (PW'(ent[i].code) + PW'(1) == dsp_prec)) begin
        dsp_hit = 1'b1;
        dsp_idx = IW'(i);
      end
    end
  end

  assign dsp_waddr = ent[dsp_idx].waddr;
  assign dsp_aaddr = ent[dsp_idx].aaddr;

  // ---------------- free entry for cache-in ----------------
  logic          has_free;
  logic [IW-1:0] free_idx;
  always_comb begin
    has_free = 1'b0;
    free_idx = '0;
    for (int i = R - 1; i >= 0; i--) begin
      if (!ent[i].valid) begin
        has_free = 1'b1;
        free_idx = IW'(i);
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < R; i++) count += $bits(count)'(ent[i].valid);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int i = 0; i < R; i++) ent[i] <= '0;
    end else begin
      if (dsp_en && dsp_hit) ent[dsp_idx].valid <= 1'b0;
      if (wr_en && has_free)
        ent[free_idx] <= '{valid: 1'b1, code: CW'(wr_prec - PW'(1)),
                           waddr: wr_waddr, aaddr: wr_aaddr};
    end
  end

  property p_no_write_when_full;
    @(posedge clk) disable iff (!rst_n) wr_en |-> has_free;
  endproperty
  assert property (p_no_write_when_full);

  property p_dispatch_hits;
    @(posedge clk) disable iff (!rst_n) dsp_en |-> dsp_hit;
  endproperty
  assert property (p_dispatch_hits);

endmodule
