// hap_global_check: global part of the reorder dispatcher.
//
// Inputs are the page events of all L register pages, page_ev[l][w][b-1] =
// E(b, ws = w+1) on page l (w = 0 is the exact event "precision b present").
//
// Match path: a precision b is matched under window ws when its event holds
// on every page (AND over pages). A two-level priority encoding picks the
// dispatch precision: first, for each window size, the highest matched
// precision; second, the smallest window size that has a match, whose
// precision a multiplexer selects. match_valid says that any match exists.
//
// Exception path: exc_b = "precision b present on some page"; the highest
// such b is the global exception precision, i.e. the largest of the pages'
// highest precisions, which sets the length of an exception iteration.
//
// Both paths follow the design description. The block is purely
// combinational.
module hap_global_check
  import hap_pkg::*;
#(
  parameter int unsigned L      = L_DEF,
  parameter int unsigned B      = BA_DEF,
  parameter int unsigned WS_MAX = WSMAX_DEF,
  localparam int unsigned PW    = $clog2(B + 1),
  localparam int unsigned WW    = $clog2(WS_MAX + 1)
)(
  input  logic [L-1:0][WS_MAX-1:0][B-1:0] page_ev,
  output logic                            match_valid,
  output logic [PW-1:0]                   match_prec,
  output logic [WW-1:0]                   match_ws,
  output logic [PW-1:0]                   exc_prec
);

  logic [WS_MAX-1:0][B-1:0] gev;      // global events E(b, ws)
  logic [WS_MAX-1:0]        ws_valid; // first-level encoder valid
  logic [WS_MAX-1:0][PW-1:0] ws_prec; // first-level encoder output
  logic [B-1:0]             exc_ev;

  always_comb begin
    for (int w = 0; w < WS_MAX; w++) begin
      for (int b = 0; b < B; b++) begin
        gev[w][b] = 1'b1;
        for (int l = 0; l < L; l++) gev[w][b] &= page_ev[l][w][b];
      end
    end
  end

  // first stage: highest matched precision per window size
  always_comb begin
    for (int w = 0; w < WS_MAX; w++) begin
      ws_valid[w] = 1'b0;
      ws_prec[w]  = '0;
      for (int b = 0; b < B; b++) begin
        if (gev[w][b]) begin
          ws_valid[w] = 1'b1;
          ws_prec[w]  = PW'(b + 1);
        end
      end
    end
  end

  // second stage: smallest window size with a match
  always_comb begin
    match_valid = 1'b0;
    match_prec  = '0;
    match_ws    = '0;
    for (int w = WS_MAX - 1; w >= 0; w--) begin
      if (ws_valid[w]) begin
        match_valid = 1'b1;
        match_prec  = ws_prec[w];
        match_ws    = WW'(w + 1);
      end
    end
  end

  // exception path
  always_comb begin
    for (int b = 0; b < B; b++) begin
      exc_ev[b] = 1'b0;
      for (int l = 0; l < L; l++) exc_ev[b] |= page_ev[l][0][b];
    end
    exc_prec = '0;
    for (int b = 0; b < B; b++)
      if (exc_ev[b]) exc_prec = PW'(b + 1);
  end

endmodule
