// hap_reorder_engine: reorder engine (RE) of the HAP accelerator.
//
// The RE feeds the array with iterations whose L activation column groups
// (one per submatrix) have precisions as close to each other as possible, so
// that few multiplier lanes idle during a bit-serial iteration. It holds one
// address generator and one register page per submatrix, and a dispatcher
// made of the global check and the per-page match logic.
//
// Operation for one tile (start ... done):
//  * cache-in: whenever every address generator offers an entry and the
//    pages are not full, one entry is written into each page. All pages are
//    filled and emptied together, so they always hold the same number of
//    entries.
//  * match: if some precision is matched on all pages (exactly or within a
//    blending window, see hap_global_check), one entry per page is dispatched:
//    on page l the entry with the page's highest precision inside the
//    window. The iteration runs for the global match precision.
//  * exception: with no match, and either the pages full or no more input
//    coming, every page dispatches its highest-precision entry, and the
//    iteration runs for the largest of those precisions.
//  * otherwise the RE waits for more entries.
// Match and exception rules follow the design description. The handshake
// (dsp_valid / dsp_ready with an output register), the lockstep filling and
// the event counters are this implementation's.
//
// Timing: a dispatch decision is taken in the cycle the pages hold the
// entries and is registered on dsp_*; a new iteration can be dispatched every
// cycle in which the output register is free or being taken. done pulses for
// one cycle once all count entries of every submatrix have been dispatched
// and taken.
module hap_reorder_engine
  import hap_pkg::*;
#(
  parameter int unsigned L      = L_DEF,
  parameter int unsigned B      = BA_DEF,
  parameter int unsigned R      = R_DEF,
  parameter int unsigned WS_MAX = WSMAX_DEF,
  parameter int unsigned AW     = AW_DEF,
  parameter int unsigned PAW    = $clog2(PREC_DEPTH_DEF),
  localparam int unsigned CW    = $clog2(B),
  localparam int unsigned PW    = $clog2(B + 1),
  localparam int unsigned WW    = $clog2(WS_MAX + 1)
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   stats_clr,      // clears the event counters
  input  logic [PAW-1:0]         prec_base,
  input  logic [AW-1:0]          wgt_base,
  input  logic [L-1:0][AW-1:0]   act_base,
  input  logic [PAW:0]           count,
  output logic                   busy,
  output logic                   done,
  // precision buffers, one per submatrix
  output logic [L-1:0]           pb_re,
  output logic [L-1:0][PAW-1:0]  pb_addr,
  input  logic [L-1:0][CW-1:0]   pb_rdata,
  // dispatched iteration
  output logic                   dsp_valid,
  input  logic                   dsp_ready,
  output logic [PW-1:0]          dsp_gprec,      // cycles of the iteration (per weight nibble)
  output logic [L-1:0][PW-1:0]   dsp_prec,       // precision of each lane's group
  output logic [L-1:0][AW-1:0]   dsp_waddr,
  output logic [L-1:0][AW-1:0]   dsp_aaddr,
  // event counters (cleared by stats_clr)
  output logic [31:0]            n_match_exact,  // matched with window 1
  output logic [31:0]            n_match_blend,  // matched with a wider window
  output logic [31:0]            n_exc_full,     // exception: pages full, no match
  output logic [31:0]            n_exc_drain     // exception: no more input, no match
);

  // ---------------- address generators ----------------
  logic [L-1:0]          g_valid, g_done;
  logic [L-1:0][PW-1:0]  g_prec;
  logic [L-1:0][AW-1:0]  g_waddr, g_aaddr;
  logic                  cache_in;

  for (genvar l = 0; l < L; l++) begin : g_lane
    hap_addr_gen #(.B(B), .AW(AW), .PAW(PAW)) u_ag (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (start),
      .prec_base (prec_base),
      .wgt_base  (wgt_base),
      .act_base  (act_base[l]),
      .count     (count),
      .pb_re     (pb_re[l]),
      .pb_addr   (pb_addr[l]),
      .pb_rdata  (pb_rdata[l]),
      .out_valid (g_valid[l]),
      .out_prec  (g_prec[l]),
      .out_waddr (g_waddr[l]),
      .out_aaddr (g_aaddr[l]),
      .out_ready (cache_in),
      .done      (g_done[l])
    );
  end

  // ---------------- register pages ----------------
  localparam int unsigned CNTW = $clog2(R + 1);
  logic [L-1:0][WS_MAX-1:0][B-1:0] page_ev;
  logic [L-1:0][PW-1:0]            page_exc;
  logic [L-1:0][CNTW-1:0]          page_cnt;
  logic [L-1:0][PW-1:0]            page_dsp_prec;
  logic [L-1:0]                    page_hit;
  logic [L-1:0][AW-1:0]            page_waddr, page_aaddr;
  logic                            match_valid;
  logic [PW-1:0]                   match_prec, exc_prec;
  logic [WW-1:0]                   match_ws;
  logic                            dispatch;

  for (genvar l = 0; l < L; l++) begin : g_page
    logic [((R > 1) ? $clog2(R) : 1)-1:0] idx_unused;
    hap_reg_page #(.R(R), .B(B), .WS_MAX(WS_MAX), .AW(AW)) u_page (
      .clk         (clk),
      .rst_n       (rst_n),
      .clear       (start),
      .wr_en       (cache_in),
      .wr_prec     (g_prec[l]),
      .wr_waddr    (g_waddr[l]),
      .wr_aaddr    (g_aaddr[l]),
      .ev          (page_ev[l]),
      .exc_prec    (page_exc[l]),
      .count       (page_cnt[l]),
      .match_valid (match_valid),
      .match_prec  (match_prec),
      .dsp_en      (dispatch),
      .dsp_prec    (page_dsp_prec[l]),
      .dsp_hit     (page_hit[l]),
      .dsp_idx     (idx_unused),
      .dsp_waddr   (page_waddr[l]),
      .dsp_aaddr   (page_aaddr[l])
    );
  end

  hap_global_check #(.L(L), .B(B), .WS_MAX(WS_MAX)) u_check (
    .page_ev     (page_ev),
    .match_valid (match_valid),
    .match_prec  (match_prec),
    .match_ws    (match_ws),
    .exc_prec    (exc_prec)
  );

  // ---------------- dispatcher control ----------------
  logic pages_full, pages_empty, input_done, can_dispatch, exc_dispatch;

  assign pages_full   = (page_cnt[0] == CNTW'(R));
  assign pages_empty  = (page_cnt[0] == '0);
  assign input_done   = &g_done;
  assign cache_in     = busy && (&g_valid) && !pages_full;
  assign can_dispatch = busy && (!dsp_valid || dsp_ready);
  assign exc_dispatch = !match_valid && !pages_empty && (pages_full || input_done);
  assign dispatch     = can_dispatch && (match_valid || exc_dispatch);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      dsp_valid <= 1'b0;
      dsp_gprec <= '0;
      dsp_prec  <= '0;
      dsp_waddr <= '0;
      dsp_aaddr <= '0;
    end else if (dispatch) begin
      dsp_valid <= 1'b1;
      dsp_gprec <= match_valid ? match_prec : exc_prec;
      dsp_prec  <= page_dsp_prec;
      dsp_waddr <= page_waddr;
      dsp_aaddr <= page_aaddr;
    end else if (dsp_ready) begin
      dsp_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) busy <= 1'b1;
      else if (busy && input_done && pages_empty && !dsp_valid) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || stats_clr) begin
      n_match_exact <= '0;
      n_match_blend <= '0;
      n_exc_full    <= '0;
      n_exc_drain   <= '0;
    end else if (dispatch) begin
      if (match_valid && match_ws == WW'(1)) n_match_exact <= n_match_exact + 1;
      if (match_valid && match_ws != WW'(1)) n_match_blend <= n_match_blend + 1;
      if (!match_valid && pages_full)        n_exc_full    <= n_exc_full + 1;
      if (!match_valid && !pages_full)       n_exc_drain   <= n_exc_drain + 1;
    end
  end

  // every page must find the dispatch precision it was given
  property p_all_pages_hit;
    @(posedge clk) disable iff (!rst_n) dispatch |-> &page_hit;
  endproperty
  assert property (p_all_pages_hit);

  // pages fill and empty in lockstep, so they always hold equally many entries
  for (genvar l = 1; l < L; l++) begin : g_cnt_chk
    property p_lockstep;
      @(posedge clk) disable iff (!rst_n) page_cnt[l] == page_cnt[0];
    endproperty
    assert property (p_lockstep);
  end

  // the global exception precision is the highest of the page exception precisions
  logic [PW-1:0] page_exc_max;
  always_comb begin
    page_exc_max = '0;
    for (int l = 0; l < L; l++)
      if (page_exc[l] > page_exc_max) page_exc_max = page_exc[l];
  end

  property p_exc_is_max;
    @(posedge clk) disable iff (!rst_n) exc_prec == page_exc_max;
  endproperty
  assert property (p_exc_is_max);

endmodule
