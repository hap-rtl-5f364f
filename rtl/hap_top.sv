// hap_top: HAP accelerator core: processing array, reorder engine, buffers
// and controller.
//
// The core computes GEMM tiles Y = A x W where the activations A come in
// DAR form: each column of an M-row tile (one DAR group of GS = M values of
// one input channel) is stored at its own precision b (1..BA) as b bit-plane
// words, together with a dynamic zero-point (DZP) per column and a
// precision code per column. Weights are signed 4-bit, or 8-bit for
// protected channel tiles.
//
// Blocks:
//  * L activation banks (M-bit bit-plane words, also holding DZP words),
//    L weight banks (one weight row of N bytes per word), L precision banks
//    (log2(BA)-bit codes), one per submatrix, and an output buffer of
//    TPJ * M rows of N 32-bit results;
//  * hap_reorder_engine: picks, per iteration, one column group from each
//    submatrix so that their precisions match;
//  * hap_pe_array: M x N PEs with L bit-serial multipliers each;
//  * hap_controller: runs the DZP pass, the aggregation, the reordered
//    variable-precision passes and write-back.
//
// Host interface (this implementation's choice): a write port into the
// input buffers selected by host_sel and host_lane (precision codes use the
// low address and data bits), a job start with its configuration, and a read
// port on the output buffer with one-cycle latency. Submatrix l holds input
// channels l*K/L .. (l+1)*K/L-1 of the tile, in order.
module hap_top
  import hap_pkg::*;
#(
  parameter int unsigned L          = L_DEF,
  parameter int unsigned M          = M_DEF,
  parameter int unsigned N          = N_DEF,
  parameter int unsigned BA         = BA_DEF,
  parameter int unsigned R          = R_DEF,
  parameter int unsigned WS_MAX     = WSMAX_DEF,
  parameter int unsigned AW         = AW_DEF,
  parameter int unsigned ACC_W      = ACC_W_DEF,
  parameter int unsigned ACT_DEPTH  = ACT_DEPTH_DEF,
  parameter int unsigned WGT_DEPTH  = WGT_DEPTH_DEF,
  parameter int unsigned PREC_DEPTH = PREC_DEPTH_DEF,
  localparam int unsigned TPJ       = M / BA,
  localparam int unsigned PAW       = $clog2(PREC_DEPTH),
  localparam int unsigned CW        = $clog2(BA),
  localparam int unsigned OAW       = $clog2(TPJ * M),
  localparam int unsigned LW        = (L > 1) ? $clog2(L) : 1
)(
  input  logic                          clk,
  input  logic                          rst_n,
  // host write port into the input buffers
  input  logic                          host_we,
  input  buf_sel_e                      host_sel,
  input  logic [LW-1:0]                 host_lane,
  input  logic [AW-1:0]                 host_addr,
  input  logic [N*8-1:0]                host_wdata,
  // job
  input  logic                          start,
  input  logic [PAW:0]                  cfg_kl,
  input  logic                          cfg_wgt8,
  input  logic                          cfg_dzp_en,
  input  logic [AW-1:0]                 cfg_wgt_base,
  input  logic [AW-1:0]                 cfg_dzp_base,
  input  logic [TPJ-1:0][PAW-1:0]       cfg_prec_base,
  input  logic [TPJ-1:0][L-1:0][AW-1:0] cfg_act_base,
  input  logic [N-1:0][ACC_W-1:0]       ps,
  output logic                          busy,
  output logic                          done,
  // output buffer read port
  input  logic                          ob_re,
  input  logic [OAW-1:0]                ob_raddr,
  output logic [N-1:0][ACC_W-1:0]       ob_rdata,
  // event counters of the last job
  output logic [31:0]                   n_match_exact,
  output logic [31:0]                   n_match_blend,
  output logic [31:0]                   n_exc_full,
  output logic [31:0]                   n_exc_drain,
  output logic [31:0]                   n_iter,
  output logic [31:0]                   n_pa_cycles,
  output logic [31:0]                   n_pd_cycles,
  output logic [31:0]                   n_agg_steps,
  output logic [31:0]                   n_lane_busy,
  output logic [31:0]                   n_lane_slots
);

  localparam int unsigned PW  = $clog2(BA + 1);
  localparam int unsigned STW = (BA > 2) ? $clog2(BA) : 1;

  // ---------------- interconnect ----------------
  logic                          re_start, re_done, re_busy, stats_clr;
  logic [PAW-1:0]                re_prec_base;
  logic [AW-1:0]                 re_wgt_base;
  logic [L-1:0][AW-1:0]          re_act_base;
  logic [PAW:0]                  re_count;
  logic [L-1:0]                  pb_re;
  logic [L-1:0][PAW-1:0]         pb_addr;
  logic [L-1:0][CW-1:0]          pb_rdata;
  logic                          dsp_valid, dsp_ready;
  logic [PW-1:0]                 dsp_gprec;
  logic [L-1:0][PW-1:0]          dsp_prec;
  logic [L-1:0][AW-1:0]          dsp_waddr, dsp_aaddr;
  logic                          act_re, wgt_re;
  logic [L-1:0][AW-1:0]          act_raddr, wgt_raddr;
  logic [L-1:0][M-1:0]           act_rdata;
  logic [L-1:0][N-1:0][7:0]      wgt_rdata;
  pe_op_e                        arr_op;
  logic [L-1:0][M-1:0]           arr_act;
  logic [L-1:0][N-1:0][NIB-1:0]  arr_wgt;
  logic                          arr_signed;
  logic [M-1:0][3:0]             arr_off;
  logic [STW-1:0]                arr_step;
  logic [M-1:0][N-1:0][ACC_W-1:0] arr_acc;
  logic                          ob_we;
  logic [OAW-1:0]                ob_waddr;
  logic [N-1:0][ACC_W-1:0]       ob_wdata;

  // ---------------- buffers, one bank per submatrix ----------------
  for (genvar l = 0; l < L; l++) begin : g_bank
    logic sel;
    assign sel = host_we && (host_lane == LW'(l));

    hap_sram #(.WIDTH(M), .DEPTH(ACT_DEPTH)) u_act (
      .clk   (clk), .rst_n (rst_n),
      .we    (sel && host_sel == BUF_ACT),
      .waddr (host_addr[$clog2(ACT_DEPTH)-1:0]),
      .wdata (host_wdata[M-1:0]),
      .re    (act_re),
      .raddr (act_raddr[l][$clog2(ACT_DEPTH)-1:0]),
      .rdata (act_rdata[l])
    );

    hap_sram #(.WIDTH(N * 8), .DEPTH(WGT_DEPTH)) u_wgt (
      .clk   (clk), .rst_n (rst_n),
      .we    (sel && host_sel == BUF_WGT),
      .waddr (host_addr[$clog2(WGT_DEPTH)-1:0]),
      .wdata (host_wdata),
      .re    (wgt_re),
      .raddr (wgt_raddr[l][$clog2(WGT_DEPTH)-1:0]),
      .rdata (wgt_rdata[l])
    );

    hap_sram #(.WIDTH(CW), .DEPTH(PREC_DEPTH)) u_prec (
      .clk   (clk), .rst_n (rst_n),
      .we    (sel && host_sel == BUF_PREC),
      .waddr (host_addr[PAW-1:0]),
      .wdata (host_wdata[CW-1:0]),
      .re    (pb_re[l]),
      .raddr (pb_addr[l]),
      .rdata (pb_rdata[l])
    );
  end

  hap_sram #(.WIDTH(N * ACC_W), .DEPTH(TPJ * M)) u_out (
    .clk   (clk), .rst_n (rst_n),
    .we    (ob_we),
    .waddr (ob_waddr),
    .wdata (ob_wdata),
    .re    (ob_re),
    .raddr (ob_raddr),
    .rdata (ob_rdata)
  );

  // ---------------- reorder engine ----------------
  hap_reorder_engine #(.L(L), .B(BA), .R(R), .WS_MAX(WS_MAX), .AW(AW), .PAW(PAW)) u_re (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (re_start),
    .stats_clr     (stats_clr),
    .prec_base     (re_prec_base),
    .wgt_base      (re_wgt_base),
    .act_base      (re_act_base),
    .count         (re_count),
    .busy          (re_busy),
    .done          (re_done),
    .pb_re         (pb_re),
    .pb_addr       (pb_addr),
    .pb_rdata      (pb_rdata),
    .dsp_valid     (dsp_valid),
    .dsp_ready     (dsp_ready),
    .dsp_gprec     (dsp_gprec),
    .dsp_prec      (dsp_prec),
    .dsp_waddr     (dsp_waddr),
    .dsp_aaddr     (dsp_aaddr),
    .n_match_exact (n_match_exact),
    .n_match_blend (n_match_blend),
    .n_exc_full    (n_exc_full),
    .n_exc_drain   (n_exc_drain)
  );

  // ---------------- controller ----------------
  hap_controller #(.L(L), .M(M), .N(N), .BA(BA), .AW(AW), .PAW(PAW), .ACC_W(ACC_W)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .cfg_kl        (cfg_kl),
    .cfg_wgt8      (cfg_wgt8),
    .cfg_dzp_en    (cfg_dzp_en),
    .cfg_wgt_base  (cfg_wgt_base),
    .cfg_dzp_base  (cfg_dzp_base),
    .cfg_prec_base (cfg_prec_base),
    .cfg_act_base  (cfg_act_base),
    .ps            (ps),
    .busy          (busy),
    .done          (done),
    .re_start      (re_start),
    .stats_clr     (stats_clr),
    .re_prec_base  (re_prec_base),
    .re_wgt_base   (re_wgt_base),
    .re_act_base   (re_act_base),
    .re_count      (re_count),
    .re_done       (re_done),
    .dsp_valid     (dsp_valid),
    .dsp_ready     (dsp_ready),
    .dsp_gprec     (dsp_gprec),
    .dsp_prec      (dsp_prec),
    .dsp_waddr     (dsp_waddr),
    .dsp_aaddr     (dsp_aaddr),
    .act_re        (act_re),
    .act_raddr     (act_raddr),
    .act_rdata     (act_rdata),
    .wgt_re        (wgt_re),
    .wgt_raddr     (wgt_raddr),
    .wgt_rdata     (wgt_rdata),
    .arr_op        (arr_op),
    .arr_act       (arr_act),
    .arr_wgt       (arr_wgt),
    .arr_signed    (arr_signed),
    .arr_off       (arr_off),
    .arr_step      (arr_step),
    .arr_acc       (arr_acc),
    .ob_we         (ob_we),
    .ob_waddr      (ob_waddr),
    .ob_wdata      (ob_wdata),
    .n_iter        (n_iter),
    .n_pa_cycles   (n_pa_cycles),
    .n_pd_cycles   (n_pd_cycles),
    .n_agg_steps   (n_agg_steps),
    .n_lane_busy   (n_lane_busy),
    .n_lane_slots  (n_lane_slots)
  );

  // a tile is started only when the reorder engine has finished the last one
  property p_re_idle_on_start;
    @(posedge clk) disable iff (!rst_n) re_start |-> !re_busy || re_done;
  endproperty
  assert property (p_re_idle_on_start);

  // ---------------- processing array ----------------
  hap_pe_array #(.M(M), .N(N), .L(L), .BA(BA), .ACC_W(ACC_W)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .op        (arr_op),
    .act_bits  (arr_act),
    .wgt_nib   (arr_wgt),
    .is_signed (arr_signed),
    .offset    (arr_off),
    .agg_step  (arr_step),
    .acc       (arr_acc)
  );

endmodule
