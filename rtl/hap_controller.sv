// hap_controller: job sequencer and iteration executor of the HAP
// accelerator.
//
// A job covers TPJ = M / BA consecutive GEMM tiles that share one K x N
// weight tile; each activation tile has M = GS rows (one DAR group per
// column). The output of tile t, row i, column j is
//     y = P_A + P_D + P_S
// with P_A the product of the variable-precision activations and the
// weights, P_D the product of the tile's dynamic zero-point (DZP) vector and
// the weights, and P_S the static zero-point term, precomputed and given on
// the ps input. The job runs in this order:
//  1. P_D pass (if dzp_en): the DZP vectors of all TPJ tiles are split into
//     bits, bit b of tile t's DZP driving array row t*BA + b with shift b.
//     One DZP word of the activation buffer (M bits) holds, for one input
//     channel, the BA-bit DZPs of all TPJ tiles. K/L one-bit iterations are
//     run (times two with 8-bit weights), then log2(BA) aggregation steps sum
//     each group of BA rows, and row t*BA of every column gives P_D of tile t.
//  2. for each tile t: clear the accumulators, start the reorder engine on
//     the tile's precision metadata and run every iteration it dispatches,
//     then write the M result rows, adding P_D and P_S, to the output buffer.
// An iteration of global precision g runs g bit cycles, LSB first; lane l
// feeds its activation bit plane only while the bit index is below its own
// precision and idles otherwise. With 8-bit weights each bit takes two
// consecutive cycles: first the signed upper nibble (shift + 4), then the
// unsigned lower nibble. With 4-bit weights the lower nibble of each stored
// weight byte is used, as a signed value.
//
// The term split, the bit-wise DZP mapping, log2(BA) aggregation and the
// two-cycle 8-bit mode follow the design description. The order of the
// passes, adding P_D and P_S at write-back, the buffer layouts and the
// row-by-row write-back are this implementation's choices.
//
// Timing: buffers have a one-cycle read; the array accumulates one cycle
// after the data arrives. dsp_ready is high when the executor is idle or in
// the last cycle of its iteration, so back-to-back iterations leave no gap.
// done pulses for one cycle at the end of the job; the event counters hold
// their values until the next start.
module hap_controller
  import hap_pkg::*;
#(
  parameter int unsigned L     = L_DEF,
  parameter int unsigned M     = M_DEF,
  parameter int unsigned N     = N_DEF,
  parameter int unsigned BA    = BA_DEF,
  parameter int unsigned AW    = AW_DEF,
  parameter int unsigned PAW   = $clog2(PREC_DEPTH_DEF),
  parameter int unsigned ACC_W = ACC_W_DEF,
  localparam int unsigned TPJ  = M / BA,
  localparam int unsigned PW   = $clog2(BA + 1),
  localparam int unsigned STW  = (BA > 2) ? $clog2(BA) : 1,
  localparam int unsigned OAW  = $clog2(TPJ * M),
  localparam int unsigned SHW  = 4
)(
  input  logic                              clk,
  input  logic                              rst_n,
  // job configuration, sampled on start
  input  logic                              start,
  input  logic [PAW:0]                      cfg_kl,        // K / L column groups per submatrix
  input  logic                              cfg_wgt8,      // 8-bit (protected) weight channels
  input  logic                              cfg_dzp_en,    // layer uses dynamic zero-points
  input  logic [AW-1:0]                     cfg_wgt_base,
  input  logic [AW-1:0]                     cfg_dzp_base,
  input  logic [TPJ-1:0][PAW-1:0]           cfg_prec_base,
  input  logic [TPJ-1:0][L-1:0][AW-1:0]     cfg_act_base,
  input  logic [N-1:0][ACC_W-1:0]           ps,
  output logic                              busy,
  output logic                              done,
  // reorder engine
  output logic                              re_start,
  output logic                              stats_clr,
  output logic [PAW-1:0]                    re_prec_base,
  output logic [AW-1:0]                     re_wgt_base,
  output logic [L-1:0][AW-1:0]              re_act_base,
  output logic [PAW:0]                      re_count,
  input  logic                              re_done,
  input  logic                              dsp_valid,
  output logic                              dsp_ready,
  input  logic [PW-1:0]                     dsp_gprec,
  input  logic [L-1:0][PW-1:0]              dsp_prec,
  input  logic [L-1:0][AW-1:0]              dsp_waddr,
  input  logic [L-1:0][AW-1:0]              dsp_aaddr,
  // activation and weight buffers (one bank per submatrix)
  output logic                              act_re,
  output logic [L-1:0][AW-1:0]              act_raddr,
  input  logic [L-1:0][M-1:0]               act_rdata,
  output logic                              wgt_re,
  output logic [L-1:0][AW-1:0]              wgt_raddr,
  input  logic [L-1:0][N-1:0][7:0]          wgt_rdata,
  // processing array
  output pe_op_e                            arr_op,
  output logic [L-1:0][M-1:0]               arr_act,
  output logic [L-1:0][N-1:0][NIB-1:0]      arr_wgt,
  output logic                              arr_signed,
  output logic [M-1:0][SHW-1:0]             arr_off,
  output logic [STW-1:0]                    arr_step,
  input  logic [M-1:0][N-1:0][ACC_W-1:0]    arr_acc,
  // output buffer write port
  output logic                              ob_we,
  output logic [OAW-1:0]                    ob_waddr,
  output logic [N-1:0][ACC_W-1:0]           ob_wdata,
  // event counters
  output logic [31:0]                       n_iter,        // P_A iterations executed
  output logic [31:0]                       n_pa_cycles,   // P_A bit cycles
  output logic [31:0]                       n_pd_cycles,   // P_D bit cycles
  output logic [31:0]                       n_agg_steps,   // aggregation steps
  output logic [31:0]                       n_lane_busy,   // lane-cycles doing work in P_A
  output logic [31:0]                       n_lane_slots   // lane-cycles available in P_A
);

  typedef enum logic [3:0] {
    S_IDLE, S_PD_CLR, S_PD_RUN, S_PD_WAIT, S_PD_AGG, S_PD_CAP,
    S_PA_CLR, S_PA_RUN, S_PA_WAIT, S_DRAIN
  } state_e;

  state_e state;

  // latched configuration
  logic [PAW:0]                   kl;
  logic                           wgt8;
  logic [AW-1:0]                  wgt_base, dzp_base;
  logic [TPJ-1:0][PAW-1:0]        prec_base;
  logic [TPJ-1:0][L-1:0][AW-1:0]  act_base;

  logic [PAW:0]                   j_cnt;      // P_D column counter
  logic                           hi;         // current weight nibble is the upper one
  logic [STW-1:0]                 agg_cnt;
  logic [$clog2(TPJ+1)-1:0]       tile;
  logic [$clog2(M+1)-1:0]         row;
  logic                           re_fin;
  logic [TPJ-1:0][N-1:0][ACC_W-1:0] pd;

  // executor registers (current P_A iteration)
  logic                           cur_valid;
  logic [PW-1:0]                  cur_gprec;
  logic [L-1:0][PW-1:0]           cur_prec;
  logic [L-1:0][AW-1:0]           cur_waddr, cur_aaddr;
  logic [PW-1:0]                  bit_cnt;
  logic                           cur_last;

  // read stage -> accumulate stage
  logic                           s1_valid, s1_pd, s1_hi;
  logic [PW-1:0]                  s1_bit;
  logic [L-1:0]                   s1_mask;

  // ---------------- read issue ----------------
  logic                           issue_pa, issue_pd, pd_last;
  logic [L-1:0]                   lane_mask;

  assign cur_last = (bit_cnt == cur_gprec - PW'(1)) && (!wgt8 || !hi);
  assign pd_last  = (j_cnt == kl - 1'b1) && (!wgt8 || !hi);
  assign issue_pa = (state == S_PA_RUN) && cur_valid;
  assign issue_pd = (state == S_PD_RUN);
  assign dsp_ready = (state == S_PA_RUN) && (!cur_valid || cur_last);

  always_comb begin
    act_re    = issue_pa || issue_pd;
    wgt_re    = issue_pa || issue_pd;
    for (int l = 0; l < L; l++) begin
      lane_mask[l] = (bit_cnt < cur_prec[l]);
      if (issue_pd) begin
        act_raddr[l] = dzp_base + AW'(j_cnt);
        wgt_raddr[l] = wgt_base + AW'(j_cnt);
      end else begin
        act_raddr[l] = cur_aaddr[l] + AW'(bit_cnt);
        wgt_raddr[l] = cur_waddr[l];
      end
    end
  end

  // ---------------- array drive ----------------
  always_comb begin
    if (s1_valid)               arr_op = PE_ACC;
    else if (state == S_PD_CLR || state == S_PA_CLR) arr_op = PE_CLEAR;
    else if (state == S_PD_AGG) arr_op = PE_AGG;
    else                        arr_op = PE_HOLD;
    arr_step   = agg_cnt;
    arr_signed = !wgt8 || s1_hi;
    for (int l = 0; l < L; l++) begin
      arr_act[l] = (s1_pd || s1_mask[l]) ? act_rdata[l] : '0;
      for (int c = 0; c < N; c++)
        arr_wgt[l][c] = s1_hi ? wgt_rdata[l][c][7:4] : wgt_rdata[l][c][3:0];
    end
    for (int r = 0; r < M; r++) begin
      if (s1_pd) arr_off[r] = SHW'(r % BA) + (s1_hi ? SHW'(NIB) : '0);
      else       arr_off[r] = SHW'(s1_bit) + (s1_hi ? SHW'(NIB) : '0);
    end
  end

  // ---------------- reorder engine drive ----------------
  assign re_start     = (state == S_PA_CLR);
  assign stats_clr    = (state == S_IDLE) && start;
  assign re_prec_base = prec_base[tile];
  assign re_wgt_base  = wgt_base;
  assign re_act_base  = act_base[tile];
  assign re_count     = kl;

  // ---------------- write-back ----------------
  always_comb begin
    ob_we    = (state == S_DRAIN);
    ob_waddr = OAW'(tile * M + row);
    for (int c = 0; c < N; c++)
      ob_wdata[c] = arr_acc[row[$clog2(M)-1:0]][c] + pd[tile][c] + ps[c];
  end

  assign busy = (state != S_IDLE);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      kl        <= '0;
      wgt8      <= 1'b0;
      wgt_base  <= '0;
      dzp_base  <= '0;
      prec_base <= '0;
      act_base  <= '0;
      j_cnt     <= '0;
      hi        <= 1'b0;
      agg_cnt   <= '0;
      tile      <= '0;
      row       <= '0;
      re_fin    <= 1'b0;
      pd        <= '0;
      cur_valid <= 1'b0;
      cur_gprec <= '0;
      cur_prec  <= '0;
      cur_waddr <= '0;
      cur_aaddr <= '0;
      bit_cnt   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kl        <= cfg_kl;
          wgt8      <= cfg_wgt8;
          wgt_base  <= cfg_wgt_base;
          dzp_base  <= cfg_dzp_base;
          prec_base <= cfg_prec_base;
          act_base  <= cfg_act_base;
          tile      <= '0;
          pd        <= '0;
          state     <= (cfg_dzp_en && cfg_kl != 0) ? S_PD_CLR : S_PA_CLR;
        end
        S_PD_CLR: begin
          j_cnt <= '0;
          hi    <= wgt8;
          state <= S_PD_RUN;
        end
        S_PD_RUN: begin
          if (wgt8 && hi) hi <= 1'b0;
          else begin
            hi    <= wgt8;
            j_cnt <= j_cnt + 1'b1;
          end
          if (pd_last) state <= S_PD_WAIT;
        end
        S_PD_WAIT: begin
          agg_cnt <= '0;
          state   <= S_PD_AGG;
        end
        S_PD_AGG: begin
          agg_cnt <= agg_cnt + 1'b1;
          if (agg_cnt == STW'($clog2(BA) - 1) || BA == 1) state <= S_PD_CAP;
        end
        S_PD_CAP: begin
          for (int t = 0; t < TPJ; t++) pd[t] <= arr_acc[t * BA];
          state <= S_PA_CLR;
        end
        S_PA_CLR: begin
          re_fin    <= 1'b0;
          cur_valid <= 1'b0;
          state     <= S_PA_RUN;
        end
        S_PA_RUN: begin
          if (re_done) re_fin <= 1'b1;
          if (cur_valid) begin
            if (wgt8 && hi) hi <= 1'b0;
            else begin
              hi      <= wgt8;
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
          if (dsp_ready) begin
            cur_valid <= dsp_valid;
            cur_gprec <= dsp_gprec;
            cur_prec  <= dsp_prec;
            cur_waddr <= dsp_waddr;
            cur_aaddr <= dsp_aaddr;
            bit_cnt   <= '0;
            hi        <= wgt8;
          end
          if ((re_fin || re_done) && !cur_valid && !dsp_valid) state <= S_PA_WAIT;
        end
        S_PA_WAIT: begin
          row   <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: begin
          row <= row + 1'b1;
          if (row == ($clog2(M+1))'(M - 1)) begin
            if (tile == ($clog2(TPJ+1))'(TPJ - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              tile  <= tile + 1'b1;
              state <= S_PA_CLR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // read stage register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pd    <= 1'b0;
      s1_hi    <= 1'b0;
      s1_bit   <= '0;
      s1_mask  <= '0;
    end else begin
      s1_valid <= issue_pa || issue_pd;
      s1_pd    <= issue_pd;
      s1_hi    <= hi;
      s1_bit   <= bit_cnt;
      s1_mask  <= lane_mask;
    end
  end

  // ---------------- event counters ----------------
  always_ff @(posedge clk) begin
    if (!rst_n || stats_clr) begin
      n_iter       <= '0;
      n_pa_cycles  <= '0;
      n_pd_cycles  <= '0;
      n_agg_steps  <= '0;
      n_lane_busy  <= '0;
      n_lane_slots <= '0;
    end else begin
      if (state == S_PA_RUN && dsp_ready && dsp_valid) n_iter <= n_iter + 1;
      if (issue_pa) begin
        n_pa_cycles  <= n_pa_cycles + 1;
        n_lane_busy  <= n_lane_busy + 32'($countones(lane_mask));
        n_lane_slots <= n_lane_slots + 32'(L);
      end
      if (issue_pd) n_pd_cycles <= n_pd_cycles + 1;
      if (state == S_PD_AGG) n_agg_steps <= n_agg_steps + 1;
    end
  end

  // a dispatched iteration never asks for more bits than the base precision
  property p_gprec_range;
    @(posedge clk) disable iff (!rst_n)
      (state == S_PA_RUN && dsp_ready && dsp_valid) |-> (dsp_gprec >= 1 && dsp_gprec <= PW'(BA));
  endproperty
  assert property (p_gprec_range);

endmodule
