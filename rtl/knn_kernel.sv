// knn_kernel: the KNN stage of the classifier - spatial-spectral filtering
// of the SVM probabilities.
//
// Each pixel is a point (PCA, row, column). For query pixel i the kernel
// scans the window of pixels [w_inf, w_sup) around it (knn_window), computes
// the squared Euclidean distance (PCA_i-PCA_j)^2 + (r_i-r_j)^2 + (c_i-c_j)^2
// to each, keeps the K nearest with non-zero distance (knn_kselect), sums
// their C class probabilities from the SVM, and labels the pixel with the
// class of largest sum plus one (the document averages by K first, which
// does not change the argmax). The PCA values and SVM probabilities are
// first preloaded into on-chip memories, as in the document's final KNN;
// here they are written as the PCA and SVM kernels produce them.
// Row and column are tracked with counters instead of the document's
// division and modulo by the image width. One datapath serves the top,
// constant and bottom windows that the document splits into three kernels;
// per-region pixel counts are reported.
//
// Timing: about (w_sup - w_inf) + count + 6 cycles per query pixel; a
// label leaves on o_valid/o_idx/o_label. Interface: preload through
// pca_we/svm_we at any time before 'start'; pulse 'start' with n_pixels and
// samples (image width); 'done' pulses after the last label. o_label is a
// full label_t; bits above those needed for C + 1 are always zero.
module knn_kernel
  import hsi_pkg::*;
#(
  parameter int N_MAX = 219232,      // PB1C1 pixels (Table 2.1)
  parameter int C     = 4,           // classes (Table 6.3)
  parameter int K     = 40,          // neighbours (Section 5.2.2)
  parameter int W     = 2976,        // window (Section 5.3.1)
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int KW   = $clog2(K + 1),
  localparam int CW   = $clog2(C + 1),
  localparam int SUM_W = PROB_W + KW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pca_we,
  input  logic [NW-1:0] pca_widx,
  input  pca_t          pca_wdata,
  input  logic          svm_we,
  input  logic [NW-1:0] svm_widx,
  input  prob_t         svm_wdata [C],
  input  logic          start,
  input  logic [NW-1:0] n_pixels,
  input  logic [15:0]   samples,
  output logic          o_valid,
  output logic [NW-1:0] o_idx,
  output label_t        o_label,
  output logic          done,
  output logic [NW-1:0] cnt_top,
  output logic [NW-1:0] cnt_const,
  output logic [NW-1:0] cnt_bot
);
  localparam int DW = 64;
  localparam logic [NW-1:0] SW = NW'(W / 2);

  // ---- preloaded memories (registered read) -----------------------------
  pca_t               pca_mem [N_MAX];
  logic [C*PROB_W-1:0] svm_mem [N_MAX];
  logic [NW-1:0]      pca_raddr, svm_raddr;
  pca_t               pca_rdata;
  logic [C*PROB_W-1:0] svm_rdata;

  logic [C*PROB_W-1:0] svm_wpacked;
  always_comb for (int c = 0; c < C; c++) svm_wpacked[c*PROB_W +: PROB_W] = svm_wdata[c];

  always_ff @(posedge clk) begin
    if (pca_we) pca_mem[pca_widx] <= pca_wdata;
    if (svm_we) svm_mem[svm_widx] <= svm_wpacked;
    pca_rdata <= pca_mem[pca_raddr];
    svm_rdata <= svm_mem[svm_raddr];
  end

  // ---- window -------------------------------------------------------------
  logic [NW-1:0] i_q, np_q, w_inf, w_sup;
  knn_region_e   region;
  knn_window #(.N_MAX(N_MAX)) u_win (
    .i_pix(i_q), .n_pixels(np_q), .half_w(SW), .w_inf, .w_sup, .region
  );

  // ---- neighbour list ---------------------------------------------------
  logic          ks_clear, ks_valid;
  logic [DW-1:0] ks_dist;
  logic [NW-1:0] ks_idx;
  logic [KW-1:0] nb_count;
  logic [NW-1:0] nb_idx  [K];
  logic [DW-1:0] nb_dist [K];
  knn_kselect #(.K(K), .DW(DW), .IW(NW)) u_sel (
    .clk, .rst_n, .clear(ks_clear), .in_valid(ks_valid), .in_dist(ks_dist), .in_idx(ks_idx),
    .count(nb_count), .nb_idx, .nb_dist
  );

  typedef enum logic [2:0] {Q_IDLE, Q_READI, Q_PCAI, Q_SCAN, Q_DRAIN, Q_VOTE, Q_VDRAIN, Q_DECIDE} qstate_e;
  qstate_e state;

  logic [15:0]   wid_q;
  logic [15:0]   ri_q, ci_q;            // row/column of the query
  logic [15:0]   lr_q, lc_q;            // row/column of w_inf
  logic [15:0]   rj_q, cj_q;            // row/column of the scan address
  logic [NW-1:0] j_q;
  pca_t          pca_i_q;
  // scan pipeline stage (data of the previous address)
  logic          s1_vld;
  logic [NW-1:0] s1_idx;
  logic [15:0]   s1_r, s1_c;
  // vote
  logic [KW-1:0] z_q;
  logic          v1_vld;
  logic [SUM_W-1:0] sum_q [C];

  // distance of the candidate in stage 1
  logic signed [PCA_W:0]     dp;
  logic signed [2*PCA_W+1:0] dp2;
  logic signed [16:0]        dr, dc;
  logic [DW-1:0]             cand_dist;
  logic [33:0]               d_pos;         // (r_i-r_j)^2 + (c_i-c_j)^2
  always_comb begin
    dp   = $signed({pca_i_q[PCA_W-1], pca_i_q}) - $signed({pca_rdata[PCA_W-1], pca_rdata});
    dp2  = dp * dp;
    dr   = $signed({1'b0, ri_q}) - $signed({1'b0, s1_r});
    dc   = $signed({1'b0, ci_q}) - $signed({1'b0, s1_c});
    d_pos = 34'($unsigned(34'(dr) * 34'(dr))) + 34'($unsigned(34'(dc) * 34'(dc)));
    cand_dist = DW'($unsigned(dp2) >> PCA_F) + (DW'(d_pos) << PCA_F);
  end
  assign ks_valid = s1_vld;
  assign ks_dist  = cand_dist;
  assign ks_idx   = s1_idx;

  logic [CW-1:0] best;
  always_comb begin
    best = '0;
    for (int c = 1; c < C; c++) if (sum_q[c] > sum_q[best]) best = CW'(c);
  end

  always_comb begin
    pca_raddr = (state == Q_READI) ? i_q : j_q;
    svm_raddr = nb_idx[z_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= Q_IDLE; i_q <= '0; np_q <= '0; wid_q <= '0;
      ri_q <= '0; ci_q <= '0; lr_q <= '0; lc_q <= '0; rj_q <= '0; cj_q <= '0; j_q <= '0;
      pca_i_q <= '0; s1_vld <= 1'b0; s1_idx <= '0; s1_r <= '0; s1_c <= '0;
      z_q <= '0; v1_vld <= 1'b0; ks_clear <= 1'b0;
      o_valid <= 1'b0; o_idx <= '0; o_label <= '0; done <= 1'b0;
      cnt_top <= '0; cnt_const <= '0; cnt_bot <= '0;
      for (int c = 0; c < C; c++) sum_q[c] <= '0;
    end else begin
      o_valid <= 1'b0; done <= 1'b0; ks_clear <= 1'b0; s1_vld <= 1'b0; v1_vld <= 1'b0;
      if (v1_vld)
        for (int c = 0; c < C; c++) sum_q[c] <= sum_q[c] + SUM_W'(svm_rdata[c*PROB_W +: PROB_W]);
      unique case (state)
        Q_IDLE: if (start) begin
          np_q <= n_pixels; wid_q <= samples; i_q <= '0;
          ri_q <= '0; ci_q <= '0; lr_q <= '0; lc_q <= '0;
          cnt_top <= '0; cnt_const <= '0; cnt_bot <= '0;
          state <= Q_READI;
        end
        Q_READI: begin ks_clear <= 1'b1; state <= Q_PCAI; end
        Q_PCAI: begin
          pca_i_q <= pca_rdata;
          j_q <= w_inf; rj_q <= lr_q; cj_q <= lc_q;
          state <= Q_SCAN;
        end
        Q_SCAN: begin
          s1_vld <= 1'b1; s1_idx <= j_q; s1_r <= rj_q; s1_c <= cj_q;
          if (cj_q + 1'b1 == wid_q) begin cj_q <= '0; rj_q <= rj_q + 1'b1; end
          else cj_q <= cj_q + 1'b1;
          if (j_q + 1'b1 == w_sup) state <= Q_DRAIN;
          else j_q <= j_q + 1'b1;
        end
        Q_DRAIN: if (!s1_vld) begin
          z_q <= '0;
          for (int c = 0; c < C; c++) sum_q[c] <= '0;
          state <= (nb_count == '0) ? Q_DECIDE : Q_VOTE;
        end
        Q_VOTE: begin
          v1_vld <= 1'b1;
          if (z_q + 1'b1 == nb_count) state <= Q_VDRAIN;
          else z_q <= z_q + 1'b1;
        end
        Q_VDRAIN: if (!v1_vld) state <= Q_DECIDE;
        Q_DECIDE: begin
          o_valid <= 1'b1; o_idx <= i_q; o_label <= label_t'(best) + 1'b1;
          unique case (region)
            REG_TOP:   cnt_top   <= cnt_top + 1'b1;
            REG_CONST: cnt_const <= cnt_const + 1'b1;
            default:   cnt_bot   <= cnt_bot + 1'b1;
          endcase
          if (i_q >= SW) begin             // w_inf moves with the next query
            if (lc_q + 1'b1 == wid_q) begin lc_q <= '0; lr_q <= lr_q + 1'b1; end
            else lc_q <= lc_q + 1'b1;
          end
          if (ci_q + 1'b1 == wid_q) begin ci_q <= '0; ri_q <= ri_q + 1'b1; end
          else ci_q <= ci_q + 1'b1;
          if (i_q + 1'b1 == np_q) begin done <= 1'b1; state <= Q_IDLE; end
          else begin i_q <= i_q + 1'b1; state <= Q_READI; end
        end
        default: state <= Q_IDLE;
      endcase
    end
  end
endmodule
