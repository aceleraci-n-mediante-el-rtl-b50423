// hsi_classifier_top: spatial-spectral classifier for hyperspectral images
// (brain tumour / skin lesion maps). PCA and SVM run in parallel on the
// image, then KNN filters the SVM class probabilities using the first
// principal component and the pixel position, and emits a label per pixel.
//
// Structure (the document's processing chain, Figure 6.1):
//   image pass 1 --+--> pca_kernel (statistics, power method) ---+
//                  +--> svm_kernel (probabilities per pixel) ----+--> knn_kernel --> labels
//   image pass 2 -----> pca_kernel (projection) -----------------+
// The image stays outside the accelerator (host memory in the document);
// the top asks for each pass on img_pass and takes the samples pixel by
// pixel, band 0 first, on img_valid/img_ready. Pass 1 is broadcast: a
// sample is taken when both PCA and SVM can take it. PCA values and SVM
// probabilities are written into the KNN memories as they are produced, and
// KNN starts once both kernels have finished.
//
// Interface: load the SVM model through cfg_* (cfg_sel: 0 w, 1 rho,
// 2 probA, 3 probB, 4 label); pulse 'start' with n_bands, n_pixels and
// samples (image width); serve the passes; labels leave on label_valid/
// label_idx/label_out; 'done' pulses after the last one. Status outputs give
// the power-method result and the number of pixels handled in each KNN
// window region. label_out is 8 bits wide; with C = 4 its upper four bits
// are always zero.
module hsi_classifier_top
  import hsi_pkg::*;
#(
  parameter int B_MAX = 128,       // bands, PB1C1 (Table 2.1)
  parameter int N_MAX = 219232,    // pixels, PB1C1 (Table 2.1)
  parameter int C     = 4,         // classes (Table 6.3)
  parameter int K     = 40,        // KNN neighbours (Table 6.3)
  parameter int W     = 2976,      // KNN window (Section 5.3.1)
  localparam int BW   = $clog2(B_MAX + 1),
  localparam int NW   = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SVM model
  input  logic          cfg_we,
  input  logic [2:0]    cfg_sel,
  input  logic [15:0]   cfg_addr,
  input  fx_t           cfg_data,
  // run
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  input  logic [NW-1:0] n_pixels,
  input  logic [15:0]   samples,
  // image stream
  output logic [1:0]    img_pass,
  input  logic          img_valid,
  output logic          img_ready,
  input  pix_t          img_data,
  // label map
  output logic          label_valid,
  output logic [NW-1:0] label_idx,
  output label_t        label_out,
  output logic          done,
  // status
  output fx_t           pca_eigval,
  output logic [7:0]    pca_iterations,
  output logic          pca_converged,
  output logic [NW-1:0] knn_cnt_top,
  output logic [NW-1:0] knn_cnt_const,
  output logic [NW-1:0] knn_cnt_bot
);
  img_pass_e     pca_pass;
  logic          pca_ready, svm_ready, pca_valid_in, svm_valid_in;
  logic          pca_o_valid, pca_done, svm_o_valid, svm_done;
  logic [NW-1:0] pca_o_idx, svm_o_idx;
  pca_t          pca_o;
  prob_t         svm_prob [C];
  logic          knn_start;

  always_comb begin
    if (pca_pass == PASS_PROJECT) begin
      img_pass     = 2'(PASS_PROJECT);
      img_ready    = pca_ready;
      pca_valid_in = img_valid;
      svm_valid_in = 1'b0;
    end else if (pca_pass == PASS_STATS) begin
      img_pass     = 2'(PASS_STATS);
      img_ready    = pca_ready && svm_ready;
      pca_valid_in = img_valid && svm_ready;
      svm_valid_in = img_valid && pca_ready;
    end else begin
      img_pass     = 2'(PASS_NONE);
      img_ready    = 1'b0;
      pca_valid_in = 1'b0;
      svm_valid_in = 1'b0;
    end
  end

  pca_kernel #(.B_MAX(B_MAX), .N_MAX(N_MAX)) u_pca (
    .clk, .rst_n, .start, .n_bands, .n_pixels, .pass(pca_pass),
    .s_valid(pca_valid_in), .s_ready(pca_ready), .s_data(img_data),
    .o_valid(pca_o_valid), .o_idx(pca_o_idx), .o_pca(pca_o), .done(pca_done),
    .eigval(pca_eigval), .iterations(pca_iterations), .converged(pca_converged)
  );

  svm_kernel #(.B_MAX(B_MAX), .N_MAX(N_MAX), .C(C)) u_svm (
    .clk, .rst_n, .cfg_we, .cfg_sel(svm_cfg_e'(cfg_sel)), .cfg_addr, .cfg_data,
    .start, .n_bands, .n_pixels,
    .s_valid(svm_valid_in), .s_ready(svm_ready), .s_data(img_data),
    .o_valid(svm_o_valid), .o_idx(svm_o_idx), .o_prob(svm_prob), .o_class(),   // KNN votes on the probabilities
    .done(svm_done)
  );

  knn_kernel #(.N_MAX(N_MAX), .C(C), .K(K), .W(W)) u_knn (
    .clk, .rst_n,
    .pca_we(pca_o_valid), .pca_widx(pca_o_idx), .pca_wdata(pca_o),
    .svm_we(svm_o_valid), .svm_widx(svm_o_idx), .svm_wdata(svm_prob),
    .start(knn_start), .n_pixels, .samples,
    .o_valid(label_valid), .o_idx(label_idx), .o_label(label_out), .done,
    .cnt_top(knn_cnt_top), .cnt_const(knn_cnt_const), .cnt_bot(knn_cnt_bot)
  );

  // KNN waits for both PCA and SVM (the dependency of Figure 6.1)
  logic pca_fin_q, svm_fin_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pca_fin_q <= 1'b0; svm_fin_q <= 1'b0; knn_start <= 1'b0;
    end else begin
      knn_start <= 1'b0;
      if (start) begin pca_fin_q <= 1'b0; svm_fin_q <= 1'b0; end
      else begin
        if (pca_done) pca_fin_q <= 1'b1;
        if (svm_done) svm_fin_q <= 1'b1;
        if ((pca_fin_q || pca_done) && (svm_fin_q || svm_done)) begin
          knn_start <= 1'b1; pca_fin_q <= 1'b0; svm_fin_q <= 1'b0;
        end
      end
    end
  end
endmodule
