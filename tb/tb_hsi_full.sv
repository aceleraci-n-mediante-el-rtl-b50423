// tb_hsi_full: the classifier at its full default size (128 bands, 219,232
// pixel memories, 4 classes, K = 40, window of 2976 pixels) on a synthetic
// 128-band image of 30 rows x 100 samples. 3000 pixels is just over one
// window, so all three window regions occur.
//
// The testbench is the host: it loads a one-vs-one model, starts the run
// and serves the two image passes. Checks: every PCA value and every SVM
// probability vector against double-precision models; the final label of
// every 25th pixel (and the first and last ones) against a model of the KNN
// stage applied to the design's own PCA values and probabilities; label
// order and range for every pixel; the window region counts; power-method
// convergence. Mechanism counts are reported as in the small end-to-end test.
module tb_hsi_full;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 128, N_MAX = 219232, C = 4, K = 40, W = 2976, SW = W / 2;
  localparam int NB = 128, ROWS = 30, WID = 100, NP = ROWS * WID, BC = 6;
  localparam int NW = $clog2(N_MAX + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, start = 0, img_valid = 0, img_ready, label_valid, done, pca_converged;
  logic [2:0] cfg_sel = '0;
  logic [15:0] cfg_addr = '0;
  fx_t cfg_data = '0, pca_eigval;
  logic [1:0] img_pass;
  pix_t img_data = '0;
  logic [NW-1:0] label_idx, knn_cnt_top, knn_cnt_const, knn_cnt_bot;
  label_t label_out;
  logic [7:0] pca_iterations;
  hsi_classifier_top dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .start, .n_bands(8'(NB)),
    .n_pixels(NW'(NP)), .samples(16'(WID)), .img_pass, .img_valid, .img_ready, .img_data,
    .label_valid, .label_idx, .label_out, .done, .pca_eigval, .pca_iterations, .pca_converged,
    .knn_cnt_top, .knn_cnt_const, .knn_cnt_bot
  );

  pix_t px [NP][NB];
  real  w [BC][NB], rho [BC], pa [BC], pb [BC];
  int   lab [C] = '{2, 4, 1, 3};
  real  want_pca [NP], want_p [NP][C];
  int   hw_pca [NP], hw_p [NP][C], hw_cls [NP];
  int   n_pca = 0, n_svm = 0, n_lab = 0, n_knn = 0;
  // mechanism counters
  int   m_stall = 0, m_switch = 0, m_coupl_iter = 0, m_relabel = 0;
  logic [1:0] pass_q = '0;
  bit stats_seen = 0;

  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cfg(input svm_cfg_e s, input int a, input fx_t d);
    cfg_we <= 1; cfg_sel <= 3'(s); cfg_addr <= 16'(a); cfg_data <= d;
    @(posedge clk);
  endtask

  task automatic serve();
    for (int q = 0; q < NP; q++) for (int b = 0; b < NB; b++) begin
      img_valid <= 1; img_data <= px[q][b]; @(posedge clk);
      while (!img_ready) @(posedge clk);
    end
    img_valid <= 0;
  endtask

  // stage monitors
  always @(posedge clk) if (rst_n) begin
    pass_q <= img_pass;
    if (img_pass == 2'(PASS_STATS)) stats_seen = 1;
    if (stats_seen && pass_q != 2'(PASS_PROJECT) && img_pass == 2'(PASS_PROJECT)) m_switch++;
    if (img_pass == 2'(PASS_STATS) && img_valid && !img_ready) m_stall++;
    if (dut.u_svm.cp_done && dut.u_svm.cp_iters > 0) m_coupl_iter++;
    if (dut.pca_o_valid) begin
      hw_pca[dut.pca_o_idx] = dut.pca_o;
      checks++;
      if (absr(dut.pca_o / 65536.0 - want_pca[dut.pca_o_idx]) > 2e-3) begin
        failures++; $display("pca %0d: %f vs %f", dut.pca_o_idx, dut.pca_o / 65536.0, want_pca[dut.pca_o_idx]);
      end
      n_pca++;
    end
    if (dut.svm_o_valid) begin
      hw_cls[dut.svm_o_idx] = dut.u_svm.o_class;
      for (int c = 0; c < C; c++) begin
        hw_p[dut.svm_o_idx][c] = dut.svm_prob[c];
        checks++;
        if (absr(dut.svm_prob[c] / 32768.0 - want_p[dut.svm_o_idx][c]) > 3e-3) begin
          failures++; $display("svm %0d prob[%0d]: %f vs %f", dut.svm_o_idx, c, dut.svm_prob[c] / 32768.0, want_p[dut.svm_o_idx][c]);
        end
      end
      n_svm++;
    end
    if (label_valid) begin
      checks++;
      if (int'(label_idx) != n_lab || label_out < 1 || label_out > C) begin
        failures++; $display("label %0d: idx %0d value %0d", n_lab, label_idx, label_out);
      end
      if (int'(label_out) != hw_cls[label_idx]) m_relabel++;
      n_lab++;
    end
    if (label_valid && (label_idx % 25 == 0 || int'(label_idx) == NP - 1)) begin
      int lo, hi, dv, dr, dc, cnt, best, exp_lab;
      int nb[], sum[C];
      real d[];
      lo = (int'(label_idx) > SW) ? int'(label_idx) - SW : 0;
      hi = (int'(label_idx) + SW < NP) ? int'(label_idx) + SW : NP;
      d = new[hi - lo];
      for (int j = lo; j < hi; j++) begin
        dv = hw_pca[label_idx] - hw_pca[j];
        dr = int'(label_idx) / WID - j / WID; dc = int'(label_idx) % WID - j % WID;
        d[j - lo] = real'(longint'(dv) * longint'(dv) / 65536) + real'(dr * dr + dc * dc) * 65536.0;
      end
      kpass_ref(d, hi - lo, K, nb, cnt);
      for (int c = 0; c < C; c++) sum[c] = 0;
      for (int x = 0; x < cnt; x++) for (int c = 0; c < C; c++) sum[c] += hw_p[lo + nb[x]][c];
      best = 0;
      for (int c = 1; c < C; c++) if (sum[c] > sum[best]) best = c;
      exp_lab = best + 1;
      checks++;
      if (int'(label_out) != exp_lab) begin
        failures++; $display("label of pixel %0d: %0d vs %0d", label_idx, label_out, exp_lab);
      end
      n_knn++;
    end
  end

  initial begin
    real r[], p[], mu[], cov[], ev[], lambda, dec, sig [C][NB];
    int cls, cl;
    r = new[C*C]; mu = new[NB]; cov = new[NB*NB];
    // image: class region by quadrant, class spectrum plus noise
    for (int c = 0; c < C; c++) for (int b = 0; b < NB; b++) sig[c][b] = 0.2 + 0.12 * c + 0.05 * ((b * (c + 1)) % 7);
    for (int q = 0; q < NP; q++) begin
      cl = ((q / WID) / 8 + (q % WID) / 25) % C;
      for (int b = 0; b < NB; b++) px[q][b] = pix_t'(int'((sig[cl][b] + srnd(400) / 10000.0) * 65536.0));
    end
    // reference PCA
    foreach (mu[b]) begin
      mu[b] = 0; for (int q = 0; q < NP; q++) mu[b] += px[q][b] / 65536.0; mu[b] /= NP;
    end
    for (int j = 0; j < NB; j++) for (int k = 0; k < NB; k++) begin
      cov[j*NB+k] = 0;
      for (int q = 0; q < NP; q++) cov[j*NB+k] += (px[q][j] / 65536.0 - mu[j]) * (px[q][k] / 65536.0 - mu[k]);
      cov[j*NB+k] /= NP;
    end
    power_ref(cov, NB, 1000, lambda, ev);
    for (int q = 0; q < NP; q++) begin
      want_pca[q] = 0;
      for (int b = 0; b < NB; b++) want_pca[q] += (px[q][b] / 65536.0 - mu[b]) * ev[b];
    end
    // model and reference SVM
    for (int c = 0; c < BC; c++) begin
      for (int b = 0; b < NB; b++) w[c][b] = fx2r(r2fx(srnd(1000) / 1000.0));
      rho[c] = fx2r(r2fx(srnd(1000) / 1000.0));
      pa[c]  = fx2r(r2fx(-(1.0 + $urandom_range(2000) / 1000.0)));
      pb[c]  = fx2r(r2fx(srnd(500) / 1000.0));
    end
    for (int q = 0; q < NP; q++) begin
      for (int a = 0; a < C; a++) r[a*C+a] = 0.0;
      cls = 0;
      for (int i = 0; i < C; i++) for (int k = i + 1; k < C; k++) begin
        dec = -rho[cls];
        for (int b = 0; b < NB; b++) dec += px[q][b] / 65536.0 * w[cls][b];
        r[i*C+k] = sigmoid_ref(dec, pa[cls], pb[cls]);
        r[k*C+i] = 1.0 - r[i*C+k];
        cls++;
      end
      coupling_ref(r, C, 0.005 / C, 100, p);
      for (int c = 0; c < C; c++) want_p[q][lab[c] - 1] = p[c];
    end

    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int c = 0; c < BC; c++) begin
      for (int b = 0; b < NB; b++) cfg(CFG_W, c * B_MAX + b, r2fx(w[c][b]));
      cfg(CFG_RHO, c, r2fx(rho[c]));
      cfg(CFG_PROBA, c, r2fx(pa[c]));
      cfg(CFG_PROBB, c, r2fx(pb[c]));
    end
    for (int c = 0; c < C; c++) cfg(CFG_LABEL, c, fx_t'(lab[c]));
    cfg_we <= 0;
    start <= 1; @(posedge clk); start <= 0; @(posedge clk);
    while (img_pass != 2'(PASS_STATS)) @(posedge clk);
    serve();
    while (img_pass != 2'(PASS_PROJECT)) @(posedge clk);
    serve();
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);

    checks++; if (n_pca != NP || n_svm != NP || n_lab != NP) begin
      failures++; $display("outputs pca %0d svm %0d labels %0d", n_pca, n_svm, n_lab);
    end
    checks++; if (absr(fx2r(pca_eigval) - lambda) > 1e-3 * lambda) begin
      failures++; $display("eigval %f vs %f", fx2r(pca_eigval), lambda);
    end
    $display("mechanisms: shared-pass stalls %0d, pass switches %0d, power iterations %0d (converged %0d),",
             m_stall, m_switch, pca_iterations, pca_converged);
    $display("            coupling runs with iterations %0d, windows top/const/bot %0d/%0d/%0d, relabelled %0d",
             m_coupl_iter, knn_cnt_top, knn_cnt_const, knn_cnt_bot, m_relabel);
    checks++; if (m_stall == 0)       begin failures++; $display("no stall of the shared pass"); end
    checks++; if (m_switch != 1)      begin failures++; $display("pass switch count %0d", m_switch); end
    checks++; if (!pca_converged)     begin failures++; $display("power method did not converge"); end
    checks++; if (m_coupl_iter == 0)  begin failures++; $display("coupling never iterated"); end
    checks++; if (int'(knn_cnt_top) != SW || int'(knn_cnt_bot) != SW || int'(knn_cnt_const) != NP - 2 * SW) begin
      failures++; $display("window regions %0d/%0d/%0d", knn_cnt_top, knn_cnt_const, knn_cnt_bot);
    end
    $display("labels checked against the KNN model: %0d", n_knn);
    checks++; if (m_relabel == 0)     begin failures++; $display("spatial filter changed no label"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
