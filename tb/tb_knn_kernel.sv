// tb_knn_kernel: preloads PCA values and SVM probabilities of a small image
// and runs the KNN stage. For every pixel the expected label comes from a
// model that builds the window, computes the distances, picks neighbours
// with the document's K-pass search, sums their probabilities and takes the
// class of largest sum plus one. PCA values are multiples of 1/256 with many
// repeats so the distances are exact and ties are common. Also checks the
// output order and the top/constant/bottom pixel counts.
module tb_knn_kernel;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_MAX = 64, C = 4, K = 4, W = 10, SW = W / 2;
  localparam int NW = $clog2(N_MAX + 1);
  localparam int NP = 42, WID = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pca_we = 0, svm_we = 0, start = 0, o_valid, done;
  logic [NW-1:0] pca_widx = '0, svm_widx = '0, o_idx, cnt_top, cnt_const, cnt_bot;
  pca_t pca_wdata = '0;
  prob_t svm_wdata [C];
  label_t o_label;
  knn_kernel #(.N_MAX(N_MAX), .C(C), .K(K), .W(W)) dut (
    .clk, .rst_n, .pca_we, .pca_widx, .pca_wdata, .svm_we, .svm_widx, .svm_wdata,
    .start, .n_pixels(NW'(NP)), .samples(16'(WID)), .o_valid, .o_idx, .o_label, .done,
    .cnt_top, .cnt_const, .cnt_bot
  );

  int pv [NP];
  int pr [NP][C];
  int want [NP];
  int got = 0;
  int lab_seen [256];

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && o_valid) begin
    checks++;
    lab_seen[o_label]++;
    if (int'(o_idx) != got || int'(o_label) != want[got]) begin
      failures++; $display("out %0d: idx %0d label %0d vs %0d", got, o_idx, o_label, want[got]);
    end
    got++;
  end

  initial begin
    real d[];
    int nb[], cnt, lo, hi, best, sum[C], dv, dr, dc;
    foreach (svm_wdata[c]) svm_wdata[c] = '0;
    for (int i = 0; i < NP; i++) begin
      pv[i] = int'($urandom_range(12)) - 6;
      for (int c = 0; c < C; c++) pr[i][c] = $urandom_range(32768);
    end
    // reference
    for (int i = 0; i < NP; i++) begin
      lo = (i > SW) ? i - SW : 0;
      hi = (i + SW < NP) ? i + SW : NP;
      d = new[hi - lo];
      for (int j = lo; j < hi; j++) begin
        dv = pv[i] - pv[j]; dr = i / WID - j / WID; dc = i % WID - j % WID;
        d[j - lo] = real'(dv * dv) + real'(dr * dr + dc * dc) * 65536.0;
      end
      kpass_ref(d, hi - lo, K, nb, cnt);
      for (int c = 0; c < C; c++) sum[c] = 0;
      for (int x = 0; x < cnt; x++) for (int c = 0; c < C; c++) sum[c] += pr[lo + nb[x]][c];
      best = 0;
      for (int c = 1; c < C; c++) if (sum[c] > sum[best]) best = c;
      want[i] = best + 1;
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < NP; i++) begin
      pca_we <= 1; pca_widx <= NW'(i); pca_wdata <= pca_t'(pv[i] * 256);
      svm_we <= 1; svm_widx <= NW'(i);
      for (int c = 0; c < C; c++) svm_wdata[c] <= prob_t'(pr[i][c]);
      @(posedge clk);
    end
    pca_we <= 0; svm_we <= 0;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++; if (got != NP) begin failures++; $display("got %0d labels", got); end
    $display("labels 1..4 seen %0d %0d %0d %0d", lab_seen[1], lab_seen[2], lab_seen[3], lab_seen[4]);
    checks++;
    if (int'(cnt_top) != SW || int'(cnt_bot) != SW || int'(cnt_const) != NP - 2 * SW) begin
      failures++; $display("regions %0d/%0d/%0d", cnt_top, cnt_const, cnt_bot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
