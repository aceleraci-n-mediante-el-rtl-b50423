// tb_pca_stats: streams a random image into pca_stats and checks the means
// and the covariance matrix against a double-precision reference, plus the
// cycle count of the accumulation (n_bands per pixel to load and
// n_bands*(n_bands+1)/2 per pixel to accumulate).
module tb_pca_stats;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 8, N_MAX = 64, NB = 6, NP = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, s_valid = 0, s_ready, done;
  pix_t s_data = '0;
  logic [2:0] cj = '0, ck = '0, ma = '0;
  fx_t cov, mean;
  pca_stats #(.B_MAX(B_MAX), .N_MAX(N_MAX)) dut (
    .clk, .rst_n, .start, .n_bands(4'(NB)), .n_pixels(7'(NP)), .s_valid, .s_ready, .s_data,
    .done, .cov_rd_j(cj), .cov_rd_k(ck), .cov_rd_data(cov), .mean_rd_addr(ma), .mean_rd_data(mean)
  );

  real img [NP][NB];
  pix_t raw [NP][NB];
  real mu [NB], cv [NB][NB];
  int  cyc;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) for (int b = 0; b < NB; b++) begin
      raw[p][b] = pix_t'($urandom_range(65535));
      if (b == 1) raw[p][b] = pix_t'(raw[p][0] / 2 + 16'(b * 1000));  // correlated bands
      img[p][b] = real'(raw[p][b]) / 65536.0;
    end
    foreach (mu[b]) begin mu[b] = 0; for (int p = 0; p < NP; p++) mu[b] += img[p][b]; mu[b] /= NP; end
    for (int j = 0; j < NB; j++) for (int k = 0; k < NB; k++) begin
      cv[j][k] = 0; for (int p = 0; p < NP; p++) cv[j][k] += img[p][j] * img[p][k];
      cv[j][k] = cv[j][k] / NP - mu[j] * mu[k];
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    cyc = 0;
    for (int p = 0; p < NP; p++) for (int b = 0; b < NB; b++) begin
      s_valid <= 1; s_data <= raw[p][b];
      @(posedge clk); cyc++;
      while (!s_ready) begin @(posedge clk); cyc++; end
    end
    s_valid <= 0;
    while (!done) begin @(posedge clk); cyc++; end
    // accumulation cycles: NP*(NB + NB*(NB+1)/2) plus reciprocal, means, covariance
    checks++;
    if (cyc < NP*(NB + NB*(NB+1)/2) || cyc > NP*(NB + NB*(NB+1)/2) + 84 + NB + NB*NB + 8) begin
      failures++; $display("cycle count %0d out of range", cyc);
    end
    for (int b = 0; b < NB; b++) begin
      ma <= 3'(b); #1;
      checks++;
      if (absr(fx2r(mean) - mu[b]) > 1e-6) begin failures++; $display("mean[%0d] %f vs %f", b, fx2r(mean), mu[b]); end
    end
    for (int j = 0; j < NB; j++) for (int k = 0; k < NB; k++) begin
      cj <= 3'(j); ck <= 3'(k); @(posedge clk); #1;
      checks++;
      if (absr(fx2r(cov) - cv[j][k]) > 1e-6) begin failures++; $display("cov[%0d][%0d] %f vs %f", j, k, fx2r(cov), cv[j][k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
