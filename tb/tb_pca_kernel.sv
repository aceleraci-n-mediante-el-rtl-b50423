// tb_pca_kernel: a small image with one dominant spectral direction goes
// through the complete PCA stage: statistics pass, power method, projection
// pass. The testbench serves each pass the kernel asks for and checks the
// first principal component of every pixel against a double-precision PCA
// (mean, covariance, power iteration, projection), plus the eigenvalue,
// convergence, pass sequence and pixel numbering.
module tb_pca_kernel;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 8, N_MAX = 32, NB = 6, NP = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, s_valid = 0, s_ready, o_valid, done, converged;
  img_pass_e pass;
  pix_t s_data = '0;
  logic [5:0] o_idx;
  pca_t o_pca;
  fx_t eigval;
  logic [7:0] iterations;
  pca_kernel #(.B_MAX(B_MAX), .N_MAX(N_MAX)) dut (
    .clk, .rst_n, .start, .n_bands(4'(NB)), .n_pixels(6'(NP)), .pass, .s_valid, .s_ready, .s_data,
    .o_valid, .o_idx, .o_pca, .done, .eigval, .iterations, .converged
  );
  pix_t px [NP][NB];
  real want [NP], lambda;
  int got = 0;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && o_valid) begin
    checks++;
    if (int'(o_idx) != got || absr(o_pca / 65536.0 - want[got]) > 2e-3) begin
      failures++; $display("pixel %0d: idx %0d pca %f vs %f", got, o_idx, o_pca / 65536.0, want[got]);
    end
    got++;
  end

  task automatic serve();
    for (int q = 0; q < NP; q++) for (int b = 0; b < NB; b++) begin
      s_valid <= 1; s_data <= px[q][b]; @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    s_valid <= 0;
  endtask

  initial begin
    real u[NB], mu[], cov[], ev[], t;
    mu = new[NB]; cov = new[NB*NB];
    for (int b = 0; b < NB; b++) u[b] = (b % 2) ? 0.3 : -0.2 + 0.05 * b;
    for (int q = 0; q < NP; q++) begin
      t = srnd(1000) / 1000.0;
      for (int b = 0; b < NB; b++) px[q][b] = pix_t'(int'((0.5 + t * u[b] + srnd(100) / 10000.0) * 65536.0));
    end
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
      want[q] = 0;
      for (int b = 0; b < NB; b++) want[q] += (px[q][b] / 65536.0 - mu[b]) * ev[b];
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0; @(posedge clk);
    checks++; if (pass != PASS_STATS) begin failures++; $display("first pass %s", pass.name()); end
    serve();
    while (pass != PASS_PROJECT) @(posedge clk);
    serve();
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++; if (got != NP) begin failures++; $display("got %0d outputs", got); end
    checks++;
    if (absr(fx2r(eigval) - lambda) > 1e-4 * lambda + 1e-6) begin
      failures++; $display("eigval %f vs %f", fx2r(eigval), lambda);
    end
    checks++; if (!converged) begin failures++; $display("power method did not converge"); end
    $display("eigval %f iterations %0d", fx2r(eigval), iterations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
