// tb_pca_power: serves a symmetric matrix with a known dominant direction
// through a registered read port and checks the eigenvalue and unit
// eigenvector from pca_power against a double-precision power iteration,
// and that the loop stops by convergence within 100 iterations.
module tb_pca_power;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 8, NB = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done, conv;
  logic [2:0] cj, ck, ea = '0;
  fx_t cov = '0, eigval, ev;
  logic [7:0] iters;
  fx_t mat [B_MAX][B_MAX];
  always_ff @(posedge clk) cov <= mat[cj][ck];

  pca_power #(.B_MAX(B_MAX)) dut (
    .clk, .rst_n, .start, .n_bands(4'(NB)), .cov_rd_j(cj), .cov_rd_k(ck), .cov_rd_data(cov),
    .done, .eigval, .iterations(iters), .converged(conv), .ev_rd_addr(ea), .ev_rd_data(ev)
  );

  real a[], lam, x[], u [NB];
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = new[NB*NB];
    for (int j = 0; j < NB; j++) u[j] = 0.2 + 0.1 * j;
    for (int j = 0; j < NB; j++) for (int k = j; k < NB; k++) begin
      real e;
      e = 0.02 * ($urandom_range(100) / 100.0 - 0.5);
      a[j*NB+k] = 0.5 * u[j] * u[k] + e + ((j == k) ? 0.01 : 0.0);
      a[k*NB+j] = a[j*NB+k];
    end
    foreach (mat[j, k]) mat[j][k] = '0;
    for (int j = 0; j < NB; j++) for (int k = 0; k < NB; k++) mat[j][k] = r2fx(a[j*NB+k]);
    power_ref(a, NB, 1000, lam, x);
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    #1;
    checks++; if (absr(fx2r(eigval) - lam) > 1e-5) begin failures++; $display("eigval %f vs %f", fx2r(eigval), lam); end
    checks++; if (!conv || iters > 8'd100 || iters < 8'd2) begin failures++; $display("iterations %0d conv %0d", iters, conv); end
    for (int j = 0; j < NB; j++) begin
      ea <= 3'(j); #1;
      checks++; if (absr(fx2r(ev) - x[j]) > 1e-4) begin failures++; $display("ev[%0d] %f vs %f", j, fx2r(ev), x[j]); end
    end
    $display("eigval %f iterations %0d", fx2r(eigval), iters);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
