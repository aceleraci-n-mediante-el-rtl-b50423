// tb_pca_project: feeds a mean vector and an eigenvector, streams pixels and
// checks each projection sum_k (X[k]-mean[k])*x[k] against a double-precision
// reference, the pixel numbering and the one-cycle-per-sample rate.
module tb_pca_project;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 16, N_MAX = 100, NB = 12, NP = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, s_valid = 0, s_ready, o_valid, done;
  pix_t s_data = '0;
  logic [3:0] ma, ea;
  fx_t mv [B_MAX], evv [B_MAX];
  logic [6:0] o_idx;
  pca_t o_pca;
  pca_project #(.B_MAX(B_MAX), .N_MAX(N_MAX)) dut (
    .clk, .rst_n, .start, .n_bands(5'(NB)), .n_pixels(7'(NP)), .s_valid, .s_ready, .s_data,
    .mean_rd_addr(ma), .mean_rd_data(mv[ma]), .ev_rd_addr(ea), .ev_rd_data(evv[ea]),
    .o_valid, .o_idx, .o_pca, .done
  );
  real mean_r [NB], ev_r [NB], exp_r [NP];
  pix_t raw [NP][NB];
  int got = 0, cyc = 0;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && o_valid) begin
    checks++;
    if (int'(o_idx) != got || absr(real'(o_pca) / 65536.0 - exp_r[got]) > 1e-4) begin
      failures++; $display("pixel %0d: idx %0d pca %f vs %f", got, o_idx, real'(o_pca)/65536.0, exp_r[got]);
    end
    got++;
  end
  initial begin
    foreach (mv[b]) begin mv[b] = '0; evv[b] = '0; end
    for (int b = 0; b < NB; b++) begin
      mean_r[b] = $urandom_range(60000) / 65536.0; ev_r[b] = srnd(1000) / 3000.0;
      mv[b] = r2fx(mean_r[b]); evv[b] = r2fx(ev_r[b]);
      mean_r[b] = fx2r(mv[b]); ev_r[b] = fx2r(evv[b]);
    end
    for (int p = 0; p < NP; p++) begin
      exp_r[p] = 0;
      for (int b = 0; b < NB; b++) begin
        raw[p][b] = pix_t'($urandom_range(65535));
        exp_r[p] += (raw[p][b] / 65536.0 - mean_r[b]) * ev_r[b];
      end
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    for (int p = 0; p < NP; p++) for (int b = 0; b < NB; b++) begin
      s_valid <= 1; s_data <= raw[p][b]; @(posedge clk); cyc++;
      while (!s_ready) begin @(posedge clk); cyc++; end
    end
    s_valid <= 0;
    repeat (3) @(posedge clk);
    checks++; if (got != NP) begin failures++; $display("got %0d pixels", got); end
    checks++; if (cyc != NP * NB) begin failures++; $display("took %0d cycles for %0d samples", cyc, NP*NB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
