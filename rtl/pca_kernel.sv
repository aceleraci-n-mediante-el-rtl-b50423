// pca_kernel: the PCA stage of the classifier - reduces each hyperspectral
// pixel to its first principal component.
//
// Three steps run in sequence, as in the document's final PCA: a first pass
// over the image accumulates the mean pixel and the covariance matrix
// (pca_stats), the power method finds the dominant eigenvector (pca_power),
// and a second pass projects every centred pixel on it (pca_project). The
// image itself is not stored on chip (in the document it stays in host
// memory), so the kernel asks for each pass through 'pass' and takes the
// samples on s_valid/s_ready, pixel by pixel, band 0 first.
//
// Interface: pulse 'start' with n_bands/n_pixels; 'pass' shows PASS_STATS,
// then PASS_PROJECT while the kernel waits for that pass; results leave on
// o_valid/o_idx/o_pca (one per pixel, raster order); 'done' pulses after the
// last one, with eigval/iterations/converged from the power method.
module pca_kernel
  import hsi_pkg::*;
#(
  parameter int B_MAX = 128,
  parameter int N_MAX = 219232,
  localparam int BW = $clog2(B_MAX + 1),
  localparam int AW = $clog2(B_MAX),
  localparam int NW = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  input  logic [NW-1:0] n_pixels,
  output img_pass_e     pass,
  input  logic          s_valid,
  output logic          s_ready,
  input  pix_t          s_data,
  output logic          o_valid,
  output logic [NW-1:0] o_idx,
  output pca_t          o_pca,
  output logic          done,
  output fx_t           eigval,
  output logic [7:0]    iterations,
  output logic          converged
);
  typedef enum logic [1:0] {K_IDLE, K_STATS, K_POWER, K_PROJECT} kstate_e;
  kstate_e state;
  logic [BW-1:0] nb_q;
  logic [NW-1:0] np_q;

  logic st_done, pw_done, pj_done, st_ready, pj_ready;
  logic pw_start, pj_start;
  logic [AW-1:0] cov_j, cov_k, mean_addr_pj, ev_addr;
  fx_t cov_data, mean_data, ev_data;

  pca_stats #(.B_MAX(B_MAX), .N_MAX(N_MAX)) u_stats (
    .clk, .rst_n, .start(start && state == K_IDLE), .n_bands, .n_pixels,
    .s_valid(s_valid && state == K_STATS), .s_ready(st_ready), .s_data,
    .done(st_done), .cov_rd_j(cov_j), .cov_rd_k(cov_k), .cov_rd_data(cov_data),
    .mean_rd_addr(mean_addr_pj), .mean_rd_data(mean_data)
  );

  pca_power #(.B_MAX(B_MAX)) u_power (
    .clk, .rst_n, .start(pw_start), .n_bands(nb_q),
    .cov_rd_j(cov_j), .cov_rd_k(cov_k), .cov_rd_data(cov_data),
    .done(pw_done), .eigval, .iterations, .converged,
    .ev_rd_addr(ev_addr), .ev_rd_data(ev_data)
  );

  pca_project #(.B_MAX(B_MAX), .N_MAX(N_MAX)) u_proj (
    .clk, .rst_n, .start(pj_start), .n_bands(nb_q), .n_pixels(np_q),
    .s_valid(s_valid && state == K_PROJECT), .s_ready(pj_ready), .s_data,
    .mean_rd_addr(mean_addr_pj), .mean_rd_data(mean_data),
    .ev_rd_addr(ev_addr), .ev_rd_data(ev_data),
    .o_valid, .o_idx, .o_pca, .done(pj_done)
  );

  always_comb begin
    unique case (state)
      K_STATS:   begin pass = PASS_STATS;   s_ready = st_ready; end
      K_PROJECT: begin pass = PASS_PROJECT; s_ready = pj_ready; end
      default:   begin pass = PASS_NONE;    s_ready = 1'b0;     end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= K_IDLE; nb_q <= '0; np_q <= '0; pw_start <= 1'b0; pj_start <= 1'b0; done <= 1'b0;
    end else begin
      pw_start <= 1'b0; pj_start <= 1'b0; done <= 1'b0;
      unique case (state)
        K_IDLE:    if (start) begin nb_q <= n_bands; np_q <= n_pixels; state <= K_STATS; end
        K_STATS:   if (st_done) begin pw_start <= 1'b1; state <= K_POWER; end
        K_POWER:   if (pw_done) begin pj_start <= 1'b1; state <= K_PROJECT; end
        K_PROJECT: if (pj_done) begin done <= 1'b1; state <= K_IDLE; end
        default:   state <= K_IDLE;
      endcase
    end
  end
endmodule
