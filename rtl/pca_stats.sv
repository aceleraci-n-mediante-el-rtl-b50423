// pca_stats: first pass of the PCA kernel - mean pixel and covariance matrix.
//
// The image arrives as a stream of band samples, pixel by pixel (band 0
// first). While a pixel streams in, its samples are stored and added to the
// per-band sums; then the correlation products x[j]*x[k] of that pixel are
// accumulated, one per cycle, for k >= j only (the matrix is symmetric; the
// lower half is mirrored later, a choice of this design). This follows the
// document's final PCA, which builds the mean and the correlation matrix in
// one pass instead of centring the image. After the last pixel one division
// gives 1/N (64 fractional bits), the means are formed, and the covariance
// VM[j][k] = CM[j][k]/N - mean[j]*mean[k] is written for all j,k (one entry
// per cycle). Division is by N, as in the document's pseudocode.
//
// Interface: pulse 'start' with n_bands/n_pixels valid; stream s_valid/
// s_ready/s_data (Q0.16 samples); 'done' pulses when VM and the means are
// ready. VM is read through cov_rd_* with one cycle latency (registered),
// the means through mean_rd_* combinationally. Cycles: n_bands per pixel to
// load plus n_bands*(n_bands+1)/2 per pixel to accumulate, then ~80 for the
// reciprocal, n_bands for the means and n_bands^2 for the covariance.
module pca_stats
  import hsi_pkg::*;
#(
  parameter int B_MAX = 128,                       // bands (Table 2.1)
  parameter int N_MAX = 219232,                    // pixels of PB1C1
  localparam int BW   = $clog2(B_MAX + 1),
  localparam int AW   = $clog2(B_MAX),
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int BP   = 1 << AW              // row pitch of the matrices
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  input  logic [NW-1:0] n_pixels,
  input  logic          s_valid,
  output logic          s_ready,
  input  pix_t          s_data,
  output logic          done,
  input  logic [AW-1:0] cov_rd_j,
  input  logic [AW-1:0] cov_rd_k,
  output fx_t           cov_rd_data,
  input  logic [AW-1:0] mean_rd_addr,
  output fx_t           mean_rd_data
);
  localparam int ACC_W = 2*PIX_W + NW;      // correlation accumulator
  localparam int SUM_W = PIX_W + NW;        // band sum accumulator

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MAC, S_RECIP, S_MEAN, S_COV, S_DONE} state_e;
  state_e state;

  pix_t             px    [B_MAX];          // current pixel
  logic [SUM_W-1:0] sum_q [B_MAX];
  logic [ACC_W-1:0] corr  [BP*BP];    // upper triangle used
  fx_t              mean  [B_MAX];
  fx_t              vm    [BP*BP];

  logic [BW-1:0] nb_q;
  logic [NW-1:0] np_q, pix_cnt;
  logic [AW-1:0] j_q, k_q;
  logic          first_q;                   // first pixel: overwrite sums
  logic [63:0]   recip_q;                   // floor(2^64 / N)

  // reciprocal divider: (2^64 << 0) / N in an 80-bit signed datapath
  logic        div_start, div_busy, div_done;
  logic signed [79:0] div_quo;
  fx_div #(.W(80), .F(0)) u_div (
    .clk, .rst_n, .start(div_start),
    .num(80'sd1 <<< 64), .den($signed(80'(np_q))),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  assign s_ready = (state == S_LOAD);
  assign mean_rd_data = mean[mean_rd_addr];

  always_ff @(posedge clk) cov_rd_data <= vm[{cov_rd_j, cov_rd_k}];

  // arithmetic of the current MAC / covariance step
  logic [2*PIX_W-1:0] prod;
  logic [AW-1:0]      lo, hi;
  logic [127:0]       cm_wide;
  logic signed [2*FX_W-1:0] mm;
  fx_t                vm_val;
  always_comb begin
    prod    = px[j_q] * px[k_q];
    lo      = (j_q <= k_q) ? j_q : k_q;
    hi      = (j_q <= k_q) ? k_q : j_q;
    cm_wide = 128'(corr[{lo, hi}]) * 128'(recip_q);
    mm      = mean[j_q] * mean[k_q];
    vm_val  = fx_t'(cm_wide >> 64) - fx_t'(mm >>> FX_F);
  end

  logic last_band_j, last_band_k;
  assign last_band_j = (BW'(j_q) == nb_q - 1'b1);
  assign last_band_k = (BW'(k_q) == nb_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; div_start <= 1'b0;
      nb_q <= '0; np_q <= '0; pix_cnt <= '0; j_q <= '0; k_q <= '0;
      first_q <= 1'b0; recip_q <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nb_q <= n_bands; np_q <= n_pixels; pix_cnt <= '0;
          j_q <= '0; first_q <= 1'b1; state <= S_LOAD;
        end
        S_LOAD: if (s_valid) begin
          px[j_q]    <= s_data;
          sum_q[j_q] <= first_q ? SUM_W'(s_data) : sum_q[j_q] + SUM_W'(s_data);
          if (last_band_j) begin
            j_q <= '0; k_q <= '0; state <= S_MAC;
          end else j_q <= j_q + 1'b1;
        end
        S_MAC: begin
          corr[{j_q, k_q}] <= first_q ? ACC_W'(prod) : corr[{j_q, k_q}] + ACC_W'(prod);
          if (last_band_k) begin
            if (last_band_j) begin
              first_q <= 1'b0;
              j_q     <= '0;
              pix_cnt <= pix_cnt + 1'b1;
              if (pix_cnt + 1'b1 == np_q) begin
                state <= S_RECIP; div_start <= 1'b1;
              end else state <= S_LOAD;
            end else begin
              j_q <= j_q + 1'b1; k_q <= j_q + 1'b1;
            end
          end else k_q <= k_q + 1'b1;
        end
        S_RECIP: if (div_done) begin
          recip_q <= 64'(div_quo);
          j_q <= '0; state <= S_MEAN;
        end
        S_MEAN: begin
          mean[j_q] <= fx_t'((128'(sum_q[j_q]) * 128'(recip_q)) >> 48);
          if (last_band_j) begin j_q <= '0; k_q <= '0; state <= S_COV; end
          else j_q <= j_q + 1'b1;
        end
        S_COV: begin
          vm[{j_q, k_q}] <= vm_val;
          if (last_band_k) begin
            k_q <= '0;
            if (last_band_j) state <= S_DONE;
            else j_q <= j_q + 1'b1;
          end else k_q <= k_q + 1'b1;
        end
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
