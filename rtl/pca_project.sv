// pca_project: projection pass of the PCA kernel (step 4 of the document's
// final PCA). Each pixel is centred on the fly and projected on the
// dominant eigenvector: PCA = sum_k (X[k] - mean[k]) * x[k].
//
// The image streams in again, one band sample per cycle (s_ready is high
// while the pass runs). The mean and eigenvector entries of the current
// band are fetched combinationally through mean_rd_addr / ev_rd_addr, so
// the projection costs one cycle per sample and the result of a pixel
// appears on the cycle after its last band: o_valid with o_idx (pixel
// number, raster order) and o_pca in Q15.16. 'done' pulses after the last
// pixel. Only one principal component is computed, as in the document.
module pca_project
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
  input  logic          s_valid,
  output logic          s_ready,
  input  pix_t          s_data,
  output logic [AW-1:0] mean_rd_addr,
  input  fx_t           mean_rd_data,
  output logic [AW-1:0] ev_rd_addr,
  input  fx_t           ev_rd_data,
  output logic          o_valid,
  output logic [NW-1:0] o_idx,
  output pca_t          o_pca,
  output logic          done
);
  logic          run_q;
  logic [BW-1:0] nb_q;
  logic [NW-1:0] np_q, pix_q;
  logic [AW-1:0] b_q;
  logic signed [2*FX_W+7:0] acc_q;

  assign s_ready      = run_q;
  assign mean_rd_addr = b_q;
  assign ev_rd_addr   = b_q;

  fx_t centred;
  logic signed [2*FX_W+7:0] acc_next;
  always_comb begin
    centred  = (fx_t'(s_data) <<< (FX_F - PIX_W)) - mean_rd_data;   // Q.32
    acc_next = acc_q + (2*FX_W+8)'(fx_mul_full(centred, ev_rd_data));                // Q.64
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; nb_q <= '0; np_q <= '0; pix_q <= '0; b_q <= '0; acc_q <= '0;
      o_valid <= 1'b0; o_idx <= '0; o_pca <= '0; done <= 1'b0;
    end else begin
      o_valid <= 1'b0; done <= 1'b0;
      if (start) begin
        run_q <= 1'b1; nb_q <= n_bands; np_q <= n_pixels;
        pix_q <= '0; b_q <= '0; acc_q <= '0;
      end else if (run_q && s_valid) begin
        if (BW'(b_q) == nb_q - 1'b1) begin
          o_valid <= 1'b1;
          o_idx   <= pix_q;
          o_pca   <= pca_t'(acc_next >>> (2*FX_F - PCA_F));
          acc_q   <= '0;
          b_q     <= '0;
          pix_q   <= pix_q + 1'b1;
          if (pix_q + 1'b1 == np_q) begin run_q <= 1'b0; done <= 1'b1; end
        end else begin
          acc_q <= acc_next;
          b_q   <= b_q + 1'b1;
        end
      end
    end
  end
endmodule
