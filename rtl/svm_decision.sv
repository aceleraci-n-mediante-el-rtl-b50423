// svm_decision: decision values of the one-vs-one linear SVM classifiers.
//
// For every pixel and each of the BC = C(C-1)/2 binary classifiers the
// document computes dec = sum_j image[j] * w[classifier][j] - rho. Here all
// BC dot products run in parallel while the pixel streams in, one band per
// cycle, so a pixel costs n_bands cycles instead of BC*n_bands (the parallel
// lanes are this design's choice). The weight table w (B_MAX x BC) and the
// biases rho are loaded through the configuration port before use
// (cfg_sel = CFG_W: addr = classifier*B_MAX + band; CFG_RHO: addr =
// classifier).
//
// Interface: s_valid/s_ready/s_data carry Q0.16 samples, band 0 first;
// after the last band of a pixel o_valid rises with o_dec[] (Q15.32) and
// stays until o_ready; no new sample is taken meanwhile. n_bands is sampled
// on 'start'.
module svm_decision
  import hsi_pkg::*;
#(
  parameter int B_MAX = 128,
  parameter int C     = 4,                 // classes (Table 6.3)
  localparam int BC   = C * (C - 1) / 2,   // binary classifiers (6 for C = 4)
  localparam int BW   = $clog2(B_MAX + 1),
  localparam int AW   = $clog2(B_MAX),
  localparam int PW   = $clog2(BC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  svm_cfg_e      cfg_sel,
  input  logic [15:0]   cfg_addr,
  input  fx_t           cfg_data,
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  input  logic          s_valid,
  output logic          s_ready,
  input  pix_t          s_data,
  output logic          o_valid,
  input  logic          o_ready,
  output fx_t           o_dec [BC]
);
  fx_t w_mem [B_MAX][BC];
  fx_t rho   [BC];

  logic [BW-1:0] nb_q;
  logic [AW-1:0] b_q;
  logic signed [FX_W+PIX_W+8:0] acc [BC];   // Q.48

  assign s_ready = !o_valid;

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CFG_W)
      w_mem[AW'(cfg_addr % 16'(B_MAX))][PW'(cfg_addr / 16'(B_MAX))] <= cfg_data;
    if (cfg_we && cfg_sel == CFG_RHO)
      rho[PW'(cfg_addr)] <= cfg_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb_q <= '0; b_q <= '0; o_valid <= 1'b0;
      for (int c = 0; c < BC; c++) begin acc[c] <= '0; o_dec[c] <= '0; end
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (start) begin
        nb_q <= n_bands; b_q <= '0;
        for (int c = 0; c < BC; c++) acc[c] <= '0;
      end else if (s_valid && s_ready) begin
        for (int c = 0; c < BC; c++) begin
          if (BW'(b_q) == nb_q - 1'b1) begin
            o_dec[c] <= fx_t'((acc[c] + $signed({1'b0, s_data}) * w_mem[b_q][c]) >>> PIX_W) - rho[c];
            acc[c]   <= '0;
          end else
            acc[c] <= acc[c] + $signed({1'b0, s_data}) * w_mem[b_q][c];
        end
        if (BW'(b_q) == nb_q - 1'b1) begin
          b_q <= '0; o_valid <= 1'b1;
        end else b_q <= b_q + 1'b1;
      end
    end
  end
endmodule
