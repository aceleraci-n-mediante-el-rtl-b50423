// pca_power: dominant eigenvector and eigenvalue of the covariance matrix by
// the power method, as in the document's final PCA (step 3).
//
// Starting from x = 0.1 in every band, each iteration computes v = VM*x
// (one multiply-accumulate per cycle, VM read through a registered port),
// then in one pass x.v, x.x and v.v. The eigenvalue is the Rayleigh quotient
// (x.v)/(x.x); the new x is v scaled to unit length (square root of v.v, one
// reciprocal, one multiply per band). The loop stops when the eigenvalue
// changes by less than 1e-6 between iterations or after 100 iterations,
// the document's two limits. Normalising x to unit length each iteration is
// this design's choice (the pseudocode leaves the scaling out); it keeps the
// fixed-point values in range and gives a unit eigenvector for projection.
//
// Interface: pulse 'start' with n_bands valid and VM ready in the source;
// 'done' pulses with eigval, iterations and the eigenvector (read through
// ev_rd_addr/ev_rd_data, combinational) valid until the next start.
// Cycles per iteration: about n_bands^2 + 2*n_bands + 2*80 + 48.
module pca_power
  import hsi_pkg::*;
#(
  parameter int B_MAX    = 128,
  parameter int MAX_ITER = PCA_MAX_ITER,
  localparam int BW = $clog2(B_MAX + 1),
  localparam int AW = $clog2(B_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  output logic [AW-1:0] cov_rd_j,
  output logic [AW-1:0] cov_rd_k,
  input  fx_t           cov_rd_data,        // VM[j][k], one cycle after the address
  output logic          done,
  output fx_t           eigval,
  output logic [7:0]    iterations,
  output logic          converged,
  input  logic [AW-1:0] ev_rd_addr,
  output fx_t           ev_rd_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_MV, S_MV_TAIL, S_DOTS, S_RQ, S_SQRT, S_INV, S_NORM, S_CHECK, S_DONE
  } state_e;
  state_e state;

  fx_t x [B_MAX];
  fx_t v [B_MAX];

  logic [BW-1:0] nb_q;
  logic [AW-1:0] j_q, k_q, kd_q;
  logic          mv_vld_q, mv_last_k_q;       // data of the previous address
  logic [AW-1:0] jd_q;
  logic signed [2*FX_W+7:0] acc_q;            // row accumulator, Q.64
  logic signed [2*FX_W+7:0] xv_q, xx_q;
  logic [2*FX_W+7:0]        vv_q;
  fx_t           lambda_prev_q, lambda_q, inv_q;
  logic [7:0]    iter_q;

  assign ev_rd_data = x[ev_rd_addr];
  assign cov_rd_j   = j_q;
  assign cov_rd_k   = k_q;

  // shared divider: Rayleigh quotient, then 1/||v||
  logic div_start, div_busy, div_done;
  fx_t  div_num, div_den, div_quo;
  fx_div #(.W(FX_W), .F(FX_F)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  logic sq_start, sq_busy, sq_done;
  logic [FX_W-1:0] sq_root;
  fx_sqrt #(.W(FX_W)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .rad(vv_q[2*FX_W-1:0] | {(2*FX_W){|vv_q[2*FX_W+7:2*FX_W]}}),
    .busy(sq_busy), .done(sq_done), .root(sq_root)
  );

  logic last_k, last_j;
  assign last_k = (BW'(k_q) == nb_q - 1'b1);
  assign last_j = (BW'(j_q) == nb_q - 1'b1);

  fx_t dlam;
  assign dlam = (lambda_q >= lambda_prev_q) ? lambda_q - lambda_prev_q : lambda_prev_q - lambda_q;

  logic signed [2*FX_W+7:0] acc_next;
  assign acc_next = acc_q + (2*FX_W+8)'(fx_mul_full(cov_rd_data, x[kd_q]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; div_start <= 1'b0; sq_start <= 1'b0;
      nb_q <= '0; j_q <= '0; k_q <= '0; kd_q <= '0; jd_q <= '0;
      mv_vld_q <= 1'b0; mv_last_k_q <= 1'b0; acc_q <= '0;
      xv_q <= '0; xx_q <= '0; vv_q <= '0; lambda_prev_q <= '0; lambda_q <= '0;
      inv_q <= '0; iter_q <= '0; eigval <= '0; iterations <= '0; converged <= 1'b0;
      div_num <= '0; div_den <= '0;
    end else begin
      done <= 1'b0; div_start <= 1'b0; sq_start <= 1'b0;
      // pipelined matrix-vector product: address in cycle t, data in t+1
      if (mv_vld_q) begin
        if (mv_last_k_q) begin
          v[jd_q] <= fx_t'(acc_next >>> FX_F);
          acc_q   <= '0;
        end else acc_q <= acc_next;
      end
      mv_vld_q <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nb_q <= n_bands;
          for (int b = 0; b < B_MAX; b++) x[b] <= PCA_X0;
          iter_q <= '0; lambda_prev_q <= '0; converged <= 1'b0;
          j_q <= '0; k_q <= '0; acc_q <= '0; state <= S_MV;
        end
        S_MV: begin
          mv_vld_q <= 1'b1; kd_q <= k_q; jd_q <= j_q; mv_last_k_q <= last_k;
          if (last_k) begin
            k_q <= '0;
            if (last_j) state <= S_MV_TAIL;
            else j_q <= j_q + 1'b1;
          end else k_q <= k_q + 1'b1;
        end
        S_MV_TAIL: if (!mv_vld_q) begin      // last row has been written
          j_q <= '0; xv_q <= '0; xx_q <= '0; vv_q <= '0; state <= S_DOTS;
        end
        S_DOTS: begin
          xv_q <= xv_q + (2*FX_W+8)'(fx_mul_full(x[j_q], v[j_q]));
          xx_q <= xx_q + (2*FX_W+8)'(fx_mul_full(x[j_q], x[j_q]));
          vv_q <= vv_q + (2*FX_W+8)'($unsigned(fx_mul_full(v[j_q], v[j_q])));
          if (last_j) begin
            state <= S_RQ; div_start <= 1'b1;
            div_num <= fx_t'((xv_q + (2*FX_W+8)'(fx_mul_full(x[j_q], v[j_q]))) >>> FX_F);
            div_den <= fx_t'((xx_q + (2*FX_W+8)'(fx_mul_full(x[j_q], x[j_q]))) >>> FX_F);
          end else j_q <= j_q + 1'b1;
        end
        S_RQ: if (div_done) begin
          lambda_q <= div_quo; sq_start <= 1'b1; state <= S_SQRT;
        end
        S_SQRT: if (sq_done) begin
          div_num <= FX_ONE; div_den <= fx_t'(sq_root); div_start <= 1'b1; state <= S_INV;
        end
        S_INV: if (div_done) begin
          inv_q <= div_quo; j_q <= '0; state <= S_NORM;
        end
        S_NORM: begin
          x[j_q] <= fx_mul(v[j_q], inv_q);
          if (last_j) begin
            j_q <= '0; iter_q <= iter_q + 1'b1; state <= S_CHECK;
          end else j_q <= j_q + 1'b1;
        end
        S_CHECK: begin
          lambda_prev_q <= lambda_q;
          if (iter_q > 8'd1 && dlam < PCA_EPS) begin
            converged <= 1'b1; state <= S_DONE;
          end else if (iter_q == 8'(MAX_ITER)) state <= S_DONE;
          else begin
            k_q <= '0; acc_q <= '0; state <= S_MV;
          end
        end
        S_DONE: begin
          eigval <= lambda_q; iterations <= iter_q; done <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
