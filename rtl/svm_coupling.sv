// svm_coupling: combines the pairwise probabilities of the one-vs-one SVM
// classifiers into one probability per class (pairwise coupling), following
// the iterative method of the document's SVM kernel.
//
// From r[i][j] (probability of class i against class j) it builds
// Q[t][t] = sum_{j!=t} r[j][t]^2 and Q[t][j] = -r[j][t]*r[t][j], starts from
// p = 1/C, and iterates: Qp = Q*p, pQp = p.Qp; stop when max_t |Qp[t]-pQp|
// is below eps or after 100 iterations; otherwise, for each class t in turn,
// diff = (pQp - Qp[t]) / Q[t][t], p[t] += diff, and pQp, Qp and p are
// rescaled by 1/(1+diff). The two divisions per class go through one
// sequential divider; all C-wide vector updates take one cycle. Computing
// 1/(1+diff) once and multiplying is this design's choice (the document
// divides each term). eps = 0.005/C is this design's choice; the document
// declares it inside the kernel without giving its value.
//
// Interface: pulse 'start' with r[][] (Q15.32; diagonal ignored); 'done'
// pulses with p[] and 'iterations'. About 2*C*82 + 4 cycles per iteration.
module svm_coupling
  import hsi_pkg::*;
#(
  parameter int C        = 4,
  parameter int MAX_ITER = SVM_MAX_ITER
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  fx_t        r [C][C],
  output logic       done,
  output fx_t        p [C],
  output logic [7:0] iterations
);
  localparam fx_t P_INIT = fx_t'((64'sd1 <<< FX_F) / 64'(C));
  localparam fx_t EPS    = fx_t'(((64'sd1 <<< FX_F) / 200) / 64'(C));    // 0.005 / C
  localparam int  CW     = $clog2(C + 1);

  typedef enum logic [2:0] {S_IDLE, S_QP, S_ERR, S_DIFF, S_INV, S_UPD, S_DONE} state_e;
  state_e state;

  fx_t q   [C][C];
  fx_t qp  [C];
  fx_t pqp_q, diff_q;
  logic [CW-1:0] t_q;
  logic [7:0]    it_q;

  // Qp = Q*p and pQp = p.Qp from the current p
  fx_t qp_new [C];
  fx_t pqp_new;
  fx_t err_max;
  always_comb begin
    pqp_new = '0;
    for (int a = 0; a < C; a++) begin
      qp_new[a] = '0;
      for (int b = 0; b < C; b++) qp_new[a] = qp_new[a] + fx_mul(q[a][b], p[b]);
      pqp_new = pqp_new + fx_mul(p[a], qp_new[a]);
    end
    err_max = '0;
    for (int a = 0; a < C; a++) begin
      fx_t e;
      e = (qp[a] >= pqp_q) ? qp[a] - pqp_q : pqp_q - qp[a];
      if (e > err_max) err_max = e;
    end
  end

  // Q matrix of the pairwise probabilities
  fx_t q_init [C][C];
  always_comb begin
    for (int a = 0; a < C; a++) begin
      q_init[a][a] = '0;
      for (int b = 0; b < C; b++) begin
        if (b != a) begin
          q_init[a][a] = q_init[a][a] + fx_mul(r[b][a], r[b][a]);
          q_init[a][b] = -fx_mul(r[b][a], r[a][b]);
        end
      end
    end
  end

  logic div_start, div_busy, div_done;
  fx_t  div_num, div_den, div_quo;
  fx_div #(.W(FX_W), .F(FX_F)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; iterations <= '0; it_q <= '0; t_q <= '0;
      pqp_q <= '0; diff_q <= '0; div_start <= 1'b0; div_num <= '0; div_den <= FX_ONE;
      for (int a = 0; a < C; a++) begin
        p[a] <= '0; qp[a] <= '0;
        for (int b = 0; b < C; b++) q[a][b] <= '0;
      end
    end else begin
      done <= 1'b0; div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int a = 0; a < C; a++) begin
            p[a] <= P_INIT;
            for (int b = 0; b < C; b++) q[a][b] <= q_init[a][b];
          end
          it_q <= '0; state <= S_QP;
        end
        S_QP: begin
          for (int a = 0; a < C; a++) qp[a] <= qp_new[a];
          pqp_q <= pqp_new;
          state <= S_ERR;
        end
        S_ERR: begin
          if (err_max < EPS || it_q == 8'(MAX_ITER)) state <= S_DONE;
          else begin
            t_q <= '0;
            div_num <= pqp_q - qp[0]; div_den <= q[0][0]; div_start <= 1'b1;
            state <= S_DIFF;
          end
        end
        S_DIFF: if (div_done) begin
          diff_q <= div_quo;
          div_num <= FX_ONE; div_den <= FX_ONE + div_quo; div_start <= 1'b1;
          state <= S_INV;
        end
        S_INV: if (div_done) begin
          // div_quo = 1/(1+diff)
          pqp_q <= fx_mul(fx_mul(pqp_q + fx_mul(diff_q, fx_mul(diff_q, q[t_q][t_q]) + (qp[t_q] <<< 1)),
                                 div_quo), div_quo);
          for (int a = 0; a < C; a++) begin
            qp[a] <= fx_mul(qp[a] + fx_mul(diff_q, q[t_q][a]), div_quo);
            p[a]  <= fx_mul((CW'(a) == t_q) ? p[a] + diff_q : p[a], div_quo);
          end
          state <= S_UPD;
        end
        S_UPD: begin
          if (t_q == CW'(C - 1)) begin
            it_q <= it_q + 1'b1;
            state <= S_QP;
          end else begin
            t_q <= t_q + 1'b1;
            div_num <= pqp_q - qp[t_q + 1'b1]; div_den <= q[t_q + 1'b1][t_q + 1'b1];
            div_start <= 1'b1;
            state <= S_DIFF;
          end
        end
        S_DONE: begin done <= 1'b1; iterations <= it_q; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
