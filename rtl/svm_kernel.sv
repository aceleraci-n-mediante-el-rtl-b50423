// svm_kernel: the SVM stage of the classifier - per-pixel class
// probabilities from a one-vs-one linear SVM with Platt scaling.
//
// For every pixel, in the order of the document's final SVM: the BC binary
// decision values (svm_decision, computed while the pixel streams in), the
// sigmoid probability of each pair (svm_sigmoid, r[b][k] = sigma and
// r[k][b] = 1 - sigma for pairs b < k in row order), pairwise coupling into
// C class probabilities (svm_coupling), the decision (the class of highest
// probability, first one on a tie) and the output ordered by class label
// (result[label[b]-1] = p[b]). The decision unit is released as soon as
// the sigmoids are done, so the next pixel streams in while the current one
// is coupled (an overlap this design adds).
//
// Model tables (w, rho, probA, probB, labels 1..C) are written through
// cfg_*; labels reset to 1..C. Interface: pulse 'start' with n_bands and
// n_pixels, then stream the image (band 0 first); each pixel leaves on
// o_valid with o_idx, o_prob[] (Q1.15, in label order) and o_class (the
// label decided); 'done' pulses after the last pixel.
module svm_kernel
  import hsi_pkg::*;
#(
  parameter int B_MAX = 128,
  parameter int N_MAX = 219232,
  parameter int C     = 4,
  localparam int BC   = C * (C - 1) / 2,
  localparam int BW   = $clog2(B_MAX + 1),
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int CW   = $clog2(C + 1),
  localparam int PW   = $clog2(BC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  svm_cfg_e      cfg_sel,
  input  logic [15:0]   cfg_addr,
  input  fx_t           cfg_data,
  input  logic          start,
  input  logic [BW-1:0] n_bands,
  input  logic [NW-1:0] n_pixels,
  input  logic          s_valid,
  output logic          s_ready,
  input  pix_t          s_data,
  output logic          o_valid,
  output logic [NW-1:0] o_idx,
  output prob_t         o_prob [C],
  output label_t        o_class,
  output logic          done
);
  fx_t    prob_a [BC];
  fx_t    prob_b [BC];
  label_t label  [C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < C; c++) label[c] <= label_t'(c + 1);
    end else if (cfg_we && cfg_sel == CFG_LABEL) label[cfg_addr] <= label_t'(cfg_data);
  end
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CFG_PROBA) prob_a[cfg_addr] <= cfg_data;
    if (cfg_we && cfg_sel == CFG_PROBB) prob_b[cfg_addr] <= cfg_data;
  end

  // ---- decision values --------------------------------------------------
  logic dec_valid, dec_ready, run_q;
  fx_t  dec [BC];
  logic dec_s_ready;
  svm_decision #(.B_MAX(B_MAX), .C(C)) u_dec (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .start, .n_bands, .s_valid(s_valid && run_q), .s_ready(dec_s_ready), .s_data,
    .o_valid(dec_valid), .o_ready(dec_ready), .o_dec(dec)
  );
  assign s_ready = dec_s_ready && run_q;

  // ---- sigmoid of each pair --------------------------------------------
  typedef enum logic [1:0] {P_IDLE, P_SIG, P_WAIT} pstate_e;
  pstate_e pst;
  logic [PW-1:0] cls_q;
  logic [CW-1:0] pb_q, pk_q;              // pair (b, k) of classifier cls_q
  logic          sig_start, sig_done;
  fx_t           sigma;
  fx_t           r_q [C][C];
  logic          r_full_q;                // r_q holds a pixel not yet coupled
  logic [NW-1:0] sig_pix_q;

  svm_sigmoid u_sig (
    .clk, .rst_n, .start(sig_start), .dec(dec[cls_q]), .prob_a(prob_a[cls_q]),
    .prob_b(prob_b[cls_q]), .done(sig_done), .sigma
  );

  // ---- coupling, decision and ordering ---------------------------------
  logic       cp_start, cp_done, cp_busy;
  fx_t        p [C];
  logic [7:0] cp_iters;
  logic [NW-1:0] cp_pix_q, out_cnt_q, np_q;
  svm_coupling #(.C(C)) u_cp (
    .clk, .rst_n, .start(cp_start), .r(r_q), .done(cp_done), .p, .iterations(cp_iters)
  );

  assign dec_ready = (pst == P_WAIT) && sig_done && (cls_q == PW'(BC - 1));

  logic [CW-1:0] best;
  always_comb begin
    best = '0;
    for (int c = 1; c < C; c++) if (p[c] > p[best]) best = CW'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_IDLE; cls_q <= '0; pb_q <= '0; pk_q <= '0; sig_start <= 1'b0;
      r_full_q <= 1'b0; sig_pix_q <= '0; cp_start <= 1'b0; cp_busy <= 1'b0; cp_pix_q <= '0;
      out_cnt_q <= '0; np_q <= '0; run_q <= 1'b0;
      o_valid <= 1'b0; o_idx <= '0; o_class <= '0; done <= 1'b0;
      for (int a = 0; a < C; a++) begin
        o_prob[a] <= '0;
        for (int b = 0; b < C; b++) r_q[a][b] <= '0;
      end
    end else begin
      sig_start <= 1'b0; cp_start <= 1'b0; o_valid <= 1'b0; done <= 1'b0;
      if (start) begin
        run_q <= 1'b1; np_q <= n_pixels; out_cnt_q <= '0; sig_pix_q <= '0;
      end
      // sigmoid sequencer
      unique case (pst)
        P_IDLE: if (dec_valid && !r_full_q) begin
          cls_q <= '0; pb_q <= '0; pk_q <= CW'(1); sig_start <= 1'b1; pst <= P_WAIT;
        end
        P_WAIT: if (sig_done) begin
          r_q[pb_q][pk_q] <= sigma;
          r_q[pk_q][pb_q] <= FX_ONE - sigma;
          if (cls_q == PW'(BC - 1)) begin
            r_full_q <= 1'b1; pst <= P_IDLE;
          end else begin
            cls_q <= cls_q + 1'b1;
            if (pk_q == CW'(C - 1)) begin pb_q <= pb_q + 1'b1; pk_q <= pb_q + 2'd2; end
            else pk_q <= pk_q + 1'b1;
            pst <= P_SIG;
          end
        end
        P_SIG: begin sig_start <= 1'b1; pst <= P_WAIT; end
        default: pst <= P_IDLE;
      endcase
      // coupling launcher
      if (r_full_q && !cp_busy) begin
        cp_start <= 1'b1; cp_busy <= 1'b1; r_full_q <= 1'b0;
        cp_pix_q <= sig_pix_q; sig_pix_q <= sig_pix_q + 1'b1;
      end
      if (cp_done) begin
        cp_busy <= 1'b0;
        o_valid <= 1'b1;
        o_idx   <= cp_pix_q;
        for (int c = 0; c < C; c++) o_prob[CW'(label[c] - 1'b1)] <= fx_to_prob(p[c]);
        o_class <= label[best];
        out_cnt_q <= out_cnt_q + 1'b1;
        if (out_cnt_q + 1'b1 == np_q) begin done <= 1'b1; run_q <= 1'b0; end
      end
    end
  end
endmodule
