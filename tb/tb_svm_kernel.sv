// tb_svm_kernel: loads a complete one-vs-one model (weights, biases, sigmoid
// A/B, class labels in shuffled order) and streams pixels through the SVM
// stage. Each pixel's class probabilities are checked against a
// double-precision chain of decision value, sigmoid and pairwise coupling,
// placed at their label positions; the predicted class is checked where the
// reference winner is clear. Also checks pixel numbering and 'done'.
module tb_svm_kernel;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 8, N_MAX = 16, C = 4, BC = 6, NB = 5, NP = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, start = 0, s_valid = 0, s_ready, o_valid, done;
  svm_cfg_e cfg_sel = CFG_W;
  logic [15:0] cfg_addr = '0;
  fx_t cfg_data = '0;
  pix_t s_data = '0;
  logic [4:0] o_idx;
  prob_t o_prob [C];
  label_t o_class;
  svm_kernel #(.B_MAX(B_MAX), .N_MAX(N_MAX), .C(C)) dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .start, .n_bands(4'(NB)),
    .n_pixels(5'(NP)), .s_valid, .s_ready, .s_data, .o_valid, .o_idx, .o_prob, .o_class, .done
  );
  real w [BC][NB], rho [BC], pa [BC], pb [BC];
  int lab [C] = '{3, 1, 4, 2};
  real want_p [NP][C];
  int want_c [NP], clear_c [NP];
  pix_t px [NP][NB];
  int got = 0, done_seen = 0;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cfg(input svm_cfg_e s, input int a, input fx_t d);
    cfg_we <= 1; cfg_sel <= s; cfg_addr <= 16'(a); cfg_data <= d;
    @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (done) done_seen++;
    if (o_valid) begin
      checks++;
      if (int'(o_idx) != got) begin failures++; $display("idx %0d expected %0d", o_idx, got); end
      for (int c = 0; c < C; c++) begin
        checks++;
        if (absr(o_prob[c] / 32768.0 - want_p[got][c]) > 3e-3) begin
          failures++; $display("pixel %0d prob[%0d] %f vs %f", got, c, o_prob[c] / 32768.0, want_p[got][c]);
        end
      end
      if (clear_c[got]) begin
        checks++;
        if (int'(o_class) != want_c[got]) begin failures++; $display("pixel %0d class %0d vs %0d", got, o_class, want_c[got]); end
      end
      got++;
    end
  end

  initial begin
    real r[], p[], dec, best;
    int pi, pk, cls, bi;
    r = new[C*C];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int c = 0; c < BC; c++) begin
      for (int b = 0; b < NB; b++) begin
        w[c][b] = fx2r(r2fx(srnd(3000) / 1000.0));
        cfg(CFG_W, c * B_MAX + b, r2fx(w[c][b]));
      end
      rho[c] = fx2r(r2fx(srnd(1000) / 1000.0));
      pa[c]  = fx2r(r2fx(-(1.0 + $urandom_range(2000) / 1000.0)));
      pb[c]  = fx2r(r2fx(srnd(500) / 1000.0));
      cfg(CFG_RHO, c, r2fx(rho[c]));
      cfg(CFG_PROBA, c, r2fx(pa[c]));
      cfg(CFG_PROBB, c, r2fx(pb[c]));
    end
    for (int c = 0; c < C; c++) cfg(CFG_LABEL, c, fx_t'(lab[c]));
    cfg_we <= 0;
    for (int q = 0; q < NP; q++) begin
      for (int b = 0; b < NB; b++) px[q][b] = pix_t'($urandom_range(65535));
      for (int a = 0; a < C; a++) r[a*C+a] = 0.0;
      cls = 0;
      for (pi = 0; pi < C; pi++) for (pk = pi + 1; pk < C; pk++) begin
        dec = -rho[cls];
        for (int b = 0; b < NB; b++) dec += px[q][b] / 65536.0 * w[cls][b];
        r[pi*C+pk] = sigmoid_ref(dec, pa[cls], pb[cls]);
        r[pk*C+pi] = 1.0 - r[pi*C+pk];
        cls++;
      end
      coupling_ref(r, C, 0.005 / C, 100, p);
      bi = 0;
      for (int c = 0; c < C; c++) begin
        want_p[q][lab[c] - 1] = p[c];
        if (p[c] > p[bi]) bi = c;
      end
      want_c[q] = lab[bi];
      clear_c[q] = 1;
      for (int c = 0; c < C; c++) if (c != bi && p[bi] - p[c] < 0.01) clear_c[q] = 0;
    end
    start <= 1; @(posedge clk); start <= 0;
    for (int q = 0; q < NP; q++) for (int b = 0; b < NB; b++) begin
      s_valid <= 1; s_data <= px[q][b]; @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    s_valid <= 0;
    while (got < NP) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++; if (done_seen != 1) begin failures++; $display("done seen %0d times", done_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
