// tb_svm_decision: loads weights and biases of the C(C-1)/2 binary
// classifiers through the configuration port, streams pixels band by band
// and checks every decision value sum_b x_b*w_b - rho against a
// double-precision reference. The consumer stalls on some pixels to check
// that the input is held off while a result waits.
module tb_svm_decision;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int B_MAX = 8, C = 4, BC = 6, NB = 5, NP = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0;

  logic cfg_we = 0, start = 0, s_valid = 0, s_ready, o_valid, o_ready = 0;
  svm_cfg_e cfg_sel = CFG_W;
  logic [15:0] cfg_addr = '0;
  fx_t cfg_data = '0, o_dec [BC];
  pix_t s_data = '0;
  svm_decision #(.B_MAX(B_MAX), .C(C)) dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data, .start, .n_bands(4'(NB)),
    .s_valid, .s_ready, .s_data, .o_valid, .o_ready, .o_dec
  );
  real w [BC][NB], rho [BC], want [NP][BC];
  pix_t px [NP][NB];
  int got = 0;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cfg(input svm_cfg_e s, input int a, input fx_t d);
    cfg_we <= 1; cfg_sel <= s; cfg_addr <= 16'(a); cfg_data <= d;
    @(posedge clk);
  endtask

  // consumer: accepts after a random delay
  always @(posedge clk) begin
    o_ready <= 1'b0;
    if (o_valid && !o_ready) begin
      if ($urandom_range(2) == 0) begin
        o_ready <= 1'b1;
        for (int c = 0; c < BC; c++) begin
          checks++;
          if (absr(fx2r(o_dec[c]) - want[got][c]) > 1e-6) begin
            failures++; $display("pixel %0d cls %0d: %f vs %f", got, c, fx2r(o_dec[c]), want[got][c]);
          end
        end
        got++;
      end else stalls++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int c = 0; c < BC; c++) begin
      for (int b = 0; b < NB; b++) begin
        w[c][b] = fx2r(r2fx(srnd(10000) / 700.0));
        cfg(CFG_W, c * B_MAX + b, r2fx(w[c][b]));
      end
      rho[c] = fx2r(r2fx(srnd(1000) / 300.0));
      cfg(CFG_RHO, c, r2fx(rho[c]));
    end
    cfg_we <= 0;
    for (int p = 0; p < NP; p++) for (int c = 0; c < BC; c++) begin
      want[p][c] = -rho[c];
      for (int b = 0; b < NB; b++) begin
        if (c == 0) px[p][b] = pix_t'($urandom_range(65535));
        want[p][c] += px[p][b] / 65536.0 * w[c][b];
      end
    end
    start <= 1; @(posedge clk); start <= 0;
    for (int p = 0; p < NP; p++) for (int b = 0; b < NB; b++) begin
      s_valid <= 1; s_data <= px[p][b]; @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    s_valid <= 0;
    repeat (30) @(posedge clk);
    checks++; if (got != NP) begin failures++; $display("got %0d pixels", got); end
    checks++; if (stalls == 0) begin failures++; $display("consumer never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
