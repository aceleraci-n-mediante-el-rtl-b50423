// tb_svm_coupling: random pairwise probabilities r[i][j] = 1 - r[j][i] for
// C = 4 classes go through the coupling iteration; the class probabilities
// are compared with a double-precision model of the same iteration
// (threshold 0.005/C, at most 100 iterations), and must sum to one. Also
// checks that iterations happen and that a consistent input (r made from a
// known p) gives that p back.
module tb_svm_coupling;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int C = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, iter_seen = 0;

  logic start = 0, done;
  fx_t r [C][C], p [C];
  logic [7:0] iterations;
  svm_coupling #(.C(C)) dut (.clk, .rst_n, .start, .r, .done, .p, .iterations);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input real rr[]);
    real pr[], sum;
    for (int a = 0; a < C; a++) for (int b = 0; b < C; b++) r[a][b] = r2fx(rr[a*C+b]);
    for (int a = 0; a < C; a++) for (int b = 0; b < C; b++) rr[a*C+b] = fx2r(r[a][b]);
    coupling_ref(rr, C, 0.005 / C, 100, pr);
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    if (iterations > 0) iter_seen++;
    sum = 0;
    for (int a = 0; a < C; a++) begin
      checks++; sum += fx2r(p[a]);
      if (absr(fx2r(p[a]) - pr[a]) > 2e-3) begin
        failures++; $display("p[%0d] %f vs %f (iter %0d)", a, fx2r(p[a]), pr[a], iterations);
      end
    end
    checks++;
    if (absr(sum - 1.0) > 1e-3) begin failures++; $display("sum %f", sum); end
  endtask

  initial begin
    real rr[], pt[4];
    rr = new[C*C];
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // consistent input: r_ij = p_i / (p_i + p_j)
    pt = '{0.5, 0.25, 0.15, 0.1};
    for (int a = 0; a < C; a++) for (int b = 0; b < C; b++)
      rr[a*C+b] = (a == b) ? 0.0 : pt[a] / (pt[a] + pt[b]);
    run(rr);
    for (int a = 0; a < C; a++) begin
      checks++;
      if (absr(fx2r(p[a]) - pt[a]) > 5e-3) begin failures++; $display("consistent p[%0d] %f", a, fx2r(p[a])); end
    end
    for (int t = 0; t < 40; t++) begin
      for (int a = 0; a < C; a++) begin
        rr[a*C+a] = 0.0;
        for (int b = a + 1; b < C; b++) begin
          rr[a*C+b] = ($urandom_range(900) + 50) / 1000.0;
          rr[b*C+a] = 1.0 - rr[a*C+b];
        end
      end
      run(rr);
    end
    checks++;
    if (iter_seen == 0) begin failures++; $display("no run needed an iteration"); end
    $display("coupling runs with iterations: %0d", iter_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
