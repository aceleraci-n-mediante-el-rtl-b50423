// tb_svm_sigmoid: drives decision values with slopes A and offsets B over a
// wide range (both signs of f = dec*A + B, small and saturating magnitudes)
// and checks the probability 1/(1+exp(f)) against a double-precision
// reference, plus the fixed latency of every conversion.
module tb_svm_sigmoid;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, done;
  fx_t dec = '0, pa = '0, pb = '0, sigma;
  svm_sigmoid dut (.clk, .rst_n, .start, .dec, .prob_a(pa), .prob_b(pb), .done, .sigma);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input real d, input real a, input real b);
    real want, got;
    int lat;
    dec <= r2fx(d); pa <= r2fx(a); pb <= r2fx(b); start <= 1;
    @(posedge clk); start <= 0; lat = 0;
    while (!done) begin @(posedge clk); lat++; end
    want = sigmoid_ref(fx2r(r2fx(d)), fx2r(r2fx(a)), fx2r(r2fx(b)));
    got  = fx2r(sigma);
    checks++;
    if (absr(got - want) > 2e-5) begin
      failures++; $display("dec %f A %f B %f: %f vs %f", d, a, b, got, want);
    end
    checks++;
    if (lat > 120) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    one(0.0, -1.0, 0.0);          // f = 0 -> 0.5
    one(1.0, -2.0, 0.1);
    one(-1.0, -2.0, 0.1);
    one(3.0, -5.0, -0.3);         // f << 0 -> close to 1
    one(-3.0, -5.0, -0.3);        // f >> 0 -> close to 0
    one(20.0, -4.0, 0.0);         // exp saturates on the small side
    one(-20.0, -4.0, 0.0);
    for (int t = 0; t < 60; t++)
      one(srnd(2000) / 500.0, -(srnd(1500) + 1600) / 1000.0,
          srnd(1000) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
