// tb_knn_kselect: streams windows of candidate distances (many ties and
// zeros, and windows with fewer than K non-zero entries) into the neighbour
// list and compares the kept set with the document's search, which makes K
// passes over the window taking the next larger non-zero distance and all
// of its ties in scan order.
module tb_knn_kselect;
  import hsi_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 6, DW = 20, IW = 8, KW = $clog2(K + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, in_valid = 0;
  logic [DW-1:0] in_dist = '0, nb_dist [K];
  logic [IW-1:0] in_idx = '0, nb_idx [K];
  logic [KW-1:0] count;
  knn_kselect #(.K(K), .DW(DW), .IW(IW)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_dist, .in_idx, .count, .nb_idx, .nb_dist
  );

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic window(input int len, input int range);
    real d[];
    int nb[], cnt, hits;
    d = new[len];
    for (int x = 0; x < len; x++) d[x] = $urandom_range(range);
    clear <= 1; @(posedge clk); clear <= 0;
    for (int x = 0; x < len; x++) begin
      in_valid <= 1; in_dist <= DW'(int'(d[x])); in_idx <= IW'(x); @(posedge clk);
    end
    in_valid <= 0; @(posedge clk);
    kpass_ref(d, len, K, nb, cnt);
    checks++;
    if (int'(count) != cnt) begin failures++; $display("count %0d vs %0d", count, cnt); end
    // same set of neighbours
    for (int a = 0; a < cnt; a++) begin
      hits = 0;
      for (int e = 0; e < int'(count) && e < K; e++) if (int'(nb_idx[e]) == nb[a]) hits++;
      checks++;
      if (hits != 1) begin failures++; $display("neighbour %0d (dist %0d) kept %0d times", nb[a], int'(d[nb[a]]), hits); end
    end
    // list sorted
    for (int e = 1; e < int'(count); e++) begin
      checks++;
      if (nb_dist[e] < nb_dist[e-1]) begin failures++; $display("list not sorted at %0d", e); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    window(30, 8);       // heavy ties and zeros
    window(40, 3);
    window(5, 4);        // fewer than K candidates
    window(12, 0);       // all zero: nothing kept
    for (int t = 0; t < 30; t++) window(10 + $urandom_range(50), 2 + $urandom_range(60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
