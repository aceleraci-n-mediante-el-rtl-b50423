// tb_knn_window: walks every pixel of several image sizes and half-widths
// and compares the window bounds and region with an incremental model of
// the window: the upper bound grows by one per pixel until it reaches the
// image end, the lower bound starts moving once the query is more than SW
// pixels in. Sizes include images shorter than a full window.
module tb_knn_window;
  import hsi_pkg::*;
  localparam int N_MAX = 200;
  localparam int NW = $clog2(N_MAX + 1);
  int checks = 0, failures = 0;
  int seen [3];

  logic [NW-1:0] i_pix, n_pixels, half_w, w_inf, w_sup;
  knn_region_e region;
  knn_window #(.N_MAX(N_MAX)) dut (.i_pix, .n_pixels, .half_w, .w_inf, .w_sup, .region);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic walk(input int n, input int sw);
    int lo, hi;
    knn_region_e want;
    lo = 0; hi = (sw < n) ? sw : n;
    for (int i = 0; i < n; i++) begin
      if (i > 0) begin
        if (i > sw) lo++;
        if (hi < n) hi++;
      end
      if (i < sw) want = REG_TOP;
      else if (i + sw >= n) want = REG_BOT;
      else want = REG_CONST;
      i_pix = NW'(i); n_pixels = NW'(n); half_w = NW'(sw);
      #1;
      checks++;
      if (int'(w_inf) != lo || int'(w_sup) != hi || region != want) begin
        failures++;
        $display("n %0d sw %0d i %0d: [%0d,%0d) %s vs [%0d,%0d) %s", n, sw, i, w_inf, w_sup,
                 region.name(), lo, hi, want.name());
      end
      seen[region]++;
    end
  endtask

  initial begin
    walk(200, 10);
    walk(57, 5);
    walk(31, 15);
    walk(20, 16);    // shorter than a window
    walk(1, 3);
    walk(150, 1);
    checks++;
    if (seen[REG_TOP] == 0 || seen[REG_CONST] == 0 || seen[REG_BOT] == 0) begin
      failures++; $display("a region never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
