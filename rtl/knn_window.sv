// knn_window: bounds of the KNN search window of a query pixel.
//
// Pixels are numbered in raster order. The window of query pixel i covers
// the pixel numbers [w_inf, w_sup) with w_inf = max(0, i - SW) and
// w_sup = min(N, i + SW), SW = W/2. This is the closed form of the
// document's window updates: for the first SW pixels only the upper bound
// grows (top window), in the middle both bounds advance together (constant
// window of W pixels), and for the last SW pixels only the lower bound
// advances (bottom window). 'region' says which of the three the pixel is
// in; the document runs each region as its own kernel, this design reports
// it so one datapath serves all three. If the image is shorter than W the
// top region takes precedence. Purely combinational.
module knn_window
  import hsi_pkg::*;
#(
  parameter int N_MAX = 219232,
  localparam int NW = $clog2(N_MAX + 1)
) (
  input  logic [NW-1:0] i_pix,       // query pixel number
  input  logic [NW-1:0] n_pixels,    // N
  input  logic [NW-1:0] half_w,      // SW = W/2
  output logic [NW-1:0] w_inf,
  output logic [NW-1:0] w_sup,
  output knn_region_e   region
);
  logic [NW:0] hi;
  always_comb begin
    w_inf = (i_pix >= half_w) ? i_pix - half_w : '0;
    hi    = {1'b0, i_pix} + {1'b0, half_w};
    w_sup = (hi >= {1'b0, n_pixels}) ? n_pixels : hi[NW-1:0];
    if (i_pix < half_w)                                   region = REG_TOP;
    else if ({1'b0, i_pix} + {1'b0, half_w} >= {1'b0, n_pixels}) region = REG_BOT;
    else                                                  region = REG_CONST;
  end
endmodule
