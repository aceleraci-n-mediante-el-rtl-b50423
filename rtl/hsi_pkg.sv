// hsi_pkg: number formats, constants and small arithmetic helpers shared by
// the hyperspectral classifier (PCA, SVM and KNN kernels).
//
// The original kernels compute in float/double. This RTL uses fixed point
// throughout, which is a choice of this design:
//   pix_t  : unsigned Q0.16 reflectance sample of one band (normalised image)
//   fx_t   : signed Q15.32 general internal value (48 bits)
//   pca_t  : signed Q15.16 first principal component of a pixel (32 bits)
//   prob_t : unsigned Q1.15 class probability, 1.0 = 16'h8000
// Constants below are the values the kernels use (power-method epsilon 1e-6,
// 100 iterations, initial vector 0.1) written in those formats.
package hsi_pkg;

  localparam int FX_W = 48;              // fx_t width
  localparam int FX_F = 32;              // fx_t fractional bits
  localparam int PIX_W = 16;             // image sample width (Q0.16)
  localparam int PCA_W = 32;             // PCA output width (Q15.16)
  localparam int PCA_F = 16;
  localparam int PROB_W = 16;            // probability width (Q1.15)
  localparam int PROB_F = 15;
  localparam int LABEL_W = 8;            // class label width

  typedef logic        [PIX_W-1:0]  pix_t;
  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [PCA_W-1:0]  pca_t;
  typedef logic        [PROB_W-1:0] prob_t;
  typedef logic        [LABEL_W-1:0] label_t;

  localparam fx_t FX_ONE  = fx_t'(64'sd1 <<< FX_F);
  localparam fx_t FX_ZERO = '0;
  localparam fx_t FX_MAX  = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN  = {1'b1, {(FX_W-1){1'b0}}};

  // Power method: x0 = 0.1 in every band, stop when the Rayleigh quotient
  // changes by less than 1e-6, at most 100 iterations.
  localparam fx_t PCA_X0      = fx_t'(64'sd429496730);   // round(0.1 * 2^32)
  localparam fx_t PCA_EPS     = fx_t'(64'sd4295);        // round(1e-6 * 2^32)
  localparam int  PCA_MAX_ITER = 100;

  // Pairwise coupling: at most 100 iterations; stopping threshold 0.005/C
  // (C = 4 gives 0.00125).
  localparam int  SVM_MAX_ITER = 100;

  // Sign-extending fixed-point multiply, result in fx_t (truncating).
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_F);
  endfunction

  // Full-precision product of two fx_t values (Q.64, 96 bits).
  function automatic logic signed [2*FX_W-1:0] fx_mul_full(input fx_t a, input fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return p;
  endfunction

  // Probability in fx_t (Q15.32) to Q1.15, clamped to [0, 1].
  function automatic prob_t fx_to_prob(input fx_t a);
    fx_t s;
    if (a <= 0) return '0;
    if (a >= FX_ONE) return prob_t'(1 << PROB_F);
    s = a >>> (FX_F - PROB_F);
    return prob_t'(s);
  endfunction

  // Region of the KNN window a query pixel falls in.
  typedef enum logic [1:0] {
    REG_TOP   = 2'd0,   // window still growing (first SW pixels)
    REG_CONST = 2'd1,   // full window of W pixels
    REG_BOT   = 2'd2    // window shrinking (last SW pixels)
  } knn_region_e;

  // Which pass over the image the top level wants from the host.
  typedef enum logic [1:0] {
    PASS_NONE    = 2'd0,
    PASS_STATS   = 2'd1,  // PCA statistics and SVM classification, in parallel
    PASS_PROJECT = 2'd2   // PCA projection
  } img_pass_e;

  // SVM model tables loaded through the configuration port.
  typedef enum logic [2:0] {
    CFG_W      = 3'd0,   // weight of classifier addr/B_MAX, band addr%B_MAX
    CFG_RHO    = 3'd1,   // bias rho of classifier addr
    CFG_PROBA  = 3'd2,   // sigmoid slope A of classifier addr
    CFG_PROBB  = 3'd3,   // sigmoid offset B of classifier addr
    CFG_LABEL  = 3'd4    // label of class addr (1..C)
  } svm_cfg_e;

endpackage
