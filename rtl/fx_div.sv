// fx_div: sequential signed fixed-point divider, quo = (num << F) / den.
//
// Restoring division on the magnitudes, one quotient bit per cycle, so a
// division takes W+F cycles after 'start' and is followed by a one-cycle
// 'done' pulse with 'quo' valid (held until the next start). The quotient is
// truncated toward zero and saturated to the W-bit signed range; a zero
// divisor returns the saturated value with the sign of the numerator.
// Inputs are sampled on the 'start' cycle. This helper is shared by the PCA
// and SVM kernels (mean reciprocal, Rayleigh quotient, sigmoid, coupling);
// the sequential radix-2 structure is a choice of this design.
module fx_div #(
  parameter int W = 48,
  parameter int F = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quo
);
  localparam int NW = W + F;               // numerator magnitude bits
  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] n_q;                      // remaining numerator bits / quotient
  logic [W:0]    rem_q;                    // partial remainder
  logic [W-1:0]  d_q;                      // divisor magnitude
  logic          neg_q, dz_q;
  logic [CW-1:0] cnt_q;

  logic [W:0]    rem_sh;
  logic [W:0]    rem_sub;
  always_comb begin
    rem_sh  = {rem_q[W-1:0], n_q[NW-1]};
    rem_sub = rem_sh - {1'b0, d_q};
  end

  // saturated, signed result from the magnitude quotient
  logic [NW-1:0] qmag;
  logic          ovf;
  assign qmag = n_q;
  assign ovf  = |qmag[NW-1:W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q   <= '0;
      rem_q <= '0;
      d_q   <= '0;
      neg_q <= 1'b0;
      dz_q  <= 1'b0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      quo   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q   <= NW'(num[W-1] ? W'(-num) : W'(num)) << F;
        d_q   <= den[W-1] ? W'(-den) : W'(den);
        neg_q <= num[W-1] ^ den[W-1];
        dz_q  <= (den == '0);
        rem_q <= '0;
        cnt_q <= CW'(NW);
        busy  <= 1'b1;
      end else if (busy) begin
        if (cnt_q != '0) begin
          if (!rem_sub[W]) begin
            rem_q <= rem_sub;
            n_q   <= {n_q[NW-2:0], 1'b1};
          end else begin
            rem_q <= rem_sh;
            n_q   <= {n_q[NW-2:0], 1'b0};
          end
          cnt_q <= cnt_q - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dz_q || ovf)
            quo <= neg_q ? {1'b1, {(W-1){1'b0}}} + 1'b1 : {1'b0, {(W-1){1'b1}}};
          else
            quo <= neg_q ? -$signed(W'(qmag)) : $signed(W'(qmag));
        end
      end
    end
  end
endmodule
