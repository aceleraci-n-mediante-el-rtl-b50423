// svm_sigmoid: Platt probability of one binary SVM classifier.
//
// As in the document, f = dec*probA + probB and the probability of the
// first class of the pair is sigma = 1/(1+exp(f)), evaluated in the stable
// split form: with e = exp(-|f|), sigma = e/(1+e) for f >= 0 and 1/(1+e)
// for f < 0. exp(-|f|) is computed as 2^-(|f|*log2 e): the integer part is
// a right shift and the fraction comes from a 33-entry table of 2^-(i/32),
// linearly interpolated (relative error below 6e-5). The table and the
// interpolation are this design's choice; the document uses exp() of the
// host math library. One fx_div division of 80 cycles forms 1/(1+e).
//
// Interface: pulse 'start' with dec/prob_a/prob_b (Q15.32); about 84
// cycles later 'done' pulses with 'sigma' (Q15.32, in [0, 1]).
module svm_sigmoid
  import hsi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  dec,
  input  fx_t  prob_a,
  input  fx_t  prob_b,
  output logic done,
  output fx_t  sigma
);
  // 2^-(i/32) in Q0.32, i = 0..32: round(2^(32 - i/32))
  localparam logic [32:0] EXP2_TAB [33] = '{
    33'd4294967296, 33'd4202935003, 33'd4112874773, 33'd4024744348, 33'd3938502376,
    33'd3854108391, 33'd3771522796, 33'd3690706840, 33'd3611622603, 33'd3534232978,
    33'd3458501653, 33'd3384393094, 33'd3311872529, 33'd3240905930, 33'd3171459999,
    33'd3103502151, 33'd3037000500, 33'd2971923842, 33'd2908241642, 33'd2845924021,
    33'd2784941738, 33'd2725266179, 33'd2666869345, 33'd2609723834, 33'd2553802834,
    33'd2499080105, 33'd2445529972, 33'd2393127307, 33'd2341847524, 33'd2291666561,
    33'd2242560872, 33'd2194507417, 33'd2147483648 };
  localparam logic [33:0] LOG2E_Q32 = 34'd6196328019;   // round(log2(e) * 2^32)

  typedef enum logic [1:0] {S_IDLE, S_EXP, S_DIV} state_e;
  state_e state;

  fx_t  f_q;
  logic neg_q;                          // f < 0

  // exp(-|f|) from f_q
  logic [FX_W-1:0]  t_abs;
  logic [FX_W+33:0] y;                  // |f| * log2(e), Q.64
  logic [FX_W-1:0]  y_int;
  logic [31:0]      y_frac;
  logic [4:0]       idx;
  logic [32:0]      t0, t1;
  logic [59:0]      dlt;
  logic [32:0]      e_frac;
  fx_t              e_val;
  always_comb begin
    t_abs  = f_q[FX_W-1] ? FX_W'(-f_q) : FX_W'(f_q);
    y      = (FX_W+34)'(t_abs) * (FX_W+34)'(LOG2E_Q32);
    y_int  = FX_W'(y >> 64);
    y_frac = y[63:32];
    idx    = y_frac[31:27];
    t0     = EXP2_TAB[{1'b0, idx}];
    t1     = EXP2_TAB[6'(idx) + 6'd1];
    dlt    = 60'(t0 - t1) * 60'(y_frac[26:0]);
    e_frac = t0 - 33'(dlt >> 27);
    e_val  = (y_int >= FX_W'(40)) ? '0 : fx_t'({15'd0, e_frac} >> y_int);
  end

  logic div_start, div_busy, div_done;
  fx_t  div_den, div_quo;
  fx_div #(.W(FX_W), .F(FX_F)) u_div (
    .clk, .rst_n, .start(div_start), .num(FX_ONE), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; f_q <= '0; neg_q <= 1'b0; div_start <= 1'b0; div_den <= FX_ONE;
      done <= 1'b0; sigma <= '0;
    end else begin
      done <= 1'b0; div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f_q   <= fx_mul(dec, prob_a) + prob_b;
          state <= S_EXP;
        end
        S_EXP: begin
          neg_q     <= f_q[FX_W-1];
          div_den   <= FX_ONE + e_val;
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV: if (div_done) begin
          sigma <= neg_q ? div_quo : FX_ONE - div_quo;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
