// fx_sqrt: sequential integer square root, root = floor(sqrt(rad)).
//
// Digit-by-digit (restoring) method, one result bit per cycle: W cycles
// after 'start', a one-cycle 'done' pulse with 'root' valid. With a radicand
// in Q.2F the root is in Q.F, which is how the PCA power iteration gets the
// Euclidean norm of its vector from a sum of squares. The radicand is
// sampled on the 'start' cycle. The structure is this design's choice.
module fx_sqrt #(
  parameter int W = 48
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] rad,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   root
);
  localparam int CW = $clog2(W + 1);

  logic [2*W-1:0] x_q;       // radicand bits not yet consumed
  logic [W:0]     rem_q;     // partial remainder (at most 2*root)
  logic [W-1:0]   r_q;       // partial root
  logic [CW-1:0]  cnt_q;

  // The remainder never exceeds 2*root, so W+1 bits hold it; the shifted
  // remainder and the trial value need W+3.
  logic [W+2:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem_q[W:0], x_q[2*W-1 -: 2]};
    trial  = {1'b0, r_q, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; rem_q <= '0; r_q <= '0; cnt_q <= '0;
      busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q <= rad; rem_q <= '0; r_q <= '0; cnt_q <= CW'(W); busy <= 1'b1;
      end else if (busy) begin
        if (cnt_q != '0) begin
          x_q <= x_q << 2;
          if (rem_sh >= trial) begin
            rem_q <= (W+1)'(rem_sh - trial);
            r_q   <= {r_q[W-2:0], 1'b1};
          end else begin
            rem_q <= (W+1)'(rem_sh);
            r_q   <= {r_q[W-2:0], 1'b0};
          end
          cnt_q <= cnt_q - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= r_q;
        end
      end
    end
  end
endmodule
