// premultiplier: first step of the chirp z-transform, y(n) = x(n) * W^(n^2/2).
//
// Four 8 x 8 two's complement multipliers form the products of the buffer
// word (xr, xi) with the chirp (c, s); two add/subtract units combine them:
//     re = (xr*c >>> 7) - (xi*s >>> 7)        (A - B)
//     im = (xr*s >>> 7) + (xi*c >>> 7)        (A + B)
// With s holding -sin this is multiplication by exp(-i*pi*n^2/N). Each
// product keeps its sign and upper bits (product / 128, rounded towards
// minus infinity), so each term lies in -127..127 and the 9-bit results
// (bits 8..0) cannot overflow.
//
// Timing: the multiplier registers load on the premultiplier clock (phase
// S7) from the buffer data and chirp that are stable during the
// microsecond; the sums are registered on the output clock (phase S0 of the
// next microsecond) and feed the DACs for a whole microsecond. `out_valid`
// travels with the data. Four multipliers, two ALUs, A - B for the real
// and A + B for the imaginary part and the 9-bit output follow the
// original; which product bits are kept is this design's choice.
module premultiplier
  import sa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        phase,
  input  cplx8_t            x,
  input  logic              in_valid,
  input  logic signed [7:0] chirp_cos,
  input  logic signed [7:0] chirp_sin,
  output cplx9_t            y,
  output logic              out_valid
);

  logic signed [15:0] p_rc, p_is, p_rs, p_ic;
  logic               p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_rc <= '0; p_is <= '0; p_rs <= '0; p_ic <= '0; p_valid <= 1'b0;
      y <= '0; out_valid <= 1'b0;
    end else begin
      if (phase == PH_PRE_MUL) begin
        p_rc    <= x.re * chirp_cos;
        p_is    <= x.im * chirp_sin;
        p_rs    <= x.re * chirp_sin;
        p_ic    <= x.im * chirp_cos;
        p_valid <= in_valid;
      end
      if (phase == PH_PRE_OUT) begin
        y.re      <= PRE_W'(p_rc >>> 7) - PRE_W'(p_is >>> 7);
        y.im      <= PRE_W'(p_rs >>> 7) + PRE_W'(p_ic >>> 7);
        out_valid <= p_valid;
      end
    end
  end

endmodule
