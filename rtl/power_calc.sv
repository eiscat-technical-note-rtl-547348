// power_calc: power of one spectral point, x^2 + y^2.
//
// The two CCD outputs, digitised by 8-bit two's complement flash ADCs, are
// squared by two multipliers and the squares added. As in the original, each
// square contributes its product bits P14..P1 (P15 is always zero for a
// square and P0 is dropped), and a 16-bit adder chain gives the 15-bit power
// D14..D0:
//     power = (x*x >> 1) + (y*y >> 1),  0 .. 16384
// The eight most significant bits, D14..D7, go to a test DAC.
//
// Timing: the multiplier inputs load on phase S1 (x^2, y^2 multiplier clock)
// and the sum is registered on phase S2 (x^2, y^2 output clock); `valid`
// travels along. The power is then stable until S2 of the next microsecond.
// The bit selection follows the original schematic; the phases are this
// design's choice.
module power_calc
  import sa_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           phase,
  input  logic signed [7:0]    x,         // real part from the ADC
  input  logic signed [7:0]    y,         // imaginary part from the ADC
  input  logic                 in_valid,
  output logic [POW_W-1:0]     power,     // D14..D0
  output logic [7:0]           test_dac,  // D14..D7
  output logic                 out_valid
);

  logic [15:0]        sq_x, sq_y;
  logic               sq_valid;
  logic signed [15:0] xw, yw;

  always_comb begin
    xw = 16'(x);
    yw = 16'(y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_x <= '0; sq_y <= '0; sq_valid <= 1'b0;
      power <= '0; out_valid <= 1'b0;
    end else begin
      if (phase == PH_SQ) begin
        sq_x     <= xw * xw;
        sq_y     <= yw * yw;
        sq_valid <= in_valid;
      end
      if (phase == PH_SQ_OUT) begin
        power     <= POW_W'({1'b0, sq_x[14:1]}) + POW_W'({1'b0, sq_y[14:1]});
        out_valid <= sq_valid;
      end
    end
  end

  always_comb test_dac = power[POW_W-1 -: 8];

endmodule
