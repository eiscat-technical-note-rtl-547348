// display_control: picks 8 bits of each 32-bit spectrum word for the display DAC.
//
// Eight 16-to-1 multiplexers take a window of eight adjacent bits from the
// C-bus: output bit k is bit 9+k+scale, so the window runs from bits 16..9
// (scale 0) to bits 31..24 (scale 15). The scale sits in a 4-bit counter.
// Manual mode loads it from the front-panel binary switch. Automatic mode
// clears it at the start of every integration period (and on clear/load)
// and counts it up by one on each word that has a set bit above the window,
// so that the window follows the eight highest bits in use as the sums grow.
// Each displayed word is latched with a one-clock `disp_valid`, the value
// being taken through the window in force before the word's own adjustment.
//
// The bit ranges of the multiplexers, the 4-bit up counter with load and the
// manual/automatic switch are the original's; clearing at period start and
// the one-step-per-word rule are this design's reading of the automatic
// scaler.
module display_control
  import sa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scale_reset,   // period start or clear/load
  input  logic             auto_mode,
  input  logic [3:0]       man_scale,
  input  logic [ACC_W-1:0] c_bus,
  input  logic             c_valid,
  output logic [7:0]       disp_data,
  output logic             disp_valid,
  output logic [3:0]       scale
);

  logic       above;
  logic [7:0] window;

  always_comb begin
    window = 8'(c_bus >> (5'd9 + 5'(scale)));
    above  = (scale != 4'd15) && ((c_bus >> (6'd17 + 6'(scale))) != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale <= '0; disp_data <= '0; disp_valid <= 1'b0;
    end else begin
      disp_valid <= 1'b0;
      if (!auto_mode)       scale <= man_scale;
      else if (scale_reset) scale <= '0;
      else if (c_valid && above) scale <= scale + 4'd1;
      if (c_valid) begin
        disp_data  <= window;
        disp_valid <= 1'b1;
      end
    end
  end

endmodule
