// dt_delay: delays the radar controller's DT pulse.
//
// In external mode the integration period is set by the DT pulse of the
// radar controller. The analyzer delays that pulse by about 1.5 s so that it
// can run in parallel with the correlator. A down-counter, loaded by the DT
// pulse and decremented once per microsecond, gives a one-clock pulse on
// `dt_out` when it runs out. A DT pulse that arrives while a delay is still
// running is ignored (DT pulses are seconds apart). The 1.5 s are the
// original's; the counter and the ignore rule are this design's.
module dt_delay #(
  parameter int unsigned DELAY_US = 1_500_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic us_tick,   // one clock per microsecond
  input  logic dt_in,     // DT pulse, one clock
  output logic dt_out,
  output logic busy
);

  localparam int unsigned W = $clog2(DELAY_US + 1);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; busy <= 1'b0; dt_out <= 1'b0;
    end else begin
      dt_out <= 1'b0;
      if (!busy) begin
        if (dt_in) begin
          cnt  <= W'(DELAY_US);
          busy <= 1'b1;
        end
      end else if (us_tick) begin
        cnt <= cnt - 1'b1;
        if (cnt == W'(1)) begin
          busy   <= 1'b0;
          dt_out <= 1'b1;
        end
      end
    end
  end

endmodule
