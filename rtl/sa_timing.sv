// sa_timing: the analyzer's clock generator.
//
// A 4-bit counter runs on the 16 MHz crystal clock. As in the original, its
// state is decoded twice: a four-to-sixteen decode gives sixteen 62.5 ns
// pulses C0..C15 and a three-to-eight decode of the top three bits gives
// eight 125 ns pulses S0..S7, so each pulse occurs once per microsecond.
// The pulses are registered-free decodes of the counter, here used as
// one-hot clock enables for the rest of the synchronous logic instead of
// as separate clocks (this design's choice, so that everything runs on one
// clock). `phase` is the counter itself (C index) for blocks that compare
// against a phase constant; `us_tick` is C15, the last phase of a frame.
//
// Timing: after reset the counter is 0, so C0 and S0 are active in the
// first clock; it advances every clock and wraps after 16.
module sa_timing (
  input  logic        clk,
  input  logic        rst_n,
  output logic [3:0]  phase,
  output logic [15:0] c_pulse,
  output logic [7:0]  s_pulse,
  output logic        us_tick
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 4'd1;
  end

  always_comb begin
    c_pulse = 16'b1 << phase;
    s_pulse = 8'b1 << phase[3:1];
    us_tick = (phase == 4'd15);
  end

endmodule
