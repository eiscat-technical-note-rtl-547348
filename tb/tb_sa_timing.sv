// tb_sa_timing: checks the 16 MHz phase generator.
//
// Over 20 microseconds the testbench follows the phase counter with its own
// count and checks that C0..C15 are one-hot at the phase number, that S0..S7
// each cover two consecutive clocks, and that the microsecond tick comes
// once every 16 clocks (the 1 MHz sample rate).
`timescale 1ns/1ps
module tb_sa_timing;
  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]  phase;
  logic [15:0] c_pulse;
  logic [7:0]  s_pulse;
  logic        us_tick;

  sa_timing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_ph, last_tick, ticks;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expect_ph = 0;
    last_tick = -1;
    ticks = 0;
    for (int t = 0; t < 320; t++) begin
      check(phase == 4'(expect_ph), $sformatf("phase %0d expected %0d", phase, expect_ph));
      check(c_pulse == (16'd1 << expect_ph), $sformatf("C pulses %h at phase %0d", c_pulse, expect_ph));
      check(s_pulse == (8'd1 << (expect_ph / 2)), $sformatf("S pulses %h at phase %0d", s_pulse, expect_ph));
      check($countones(c_pulse) == 1, "one C pulse at a time");
      if (us_tick) begin
        check(expect_ph == 15, "tick at the last phase");
        if (last_tick >= 0) check(t - last_tick == 16, $sformatf("tick spacing %0d clocks", t - last_tick));
        last_tick = t;
        ticks++;
      end
      @(negedge clk);
      expect_ph = (expect_ph + 1) % 16;
    end
    check(ticks == 20, $sformatf("20 microsecond ticks in 320 clocks (%0d)", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
