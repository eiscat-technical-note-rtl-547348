// tb_dt_delay: checks the DT pulse delay.
//
// With the delay shortened to 20 microseconds, a DT pulse must give exactly
// one delayed pulse, between 20 and 21 microseconds later (the countdown
// runs on the microsecond tick). A second DT pulse while the delay is
// running must be ignored; one after it has ended starts a new delay.
`timescale 1ns/1ps
module tb_dt_delay;
  localparam int D = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0] ph = '0;
  always_ff @(posedge clk) if (rst_n) ph <= ph + 4'd1;

  logic us_tick, dt_in = 1'b0, dt_out, busy;
  always_comb us_tick = (ph == 4'd15);

  dt_delay #(.DELAY_US(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0, clks = 0;
  always @(posedge clk) if (rst_n) begin
    clks++;
    if (dt_out) n_out++;
  end

  task automatic dt_and_measure(input bit extra, input int start_ph);
    int c0, o0;
    while (ph != 4'(start_ph)) @(negedge clk);
    @(negedge clk) dt_in = 1'b1;
    @(negedge clk) dt_in = 1'b0;
    c0 = clks;
    o0 = n_out;
    check(busy, "busy after DT");
    while (n_out == o0 && clks - c0 < 40 * 16) begin
      @(negedge clk);
      if (extra && clks - c0 == 5 * 16) begin
        dt_in = 1'b1;
        @(negedge clk) dt_in = 1'b0;
      end
    end
    check(clks - c0 > (D - 1) * 16 && clks - c0 <= (D + 1) * 16,
          $sformatf("delay %0d clocks for %0d us", clks - c0, D));
    repeat (30 * 16) @(negedge clk);
    check(n_out == o0 + 1, $sformatf("one delayed pulse (%0d)", n_out - o0));
    check(!busy, "idle after the delay");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!busy && !dt_out, "idle after reset");
    dt_and_measure(1'b0, 3);
    dt_and_measure(1'b1, 14);
    dt_and_measure(1'b0, 0);
    check(n_out == 3, $sformatf("delayed pulses %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
