// tb_power_calc: exhaustive check of the power calculation.
//
// All 65536 pairs of 8-bit two's complement inputs are applied, one per
// microsecond. The result, registered at the output clock (phase 4), must
// equal floor(x*x/2) + floor(y*y/2) (the square bits P14..P1 of each
// product added), the test DAC output must be its bits 14..7, and the
// valid flag must follow the input flag.
`timescale 1ns/1ps
module tb_power_calc;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]        phase = '0;
  logic signed [7:0] x = '0, y = '0;
  logic              in_valid = 1'b0;
  logic [POW_W-1:0]  power;
  logic [7:0]        test_dac;
  logic              out_valid;

  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  power_calc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #80ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxp;
    maxp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        int e;
        bit v;
        // ADC data become valid at phase 12
        while (phase != 4'd13) @(negedge clk);
        x = 8'(a);
        y = 8'(b);
        v = 1'((a + b) & 1);
        in_valid = v;
        e = (a * a) / 2 + (b * b) / 2;
        while (phase != 4'(PH_SQ_OUT + 1)) @(negedge clk);
        check(int'(power) == e, $sformatf("x=%0d y=%0d: power %0d expected %0d", a, b, power, e));
        check(int'(test_dac) == e / 128, "test DAC bits");
        check(out_valid == v, "valid flag");
        if (int'(power) > maxp) maxp = int'(power);
      end
    end
    check(maxp == 16384, $sformatf("full-scale power %0d", maxp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
