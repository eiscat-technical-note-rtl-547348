// tb_display_control: checks the display scaler.
//
// Manual mode: for every scale setting 0..15 and random 32-bit sums, the
// displayed byte must be bits 9+scale .. 16+scale of the sum, the same
// selection the 74150 multiplexers make. Auto mode: after a reset of the
// scale, words whose bits reach above the window must raise the scale by
// one per word and words that fit must leave it; the testbench follows the
// expected scale with its own model and checks each displayed byte.
`timescale 1ns/1ps
module tb_display_control;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic             scale_reset = 1'b0, auto_mode = 1'b0, c_valid = 1'b0;
  logic [3:0]       man_scale = '0, scale;
  logic [ACC_W-1:0] c_bus = '0;
  logic [7:0]       disp_data;
  logic             disp_valid;

  display_control dut (.*);

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

  function automatic logic [7:0] sel(input logic [31:0] v, input int sc);
    logic [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = (9 + k + sc < 32) ? v[9 + k + sc] : 1'b0;
    return r;
  endfunction

  task automatic word(input logic [31:0] v);
    @(negedge clk);
    c_bus = v; c_valid = 1'b1;
    @(negedge clk);
    c_valid = 1'b0;
  endtask

  initial begin
    int sc, steps;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // manual
    for (int s = 0; s < 16; s++) begin
      man_scale = 4'(s);
      for (int k = 0; k < 40; k++) begin
        logic [31:0] v;
        v = (k < 20) ? $urandom : ($urandom >> $urandom_range(31));
        word(v);
        check(disp_valid, "display strobe");
        check(disp_data == sel(v, s), $sformatf("scale %0d word %h: %h expected %h", s, v, disp_data, sel(v, s)));
        check(scale == 4'(s), "manual scale");
      end
    end
    // auto
    auto_mode = 1'b1;
    @(negedge clk) scale_reset = 1'b1;
    @(negedge clk) scale_reset = 1'b0;
    check(scale == 0, "scale reset");
    sc = 0;
    steps = 0;
    for (int k = 0; k < 400; k++) begin
      logic [31:0] v;
      v = (k < 200) ? ($urandom >> (31 - k / 8)) : $urandom;
      word(v);
      check(disp_data == sel(v, sc), $sformatf("auto word %h at scale %0d: %h", v, sc, disp_data));
      if (sc < 15 && (v >> (17 + sc)) != 0) begin
        sc++;
        steps++;
      end
      check(scale == 4'(sc), $sformatf("auto scale %0d expected %0d", scale, sc));
    end
    check(steps >= 10, $sformatf("auto steps %0d", steps));
    @(negedge clk) scale_reset = 1'b1;
    @(negedge clk) scale_reset = 1'b0;
    check(scale == 0, "scale reset at a new period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
