// tb_op_control: checks the STOP/READY/RUN operation control.
//
// Manual mode: RUN takes STOP to READY, the first data strobe takes READY to
// RUN, STOP returns to STOP from either; a clear/load gives a pulse of the
// set length and forces STOP; data are accepted only in READY and RUN.
// Computer mode: the rising edge of the run-enable line acts as RUN and its
// falling edge as STOP, the computer clear/load line gives the clear pulse,
// and the front-panel buttons have no effect. Strobes in STOP are ignored.
`timescale 1ns/1ps
module tb_op_control;
  import sa_pkg::*;

  localparam int CL = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic comp_mode = 1'b0, man_clear_load = 1'b0, man_run = 1'b0, man_stop = 1'b0;
  logic cmp_clear_load = 1'b0, cmp_run_enable = 1'b0, data_strobe = 1'b0;
  logic clear_load, accept;
  run_state_e state;

  op_control #(.CL_CLKS(CL)) dut (.*);

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

  int cl_len = 0, cl_pulses = 0;
  logic cl_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cl_q <= clear_load;
    if (clear_load) cl_len++;
    if (clear_load && !cl_q) cl_pulses++;
  end

  task automatic press(ref logic b);
    @(negedge clk) b = 1'b1;
    repeat (6) @(negedge clk);
    b = 1'b0;
    repeat (CL + 8) @(negedge clk);
  endtask

  task automatic strobe();
    @(negedge clk) data_strobe = 1'b1;
    @(negedge clk) data_strobe = 1'b0;
    @(negedge clk);
  endtask

  task automatic expect_state(input run_state_e s, input string msg);
    check(state == s, $sformatf("%s: state %s", msg, state.name()));
    check(accept == (s != ST_STOP), $sformatf("%s: accept", msg));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    expect_state(ST_STOP, "after reset");
    strobe();
    expect_state(ST_STOP, "strobe in STOP ignored");
    press(man_run);
    expect_state(ST_READY, "RUN button");
    strobe();
    expect_state(ST_RUN, "first strobe");
    press(man_stop);
    expect_state(ST_STOP, "STOP button in RUN");
    press(man_run);
    press(man_stop);
    expect_state(ST_STOP, "STOP button in READY");
    press(man_run);
    strobe();
    cl_len = 0;
    press(man_clear_load);
    expect_state(ST_STOP, "clear/load forces STOP");
    check(cl_len == CL, $sformatf("clear/load pulse %0d clocks", cl_len));
    check(cl_pulses == 1, "one clear/load pulse");
    // a held button acts once
    man_run = 1'b1;
    repeat (50) @(negedge clk);
    strobe();
    man_run = 1'b0;
    repeat (10) @(negedge clk);
    expect_state(ST_RUN, "held RUN button");
    press(man_stop);

    // computer mode
    comp_mode = 1'b1;
    repeat (4) @(negedge clk);
    press(man_run);
    expect_state(ST_STOP, "panel RUN ignored in computer mode");
    @(negedge clk) cmp_run_enable = 1'b1;
    repeat (8) @(negedge clk);
    expect_state(ST_READY, "run enable rising");
    strobe();
    expect_state(ST_RUN, "strobe in computer mode");
    press(man_stop);
    expect_state(ST_RUN, "panel STOP ignored in computer mode");
    @(negedge clk) cmp_run_enable = 1'b0;
    repeat (8) @(negedge clk);
    expect_state(ST_STOP, "run enable falling");
    cl_len = 0;
    press(man_clear_load);
    check(cl_len == 0, "panel clear/load ignored in computer mode");
    press(cmp_clear_load);
    check(cl_len == CL, $sformatf("computer clear/load pulse %0d clocks", cl_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
