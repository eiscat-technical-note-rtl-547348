// tb_integ_control: checks the integration sequencing.
//
// Eight points, up to four banks, the default 3 microsecond pipeline delay.
// The testbench sends enable-integration pulses as the input buffer does
// (at the first read of a recycle pass) and checks: the add enable rises
// 3 microseconds after the pulse, at phase 0, and lasts N microseconds;
// the address steps through the points of one bank, once per microsecond;
// banks follow each other and wrap after the selected number; IBCC ends
// every pass and ICC every cycle over all banks; the clear pulse appears at
// the start of each bank's pass while the zero flag is set, that is in the
// first cycle after a clear/load or a period end (ITE), and not otherwise.
`timescale 1ns/1ps
module tb_integ_control;
  import sa_pkg::*;

  localparam int N = 8, B = 4, AW = $clog2(N * B);

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]    phase = '0;
  logic          clear = 1'b0, ena_integ = 1'b0, ite = 1'b0;
  logic [1:0]    nbanks_sel = 2'd1;
  logic          add_en, zero, mem_clr, ibcc, icc;
  logic [AW-1:0] addr;

  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  integ_control #(.N(N), .BANKS(B)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ibcc = 0, n_icc = 0, n_clr = 0;
  always @(negedge clk) if (rst_n) begin
    if (ibcc) n_ibcc++;
    if (icc) n_icc++;
    if (mem_clr) n_clr++;
  end

  // one pass: pulse, then follow the add enable
  task automatic run_pass(input int bank, input bit expect_clr);
    int clks;
    while (phase != 4'(PH_READ + 1)) @(negedge clk);
    ena_integ = 1'b1;
    @(negedge clk);
    ena_integ = 1'b0;
    clks = 1;
    while (!add_en && clks < 100) begin
      @(negedge clk);
      clks++;
    end
    // counted from the pulse: the pass starts at the third phase 0 after it
    check(clks == 10 + 2 * 16, $sformatf("pipeline delay %0d clocks", clks));
    check(phase == 4'd1, "add enable from phase 0");
    check(mem_clr == expect_clr, $sformatf("clear pulse at bank %0d: %0d", bank, mem_clr));
    for (int k = 0; k < N; k++) begin
      check(add_en, "add enable through the pass");
      check(addr == AW'(bank * N + k), $sformatf("address %0d expected %0d", addr, bank * N + k));
      repeat (16) @(negedge clk);
    end
    check(!add_en, "add enable ends after N points");
  endtask

  initial begin
    int c0, i0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(zero, "zero flag after reset");
    // two banks: cycle 1 clears, cycle 2 accumulates
    run_pass(0, 1'b1);
    run_pass(1, 1'b1);
    check(n_clr == 2, "two clear pulses in the first cycle");
    check(n_icc == 1 && n_ibcc == 2, $sformatf("ICC %0d IBCC %0d after one cycle", n_icc, n_ibcc));
    check(!zero, "zero flag off after the first cycle");
    run_pass(0, 1'b0);
    run_pass(1, 1'b0);
    check(n_icc == 2 && n_ibcc == 4, "second cycle");
    // period end: the next cycle clears again
    @(negedge clk) ite = 1'b1;
    @(negedge clk) ite = 1'b0;
    check(zero, "zero flag set by ITE");
    run_pass(0, 1'b1);
    run_pass(1, 1'b1);
    // four banks
    nbanks_sel = 2'd3;
    c0 = n_icc;
    i0 = n_ibcc;
    for (int b = 0; b < 4; b++) run_pass(b, 1'b0);
    check(n_icc == c0 + 1 && n_ibcc == i0 + 4, "four-bank cycle");
    // one bank
    nbanks_sel = 2'd0;
    for (int k = 0; k < 3; k++) run_pass(0, 1'b0);
    check(n_icc == c0 + 4, $sformatf("one-bank cycles (%0d)", n_icc - c0));
    // clear/load
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(zero && !add_en, "clear/load state");
    run_pass(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
