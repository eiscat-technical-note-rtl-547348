// tb_integrator: checks the integration memory and adder.
//
// Eight points and two banks. The testbench plays the integration control:
// for every microsecond of a pass it presents an address and a power value
// and raises the add enable. The first pass of each bank runs with the zero
// flag (clear folded into the first cycle), later passes accumulate. A
// reference array kept here predicts every sum; each write must appear on
// the A-bus, with its address, as a one-clock valid at phase 14. A pass with
// the add enable low must change nothing, and large inputs check the
// 32-bit width.
`timescale 1ns/1ps
module tb_integrator;
  import sa_pkg::*;

  localparam int N = 8, B = 2, AW = $clog2(N * B);

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]       phase = '0;
  logic             add_en = 1'b0, zero = 1'b0;
  logic [AW-1:0]    addr = '0;
  logic [POW_W-1:0] power = '0;
  logic [ACC_W-1:0] a_bus;
  logic [AW-1:0]    a_addr;
  logic             a_valid;

  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  integrator #(.N(N), .BANKS(B)) dut (.*);

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

  longint model [N * B];
  int nwrites = 0;

  always @(posedge clk) if (rst_n && a_valid) begin
    nwrites++;
    check(phase == 4'(PH_INT_ADD + 1), $sformatf("A-bus valid at phase %0d", phase));
  end

  // one pass over one bank; `en` low runs it with the adder disabled
  task automatic pass(input int bank, input bit z, input bit en, input bit big);
    for (int k = 0; k < N; k++) begin
      int p;
      while (phase != 4'd1) @(negedge clk);
      addr   = AW'(bank * N + k);
      p      = big ? 16384 - int'($urandom_range(3)) : int'($urandom_range(16384));
      power  = POW_W'(p);
      zero   = z;
      add_en = en;
      while (phase != 4'(PH_INT_ADD + 1)) @(negedge clk);
      if (en) begin
        model[bank * N + k] = (z ? 0 : model[bank * N + k]) + longint'(p);
        check(a_valid, "one write per point");
        check(longint'(a_bus) == (model[bank * N + k] & 64'hFFFF_FFFF),
              $sformatf("bank %0d point %0d: sum %0d expected %0d", bank, k, a_bus, model[bank * N + k]));
        check(a_addr == AW'(bank * N + k), "A-bus address");
      end else begin
        check(!a_valid, "no write with the adder disabled");
      end
    end
    add_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    pass(0, 1'b1, 1'b1, 1'b0);
    pass(1, 1'b1, 1'b1, 1'b0);
    for (int c = 0; c < 5; c++) begin
      pass(0, 1'b0, 1'b1, 1'b0);
      pass(1, 1'b0, 1'b1, 1'b0);
    end
    pass(0, 1'b0, 1'b0, 1'b0);          // disabled: memory unchanged
    pass(0, 1'b0, 1'b1, 1'b0);
    // a new period: zero flag clears the old sums
    pass(0, 1'b1, 1'b1, 1'b1);
    for (int c = 0; c < 20; c++) pass(0, 1'b0, 1'b1, 1'b1);
    repeat (2) @(negedge clk);
    check(model[0] > 64'd300000, "large sums reached");
    check(nwrites == (2 + 10 + 1 + 21) * N, $sformatf("writes %0d", nwrites));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
