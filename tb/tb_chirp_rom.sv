// tb_chirp_rom: checks the chirp tables and their address counter.
//
// The testbench steps the address counter through all 512 entries plus a
// wrap, as the buffer reads do, and compares every output pair with the
// chirp exp(-i*pi*n^2/512) scaled by 128, rounded, limited to 8 bits and
// with -128 replaced by -127, worked out here from the angle 2*pi*n^2/1024.
// It also checks that the counter only advances on phase 0 after a read,
// that it wraps to the start for the recycle pass, that a clear returns it
// to zero, and that no output ever equals -128.
`timescale 1ns/1ps
module tb_chirp_rom;
  import sa_pkg::*;

  localparam int N = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]           phase = '0;
  logic                 clear = 1'b0, rd_valid = 1'b0;
  logic [$clog2(N)-1:0] addr;
  logic signed [7:0]    cos_out, sin_out;

  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  chirp_rom #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(input real v);
    int r;
    r = int'($floor(v * 128.0 + 0.5));
    if (r > 127) r = 127;
    if (r <= -128) r = -127;
    return r;
  endfunction

  int n_mod = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // one microsecond with no read: the counter holds
    repeat (16) @(negedge clk);
    check(addr == 0, "counter holds without reads");
    for (int k = 0; k < N + 8; k++) begin
      int n;
      real ang;
      n   = k % N;
      ang = 2.0 * 3.14159265358979323846 * real'((n * n) % (2 * N)) / real'(2 * N);
      check(addr == 9'(n), $sformatf("address %0d expected %0d", addr, n));
      check(int'(cos_out) == ref_val($cos(ang)), $sformatf("cos[%0d] = %0d expected %0d", n, cos_out, ref_val($cos(ang))));
      check(int'(sin_out) == ref_val(-$sin(ang)), $sformatf("sin[%0d] = %0d expected %0d", n, sin_out, ref_val(-$sin(ang))));
      check(cos_out != -8'sd128 && sin_out != -8'sd128, "no -128 output");
      if ($floor(-$sin(ang) * 128.0 + 0.5) <= -128.0 || $floor($cos(ang) * 128.0 + 0.5) <= -128.0) n_mod++;
      // a read in this microsecond advances the counter at the next phase 0
      rd_valid = 1'b1;
      repeat (16) @(negedge clk);
    end
    rd_valid = 1'b0;
    check(n_mod > 0, $sformatf("entries changed from -128 to -127: %0d", n_mod));
    check(addr == 9'd8, "counter after wrap");
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(addr == 0, "clear returns the counter to zero");
    // phase 0 without a read does not advance
    repeat (40) @(negedge clk);
    check(addr == 0, "no advance without reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
