// tb_premultiplier: checks the complex premultiplier.
//
// Random buffer words and chirp values, plus the extreme corners, are
// applied one per microsecond. For each, the result must appear at the
// output clock (phase 0) that follows the multiplier clock (phase 14) and
// equal re = floor(xr*c/128) - floor(xi*s/128), im = floor(xr*s/128) +
// floor(xi*c/128), worked out here in integer arithmetic. The valid flag
// must travel with the data, and the output must hold for the rest of the
// microsecond.
`timescale 1ns/1ps
module tb_premultiplier;
  import sa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0]        phase = '0;
  cplx8_t            x = '0;
  logic              in_valid = 1'b0;
  logic signed [7:0] chirp_cos = '0, chirp_sin = '0;
  cplx9_t            y;
  logic              out_valid;

  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  premultiplier dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      int xr, xi, c, s, er, ei;
      bit v;
      // inputs change at phase 6 as the buffer and chirp counter do
      while (phase != 4'(PH_READ + 1)) @(negedge clk);
      case (k)
        0: begin xr = -128; xi = -128; c = 127;  s = 127;  end
        1: begin xr = -128; xi = 127;  c = -127; s = 127;  end
        2: begin xr = 127;  xi = -128; c = -127; s = -127; end
        default: begin
          xr = int'($urandom_range(255)) - 128;
          xi = int'($urandom_range(255)) - 128;
          c  = int'($urandom_range(254)) - 127;
          s  = int'($urandom_range(254)) - 127;
        end
      endcase
      v = 1'($urandom);
      x.re = 8'(xr); x.im = 8'(xi);
      chirp_cos = 8'(c); chirp_sin = 8'(s);
      in_valid = v;
      er = fdiv128(xr * c) - fdiv128(xi * s);
      ei = fdiv128(xr * s) + fdiv128(xi * c);
      // wait until the output clock has passed
      while (phase != 4'(PH_PRE_OUT + 1)) @(negedge clk);
      check(int'(y.re) == er && int'(y.im) == ei,
            $sformatf("(%0d,%0d)*(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", xr, xi, c, s, y.re, y.im, er, ei));
      check(out_valid == v, "valid travels with the data");
      // the output holds through the microsecond
      repeat (12) @(negedge clk);
      check(int'(y.re) == er && int'(y.im) == ei, "output holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
