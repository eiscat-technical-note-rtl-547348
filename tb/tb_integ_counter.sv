// tb_integ_counter: checks the six-digit BCD integration counter.
//
// Internal mode: with a preset of P the period end (ITE) must come on the
// P-th integration cycle complete (ICC) after a clear/load and every P
// cycles after that; the count is checked against a decimal down-count kept
// here, including borrows across digits (100 -> 99, 1000 -> 999). A preset
// of 0 or 1 ends every cycle. External mode: the count does not decide; ITE
// comes at the first ICC at or after the delayed DT pulse, and only once per
// pulse. A new preset is taken by the strobe and used from the next reload.
`timescale 1ns/1ps
module tb_integ_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic        clear = 1'b0, preset_strobe = 1'b0, icc = 1'b0, ext_mode = 1'b0, dt_delayed = 1'b0;
  logic [23:0] preset_bcd = '0, count_bcd, preset_reg;
  logic        ite;

  integ_counter #(.DIGITS(6)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] to_bcd(input int v);
    logic [23:0] r;
    for (int d = 0; d < 6; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  int n_ite = 0;
  always @(posedge clk) if (rst_n && ite) n_ite++;

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  // one ICC; returns whether it ended the period
  task automatic cycle(output bit ended);
    int i0;
    i0 = n_ite;
    pulse(icc);
    @(negedge clk);
    ended = (n_ite != i0);
  endtask

  task automatic load(input int p);
    preset_bcd = to_bcd(p);
    pulse(preset_strobe);
    check(preset_reg == to_bcd(p), "preset register");
    pulse(clear);
    check(count_bcd == to_bcd(p), "count loaded by clear/load");
  endtask

  initial begin
    bit e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int t = 0; t < 6; t++) begin
      int p, eff;
      p = (t == 0) ? 3 : (t == 1) ? 1 : (t == 2) ? 0 : (t == 3) ? 12 : (t == 4) ? 100 : 1000;
      eff = (p == 0) ? 1 : p;
      load(p);
      for (int period = 0; period < 2; period++) begin
        for (int c = 1; c <= eff; c++) begin
          cycle(e);
          check(e == (c == eff), $sformatf("preset %0d cycle %0d: ITE %0d", p, c, e));
          if (c < eff) check(count_bcd == to_bcd(p - c), $sformatf("preset %0d count %h after %0d", p, count_bcd, c));
          else check(count_bcd == to_bcd(p), "reload at the period end");
        end
      end
    end

    // a new preset takes effect at the next reload
    load(2);
    preset_bcd = to_bcd(5);
    pulse(preset_strobe);
    cycle(e); check(!e, "old preset still counting");
    cycle(e); check(e, "old preset ends the period");
    for (int c = 1; c <= 5; c++) begin
      cycle(e);
      check(e == (c == 5), "new preset after reload");
    end

    // external mode
    ext_mode = 1'b1;
    load(3);
    for (int c = 0; c < 6; c++) begin
      cycle(e);
      check(!e, "no ITE without DT");
    end
    pulse(dt_delayed);
    cycle(e); check(e, "ITE at the ICC after the delayed DT");
    cycle(e); check(!e, "one ITE per DT");
    // DT coinciding with ICC
    begin
      int i0;
      i0 = n_ite;
      @(negedge clk) begin dt_delayed = 1'b1; icc = 1'b1; end
      @(negedge clk) begin dt_delayed = 1'b0; icc = 1'b0; end
      @(negedge clk);
      check(n_ite == i0 + 1, "ITE with DT and ICC together");
    end
    // a pending DT is dropped by clear/load
    pulse(dt_delayed);
    pulse(clear);
    cycle(e); check(!e, "pending DT cleared by clear/load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
