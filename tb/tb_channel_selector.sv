// tb_channel_selector: exhaustive check of the channel selector.
//
// Every combination of data channel address, switch setting, selection
// on/off and strobe is applied; the admitted strobe must equal the incoming
// strobe when selection is off, and otherwise only when the channel address
// equals the switch setting.
`timescale 1ns/1ps
module tb_channel_selector;
  logic [2:0] chan_addr, chan_select;
  logic       sel_on, strobe_in, strobe_out;

  channel_selector dut (.*);

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

  int admitted = 0;

  initial begin
    for (int a = 0; a < 8; a++)
      for (int s = 0; s < 8; s++)
        for (int on = 0; on < 2; on++)
          for (int st = 0; st < 2; st++) begin
            bit expect_out;
            chan_addr   = 3'(a);
            chan_select = 3'(s);
            sel_on      = 1'(on);
            strobe_in   = 1'(st);
            #10ns;
            expect_out = (st == 1) && (on == 0 || a == s);
            check(strobe_out == expect_out,
                  $sformatf("addr %0d switch %0d on %0d strobe %0d -> %0d", a, s, on, st, strobe_out));
            if (strobe_out) admitted++;
          end
    // 64 strobes with selection off, 8 with it on
    check(admitted == 72, $sformatf("admitted strobes %0d", admitted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
