// tb_readout_memory: checks the readout memory, its DMA and the C-bus.
//
// Eight points, four banks, one DMA word every 4 clocks. The testbench
// plays the integrator: every integration cycle it writes a fresh value to
// every point of the selected banks on the A-bus and then gives an ICC.
// At a period end (ITE) after at least one full cycle the memory must be
// sent by DMA: every point as two 16-bit words, high half first, bank by
// bank, spaced by the DMA interval, matching the last values written.
// During the DMA the parallel writes must be switched off (writes made then
// must not show up), and they must return at the next ICC after it. An ITE
// with no full cycle since the last DMA must set the overrun flag instead.
// Each A-bus write must also appear on the C-bus towards the display.
`timescale 1ns/1ps
module tb_readout_memory;
  import sa_pkg::*;

  localparam int N = 8, B = 4, DC = 4, AW = $clog2(N * B);   // DC * 62.5 ns = 250 ns per word

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic             clear = 1'b0, a_valid = 1'b0, icc = 1'b0, ite = 1'b0;
  logic [ACC_W-1:0] a_bus = '0, c_bus;
  logic [AW-1:0]    a_addr = '0, c_addr;
  logic [1:0]       nbanks_sel = 2'd1;
  logic [15:0]      dma_data;
  logic             dma_trigger, dma_active, par_en, overrun, c_valid;

  readout_memory #(.N(N), .BANKS(B), .DMA_CLKS(DC)) dut (.*);

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

  logic [31:0] shadow [N * B];
  logic [15:0] words [$];
  longint      t_prev = -1;
  int          bad_spacing = 0;

  always @(posedge clk) if (rst_n && dma_trigger) begin
    words.push_back(dma_data);
    if (t_prev >= 0 && words.size() > 1 && $time - t_prev != 64'd250) bad_spacing++;
    t_prev = $time;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  // one integration cycle over the selected banks; `track` if writes count
  task automatic cycle(input bit track);
    for (int a = 0; a < (int'(nbanks_sel) + 1) * N; a++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      a_bus = v; a_addr = AW'(a); a_valid = 1'b1;
      @(negedge clk);
      a_valid = 1'b0;
      if (track) begin
        shadow[a] = v;
        check(c_valid && c_bus == v && c_addr == AW'(a), "A-bus write on the C-bus");
      end
      repeat (2) @(negedge clk);
    end
    pulse(icc);
  endtask

  task automatic expect_dma(input int nb);
    int bad;
    words.delete();
    t_prev = -1;
    bad_spacing = 0;
    pulse(ite);
    @(negedge clk);
    check(dma_active && !par_en, "DMA started, parallel writes off");
    // writes during the DMA are ignored
    cycle(1'b0);
    while (dma_active) @(negedge clk);
    repeat (3) @(negedge clk);
    check(words.size() == 2 * nb * N, $sformatf("DMA words %0d expected %0d", words.size(), 2 * nb * N));
    bad = 0;
    for (int a = 0; a < nb * N && 2 * a + 1 < words.size(); a++)
      if ({words[2*a], words[2*a+1]} != shadow[a]) bad++;
    check(bad == 0, $sformatf("DMA contents, %0d wrong", bad));
    check(bad_spacing == 0, "DMA word spacing");
    check(!par_en, "parallel writes stay off until the next ICC");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(par_en && !overrun && !dma_active, "state after reset");
    // two banks, two cycles, DMA
    cycle(1'b1);
    cycle(1'b1);
    expect_dma(2);
    // the ICC of the next cycle re-enables writes; that cycle is not valid
    cycle(1'b0);
    check(par_en, "parallel writes back after the ICC");
    // ITE without a full cycle since: overrun
    pulse(ite);
    @(negedge clk);
    check(overrun && !dma_active, "overrun on a too short period");
    // four banks
    nbanks_sel = 2'd3;
    cycle(1'b1);
    expect_dma(4);
    // clear/load resets the overrun flag and the write enable
    pulse(clear);
    check(!overrun && par_en, "clear/load");
    nbanks_sel = 2'd0;
    cycle(1'b1);
    expect_dma(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
