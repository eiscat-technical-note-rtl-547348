// tb_spectrum_analyzer: end-to-end test of the spectrum analyzer with the
// behavioural CCD chain.
//
// Receiver data sets (512 complex samples each, a tone whose bin and level
// change from set to set) are strobed in at 400 kHz on channel 3, with a
// channel-5 word between every two samples that the channel selector must
// drop. For every set the testbench computes its own expected power spectrum
// (chirp tables, premultiplication, CCD convolution, ADC rounding and
// x^2 + y^2, written out here from the definitions) and compares the
// DMA output word by word with the sums it expects per bank and period.
//
// Phases: (1) two banks, two cycles per period, two periods DMAed; then one
// cycle per period, where the first short period finds the readout memory
// not yet refreshed (overrun) and the next is DMAed again; (2) after a new
// clear/load, one bank in external mode with a delayed DT pulse ending the
// period and full-scale tones that make the display scaler step; (3) data at
// 1 MHz to set the input error FF; (4) stop. All parameters are the
// defaults, so the external phase runs through the full 1.5 s DT delay
// (about 1300 identical data sets). Each mechanism is counted and a failure
// is counted for one that never happened.
`timescale 1ns/1ps
module tb_spectrum_analyzer;
  import sa_pkg::*;

  localparam int N = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic signed [7:0] adc_re = '0, adc_im = '0;
  logic [2:0]  adc_chan = '0;
  logic        data_strobe_n = 1'b1;
  logic [2:0]  chan_select = 3'd3;
  logic        chan_sel_on = 1'b1;
  logic        comp_mode = 1'b0, man_clear_load = 1'b0, man_run = 1'b0, man_stop = 1'b0;
  logic [23:0] preset_bcd = 24'h000002;
  logic        preset_strobe = 1'b0, ext_mode = 1'b0;
  logic [1:0]  nbanks_sel = 2'd1;
  logic        disp_auto = 1'b1;
  logic [3:0]  disp_man_scale = '0;
  logic        cmp_clear_load = 1'b0, cmp_run_enable = 1'b0, dt_pulse = 1'b0;
  logic signed [8:0] dac_re, dac_im;
  logic        dac_valid;
  logic signed [7:0] ccd_adc_re, ccd_adc_im;
  run_state_e  state;
  logic        input_error, icc, ite, overrun, dma_trigger, dma_active, disp_valid;
  logic [7:0]  test_dac, disp_data;
  logic [23:0] integ_count;
  logic [15:0] dma_data;
  logic [10:0] disp_addr;
  logic [3:0]  disp_scale;

  spectrum_analyzer dut (.*);

  ccd_chain_model #(.N(N)) u_ccd (
    .clk, .phase(dut.phase), .dac_re, .dac_im, .adc_re(ccd_adc_re), .adc_im(ccd_adc_im)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  logic signed [7:0] ref_cos [N];
  logic signed [7:0] ref_sin [N];
  real v_re [N], v_im [N];

  function automatic logic signed [7:0] q128(input real v);
    real r;
    int  i;
    r = v * 128.0;
    r = (r >= 0.0) ? r + 0.5 : r - 0.5;
    i = $rtoi(r);
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    if (i == -128) i = -127;   // multipliers cannot take -128
    return 8'(i);
  endfunction

  function automatic int qadc(input real v);
    real r;
    int  i;
    r = v / 512.0;
    r = (r >= 0.0) ? r + 0.5 : r - 0.5;
    i = $rtoi(r);
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return i;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      longint p;
      real a;
      p = (longint'(n) * n) % (2 * N);
      a = 3.14159265358979323846 * real'(p) / real'(N);
      ref_cos[n] = q128($cos(a));
      ref_sin[n] = q128(-$sin(a));
      v_re[n] = $cos(a);
      v_im[n] = $sin(a);
    end
  end

  // stored sets and their expected power spectra
  localparam int MAXSETS = 40;
  int set_re [MAXSETS][N];
  int set_im [MAXSETS][N];
  int pw     [MAXSETS][N];
  int nsets = 0;

  function automatic int floor128(input int p);
    return p >>> 7;
  endfunction

  task automatic compute_power(input int s);
    int yr [N], yi [N];
    for (int n = 0; n < N; n++) begin
      yr[n] = floor128(set_re[s][n] * ref_cos[n]) - floor128(set_im[s][n] * ref_sin[n]);
      yi[n] = floor128(set_re[s][n] * ref_sin[n]) + floor128(set_im[s][n] * ref_cos[n]);
    end
    for (int k = 0; k < N; k++) begin
      real sr, si;
      int  xr, xi;
      sr = 0.0; si = 0.0;
      for (int m = 0; m < N; m++) begin
        int j;
        j = (k - m + N) % N;
        sr += real'(yr[j]) * v_re[m] - real'(yi[j]) * v_im[m];
        si += real'(yr[j]) * v_im[m] + real'(yi[j]) * v_re[m];
      end
      xr = qadc(sr);
      xi = qadc(si);
      pw[s][k] = ((xr * xr) >> 1) + ((xi * xi) >> 1);
    end
  endtask

  // ---------------- stimulus ----------------
  task automatic strobe_word(input int re, input int im, input int chan, input int gap);
    adc_re   = 8'(re);
    adc_im   = 8'(im);
    adc_chan = 3'(chan);
    repeat (2) @(posedge clk);
    data_strobe_n = 1'b0;
    repeat (5) @(posedge clk);
    data_strobe_n = 1'b1;
    repeat (gap) @(posedge clk);
  endtask

  // one data set: tone at bin `bin` of amplitude `amp`; every word spaced
  // by `spacing` clocks, with a foreign-channel word in between if asked
  task automatic send_set(input int bin, input real amp, input int spacing, input bit foreign,
                          input int resend = -1);
    int s;
    if (resend >= 0) begin
      for (int n = 0; n < N; n++) strobe_word(set_re[resend][n], set_im[resend][n], 3, spacing - 7);
      return;
    end
    s = nsets;
    for (int n = 0; n < N; n++) begin
      real a;
      a = 2.0 * 3.14159265358979323846 * real'(bin * n % N) / real'(N);
      set_re[s][n] = $rtoi(amp * $cos(a) + ((amp * $cos(a) >= 0.0) ? 0.5 : -0.5));
      set_im[s][n] = $rtoi(amp * $sin(a) + ((amp * $sin(a) >= 0.0) ? 0.5 : -0.5));
    end
    nsets++;
    for (int n = 0; n < N; n++) begin
      if (foreign) begin
        strobe_word(-set_re[s][n], 77, 5, spacing / 2 - 7);
        strobe_word(set_re[s][n], set_im[s][n], 3, spacing / 2 - 7);
      end else begin
        strobe_word(set_re[s][n], set_im[s][n], 3, spacing - 7);
      end
    end
    compute_power(s);
  endtask

  task automatic press(ref logic b);
    b = 1'b1;
    repeat (8) @(posedge clk);
    b = 1'b0;
    repeat (40) @(posedge clk);
  endtask

  // ---------------- DMA monitor ----------------
  int dma_words [$];
  int dma_done = 0;
  int ncheck_sets [8][$];   // sets expected in each DMA transfer, per bank order
  int dma_banks [8];
  logic dma_active_q = 1'b0;

  always @(posedge clk) begin
    dma_active_q <= dma_active;
    if (dma_trigger && rst_n) dma_words.push_back(int'(dma_data));
    if (dma_active_q && !dma_active) begin
      int nb, bad;
      nb  = dma_banks[dma_done];
      bad = 0;
      if (nb > 0) begin
      check(dma_words.size() == nb * N * 2, $sformatf("DMA %0d word count %0d", dma_done, dma_words.size()));
      for (int b = 0; b < nb; b++) begin
        for (int k = 0; k < N; k++) begin
          longint exp_v, got;
          exp_v = 0;
          for (int i = 0; i < ncheck_sets[dma_done].size(); i++)
            if (i % nb == b) exp_v += longint'(pw[ncheck_sets[dma_done][i]][k]);
          if (dma_words.size() >= 2 * (b * N + k) + 2)
            got = {dma_words[2*(b*N+k)][15:0], dma_words[2*(b*N+k)+1][15:0]};
          else got = -1;
          if (got != exp_v) begin
            bad++;
            if (bad < 5) $display("DMA %0d bank %0d point %0d: got %0d expected %0d", dma_done, b, k, got, exp_v);
          end
        end
      end
      check(bad == 0, $sformatf("DMA %0d contents (%0d wrong)", dma_done, bad));
      end
      dma_words.delete();
      dma_done++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_flip = 0, n_icc = 0, n_ite = 0, n_mem_clr = 0, n_rejected = 0, n_overrun = 0;
  int n_recycle = 0, n_ext_ite = 0, n_scale_up = 0, n_disp = 0, n_ready = 0, n_run = 0;
  int n_input_error = 0, n_dt = 0;
  longint ite_time = 0;
  int ite_icc = 0;
  logic overrun_q = 0, input_error_q = 0;
  logic [3:0] disp_scale_q = 0;
  run_state_e state_q = ST_STOP;

  always @(posedge clk) begin
    overrun_q <= overrun;
    input_error_q <= input_error;
    disp_scale_q <= disp_scale;
    state_q <= state;
    if (dut.u_buf.flip) n_flip++;
    if (icc) n_icc++;
    if (ite) begin
      n_ite++;
      ite_time = $time;
      ite_icc  = n_icc;
    end
    if (ite && ext_mode) n_ext_ite++;
    if (dut.u_ictl.mem_clr) n_mem_clr++;
    if (dut.sel_strobe != dut.ds_evt) n_rejected++;
    if (overrun && !overrun_q) n_overrun++;
    if (input_error && !input_error_q) n_input_error++;
    if (dut.ena_integ) n_recycle++;
    if (disp_auto && disp_scale > disp_scale_q) n_scale_up++;
    if (disp_valid) n_disp++;
    if (state == ST_READY && state_q != ST_READY) n_ready++;
    if (state == ST_RUN && state_q != ST_RUN) n_run++;
    if (dut.dt_delayed) n_dt++;
  end

  // integration pipeline timing: the first integrator write of a sweep
  // must come PIPE_DELAY = 3 us after the enable-integration pulse
  longint t_ena = 0;
  int n_lat = 0;
  always @(posedge clk) begin
    if (dut.ena_integ) t_ena = $time;
    if (dut.u_int.a_valid && dut.u_int.a_addr[8:0] == 9'd0) begin
      real dt_us;
      dt_us = real'($time - t_ena) / 1000.0;
      check(dt_us > 3.0 && dt_us < 4.0, $sformatf("ena->first write %f us", dt_us));
      n_lat++;
    end
  end

  // watchdog
  initial begin
    #3s;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main sequence ----------------
  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    press(preset_strobe);
    press(man_clear_load);
    check(state == ST_STOP, "STOP after clear/load");
    // a strobe in STOP is ignored
    strobe_word(1, 1, 3, 20);
    check(dut.u_buf.wr_addr == 0, "no write in STOP");
    press(man_run);
    check(state == ST_READY, "READY after run");

    // phase 1: two banks, two cycles per period
    dma_banks[0] = 2; dma_banks[1] = 2; dma_banks[2] = 2;
    for (int s = 0; s < 4; s++)  ncheck_sets[0].push_back(s);
    for (int s = 4; s < 8; s++)  ncheck_sets[1].push_back(s);
    for (int s = 10; s < 12; s++) ncheck_sets[2].push_back(s);
    for (int s = 0; s < 12; s++) begin
      if (s == 0) begin
        send_set(37, 100.0, 40, 1'b1);
        check(state == ST_RUN, "RUN after first strobe");
      end else if (s == 5) begin
        // next periods one cycle long
        preset_bcd = 24'h000001;
        press(preset_strobe);
        send_set((s % 2) ? 100 : 37, 60.0 + 5.0 * s, 40, 1'b1);
      end else begin
        send_set((s % 2) ? 100 : 37, 60.0 + 5.0 * s, 40, 1'b1);
      end
    end
    // let the last set be read and integrated, and the DMA finish
    repeat (16 * 3000) @(posedge clk);
    check(dma_done == 3, $sformatf("three DMA transfers in phase 1 (%0d)", dma_done));
    check(overrun, "overrun flag after a too short period");

    // phase 2: one bank, external period end, full-scale tones
    press(man_stop);
    check(state == ST_STOP, "STOP after stop");
    nbanks_sel = 2'd0;
    ext_mode   = 1'b1;
    preset_bcd = 24'h000003;
    press(preset_strobe);
    press(man_clear_load);
    check(!overrun, "overrun cleared by clear/load");
    press(man_run);
    begin
      int ite0;
      longint t_dt, t_ite;
      int icc0, sets_sent;
      ite0 = n_ite;
      dma_banks[3] = 1;
      icc0 = n_icc;
      send_set(200, 127.0, 36, 1'b0);       // set 12, the reference
      dt_pulse = 1'b1;
      repeat (4) @(posedge clk);
      dt_pulse = 1'b0;
      t_dt = $time;
      sets_sent = 1;
      while (n_ite == ite0 && sets_sent < 2000) begin
        send_set(200, 127.0, 36, 1'b0, 12);
        sets_sent++;
      end
      t_ite = ite_time;
      // every integration cycle completed up to and including the period end
      for (int i = 0; i < ite_icc - icc0; i++) ncheck_sets[3].push_back(12);
      check(t_ite - t_dt >= 64'd1_500_000_000 && t_ite - t_dt < 64'd1_503_000_000,
            $sformatf("DT to period end %0d ns", t_ite - t_dt));
      repeat (16 * 2000) @(posedge clk);
      check(n_ite == ite0 + 1, $sformatf("one external period end (%0d)", n_ite - ite0));
      check(dma_done == 4, "DMA of the external period");
    end
    check(n_scale_up > 0, "display scaler stepped up");

    // phase 2b: all four banks, one cycle per period
    press(man_stop);
    nbanks_sel = 2'd3;
    ext_mode   = 1'b0;
    preset_bcd = 24'h000001;
    press(preset_strobe);
    press(man_clear_load);
    press(man_run);
    dma_banks[4] = 4;
    for (int s = 13; s < 17; s++) ncheck_sets[4].push_back(s);
    for (int s = 13; s < 17; s++) send_set(11 + 60 * (s - 13), 90.0, 40, 1'b0);
    repeat (16 * 6000) @(posedge clk);
    check(dma_done == 5, $sformatf("DMA of the four-bank period (%0d)", dma_done));

    // phase 3: too fast input sets the input error FF
    ext_mode = 1'b0;
    check(!input_error, "no input error at 400 kHz");
    for (int n = 0; n < 3 * N; n++) strobe_word(n % 100, 0, 3, 9);
    check(input_error, "input error at 1 MHz");

    // phase 4: stop
    press(man_stop);
    check(state == ST_STOP, "STOP at the end");

    // mechanism coverage
    check(n_flip > 0, "buffer flips");
    check(n_recycle > 0, "recycle passes");
    check(n_rejected > 0, "channel selector rejected words");
    check(n_icc > 0, "integration cycles complete");
    check(n_ite >= 4, "integration periods end");
    check(n_mem_clr > 0, "memory clear cycles");
    check(n_overrun > 0, "readout overrun");
    check(n_ext_ite > 0, "external period end");
    check(n_dt > 0, "delayed DT pulse");
    check(n_scale_up > 0, "auto scale");
    check(n_disp > 0, "display words");
    check(n_ready > 0 && n_run > 0, "READY and RUN states");
    check(n_input_error > 0, "input error");
    check(n_lat > 0, "pipeline delay measured");
    $display("mechanisms: flips=%0d recycles=%0d rejected=%0d icc=%0d ite=%0d mem_clr=%0d overrun=%0d ext_ite=%0d dt=%0d scale_up=%0d disp=%0d ready=%0d run=%0d input_error=%0d dma=%0d",
             n_flip, n_recycle, n_rejected, n_icc, n_ite, n_mem_clr, n_overrun, n_ext_ite, n_dt,
             n_scale_up, n_disp, n_ready, n_run, n_input_error, dma_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
