// tb_integration_workload: noise-integration runs of N = 10, 100, 1000 and
// 10000 spectra through the whole analyzer, at its default parameters, and
// a run of two spectra integrated side by side and subtracted.
//
// This is the measurement the analyzer was characterised with: receiver
// noise is analysed and integrated over N spectra, and the variance of the
// integrated spectrum across its points is compared with the expected law
//     var(S_N) = E(S_N)^2 / N.
// Here complex white Gaussian noise (8-bit samples, sigma 40 per component,
// limited to -128..127) is strobed in on one channel at about 470 kHz, with
// one bank, internal period control and a preset of N. For every data set
// the testbench computes its own expected power spectrum (chirp tables,
// premultiplication, CCD convolution through the model's response, ADC
// rounding, x^2 + y^2) and adds it to an expected sum, so the DMA output of
// each period can be compared word by word.
//
// Checks per run: 1024 DMA words; every 32-bit sum equal to the expected
// sum; the period ends after exactly N integration cycles; and the
// normalised variance var/mean^2 of the 512 integrated points lies within
// a factor of two of c/N, where c is the same ratio measured on single
// spectra of the first run. The normalised variance must also fall from run
// to run.
//
// A last run uses two banks for 200 cycles: even data sets go to bank 0 and
// odd ones to bank 1, so two independent estimates of the same spectrum are
// integrated at once. Both banks are checked word by word, and their
// difference, which removes any shape common to both, must have a
// normalised variance var(S_a - S_b)/mean^2 within a factor of two of
// 2c/N. The whole test simulates about 12 s of analyzer time.
`timescale 1ns/1ps
module tb_integration_workload;
  import sa_pkg::*;

  localparam int N = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic signed [7:0] adc_re = '0, adc_im = '0;
  logic [2:0]  adc_chan = 3'd1;
  logic        data_strobe_n = 1'b1;
  logic [2:0]  chan_select = 3'd1;
  logic        chan_sel_on = 1'b1;
  logic        comp_mode = 1'b0, man_clear_load = 1'b0, man_run = 1'b0, man_stop = 1'b0;
  logic [23:0] preset_bcd = 24'h000010;
  logic        preset_strobe = 1'b0, ext_mode = 1'b0;
  logic [1:0]  nbanks_sel = 2'd0;
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

  initial begin
    #20s;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ----------------
  logic signed [7:0] ref_cos [N];
  logic signed [7:0] ref_sin [N];
  real v_re [N], v_im [N];

  function automatic logic signed [7:0] q128(input real v);
    int i;
    i = $rtoi((v * 128.0 >= 0.0) ? v * 128.0 + 0.5 : v * 128.0 - 0.5);
    if (i > 127) i = 127;
    if (i <= -128) i = -127;
    return 8'(i);
  endfunction

  function automatic int qadc(input real v);
    int i;
    i = $rtoi((v / 512.0 >= 0.0) ? v / 512.0 + 0.5 : v / 512.0 - 0.5);
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return i;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      real a;
      a = 3.14159265358979323846 * real'((longint'(n) * n) % (2 * N)) / real'(N);
      ref_cos[n] = q128($cos(a));
      ref_sin[n] = q128(-$sin(a));
      v_re[n] = $cos(a);
      v_im[n] = $sin(a);
    end
  end

  int     cur_re [N], cur_im [N], cur_pw [N];
  longint exp_sum [2][N];
  int     cur_bank;

  task automatic set_power();
    int yr [N], yi [N];
    for (int n = 0; n < N; n++) begin
      yr[n] = ((cur_re[n] * ref_cos[n]) >>> 7) - ((cur_im[n] * ref_sin[n]) >>> 7);
      yi[n] = ((cur_re[n] * ref_sin[n]) >>> 7) + ((cur_im[n] * ref_cos[n]) >>> 7);
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
      cur_pw[k] = ((xr * xr) >> 1) + ((xi * xi) >> 1);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979323846 * u2);
  endfunction

  function automatic int noise_sample();
    int v;
    real g;
    g = 40.0 * gauss();
    v = $rtoi((g >= 0.0) ? g + 0.5 : g - 0.5);
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction

  // normalised variance var/mean^2 across the points of a spectrum
  function automatic real norm_var(input longint s [N]);
    real m, v;
    m = 0.0;
    for (int k = 0; k < N; k++) m += real'(s[k]);
    m /= real'(N);
    v = 0.0;
    for (int k = 0; k < N; k++) v += (real'(s[k]) - m) * (real'(s[k]) - m);
    v /= real'(N - 1);
    return v / (m * m);
  endfunction

  // ---------------- stimulus ----------------
  task automatic send_noise_set();
    for (int n = 0; n < N; n++) begin
      cur_re[n] = noise_sample();
      cur_im[n] = noise_sample();
    end
    for (int n = 0; n < N; n++) begin
      adc_re = 8'(cur_re[n]);
      adc_im = 8'(cur_im[n]);
      data_strobe_n = 1'b0;
      repeat (5) @(posedge clk);
      data_strobe_n = 1'b1;
      repeat (28) @(posedge clk);
    end
    set_power();
    for (int k = 0; k < N; k++) exp_sum[cur_bank][k] += longint'(cur_pw[k]);
  endtask

  task automatic press(ref logic b);
    b = 1'b1;
    repeat (8) @(posedge clk);
    b = 1'b0;
    repeat (40) @(posedge clk);
  endtask

  // ---------------- DMA capture ----------------
  logic [15:0] words [$];
  always @(posedge clk) if (rst_n && dma_trigger) words.push_back(dma_data);

  int n_icc = 0, n_ite = 0;
  always @(posedge clk) if (rst_n) begin
    if (icc) n_icc++;
    if (ite) n_ite++;
  end

  function automatic logic [23:0] to_bcd(input int v);
    logic [23:0] r;
    for (int d = 0; d < 6; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // ---------------- runs ----------------
  initial begin
    int  sizes [5] = '{10, 100, 1000, 10000, 200};
    int  banks [5] = '{1, 1, 1, 1, 2};
    real c1, prev;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    c1 = 0.0;
    prev = 1.0e9;
    foreach (sizes[r]) begin
      int nspec, nb, icc0, ite0, bad;
      longint got [2][N];
      real nv, nvb;
      nspec = sizes[r];
      nb = banks[r];
      preset_bcd = to_bcd(nspec);
      nbanks_sel = 2'(nb - 1);
      press(preset_strobe);
      press(man_clear_load);
      press(man_run);
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < N; k++) exp_sum[b][k] = 0;
      words.delete();
      icc0 = n_icc;
      ite0 = n_ite;
      for (int s = 0; s < nspec * nb; s++) begin
        cur_bank = s % nb;
        send_noise_set();
        if (r == 0) begin
          longint one [N];
          for (int k = 0; k < N; k++) one[k] = longint'(cur_pw[k]);
          c1 += norm_var(one) / real'(nspec);
        end
      end
      // the last set is read twice and integrated, then the DMA runs
      repeat (16 * (1600 + 1100 * nb)) @(posedge clk);
      check(n_ite == ite0 + 1, $sformatf("N=%0d: one period end (%0d)", nspec, n_ite - ite0));
      check(n_icc == icc0 + nspec, $sformatf("N=%0d: %0d integration cycles", nspec, n_icc - icc0));
      check(words.size() == 2 * nb * N, $sformatf("N=%0d: %0d DMA words", nspec, words.size()));
      check(!input_error && !overrun, $sformatf("N=%0d: no input error or overrun", nspec));
      bad = 0;
      for (int b = 0; b < nb; b++)
        for (int k = 0; k < N; k++) begin
          int w;
          w = 2 * (b * N + k);
          got[b][k] = (w + 1 < words.size()) ? longint'({words[w], words[w+1]}) : -1;
          if (got[b][k] != exp_sum[b][k]) begin
            bad++;
            if (bad < 4) $display("N=%0d bank %0d point %0d: got %0d expected %0d",
                                  nspec, b, k, got[b][k], exp_sum[b][k]);
          end
        end
      check(bad == 0, $sformatf("N=%0d: DMA sums (%0d wrong)", nspec, bad));
      for (int b = 0; b < nb; b++) begin
        nv = norm_var(got[b]);
        $display("N=%0d bank %0d: mean %0.1f per spectrum, var/mean^2 = %g, times N = %g (single spectrum %g)",
                 nspec, b, real'(got[b][N/2]) / real'(nspec), nv, nv * real'(nspec), c1);
        check(nv * real'(nspec) > 0.5 * c1 && nv * real'(nspec) < 2.0 * c1,
              $sformatf("N=%0d: variance law, var/mean^2 * N = %g against %g", nspec, nv * real'(nspec), c1));
      end
      if (nb == 1) begin
        check(nv < prev, $sformatf("N=%0d: variance falls with N", nspec));
        prev = nv;
      end else begin
        // difference of the two simultaneous estimates
        longint diff [N];
        real m0, md, vd;
        m0 = 0.0; md = 0.0; vd = 0.0;
        for (int k = 0; k < N; k++) begin
          diff[k] = got[0][k] - got[1][k];
          m0 += real'(got[0][k]) / real'(N);
          md += real'(diff[k]) / real'(N);
        end
        for (int k = 0; k < N; k++) vd += (real'(diff[k]) - md) * (real'(diff[k]) - md) / real'(N - 1);
        nvb = vd / (m0 * m0) * real'(nspec);
        $display("N=%0d difference: mean %g, var/mean^2 * N = %g (expected about %g)", nspec, md, nvb, 2.0 * c1);
        check(nvb > c1 && nvb < 4.0 * c1, $sformatf("N=%0d: difference variance %g against %g", nspec, nvb, 2.0 * c1));
        check(md * md < 16.0 * vd / real'(N), $sformatf("N=%0d: difference mean %g near zero", nspec, md));
      end
      press(man_stop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
