// ccd_chain_model: behavioural model of the analyzer's analog CCD chain.
//
// Not synthesizable. Stands for the two DACs, the N-stage charge-coupled
// chirp transversal filter, the differential readout amplifiers and the two
// 8-bit flash ADCs. Once per microsecond, on phase C8, the DAC words enter
// the first stage and all stages shift; the filter output
//     g = sum_{m=0}^{N-1} stage[m] * exp(+i*pi*m^2/N)
// is formed (stage[0] newest). On phase C12 of the following microsecond the
// ADCs present g / 2^GAIN_SHIFT, rounded and limited to -128..127. With a
// set fed twice, the output during the second pass is the circular
// convolution of the chirp z-transform, so |ADC| is |X(k)| / N for the
// default gain. Noise, offsets and settling are not modelled.
//
// Timing contract with spectrum_analyzer: a DAC word presented from C0 of
// microsecond t appears in g on the ADC outputs from C12 of t+1 to C12 of t+2.
module ccd_chain_model #(
  parameter int unsigned N          = 512,
  parameter int unsigned GAIN_SHIFT = 9
) (
  input  logic              clk,
  input  logic [3:0]        phase,
  input  logic signed [8:0] dac_re,
  input  logic signed [8:0] dac_im,
  output logic signed [7:0] adc_re,
  output logic signed [7:0] adc_im
);

  real st_re [N];
  real st_im [N];
  real v_re  [N];
  real v_im  [N];
  real g_re, g_im, gp_re, gp_im;

  function automatic logic signed [7:0] quant(input real v);
    real r;
    r = v / real'(longint'(1) << GAIN_SHIFT);
    r = (r >= 0.0) ? r + 0.5 : r - 0.5;
    if (r > 127.0)  return 8'sd127;
    if (r < -128.0) return -8'sd128;
    return 8'($rtoi(r));
  endfunction

  initial begin
    for (int m = 0; m < int'(N); m++) begin
      longint p;
      real    a;
      p = (longint'(m) * longint'(m)) % (2 * longint'(N));
      a = 3.14159265358979323846 * real'(p) / real'(N);
      v_re[m] = $cos(a);
      v_im[m] = $sin(a);
      st_re[m] = 0.0;
      st_im[m] = 0.0;
    end
    g_re = 0.0; g_im = 0.0; gp_re = 0.0; gp_im = 0.0;
    adc_re = '0;
    adc_im = '0;
  end

  always @(posedge clk) begin
    if (phase == 4'd8) begin
      real sr, si;
      for (int m = int'(N) - 1; m > 0; m--) begin
        st_re[m] = st_re[m-1];
        st_im[m] = st_im[m-1];
      end
      st_re[0] = real'(dac_re);
      st_im[0] = real'(dac_im);
      sr = 0.0; si = 0.0;
      for (int m = 0; m < int'(N); m++) begin
        sr += st_re[m] * v_re[m] - st_im[m] * v_im[m];
        si += st_re[m] * v_im[m] + st_im[m] * v_re[m];
      end
      gp_re = g_re; gp_im = g_im;
      g_re  = sr;   g_im  = si;
    end
    if (phase == 4'd12) begin
      adc_re <= quant(gp_re);
      adc_im <= quant(gp_im);
    end
  end

endmodule
