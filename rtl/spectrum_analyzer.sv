// spectrum_analyzer: digital part of a 512-point real-time CCD spectrum analyzer.
//
// Complex samples from a receiver ADC are written into a double input
// buffer. Each set of 512 samples is read out twice at 1 MHz, multiplied by
// the chirp exp(-i*pi*n^2/N) (first step of the chirp z-transform) and sent
// through DACs to a charge-coupled chirp filter, which performs the
// convolution step. The filter output, digitised by two 8-bit ADCs, arrives
// back here; its squared magnitude is the power spectrum (the final chirp
// multiplication only changes the phase and is omitted). The powers are
// added into up to four 512 x 32 bit integration banks; at the end of each
// integration period the results go by DMA to the host from a readout
// memory that is kept in step with the integration memory, and an
// auto-scaling display output shows the spectra as they build up.
//
// The analog part (DACs, CCD, its clock drivers, readout amplifiers, offset
// compensation and ADCs) is outside this module: `dac_*` leave it, `ccd_adc_*`
// come back. The pipeline expects the filter output that includes a DAC word
// presented from phase C0 of microsecond t to be on `ccd_adc_*` at phase C2
// (S1) of microsecond t+2, when the squaring multipliers sample it (the
// testbench model presents it from C12 of t+1); the first point of a
// transform then reaches the integrator PIPE_DELAY = 3 us after the second
// reading of the set starts.
//
// Clocking: one 16 MHz clock; a 4-bit counter divides each microsecond into
// phases C0..C15 that enable the registers. The ADC data strobe and the
// panel inputs are asynchronous and are synchronised here; the ADC data must
// be stable from the strobe's falling edge for at least three clock periods.
//
// What follows the original: the block structure, the 512-point recycling
// mode, the buffer/recycle/integration sequencing, the data widths, the
// bank organisation, the integration counter, the output memory with DMA,
// the display scaler and the STOP/READY/RUN control. The phase assignment,
// synchronisers and the details noted in each block are this design's.
module spectrum_analyzer
  import sa_pkg::*;
#(
  parameter int unsigned DT_DELAY_US = 1_500_000,
  parameter int unsigned DMA_CLKS    = 8
) (
  input  logic               clk,             // 16 MHz
  input  logic               rst_n,
  // receiver ADC
  input  logic signed [7:0]  adc_re,
  input  logic signed [7:0]  adc_im,
  input  logic [2:0]         adc_chan,
  input  logic               data_strobe_n,
  // front panel
  input  logic [2:0]         chan_select,
  input  logic               chan_sel_on,
  input  logic               comp_mode,
  input  logic               man_clear_load,
  input  logic               man_run,
  input  logic               man_stop,
  input  logic [23:0]        preset_bcd,
  input  logic               preset_strobe,
  input  logic               ext_mode,
  input  logic [1:0]         nbanks_sel,
  input  logic               disp_auto,
  input  logic [3:0]         disp_man_scale,
  // computer and radar controller
  input  logic               cmp_clear_load,
  input  logic               cmp_run_enable,
  input  logic               dt_pulse,
  // analog CCD chain
  output logic signed [8:0]  dac_re,
  output logic signed [8:0]  dac_im,
  output logic               dac_valid,
  input  logic signed [7:0]  ccd_adc_re,
  input  logic signed [7:0]  ccd_adc_im,
  // status
  output run_state_e         state,
  output logic               input_error,
  output logic [7:0]         test_dac,
  output logic               icc,
  output logic               ite,
  output logic [23:0]        integ_count,
  output logic               overrun,
  // DMA
  output logic [15:0]        dma_data,
  output logic               dma_trigger,
  output logic               dma_active,
  // display
  output logic [7:0]         disp_data,
  output logic               disp_valid,
  output logic [10:0]        disp_addr,
  output logic [3:0]         disp_scale
);

  localparam int unsigned AW = $clog2(MAX_BANKS * N_POINTS);

  // clock generator
  logic [3:0]  phase;
  logic [15:0] c_pulse;
  logic [7:0]  s_pulse;
  logic        us_tick;

  sa_timing u_timing (
    .clk, .rst_n, .phase, .c_pulse, .s_pulse, .us_tick
  );

  // data strobe synchroniser; data is taken two clocks after the falling edge
  logic [2:0]  ds_sync;
  cplx8_t      ds_data;
  logic [2:0]  ds_chan;
  logic        ds_evt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_sync <= 3'b111; ds_data <= '0; ds_chan <= '0;
    end else begin
      ds_sync <= {ds_sync[1:0], data_strobe_n};
      if (ds_sync[1] == 1'b0 && ds_sync[2] == 1'b1) begin
        ds_data <= '{re: adc_re, im: adc_im};
        ds_chan <= adc_chan;
      end
    end
  end

  logic ds_edge_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ds_edge_q <= 1'b0;
    else        ds_edge_q <= (ds_sync[1] == 1'b0 && ds_sync[2] == 1'b1);
  end
  always_comb ds_evt = ds_edge_q;

  // channel selector and operation control
  logic sel_strobe, accept, clear_load, wr_strobe;

  channel_selector u_chan (
    .chan_addr(ds_chan), .chan_select, .sel_on(chan_sel_on),
    .strobe_in(ds_evt), .strobe_out(sel_strobe)
  );

  op_control u_op (
    .clk, .rst_n, .comp_mode, .man_clear_load, .man_run, .man_stop,
    .cmp_clear_load, .cmp_run_enable, .data_strobe(sel_strobe),
    .clear_load, .state, .accept
  );

  always_comb wr_strobe = sel_strobe && accept && !clear_load;

  // input buffer
  cplx8_t      rd_data;
  logic        rd_valid, rd_pass, ena_integ, chirp_clr, flip, wr_half, reading;
  logic [8:0]  rd_idx;

  input_buffer u_buf (
    .clk, .rst_n, .clear(clear_load), .phase, .wr_strobe, .wr_data(ds_data),
    .rd_data, .rd_valid, .rd_idx, .rd_pass, .ena_integ, .chirp_clr, .flip,
    .wr_half, .reading, .input_error
  );

  // pre-chirp and premultipliers
  logic signed [7:0] chirp_cos, chirp_sin;
  logic [8:0]        chirp_addr;
  cplx9_t            pre_y;

  chirp_rom u_chirp (
    .clk, .rst_n, .clear(chirp_clr || clear_load), .phase, .rd_valid,
    .addr(chirp_addr), .cos_out(chirp_cos), .sin_out(chirp_sin)
  );

  premultiplier u_pre (
    .clk, .rst_n, .phase, .x(rd_data), .in_valid(rd_valid),
    .chirp_cos, .chirp_sin, .y(pre_y), .out_valid(dac_valid)
  );

  always_comb begin
    dac_re = pre_y.re;
    dac_im = pre_y.im;
  end

  // power computation
  logic [POW_W-1:0] power;
  logic             pow_valid;

  power_calc u_pow (
    .clk, .rst_n, .phase, .x(ccd_adc_re), .y(ccd_adc_im), .in_valid(1'b1),
    .power, .test_dac, .out_valid(pow_valid)
  );

  // integration
  logic          add_en, zero, mem_clr, ibcc;
  logic [AW-1:0] int_addr, a_addr;
  logic [31:0]   a_bus;
  logic          a_valid;

  integ_control u_ictl (
    .clk, .rst_n, .clear(clear_load), .phase, .ena_integ, .ite, .nbanks_sel,
    .add_en, .addr(int_addr), .zero, .mem_clr, .ibcc, .icc
  );

  integrator u_int (
    .clk, .rst_n, .phase, .add_en, .zero, .addr(int_addr), .power,
    .a_bus, .a_addr, .a_valid
  );

  // integration period
  logic [1:0]  dt_sync;
  logic        dt_evt, dt_delayed, dt_busy;
  logic [23:0] preset_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dt_sync <= '0;
    else        dt_sync <= {dt_sync[0], dt_pulse};
  end

  logic dt_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dt_prev <= 1'b0;
    else        dt_prev <= dt_sync[1];
  end
  always_comb dt_evt = dt_sync[1] && !dt_prev;

  dt_delay #(.DELAY_US(DT_DELAY_US)) u_dt (
    .clk, .rst_n, .us_tick, .dt_in(dt_evt), .dt_out(dt_delayed), .busy(dt_busy)
  );

  integ_counter u_icnt (
    .clk, .rst_n, .clear(clear_load), .preset_bcd, .preset_strobe, .icc,
    .ext_mode, .dt_delayed, .count_bcd(integ_count), .preset_reg, .ite
  );

  // readout memory, DMA and display
  logic [31:0]   c_bus;
  logic [AW-1:0] c_addr;
  logic          c_valid, par_en;

  readout_memory #(.DMA_CLKS(DMA_CLKS)) u_ro (
    .clk, .rst_n, .clear(clear_load), .a_bus, .a_addr, .a_valid, .icc, .ite,
    .nbanks_sel, .dma_data, .dma_trigger, .dma_active, .par_en, .overrun,
    .c_bus, .c_addr, .c_valid
  );

  display_control u_disp (
    .clk, .rst_n, .scale_reset(ite || clear_load), .auto_mode(disp_auto),
    .man_scale(disp_man_scale), .c_bus, .c_valid, .disp_data, .disp_valid,
    .scale(disp_scale)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       disp_addr <= '0;
    else if (c_valid) disp_addr <= 11'(c_addr);
  end

endmodule
