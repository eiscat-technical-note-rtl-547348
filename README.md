# Real-time CCD chirp z-transform spectrum analyzer

This is synthesizable SystemVerilog for the digital part of a real-time power spectrum analyzer for
incoherent-scatter radar receiver data. The analyzer takes complex 8-bit samples from a receiver ADC
and computes 512-point power spectra at a 1 MHz processing clock. It integrates the spectra over a
preset number of cycles, or over a period ended by the radar controller, and sends each integrated
result to a host computer by DMA. A scaled copy drives an oscilloscope display.

The discrete Fourier transform is not computed in digital logic. The analyzer uses the chirp
z-transform (CZT), which turns a DFT into a chirp multiplication, a convolution with a chirp, and a
second chirp multiplication. Only the first multiplication is digital. The convolution is done by an
analog charge-coupled device (CCD) transversal filter with 512 taps fixed to the chirp. The second
multiplication is not needed: it only changes phase, and power spectra discard phase. The digital
logic therefore does four things:

- it feeds the CCD with pre-chirped data at exactly one word per microsecond;
- it turns the CCD output into power (x² + y²);
- it accumulates 512-point spectra in up to four memory banks;
- it manages buffering, timing, period control, readout and display around the analog core.

The RTL covers all of that. The analog chain, the converters around it and the external equipment
are brought out as ports of the top module, `spectrum_analyzer`. A behavioural model of the CCD chain
(`tb/ccd_chain_model.sv`) closes the loop in simulation.

## The chirp z-transform as used here

With W = exp(-i·2π/N) and N = 512:

    X(k) = W^(k²/2) · Σ_n [ x(n) · W^(n²/2) ] · W^(-(k-n)²/2)

- `chirp_rom` and `premultiplier` form y(n) = x(n)·W^(n²/2).
  - The chirp tables hold round(128·cos(πn²/N)) and round(−128·sin(πn²/N)).
  - The phase angle uses n² mod 2N, so the tables are exact for every n.
  - The tables are computed at elaboration; there is no data file.
  - The multipliers cannot form (−128)·(−128), so a table value of −128 is changed to −127 on its
    way out.
  - Each 8×8 product is divided by 128 (arithmetic shift). This gives a 9-bit complex result:
    Re = A − B, Im = A + B.
- The CCD convolves y with the conjugate chirp. In **recycle mode**, the mode built here, each
  512-sample set is fed through the CCD twice:
  - the first pass fills the filter;
  - during the second pass the filter output is the circular convolution, that is |X(k)| for
    k = 0..511 in order.
- `power_calc` squares the two 8-bit CCD ADC outputs and adds the squares.
  - Each square contributes its product bits 14..1.
  - This gives a 15-bit power, 0..16384.
  - Bits 14..7 also go to a test DAC port.

A set therefore takes 1024 µs to process. New sets can be accepted at most every 1024 µs, which is
an input rate of about 500 kHz. The sliding-DFT (continuous) mode of the original hardware is not
built.

## One microsecond, sixteen phases

Everything synchronous runs on one 16 MHz clock. `sa_timing` counts the sixteen 62.5 ns phases
C0..C15 of each microsecond. S0..S7 are the 125 ns pairs: S_i covers phases 2i and 2i+1. The
original hardware used these pulses as clocks for individual register groups. Here they are
**clock enables**: each register loads on the clock edge whose phase matches its own phase
constant.

The signal names follow the original timing diagrams. Which phase each one uses is a choice of this
design. The constants are in `rtl/sa_pkg.sv`:

| phase | what loads |
|---|---|
| 0 (S0) | chirp address counter advances; premultiplier result to the DAC outputs (`dac_re`, `dac_im`) |
| 2 (S1) | x², y² multipliers load the CCD ADC word |
| 4 (S2) | power register (x² + y²) |
| 4 | a set waiting to be read starts its read |
| 6 (S3) | buffer read: the next word and its point index |
| 8 (S4) | integration memory read of the current point |
| 14 (S7) | premultiplier products; integration add and write, with the A-bus output |

**Contract with the analog chain.**
- A DAC word is valid from phase 0 of microsecond t.
- The CCD ADC must present the corresponding filter output on `ccd_adc_re`/`ccd_adc_im` from
  phase 12 of microsecond t+1, and hold it until phase 12 of t+2.
- With that contract, the power of spectral point k reaches the integrator three microseconds
  after the DAC word that completes it. This three-microsecond pipeline delay is also present in
  the original design.

## Input buffer and the recycle sequence

`input_buffer` is a double buffer of 2 × 512 words.

**Write side.** It is asynchronous in the original. Here:
- the active-low data strobe is synchronised in the top with three flip-flops;
- the sample is captured on the detected edge;
- the channel selector passes it only if the three channel address bits match the front-panel
  setting (unless selection is off);
- the operation control must be in READY or RUN.

Each accepted word is written into the half chosen by the control flip-flop. After the 512th word,
the flip-buffer pulse toggles the control flip-flop and starts the read synchronisation.

**Read side.**
1. FF1 catches the flip pulse.
2. FF1 passes to FF2 at phase 0.
3. At phase 4 a waiting FF2 starts the read of the full half and clears the chirp address counter.
4. Words are read at one per microsecond, twice. The recycle flip-flop tells the two passes apart.
5. The first word of the second pass gives the **enable-integration** pulse.

**Input error.** If a flip arrives while the previous set is still being read, or is still waiting
to be read, the input arrived faster than the analyzer can process. The **input error** flip-flop
is then set and stays set until clear/load.

## Integration: banks, cycles and periods

`integ_control` turns the enable-integration pulse into a pass over one memory bank:
1. A pipeline delay counter loads 3 and counts phase-0 pulses.
2. At the end of the count, the add enable rises for 512 microseconds.
3. The address steps through the points of the current bank, {bank, point}, one per microsecond.

Successive data sets go to successive banks, 1 to 4 as selected by `nbanks_sel`. Each bank
integrates every n-th spectrum.
- The end of each pass gives IBCC.
- The end of the pass over the last selected bank gives **ICC** (integration cycle complete).

`integrator` holds 4 × 512 words of 32 bits.
- In each add microsecond it reads the old sum at phase 8.
- At phase 14 it writes old + power and puts the new sum, with its address, on the A-bus.

**Clear cycle.** The original hardware ran a separate memory clear cycle (writing zeroes) before the
first cycle of a new period. This design folds that clear into the first cycle. While the zero flag
is set, the adder ignores the memory and writes the power alone. The memory ends up the same as
after a clear cycle followed by a cycle of adds, and no data set is spent on clearing.
- The zero flag is set by reset, by clear/load and at each period end (**ITE**).
- It is removed by the next ICC.
- A `mem_clr` pulse marks the start of each bank's first pass. With four banks, there are four such
  pulses per period.

**Period length.** `integ_counter` is a six-digit BCD down-counter.
- The front-panel preset register loads it at clear/load and again at each ITE.
- Each ICC counts it down.
- The ICC that finds the count at 1 (or 0) ends the period with ITE. A preset of P therefore gives
  P cycles, and 0 behaves as 1.

**External mode.** The count is ignored. The radar controller's DT pulse is first delayed by about
1.5 s in `dt_delay`, so that the analyzer and the correlator can run side by side. The next ICC then
ends the period, so a period always holds whole cycles. A second DT pulse while a delay is running
is ignored.

**Word width.** 32-bit sums hold 262,144 full-scale cycles (2³² / 16384). That is enough for the
140,000-spectrum integrations the analyzer was characterised with. A preset near 999,999 with a
full-scale input would wrap, as it would in the original 32-bit memory.

## Readout memory and DMA

`readout_memory` is a second 4 × 512 × 32 memory. During integration it takes every A-bus write in
parallel with the integration memory. At ITE:
- if at least one whole cycle has been written in parallel since the last transfer, parallel
  writing stops and the contents are sent by DMA;
- the integration memory meanwhile starts the next period at once.

**DMA format.** Each 32-bit word is sent as two 16-bit words, high half first, on `dma_data`. Each
word comes with a one-clock `dma_trigger`, spaced by `DMA_CLKS` clocks (8 by default, 2 MHz). This is
the handshake-free interface of the original. The transfer covers banks 0..`nbanks_sel`, point by
point, and `dma_active` is high throughout. When it ends, parallel writing resumes at the next ICC.
The next period therefore refreshes the readout memory during its first whole cycle.

**Overrun.** If a period ends before such a refresh, for example with one-cycle periods while a DMA
runs, the period is not transferred and the `overrun` flag is set. Clear/load resets the flag. The
original leaves this case undefined. The flag is this design's addition.

## Display scaler

`display_control` selects 8 of the 32 C-bus bits for the display DAC. The C-bus carries every
parallel write and every word read out by DMA.
- With scale s, display bit k is bus bit 9+k+s. The lowest window is bits 9..16, as with the
  original's 74150 multiplexers.
- **Manual mode**: s comes from the panel.
- **Auto mode**: s starts at 0 at each period end and at clear/load. It steps up by one for each
  word with a bit above the window, so the display always shows the eight highest bits in use
  while the sums grow.

## Operation control

`op_control` implements the three run states:
- clear/load puts the analyzer in STOP;
- RUN moves STOP to READY;
- the first accepted data strobe moves READY to RUN;
- STOP returns to STOP from either state.

Data are written only in READY and RUN, and there is no upper limit on the time between strobes.
Clear/load is a pulse of `CL_CLKS` clocks. It resets the buffer, the integration sequence, the BCD
counter, the readout memory control and the display scale.

The commands come from the front panel or, with the computer/manual switch, from the host:
- a computer clear/load line;
- a run-enable line, whose rising edge acts as RUN and falling edge as STOP.

All command inputs pass two-flip-flop synchronisers and edge detectors.

## Top-level ports

`spectrum_analyzer` brings out:

| group | ports |
|---|---|
| receiver ADC | `adc_re`, `adc_im`, `adc_chan`, `data_strobe_n` |
| front panel | `chan_select`, `chan_sel_on`, `comp_mode`, `man_clear_load`, `man_run`, `man_stop`, `preset_bcd`, `preset_strobe`, `ext_mode`, `nbanks_sel`, `disp_auto`, `disp_man_scale` |
| host and radar controller | `cmp_clear_load`, `cmp_run_enable`, `dt_pulse` |
| analog CCD chain | `dac_re`, `dac_im`, `dac_valid` out; `ccd_adc_re`, `ccd_adc_im` in |
| status | `state`, `input_error`, `test_dac`, `icc`, `ite`, `integ_count`, `overrun` |
| DMA | `dma_data`, `dma_trigger`, `dma_active` |
| display DAC | `disp_data`, `disp_valid`, `disp_addr`, `disp_scale` |

Parameters of the top: `DT_DELAY_US` (1,500,000) and `DMA_CLKS` (8). The sizes (512 points, 4 banks,
32-bit sums, 8-bit samples) are in `sa_pkg`.

## Where this design departs or chooses

- **Clocking.** The C/S pulses are clock enables of a single 16 MHz clock, not separate clocks. The
  phase of each register is chosen here (see the table above).
- **Clear cycle.** The memory clear is folded into the first integration cycle.
- **Period counting.** A preset of P gives P cycles, and 0 behaves as 1.
- **External period end.** It waits for the first ICC after the delayed DT pulse.
- **DMA.** The word order is high half first. The word spacing, the resumption of parallel writes
  at the next ICC, and the `overrun` flag are this design's choices.
- **Chirp tables.** The amplitude scale (128) and the rounding of the chirp tables are chosen here.
  So is the /128 product scaling in the premultiplier.
- **Auto scaling.** It steps one bit per word that overflows the window.
- **Not built:**
  - the input-control path (external sampling control, stop sampling, buffer full) drawn in the
    original control schematic, because its operation is not described;
  - the sliding-DFT continuous mode;
  - the handshake variant of the DMA.
- **Outside the RTL:** the analog chain (DACs, CCD, CCD clock drivers, readout amplifiers, offset
  compensation, ADCs), the test and display DACs, the oscillator, and the host/CAMAC interface.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. For example, with plain Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb --top-module tb_integ_control \
        rtl/sa_pkg.sv tb/tb_integ_control.sv -o sim && ./obj_dir/sim

The end-to-end test uses the top at its default parameters and the CCD chain model:

    verilator --binary --timing -Wno-fatal -y rtl -y tb --top-module tb_spectrum_analyzer \
        rtl/sa_pkg.sv tb/tb_spectrum_analyzer.sv -o sim && ./obj_dir/sim

It takes about 15 s and simulates about 1.6 s. It strobes tone data sets through a channel selector
that must reject interleaved words of another channel. For each set it computes the expected power
spectrum itself, from the chirp tables, the premultiplication, the CCD convolution and the ADC
rounding. It then compares every DMA word with the expected sums per bank and period. It covers:

- two-bank periods;
- a change of preset;
- an overrun;
- an external period ended by a DT pulse after the full 1.5 s delay (about 1300 integrated spectra);
- a four-bank period;
- automatic display scaling;
- the input error at a 1 MHz input rate;
- every run-state transition.

It counts each of these mechanisms and fails if any never happened.

`tb_integration_workload` repeats the measurement the analyzer was characterised with: white
receiver noise integrated over N = 10, 100, 1000 and 10000 spectra, at the default parameters. It
takes about two minutes. Every DMA sum must equal the testbench's own sum of reference spectra. The
normalised variance of the integrated spectrum across its points must then follow
var/mean² ≈ c/N. Here c is the ratio measured on single spectra, about 1.4 with this noise level,
because the CCD output is only a few LSBs. The measured N·var/mean² stays between 1.4 and 1.7 over
all four runs. A fifth run integrates two spectra side by side: two banks, 200 cycles, with even
and odd data sets in different banks. Both banks are checked word by word. Their difference, which
removes any shape the two estimates share, must show about twice the single-bank normalised
variance.

The block testbenches shorten sizes where that makes the test sharper (8-point memories, a 20 µs DT
delay). The chirp, premultiplier and power tests cover full tables or all input pairs.
