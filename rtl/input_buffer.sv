// input_buffer: double buffer between the receiver ADC and the CCD chain.
//
// The memory holds two halves of 512 complex words (8-bit real, 8-bit
// imaginary, two's complement). The ADC side writes one half while the
// synchronous side reads the other:
//  * Write side. Each accepted data strobe writes one word at the write
//    address of the current half and advances the address. The control FF
//    (`wr_half`) selects the half; after the 512th word the address counter
//    produces the flip-buffer pulse, which toggles the control FF. A clear/load
//    pulse clears the control FF, so writing always starts in half zero.
//  * Read synchronisation. The flip pulse sets FF1; on phase S0 FF1 passes to
//    FF2, and on phase S2 a waiting FF2 starts the read (enable read), as in
//    the original's two-FF scheme. The chirp ROM address counter is cleared
//    at the same moment (`chirp_clr`).
//  * Recycle. Every set is read twice, one word per microsecond on the read
//    phase: in the first pass (recycle FF clear) the CCD is filled, in the
//    second (recycle FF set) the CCD output is integrated. The first read of
//    the second pass gives the enable-integration pulse `ena_integ`.
//  * Input error. A flip while the previous set is still being read, or
//    still waiting to be read, means data arrive faster than about 500 kHz;
//    it sets the input error FF, which stays set until clear/load.
//
// Interface: `wr_strobe` is a one-clock pulse already synchronised to `clk`
// and qualified by the channel selector and the run state. `rd_data`,
// `rd_idx` and `rd_pass` change on the read phase and hold for the rest of
// the microsecond; `rd_valid` tells whether that microsecond carried a read.
// The half size, the flip pulse, FF1/FF2, the recycle FF and the error FF
// follow the original; the phases used, reading the error condition as
// "flip while the other half is still needed", and single-clock internal
// strobes are this design's choices.
module input_buffer
  import sa_pkg::*;
#(
  parameter int unsigned DEPTH = N_POINTS   // words per half
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,       // clear/load pulse
  input  logic [3:0]               phase,
  input  logic                     wr_strobe,
  input  cplx8_t                   wr_data,
  output cplx8_t                   rd_data,
  output logic                     rd_valid,
  output logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic                     rd_pass,     // recycle FF of the word on rd_data
  output logic                     ena_integ,   // first word of the second pass
  output logic                     chirp_clr,   // clear chirp ROM address counter
  output logic                     flip,        // flip-buffer pulse
  output logic                     wr_half,     // control FF
  output logic                     reading,     // a set is being read
  output logic                     input_error  // input error FF
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0]   mem [2*DEPTH];
  logic [AW-1:0] wr_addr, ra;
  logic          ff1, ff2, rd_half, full_half, pass;

  wire last_wr = (wr_addr == AW'(DEPTH - 1));

  always_comb flip = wr_strobe && last_wr;

  // write side and control FF
  always_ff @(posedge clk) begin
    if (wr_strobe) mem[{wr_half, wr_addr}] <= {wr_data.re, wr_data.im};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr   <= '0;
      wr_half   <= 1'b0;
      full_half <= 1'b0;
    end else if (clear) begin
      wr_addr   <= '0;
      wr_half   <= 1'b0;
      full_half <= 1'b0;
    end else if (wr_strobe) begin
      wr_addr <= last_wr ? '0 : wr_addr + 1'b1;
      if (last_wr) begin
        wr_half   <= ~wr_half;
        full_half <= wr_half;
      end
    end
  end

  // read synchronisation, recycle FF and input error FF
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff1 <= 1'b0; ff2 <= 1'b0; reading <= 1'b0; rd_half <= 1'b0;
      ra <= '0; pass <= 1'b0; input_error <= 1'b0;
      rd_data <= '0; rd_valid <= 1'b0; rd_idx <= '0; rd_pass <= 1'b0;
      ena_integ <= 1'b0; chirp_clr <= 1'b0;
    end else if (clear) begin
      ff1 <= 1'b0; ff2 <= 1'b0; reading <= 1'b0; rd_half <= 1'b0;
      ra <= '0; pass <= 1'b0; input_error <= 1'b0;
      rd_valid <= 1'b0; ena_integ <= 1'b0; chirp_clr <= 1'b0;
    end else begin
      ena_integ <= 1'b0;
      chirp_clr <= 1'b0;
      if (flip) begin
        ff1 <= 1'b1;
        if (reading || ff1 || ff2) input_error <= 1'b1;
      end
      if (phase == 4'd0 && ff1 && !ff2 && !flip) begin
        ff2 <= 1'b1;
        ff1 <= 1'b0;
      end
      if (phase == 4'd4 && ff2 && !reading) begin
        ff2       <= 1'b0;
        reading   <= 1'b1;
        rd_half   <= full_half;
        ra        <= '0;
        pass      <= 1'b0;
        chirp_clr <= 1'b1;
      end
      if (phase == PH_READ) begin
        rd_valid <= reading;
        if (reading) begin
          rd_data   <= cplx8_t'(mem[{rd_half, ra}]);
          rd_idx    <= ra;
          rd_pass   <= pass;
          ena_integ <= pass && (ra == '0);
          ra        <= ra + 1'b1;
          if (ra == AW'(DEPTH - 1)) begin
            if (pass) reading <= 1'b0;
            pass <= ~pass;
          end
        end
      end
    end
  end

endmodule
