// sa_pkg: constants and types shared by the spectrum analyzer blocks.
//
// The analyzer runs from one 16 MHz clock. Every microsecond is split into
// sixteen 62.5 ns phases C0..C15 (S0..S7 are pairs of them); each register
// of the synchronous part acts on one phase, given here. The 1 us frame, the
// 16 MHz clock, the 512-point transform, the 8-bit data and the 32-bit
// integration words are the original design's; which phase each register uses is
// this design's own choice, ordered as the original pipeline is (buffer read,
// premultiply, DAC, CCD, ADC, square, integrate).
package sa_pkg;

  localparam int unsigned N_POINTS   = 512;  // CCD stages = DFT length
  localparam int unsigned PT_W       = 9;    // point index width
  localparam int unsigned MAX_BANKS  = 4;    // integration banks
  localparam int unsigned BANK_W     = 2;
  localparam int unsigned DATA_W     = 8;    // ADC sample width
  localparam int unsigned PRE_W      = 9;    // premultiplier output width
  localparam int unsigned POW_W      = 15;   // x^2 + y^2 width (D14..D0)
  localparam int unsigned ACC_W      = 32;   // integration word width
  localparam int unsigned PHASES     = 16;   // 16 MHz clocks per microsecond

  // Phase (C index) on which each pipeline register acts.
  localparam logic [3:0] PH_CHIRP_ADV = 4'd0;   // S0: chirp ROM address clock
  localparam logic [3:0] PH_PRE_OUT   = 4'd0;   // S0: premultiplier output register
  localparam logic [3:0] PH_SQ        = 4'd2;   // S1: x^2, y^2 multiplier clock
  localparam logic [3:0] PH_SQ_OUT    = 4'd4;   // S2: x^2 + y^2 output register
  localparam logic [3:0] PH_READ      = 4'd6;   // S3: read buffer clock
  localparam logic [3:0] PH_MEM_RD    = 4'd8;   // S4: integration memory read
  localparam logic [3:0] PH_PRE_MUL   = 4'd14;  // S7: premultiplier clock
  localparam logic [3:0] PH_INT_ADD   = 4'd14;  // S7: integrator add and write

  typedef enum logic [1:0] {
    ST_STOP  = 2'd0,
    ST_READY = 2'd1,
    ST_RUN   = 2'd2
  } run_state_e;

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx8_t;

  typedef struct packed {
    logic signed [PRE_W-1:0] re;
    logic signed [PRE_W-1:0] im;
  } cplx9_t;

endpackage
