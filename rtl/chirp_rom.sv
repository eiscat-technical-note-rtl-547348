// chirp_rom: pre-chirp generator with two's complement modification.
//
// Holds the cosine and sine of the chirp W^(n^2/2) = exp(-i*pi*n^2/N) for
// n = 0..N-1 as two N x 8 bit two's complement tables, the 512 x 8 ROMs of
// the original. The entries are round(128*cos(pi*n^2/N)) and
// round(-128*sin(pi*n^2/N)), limited to -128..127; the angle is formed from
// n^2 mod 2N so that it stays exact. The tables are computed at
// elaboration by a constant function in integer arithmetic (Taylor series
// for cos and sin of pi/N, then repeated rotation), so no data file and no
// real arithmetic are needed.
//
// A 9-bit address counter, cleared by `clear` and advanced on phase S0 of
// every microsecond that follows a buffer read (`rd_valid`), keeps the
// tables in step with the buffer data. Because it wraps from N-1 to 0, the
// second (recycle) pass of a set gets the same chirp as the first.
//
// The multipliers cannot form -128 x -128, so an output equal to -128 is
// changed to -127 (an AND of the sign bit and the seven inverted low bits
// ORed into the LSB, as printed in the original's schematic).
//
// Outputs are combinational from the counter and are stable from phase S0
// to the end of the microsecond. The ROM scale of 128 and the exact angle
// formula are this design's reading of the chirp definition; the address
// counter clocked by S0, the ROM sizes and the modification follow the
// original.
module chirp_rom
  import sa_pkg::*;
#(
  parameter int unsigned N = N_POINTS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [3:0]              phase,
  input  logic                    rd_valid,   // previous microsecond carried a buffer read
  output logic [$clog2(N)-1:0]    addr,
  output logic signed [7:0]       cos_out,
  output logic signed [7:0]       sin_out
);


  localparam int unsigned TW = 8 * N;

  // pi * 2^60, the only constant the tables need
  localparam logic signed [127:0] PI_Q60 = 128'sd3622009729038561421;
  localparam int unsigned         FRAC   = 60;

  // round(v * 128 / 2^60) limited to -128..127 (ties cannot occur)
  function automatic logic signed [7:0] quant(input logic signed [127:0] v);
    logic signed [127:0] r;
    r = (v + (128'sd1 <<< (FRAC - 8))) >>> (FRAC - 7);
    if (r > 127)  return 8'sd127;
    if (r < -128) return -8'sd128;
    return 8'(r);
  endfunction

  // Each table is one packed vector: bits 8n+7..8n hold entry n. The
  // angles pi*j/N, j = 0..2N-1, are generated by repeated rotation with
  // cos(pi/N) and sin(pi/N), which come from their Taylor series; all
  // arithmetic is integer with 60 fractional bits, so the rounding error
  // stays far below the 8-bit step.
  function automatic logic [TW-1:0] make_tab(input bit sine);
    logic signed [127:0] x, x2, c1, s1, tc, ts, c, s, cn;
    logic [TW-1:0]       tab;
    logic [2*TW-1:0]     ring;
    longint              p;
    x  = PI_Q60 / 128'(N);
    x2 = (x * x) >>> FRAC;
    c1 = 128'sd1 <<< FRAC;
    s1 = x;
    tc = c1;
    ts = x;
    c  = 128'sd1 <<< FRAC;
    s  = '0;
    for (int k = 1; k <= 12; k++) begin
      tc = -((tc * x2) >>> FRAC) / 128'((2 * k - 1) * (2 * k));
      ts = -((ts * x2) >>> FRAC) / 128'((2 * k) * (2 * k + 1));
      c1 = c1 + tc;
      s1 = s1 + ts;
    end
    // one full turn of rounded values, then each entry picks its angle
    for (int j = 0; j < 2 * int'(N); j++) begin
      ring[8*j +: 8] = sine ? quant(-s) : quant(c);
      cn = ((c * c1) >>> FRAC) - ((s * s1) >>> FRAC);
      s  = ((s * c1) >>> FRAC) + ((c * s1) >>> FRAC);
      c  = cn;
    end
    for (int n = 0; n < int'(N); n++) begin
      p = (longint'(n) * longint'(n)) % (2 * longint'(N));
      tab[8*n +: 8] = ring[8*int'(p) +: 8];
    end
    return tab;
  endfunction

  localparam logic [TW-1:0] COS_TAB = make_tab(1'b0);
  localparam logic [TW-1:0] SIN_TAB = make_tab(1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          addr <= '0;
    else if (clear)                      addr <= '0;
    else if (phase == PH_CHIRP_ADV && rd_valid) addr <= addr + 1'b1;
  end

  function automatic logic signed [7:0] fix128(input logic signed [7:0] v);
    return {v[7:1], v[0] | (v[7] & ~|v[6:0])};
  endfunction

  always_comb begin
    cos_out = fix128(COS_TAB[8*addr +: 8]);
    sin_out = fix128(SIN_TAB[8*addr +: 8]);
  end

endmodule
