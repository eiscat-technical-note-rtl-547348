// integrator: accumulates power spectra in the integration memory.
//
// The memory holds BANKS banks of N words of 32 bits (in the original four
// 512 x 32 bit banks built from eight 1K x 8 static RAMs). For each point
// the control supplies a bank/point address: the previous sum is read, the
// ALU adds the new power to it, and the result is written back and put on
// the A-bus, from where the readout memory and the display take it. During
// the clear cycle that starts every integration period (`zero` high) the ALU
// ignores the memory and passes the power alone, so each word is cleared
// on the same pass that stores its first spectrum. Sums wrap modulo 2^32;
// nothing saturates.
//
// Timing, once per microsecond while `add_en` is high: memory read on phase
// S4, add, write and A-bus register on phase S7 (one-clock `a_valid`). The
// power must be stable from S2 to S7. The bank organisation, word width and
// use of the ALU for clearing follow the original; folding the clear into the
// first integration cycle and the phases are this design's choices.
module integrator
  import sa_pkg::*;
#(
  parameter int unsigned N     = N_POINTS,
  parameter int unsigned BANKS = MAX_BANKS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [3:0]                           phase,
  input  logic                                 add_en,
  input  logic                                 zero,
  input  logic [$clog2(BANKS*N)-1:0]           addr,
  input  logic [POW_W-1:0]                     power,
  output logic [ACC_W-1:0]                     a_bus,
  output logic [$clog2(BANKS*N)-1:0]           a_addr,
  output logic                                 a_valid
);

  localparam int unsigned AW = $clog2(BANKS*N);

  logic [ACC_W-1:0] mem [BANKS*N];
  logic [ACC_W-1:0] rdata;
  logic [ACC_W-1:0] sum;

  always_comb sum = (zero ? '0 : rdata) + ACC_W'(power);

  always_ff @(posedge clk) begin
    if (phase == PH_MEM_RD && add_en) rdata <= mem[addr];
    if (phase == PH_INT_ADD && add_en) mem[addr] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_bus <= '0; a_addr <= '0; a_valid <= 1'b0;
    end else begin
      a_valid <= 1'b0;
      if (phase == PH_INT_ADD && add_en) begin
        a_bus   <= sum;
        a_addr  <= AW'(addr);
        a_valid <= 1'b1;
      end
    end
  end

endmodule
