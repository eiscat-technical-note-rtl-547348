// integ_control: sequences the integrator.
//
// The enable-integration pulse from the input buffer marks the first read of
// the second (recycle) pass of a data set. The CCD output that belongs to
// point 0 of that set reaches the integrator PIPE_DELAY microseconds later
// (the CCD's 512 us have already passed during the first pass; what remains
// is the 3 us of the DAC, CCD readout, ADC and squaring stages), so a
// pipeline delay counter waits that long and then starts a sweep of N
// points, one per microsecond, into the current bank. This keeps every
// point of one transform from one data set, also when several spectra are
// integrated in different banks.
//
// The bank counter steps after each sweep (integration basic cycle complete,
// `ibcc`) and wraps after the number of banks chosen on the front panel
// (`nbanks_sel` + 1); the wrap is the integration cycle complete pulse
// `icc` counted by the integration counter. After a clear/load or an
// integration time end the next integration cycle is a clear cycle: `zero`
// tells the integrator to write the power without the old sum, and one
// enable-memory-clear pulse (`mem_clr`) marks the start of each bank's
// clearing sweep.
//
// Timing: `ena_integ` is a one-clock pulse; the delay counter counts on phase
// C0; `add_en` and `addr` are stable for a whole microsecond and advance at
// C15; `icc`, `ibcc` and `mem_clr` are one-clock pulses. The delay of 512 + 3
// us, the bank selection switch, ICC and the enable-memory-clear pulses are
// the original's; the counter structure and the phases are this design's.
module integ_control
  import sa_pkg::*;
#(
  parameter int unsigned N          = N_POINTS,
  parameter int unsigned BANKS      = MAX_BANKS,
  parameter int unsigned PIPE_DELAY = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,      // clear/load
  input  logic [3:0]                  phase,
  input  logic                        ena_integ,
  input  logic                        ite,        // integration time end
  input  logic [$clog2(BANKS)-1:0]    nbanks_sel, // number of banks - 1
  output logic                        add_en,
  output logic [$clog2(BANKS*N)-1:0]  addr,
  output logic                        zero,
  output logic                        mem_clr,
  output logic                        ibcc,
  output logic                        icc
);

  localparam int unsigned PW = $clog2(N);
  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned DW = $clog2(PIPE_DELAY + 1);

  logic [DW-1:0] dcnt;
  logic          dly_active;
  logic [PW-1:0] idx;
  logic [BW-1:0] bank;

  always_comb addr = {bank, idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt <= '0; dly_active <= 1'b0; add_en <= 1'b0; idx <= '0; bank <= '0;
      zero <= 1'b1; mem_clr <= 1'b0; ibcc <= 1'b0; icc <= 1'b0;
    end else if (clear) begin
      dcnt <= '0; dly_active <= 1'b0; add_en <= 1'b0; idx <= '0; bank <= '0;
      zero <= 1'b1; mem_clr <= 1'b0; ibcc <= 1'b0; icc <= 1'b0;
    end else begin
      mem_clr <= 1'b0;
      ibcc    <= 1'b0;
      icc     <= 1'b0;
      if (ena_integ) begin
        dcnt       <= DW'(PIPE_DELAY);
        dly_active <= 1'b1;
      end else if (phase == 4'd0 && dly_active) begin
        dcnt <= dcnt - 1'b1;
        if (dcnt == DW'(1)) begin
          dly_active <= 1'b0;
          add_en     <= 1'b1;
          idx        <= '0;
          mem_clr    <= zero;
        end
      end
      if (phase == 4'd15 && add_en) begin
        idx <= idx + 1'b1;
        if (idx == PW'(N - 1)) begin
          add_en <= 1'b0;
          ibcc   <= 1'b1;
          if (bank >= nbanks_sel) begin
            bank <= '0;
            icc  <= 1'b1;
            zero <= 1'b0;
          end else begin
            bank <= bank + 1'b1;
          end
        end
      end
      if (ite) zero <= 1'b1;
    end
  end

endmodule
