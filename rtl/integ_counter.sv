// integ_counter: decides when an integration period ends.
//
// Internal mode: six BCD down-counter digits count the integration cycle
// complete (ICC) pulses of the integrator. The number of cycles per period
// is set with front-panel BCD switches and copied into holding registers by
// a manual strobe; the counters are preloaded from those registers on
// clear/load and again at the end of each period. The ICC that finds the
// count at 1 (or 0) ends the period: `ite` (integration time end) pulses and
// the counters reload, so a preset of P gives P integration cycles (0 acts
// as 1).
//
// External mode (`ext_mode` high, the front-panel EXT/INT switch): the period
// is ended by the radar controller's DT pulse, already delayed by dt_delay;
// the period then ends on the next ICC, so that it always holds whole
// integration cycles.
//
// Timing: all inputs are one-clock pulses or levels in the clock domain;
// `ite` is a one-clock pulse one clock after the ICC that ends the period.
// Six BCD digits, the holding registers, preloading and the INT/EXT choice
// follow the original; ending on the count of 1 instead of on a borrow, and
// ending an external period on the next ICC, are this design's choices.
module integ_counter #(
  parameter int unsigned DIGITS = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,        // clear/load
  input  logic [4*DIGITS-1:0]   preset_bcd,   // front-panel switches
  input  logic                  preset_strobe,
  input  logic                  icc,
  input  logic                  ext_mode,
  input  logic                  dt_delayed,
  output logic [4*DIGITS-1:0]   count_bcd,
  output logic [4*DIGITS-1:0]   preset_reg,
  output logic                  ite
);

  localparam int unsigned W = 4 * DIGITS;

  logic ext_pending;

  function automatic logic [W-1:0] bcd_dec(input logic [W-1:0] v);
    logic [W-1:0] r;
    logic         borrow;
    r      = v;
    borrow = 1'b1;
    for (int d = 0; d < int'(DIGITS); d++) begin
      if (borrow) begin
        if (r[4*d +: 4] == 4'd0) r[4*d +: 4] = 4'd9;
        else begin
          r[4*d +: 4] = r[4*d +: 4] - 4'd1;
          borrow = 1'b0;
        end
      end
    end
    return r;
  endfunction

  wire last_cycle = (count_bcd[W-1:4] == '0) && (count_bcd[3:0] <= 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      preset_reg  <= '0;
      count_bcd   <= '0;
      ext_pending <= 1'b0;
      ite         <= 1'b0;
    end else begin
      ite <= 1'b0;
      if (preset_strobe) preset_reg <= preset_bcd;
      if (clear) begin
        count_bcd   <= preset_reg;
        ext_pending <= 1'b0;
      end else begin
        if (ext_mode && dt_delayed) ext_pending <= 1'b1;
        if (icc) begin
          if (ext_mode ? (ext_pending || dt_delayed) : last_cycle) begin
            ite         <= 1'b1;
            count_bcd   <= preset_reg;
            ext_pending <= 1'b0;
          end else if (!ext_mode) begin
            count_bcd <= bcd_dec(count_bcd);
          end
        end
      end
    end
  end

endmodule
