// op_control: front-panel / computer control of the analyzer.
//
// A front-panel switch selects whether the commands come from the panel
// buttons or from the computer. The selected clear/load command starts a
// CL_CLKS long clear/load pulse that initialises the rest of the analyzer and
// puts it in the STOP state. A run command then moves it to READY, where it
// waits for the first data strobe; that strobe moves it to RUN, which lasts
// until a stop command. There is thus no upper limit on the time between
// data strobes. Data strobes are accepted (`accept`) in READY and RUN.
//
// Panel buttons are asynchronous: each passes a two-flip-flop synchroniser
// and acts on its rising edge. From the computer the clear/load command is
// an edge as well, and the run enable is a level: its rising edge is a run
// command and its falling edge a stop command.
//
// The computer/manual multiplexer, the one-shot clear/load pulse and the
// STOP/READY/RUN sequence are the original's; the synchronisers, edge rules
// and pulse length are this design's.
module op_control
  import sa_pkg::*;
#(
  parameter int unsigned CL_CLKS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       comp_mode,       // 1: computer control
  input  logic       man_clear_load,
  input  logic       man_run,
  input  logic       man_stop,
  input  logic       cmp_clear_load,
  input  logic       cmp_run_enable,
  input  logic       data_strobe,     // synchronised strobe event
  output logic       clear_load,
  output run_state_e state,
  output logic       accept
);

  localparam int unsigned CW = $clog2(CL_CLKS + 1);

  logic [1:0] s_mcl, s_mrun, s_mstop, s_ccl, s_crun, s_comp;
  logic       p_mcl, p_mrun, p_mstop, p_ccl, p_crun;
  logic       cl_cmd, run_cmd, stop_cmd;
  logic [CW-1:0] cl_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_mcl <= '0; s_mrun <= '0; s_mstop <= '0; s_ccl <= '0; s_crun <= '0; s_comp <= '0;
      p_mcl <= 1'b0; p_mrun <= 1'b0; p_mstop <= 1'b0; p_ccl <= 1'b0; p_crun <= 1'b0;
    end else begin
      s_mcl  <= {s_mcl[0],  man_clear_load};
      s_mrun <= {s_mrun[0], man_run};
      s_mstop<= {s_mstop[0],man_stop};
      s_ccl  <= {s_ccl[0],  cmp_clear_load};
      s_crun <= {s_crun[0], cmp_run_enable};
      s_comp <= {s_comp[0], comp_mode};
      p_mcl  <= s_mcl[1];
      p_mrun <= s_mrun[1];
      p_mstop<= s_mstop[1];
      p_ccl  <= s_ccl[1];
      p_crun <= s_crun[1];
    end
  end

  always_comb begin
    if (s_comp[1]) begin
      cl_cmd   = s_ccl[1] && !p_ccl;
      run_cmd  = s_crun[1] && !p_crun;
      stop_cmd = !s_crun[1] && p_crun;
    end else begin
      cl_cmd   = s_mcl[1] && !p_mcl;
      run_cmd  = s_mrun[1] && !p_mrun;
      stop_cmd = s_mstop[1] && !p_mstop;
    end
    accept     = (state == ST_READY) || (state == ST_RUN);
    clear_load = (cl_cnt != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_STOP;
      cl_cnt <= '0;
    end else begin
      if (cl_cmd)              cl_cnt <= CW'(CL_CLKS);
      else if (cl_cnt != '0)   cl_cnt <= cl_cnt - 1'b1;
      if (cl_cmd || cl_cnt != '0) state <= ST_STOP;
      else if (stop_cmd)          state <= ST_STOP;
      else case (state)
        ST_STOP:  if (run_cmd) state <= ST_READY;
        ST_READY: if (data_strobe) state <= ST_RUN;
        default:  ;
      endcase
    end
  end

endmodule
