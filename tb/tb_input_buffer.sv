// tb_input_buffer: checks the double input buffer with 16-word halves.
//
// Four data sets are written one word every 3 microseconds, slow enough for
// the reader. A monitor follows the read side and checks that each set is
// read twice in write order (recycle FF 0, then 1), that the enable-
// integration pulse comes once, at the first word of the second pass, and
// that one chirp clear precedes each set. It also checks that the first
// read follows the flip pulse within the two-FF synchronisation time (under
// two microseconds) and that reads come one per microsecond. Then data are
// written one word per clock, which must set the input error FF, and a
// clear must reset it together with the control FF.
`timescale 1ns/1ps
module tb_input_buffer;
  import sa_pkg::*;

  localparam int D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #31.25 clk = ~clk;

  logic [3:0] phase = '0;
  always_ff @(posedge clk) if (rst_n) phase <= phase + 4'd1;

  logic                 clear = 1'b0, wr_strobe = 1'b0;
  cplx8_t               wr_data = '0, rd_data;
  logic                 rd_valid, rd_pass, ena_integ, chirp_clr, flip, wr_half, reading, input_error;
  logic [$clog2(D)-1:0] rd_idx;

  input_buffer #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected read stream
  logic [15:0] sets [8][D];
  int nflip = 0, nena = 0, nclr = 0, nreads = 0;
  int rd_set = 0, rd_n = 0;
  longint t_flip = 0, t_last_read = 0;
  bit first_of_set = 1'b1;

  always @(negedge clk) if (rst_n) begin
    if (flip) begin
      nflip++;
      t_flip = $time;
    end
    if (chirp_clr) nclr++;
    if (ena_integ) begin
      nena++;
      check(rd_pass && rd_idx == 0, "enable integration at word 0 of pass 2");
    end
    // rd_* change at the edge that sees phase PH_READ
    if (phase == 4'(PH_READ + 1) && rd_valid && rd_set < 4) begin
      int pass, n;
      pass = rd_n / D;
      n    = rd_n % D;
      check(rd_idx == n, $sformatf("read index %0d expected %0d", rd_idx, n));
      check(rd_pass == 1'(pass), $sformatf("recycle FF %0d expected %0d", rd_pass, pass));
      check(rd_data == cplx8_t'(sets[rd_set][n]),
            $sformatf("set %0d pass %0d word %0d: %h expected %h", rd_set, pass, n, rd_data, sets[rd_set][n]));
      if (rd_n == 0) begin
        check($time - t_flip < 64'd2000, $sformatf("flip to first read %0d ns", $time - t_flip));
      end else begin
        check($time - t_last_read == 64'd1000, $sformatf("read spacing %0d ns", $time - t_last_read));
      end
      t_last_read = $time;
      nreads++;
      rd_n++;
      if (rd_n == 2 * D) begin
        rd_n = 0;
        rd_set++;
      end
    end
  end

  task automatic write_word(input logic [15:0] w, input int gap);
    @(posedge clk);
    wr_data   <= cplx8_t'(w);
    wr_strobe <= 1'b1;
    @(posedge clk);
    wr_strobe <= 1'b0;
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      check(wr_half == 1'(s % 2), $sformatf("control FF before set %0d", s));
      for (int n = 0; n < D; n++) begin
        sets[s][n] = 16'($urandom);
        write_word(sets[s][n], 46);
      end
    end
    repeat (16 * 2 * D + 64) @(posedge clk);
    check(rd_set == 4, $sformatf("sets read %0d", rd_set));
    check(nreads == 4 * 2 * D, $sformatf("reads %0d", nreads));
    check(nflip == 4, $sformatf("flip pulses %0d", nflip));
    check(nena == 4, $sformatf("enable integration pulses %0d", nena));
    check(nclr == 4, $sformatf("chirp clears %0d", nclr));
    check(!input_error, "no input error at the slow rate");
    check(!reading, "reader idle");

    // too fast: a second set arrives while the first is still read
    for (int n = 0; n < 2 * D; n++) write_word(16'(n), 0);
    repeat (4) @(posedge clk);
    check(input_error, "input error FF set by a fast set");
    @(posedge clk) clear <= 1'b1;
    @(posedge clk) clear <= 1'b0;
    @(negedge clk);
    check(!input_error, "clear resets the input error FF");
    check(!wr_half, "clear resets the control FF");
    check(!reading, "clear stops the reader");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
