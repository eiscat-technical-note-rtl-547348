// readout_memory: output memory and DMA to the host computer.
//
// The output memory has the size of the integration memory. While the
// analyzer integrates it is written in parallel with the integration memory
// from the A-bus, so it always holds the running sums. When the integration
// period ends (`ite`) parallel writing stops and the memory is sent to the
// computer while a new period already runs in the integration memory. Each
// 32-bit word leaves as two 16-bit halves, high half first, for the 16-bit
// ND-10 bus; the interface has no handshake, so every half-word comes with a
// one-clock `dma_trigger` pulse, one every DMA_CLKS clocks. Only the banks
// in use (`nbanks_sel` + 1) are sent.
//
// After the transfer the memory waits for the next integration cycle
// complete pulse and then goes back to parallel writing; one whole parallel
// integration cycle brings it up to date again. If a period ends before the
// memory has seen one whole parallel cycle (a period shorter than the DMA
// plus one cycle), there is no complete data to send: that period is not
// transferred and the sticky `overrun` flag is set until clear/load.
//
// The C-bus (`c_bus`, `c_valid`, `c_addr`) carries what passes the bus
// driver: the A-bus words during parallel writing, the words read during
// DMA. The display control takes it from there.
//
// Parallel writing, DMA from this memory at period end, the 32-to-16 bit
// multiplexing and the trigger pulse follow the original; the word order,
// the DMA rate and the overrun rule are this design's choices.
module readout_memory
  import sa_pkg::*;
#(
  parameter int unsigned N        = N_POINTS,
  parameter int unsigned BANKS    = MAX_BANKS,
  parameter int unsigned DMA_CLKS = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic [ACC_W-1:0]            a_bus,
  input  logic [$clog2(BANKS*N)-1:0]  a_addr,
  input  logic                        a_valid,
  input  logic                        icc,
  input  logic                        ite,
  input  logic [$clog2(BANKS)-1:0]    nbanks_sel,
  output logic [15:0]                 dma_data,
  output logic                        dma_trigger,
  output logic                        dma_active,
  output logic                        par_en,
  output logic                        overrun,
  output logic [ACC_W-1:0]            c_bus,
  output logic [$clog2(BANKS*N)-1:0]  c_addr,
  output logic                        c_valid
);

  localparam int unsigned AW = $clog2(BANKS*N);
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned TW = $clog2(DMA_CLKS);

  logic [ACC_W-1:0] mem [BANKS*N];
  logic [ACC_W-1:0] mem_q;
  logic [AW-1:0]    daddr;
  logic [AW-1:0]    last_addr;
  logic [TW-1:0]    tcnt;
  logic             half, par_valid, wait_resume;

  always_comb last_addr = AW'({nbanks_sel, {PW{1'b1}}});

  always_ff @(posedge clk) begin
    if (a_valid && par_en) mem[a_addr] <= a_bus;
    mem_q <= mem[daddr];
  end

  wire step = dma_active && (tcnt == TW'(DMA_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_en <= 1'b1; par_valid <= 1'b0; wait_resume <= 1'b0; overrun <= 1'b0;
      dma_active <= 1'b0; daddr <= '0; tcnt <= '0; half <= 1'b0;
      dma_data <= '0; dma_trigger <= 1'b0;
    end else if (clear) begin
      par_en <= 1'b1; par_valid <= 1'b0; wait_resume <= 1'b0; overrun <= 1'b0;
      dma_active <= 1'b0; daddr <= '0; tcnt <= '0; half <= 1'b0;
      dma_trigger <= 1'b0;
    end else begin
      dma_trigger <= 1'b0;
      if (icc) begin
        if (wait_resume) begin
          wait_resume <= 1'b0;
          par_en      <= 1'b1;
        end else if (par_en) begin
          par_valid <= 1'b1;
        end
      end
      if (ite) begin
        if (par_valid && par_en) begin
          par_en     <= 1'b0;
          par_valid  <= 1'b0;
          dma_active <= 1'b1;
          daddr      <= '0;
          tcnt       <= '0;
          half       <= 1'b0;
        end else begin
          overrun <= 1'b1;
        end
      end
      if (dma_active) begin
        tcnt <= step ? '0 : tcnt + 1'b1;
        if (step) begin
          dma_data    <= half ? mem_q[15:0] : mem_q[31:16];
          dma_trigger <= 1'b1;
          half        <= ~half;
          if (half) begin
            daddr <= daddr + 1'b1;
            if (daddr == last_addr) begin
              dma_active  <= 1'b0;
              wait_resume <= 1'b1;
            end
          end
        end
      end
    end
  end

  // C-bus towards the display
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_bus <= '0; c_addr <= '0; c_valid <= 1'b0;
    end else begin
      c_valid <= 1'b0;
      if (a_valid && par_en) begin
        c_bus <= a_bus; c_addr <= a_addr; c_valid <= 1'b1;
      end else if (step && !half) begin
        c_bus <= mem_q; c_addr <= daddr; c_valid <= 1'b1;
      end
    end
  end

endmodule
