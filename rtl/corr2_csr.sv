// corr2_csr: control and status registers of the corr2 engine, an Avalon-MM slave.
//
// The processor programs the DMA (start and end byte address, burst count, FIFO threshold),
// selects the target FIFO, the CALB pass mode and the FIFO A feedback in the control
// ("Fifo / Calb") register, starts a load or a pass by writing the command register, and reads
// back the FIFO fill levels, the pixel sum, the means and the eight CALB results. The register
// set follows the original design's reference simulation; addresses and bit positions are
// this design's (see corr2_pkg).
//
// Timing: writes take effect at the clock edge; a command write gives a one-cycle pulse on
// dma_go/calb_go. Reads have a fixed latency of one cycle (s_readdata is valid the cycle after
// s_read). Unmapped addresses read as 0.
module corr2_csr
  import corr2_pkg::*;
#(
  parameter int unsigned FIFO_CW = 15
) (
  input  logic               clk,
  input  logic               rst_n,
  // Avalon-MM slave
  input  logic [4:0]         s_address,
  input  logic               s_read,
  input  logic               s_write,
  input  logic [31:0]        s_writedata,
  output logic [31:0]        s_readdata,
  // register outputs
  output logic [31:0]        dma_start,
  output logic [31:0]        dma_end,
  output logic [BURST_W-1:0] dma_burst,
  output logic [31:0]        dma_thresh,
  output ctrl_t              ctrl,
  output logic               dma_go,
  output logic               calb_go,
  // status inputs
  input  status_t            status,
  input  logic [FIFO_CW-1:0] fifoa_used,
  input  logic [FIFO_CW-1:0] fifob_used,
  input  logic [ACC_W-1:0]   acc_sum,
  input  logic [PIX_W-1:0]   mean_a,
  input  logic [PIX_W-1:0]   mean_b,
  input  logic [31:0]        pixels,
  input  logic [ACC_W-1:0]   xz [LANES],
  input  logic [ACC_W-1:0]   y  [LANES]
);

  cmd_t cmd;
  assign cmd = cmd_t'(s_writedata[$bits(cmd_t)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_start  <= '0;
      dma_end    <= '0;
      dma_burst  <= BURST_W'(1);
      dma_thresh <= '0;
      ctrl       <= '0;
      dma_go     <= 1'b0;
      calb_go    <= 1'b0;
    end else begin
      dma_go  <= 1'b0;
      calb_go <= 1'b0;
      if (s_write) begin
        unique case (s_address)
          CSR_DMA_START:  dma_start  <= s_writedata;
          CSR_DMA_END:    dma_end    <= s_writedata;
          CSR_DMA_BURST:  dma_burst  <= BURST_W'(s_writedata);
          CSR_DMA_THRESH: dma_thresh <= s_writedata;
          CSR_CTRL:       ctrl       <= ctrl_t'(s_writedata[$bits(ctrl_t)-1:0]);
          CSR_CMD_STATUS: begin
            dma_go  <= cmd.dma_go;
            calb_go <= cmd.calb_go;
          end
          default: ;
        endcase
      end
    end
  end

  logic [31:0] rdata;

  always_comb begin
    rdata = '0;
    if (s_address >= CSR_XZ0 && s_address < CSR_XZ0 + 5'(LANES))
      rdata = xz[2'(s_address - CSR_XZ0)];
    else if (s_address >= CSR_Y0 && s_address < CSR_Y0 + 5'(LANES))
      rdata = y[2'(s_address - CSR_Y0)];
    else
      unique case (s_address)
        CSR_VERSION:    rdata = FIRMWARE_VERSION;
        CSR_DMA_START:  rdata = dma_start;
        CSR_DMA_END:    rdata = dma_end;
        CSR_DMA_BURST:  rdata = 32'(dma_burst);
        CSR_DMA_THRESH: rdata = dma_thresh;
        CSR_CTRL:       rdata = 32'(ctrl);
        CSR_CMD_STATUS: rdata = 32'(status);
        CSR_FIFOA_USED: rdata = 32'(fifoa_used);
        CSR_FIFOB_USED: rdata = 32'(fifob_used);
        CSR_ACC:        rdata = acc_sum;
        CSR_MEAN_A:     rdata = 32'(mean_a);
        CSR_MEAN_B:     rdata = 32'(mean_b);
        CSR_PIXELS:     rdata = pixels;
        default:        rdata = '0;
      endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s_readdata <= '0;
    else if (s_read) s_readdata <= rdata;
  end

endmodule
