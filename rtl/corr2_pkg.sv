// corr2_pkg: types and constants shared by the corr2 correlation engine.
//
// The engine works on 8-bit grey-scale pixels packed four to a 32-bit word, one pixel per byte
// lane, and runs one arithmetic block per lane. The register map below is this design's own
// layout; the register set itself (version, DMA start/end address, burst count, FIFO threshold,
// FIFO/CALB control, FIFO fill levels, accumulator result, four XZ and four Y results) follows
// the register dump of the reference testbench run. The version word 0xABCD0001 is the value
// that run reports.
package corr2_pkg;

  localparam int unsigned WORD_W  = 32;   // bus and FIFO word
  localparam int unsigned PIX_W   = 8;    // one pixel
  localparam int unsigned LANES   = 4;    // pixels per word = number of CALBs
  localparam int unsigned ACC_W   = 32;   // pixel-sum and CALB accumulator width
  localparam int unsigned BURST_W = 7;    // Avalon burstcount width, bursts of 1..64 words

  localparam logic [31:0] FIRMWARE_VERSION = 32'hABCD_0001;

  // CSR word addresses (5-bit word address on the slave port)
  typedef enum logic [4:0] {
    CSR_VERSION    = 5'd0,
    CSR_DMA_START  = 5'd1,   // byte address of the first word
    CSR_DMA_END    = 5'd2,   // byte address one past the last word
    CSR_DMA_BURST  = 5'd3,   // words per burst, 1..64
    CSR_DMA_THRESH = 5'd4,   // FIFO fill limit the DMA respects
    CSR_CTRL       = 5'd5,   // "Fifo / Calb register", see ctrl_t
    CSR_CMD_STATUS = 5'd6,   // write: cmd_t pulses; read: status_t
    CSR_FIFOA_USED = 5'd7,
    CSR_FIFOB_USED = 5'd8,
    CSR_ACC        = 5'd9,   // pixel sum of the last loaded image
    CSR_MEAN_A     = 5'd10,
    CSR_MEAN_B     = 5'd11,
    CSR_PIXELS     = 5'd12,  // pixel count of the last loaded image
    CSR_XZ0        = 5'd16,  // 16..19: XZ of lanes 0..3
    CSR_Y0         = 5'd20   // 20..23: Y of lanes 0..3
  } csr_addr_e;

  // which FIFO the DMA fills
  typedef enum logic {
    SEL_FIFO_A = 1'b0,
    SEL_FIFO_B = 1'b1
  } fifo_sel_e;

  // what a CALB pass computes
  typedef enum logic {
    MODE_X  = 1'b0,   // A alone: XZ = sum (a - meanA)^2
    MODE_YZ = 1'b1    // A against B: XZ = sum (b - meanB)^2, Y = sum (a - meanA)(b - meanB)
  } calb_mode_e;

  typedef struct packed {
    logic       feedback;   // bit 2: words read from FIFO A are written back into it
    calb_mode_e calb_mode;  // bit 1
    fifo_sel_e  fifo_sel;   // bit 0
  } ctrl_t;

  typedef struct packed {
    logic calb_go;          // bit 1: start a CALB pass
    logic dma_go;           // bit 0: start loading an image
  } cmd_t;

  typedef struct packed {
    logic mean_b_valid;     // bit 5
    logic mean_a_valid;     // bit 4
    logic calb_done;        // bit 3: results of the last pass are ready
    logic calb_busy;        // bit 2
    logic mean_busy;        // bit 1
    logic dma_busy;         // bit 0
  } status_t;

endpackage
