// corr2_fifo: single-clock FIFO that buffers one image, 32-bit words of four pixels.
//
// Two of these hold the reference image (FIFO A) and the image under comparison (FIFO B).
// The default depth of 16384 words matches the largest image the engine handles, 16320 words
// or about 64K pixels; a power-of-two depth is this design's choice. The storage is a plain
// array with a registered read so that it maps onto block RAM.
//
// Interface: push with wr_en/wr_data (ignored when full), pop with rd_en (ignored when empty);
// rd_data holds the popped word from the cycle after rd_en. A push and a pop may happen in the
// same cycle, which is what the FIFO A feedback path relies on. used_words counts the words
// stored, 0..DEPTH.
module corr2_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,       // empties the FIFO
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    used_words
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (used_words == CW'(DEPTH));
  assign empty = (used_words == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      used_words <= '0;
    end else if (clear) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      used_words <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   used_words <= used_words + 1'b1;
        2'b01:   used_words <= used_words - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
