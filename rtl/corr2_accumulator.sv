// corr2_accumulator: sums the pixels of an image while it streams into its FIFO.
//
// Every word the DMA writes into FIFO A or FIFO B also passes through here; its four byte-lane
// pixels are added in one cycle, so the sum needs no extra pass over the image. The pixel count
// is kept alongside the sum; both feed the mean divider when the load ends. Summing on the way
// in is the original design's scheme; the adder tree and the counter are this design's.
//
// Interface: clear (one cycle) zeroes sum and count; each cycle with in_valid adds the four
// pixels of in_word. sum and pixels are registered and include a word one cycle after it
// arrives.
module corr2_accumulator
  import corr2_pkg::*;
#(
  parameter int unsigned SUM_W = ACC_W,
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_word,
  output logic [SUM_W-1:0]  sum,
  output logic [CNT_W-1:0]  pixels
);

  logic [PIX_W+1:0] word_sum;   // four 8-bit pixels need 10 bits

  always_comb begin
    word_sum = '0;
    for (int l = 0; l < LANES; l++)
      word_sum += (PIX_W + 2)'(in_word[l*PIX_W +: PIX_W]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      pixels <= '0;
    end else if (clear) begin
      sum    <= '0;
      pixels <= '0;
    end else if (in_valid) begin
      sum    <= sum + SUM_W'(word_sum);
      pixels <= pixels + CNT_W'(LANES);
    end
  end

endmodule
