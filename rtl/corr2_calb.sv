// corr2_calb: Custom Arithmetic Logic Block, one per pixel lane.
//
// For each pixel pair (a, b) it forms the deviations da = a - meanA and db = b - meanB and
// accumulates
//   XZ += db * db        (Z, or X when the pass feeds image A on both inputs)
//   Y  += da * db        (the numerator of the correlation coefficient)
// over the pixels of its lane. Four instances, one per byte lane of a 32-bit word, take four
// pixels per clock; software adds the four lanes and forms r = Y / sqrt(X * Z). That split and
// the XZ/Y result pair per CALB are the original design's; the two-stage pipeline (deviations and
// products registered, then accumulated) and having no mode input (an X pass simply feeds A
// as both a and b, which makes Y equal X as well) are this design's.
//
// Timing: a pair presented with in_valid is in xz/y two cycles later. clear zeroes both sums
// and drops the pair in flight. Widths: deviations are 9-bit signed, products 17-bit signed,
// sums ACC_W bits, enough for 16384 pixels per lane (16384 * 255^2 < 2^31).
module corr2_calb
  import corr2_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic [PIX_W-1:0]        a,
  input  logic [PIX_W-1:0]        b,
  input  logic [PIX_W-1:0]        mean_a,
  input  logic [PIX_W-1:0]        mean_b,
  output logic [ACC_W-1:0]        xz,
  output logic signed [ACC_W-1:0] y
);

  logic signed [PIX_W:0]     da, db;
  logic signed [2*PIX_W:0]   p_xz, p_y;   // registered products
  logic                      p_valid;

  assign da = $signed({1'b0, a}) - $signed({1'b0, mean_a});
  assign db = $signed({1'b0, b}) - $signed({1'b0, mean_b});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_xz    <= '0;
      p_y     <= '0;
      xz      <= '0;
      y       <= '0;
    end else if (clear) begin
      p_valid <= 1'b0;
      xz      <= '0;
      y       <= '0;
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        p_xz <= (2*PIX_W+1)'(db * db);
        p_y  <= (2*PIX_W+1)'(da * db);
      end
      if (p_valid) begin
        xz <= xz + ACC_W'(unsigned'(p_xz));
        y  <= y + ACC_W'(p_y);
      end
    end
  end

endmodule
