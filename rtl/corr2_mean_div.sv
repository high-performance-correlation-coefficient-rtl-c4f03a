// corr2_mean_div: integer mean of an image, the pixel sum divided by the pixel count.
//
// A restoring divider that retires one quotient bit per cycle, so a mean is ready N_W+1
// cycles after start. The quotient is truncated, as the reference results show (a sum of 2112
// over 128 pixels gives a mean of 16, not 16.5). The original design says only that the mean of
// each image is used; computing it in hardware with a serial divider is this design's choice,
// cheap because it runs once per image.
//
// Interface: start (one cycle) samples num and den; busy stays high until done pulses for
// one cycle with quot valid, and quot holds until the next start. A zero divisor gives 0.
module corr2_mean_div #(
  parameter int unsigned N_W = 32,   // dividend (pixel sum) width
  parameter int unsigned D_W = 32,   // divisor (pixel count) width
  parameter int unsigned Q_W = 8     // quotient width, a mean fits a pixel
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] num,
  input  logic [D_W-1:0] den,
  output logic           busy,
  output logic           done,
  output logic [Q_W-1:0] quot
);

  localparam int unsigned STEP_W = $clog2(N_W + 1);

  logic [N_W-1:0]    q;          // dividend shifting out, quotient shifting in
  logic [D_W-1:0]    rem;        // partial remainder
  logic [D_W-1:0]    div;
  logic [STEP_W-1:0] steps;
  logic [D_W:0]      trial;

  assign trial = {rem, q[N_W-1]} - {1'b0, div};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      rem   <= '0;
      div   <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      quot  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q     <= num;
        rem   <= '0;
        div   <= den;
        steps <= STEP_W'(N_W);
        busy  <= 1'b1;
      end else if (busy) begin
        if (steps == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          // saturate: a mean never exceeds the largest pixel, a zero divisor gives 0
          if (div == '0)                    quot <= '0;
          else if (q > N_W'({Q_W{1'b1}}))   quot <= '1;
          else                              quot <= q[Q_W-1:0];
        end else begin
          steps <= steps - 1'b1;
          if (!trial[D_W]) begin
            rem <= trial[D_W-1:0];
            q   <= {q[N_W-2:0], 1'b1};
          end else begin
            rem <= {rem[D_W-2:0], q[N_W-1]};
            q   <= {q[N_W-2:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
