// corr2_calb_seq: runs one CALB pass, streaming the stored images through the four CALBs.
//
// In an X pass it reads image A from FIFO A and feeds it to the CALBs as both inputs, so each
// CALB's XZ becomes the lane's sum of (a - meanA)^2. In a YZ pass it reads A and B word for
// word in step, giving Z in XZ and the cross term in Y. With feedback set, every word read
// from FIFO A is written back into it, so the reference image is loaded from memory once and
// reused for every comparison; FIFO B is drained. Those mechanisms are the original design's; the
// sequencing below is this design's.
//
// Interface: go (one cycle) latches mode, feedback, the word count and both means, and clears
// the CALBs. A word pair is popped whenever the FIFOs it needs are not empty, so a pass runs at
// one word (four pixels) per clock and waits when FIFO B has not yet caught up. FIFO data
// arrives the cycle after the pop and goes to the CALBs and, for A, back to FIFO A in that
// cycle. done pulses when the last products have been accumulated, PIPE cycles after the
// last word.
module corr2_calb_seq
  import corr2_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  calb_mode_e        mode,
  input  logic              feedback,
  input  logic [29:0]       words,       // words per image
  input  logic [PIX_W-1:0]  mean_a_in,
  input  logic [PIX_W-1:0]  mean_b_in,
  output logic              busy,
  output logic              done,
  // FIFO A
  input  logic              a_empty,
  output logic              a_rd,
  input  logic [WORD_W-1:0] a_data,
  output logic              a_fb_wr,     // write a_data back into FIFO A
  // FIFO B
  input  logic              b_empty,
  output logic              b_rd,
  input  logic [WORD_W-1:0] b_data,
  // to the CALBs
  output logic              calb_clear,
  output logic              calb_valid,
  output logic [WORD_W-1:0] calb_a,
  output logic [WORD_W-1:0] calb_b,
  output logic [PIX_W-1:0]  mean_a,
  output logic [PIX_W-1:0]  mean_b
);

  localparam int unsigned PIPE = 2;      // CALB latency

  calb_mode_e  mode_q;
  logic        fb_q;
  logic [29:0] remaining;
  logic        rd_q;                     // a pop was made last cycle
  logic [1:0]  drain;
  logic        pop;

  assign pop  = busy && remaining != '0 && !a_empty && (mode_q == MODE_X || !b_empty);
  assign a_rd = pop;
  assign b_rd = pop && mode_q == MODE_YZ;

  assign calb_valid = rd_q;
  assign calb_a     = a_data;
  assign calb_b     = (mode_q == MODE_YZ) ? b_data : a_data;
  assign a_fb_wr    = rd_q && fb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      mode_q     <= MODE_X;
      fb_q       <= 1'b0;
      remaining  <= '0;
      rd_q       <= 1'b0;
      drain      <= '0;
      calb_clear <= 1'b0;
      mean_a     <= '0;
      mean_b     <= '0;
    end else begin
      done       <= 1'b0;
      calb_clear <= 1'b0;
      rd_q       <= pop;
      if (go && !busy) begin
        busy       <= 1'b1;
        mode_q     <= mode;
        fb_q       <= feedback;
        remaining  <= words;
        drain      <= 2'(PIPE);
        calb_clear <= 1'b1;
        mean_a     <= mean_a_in;
        mean_b     <= (mode == MODE_YZ) ? mean_b_in : mean_a_in;
      end else if (busy) begin
        if (pop) remaining <= remaining - 1'b1;
        if (remaining == '0 && !rd_q) begin
          if (drain == '0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            drain <= drain - 1'b1;
          end
        end
      end
    end
  end

endmodule
