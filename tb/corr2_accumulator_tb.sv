// corr2_accumulator_tb: streams random words, with idle cycles, through the accumulator and
// compares the pixel sum and count with values summed here; repeats after a clear. Words of
// all-255 pixels check that the lane adder does not drop its carry.
module corr2_accumulator_tb;
  import corr2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear, in_valid;
  logic [31:0] in_word, sum, pixels;

  corr2_accumulator dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint exp_sum;
    int     exp_pix;
    clear = 0; in_valid = 0; in_word = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img = 0; img < 4; img++) begin
      clear = 1; @(negedge clk); clear = 0;
      exp_sum = 0; exp_pix = 0;
      for (int w = 0; w < 300 * (img + 1); w++) begin
        in_valid = $urandom_range(3) != 0;
        in_word  = (w % 17 == 0) ? 32'hFFFF_FFFF : $urandom;
        if (in_valid) begin
          for (int l = 0; l < 4; l++) exp_sum += in_word[8*l +: 8];
          exp_pix += 4;
        end
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      checks += 2;
      if (sum !== 32'(exp_sum))  begin failures++; $display("FAIL sum %0d expected %0d", sum, exp_sum); end
      if (pixels !== exp_pix)    begin failures++; $display("FAIL pixels %0d expected %0d", pixels, exp_pix); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
