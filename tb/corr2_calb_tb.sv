// corr2_calb_tb: feeds pixel pairs with random gaps to one CALB and compares XZ and Y with
// sums of (b - meanB)^2 and (a - meanA)(b - meanB) formed here, for random means and the
// extreme cases (pixels 0 and 255 against means 255 and 0). Checks the two-cycle latency and
// that clear restarts both sums.
module corr2_calb_tb;
  import corr2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    clear, in_valid;
  logic [7:0]              a, b, mean_a, mean_b;
  logic [31:0]             xz;
  logic signed [31:0]      y;

  corr2_calb dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint exz, ey;
    clear = 0; in_valid = 0; a = 0; b = 0; mean_a = 0; mean_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      clear = 1; @(negedge clk); clear = 0;
      mean_a = (run == 0) ? 8'd255 : (run == 1) ? 8'd0 : 8'($urandom);
      mean_b = (run == 0) ? 8'd0   : (run == 1) ? 8'd255 : 8'($urandom);
      exz = 0; ey = 0;
      for (int i = 0; i < 500 * (run + 1); i++) begin
        in_valid = $urandom_range(4) != 0;
        a = (run < 2) ? ((i % 2) ? 8'd0 : 8'd255) : 8'($urandom);
        b = (run < 2) ? ((i % 3) ? 8'd255 : 8'd0) : 8'($urandom);
        if (in_valid) begin
          exz += (int'(b) - int'(mean_b)) ** 2;
          ey  += (int'(a) - int'(mean_a)) * (int'(b) - int'(mean_b));
        end
        @(negedge clk);
      end
      // one more pair that always changes XZ
      in_valid = 1; a = 8'($urandom); b = (mean_b == 8'd255) ? 8'd0 : 8'd255;
      exz += (int'(b) - int'(mean_b)) ** 2;
      ey  += (int'(a) - int'(mean_a)) * (int'(b) - int'(mean_b));
      @(negedge clk);
      in_valid = 0;
      // latency: the last pair is in the sums two cycles after it was presented, not one
      checks++;
      if (xz === 32'(exz)) begin
        failures++; $display("FAIL results visible after one cycle");
      end
      @(negedge clk);
      checks += 2;
      if (xz !== 32'(exz)) begin failures++; $display("FAIL xz %0d expected %0d", xz, exz); end
      if (y  !== 32'(ey))  begin failures++; $display("FAIL y %0d expected %0d", y, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
