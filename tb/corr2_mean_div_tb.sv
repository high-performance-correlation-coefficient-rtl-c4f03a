// corr2_mean_div_tb: divides pixel sums by pixel counts and compares with integer division,
// including the reference cases 2112/128 = 16 and 2304/128 = 18, the largest image
// (65280 pixels of 255), a zero divisor and random cases. Also checks that each division
// takes N_W + 2 cycles from start to done.
module corr2_mean_div_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, busy, done;
  logic [31:0] num, den;
  logic [7:0]  quot;

  corr2_mean_div #(.N_W(32), .D_W(32), .Q_W(8)) dut (.*);

  int checks = 0, failures = 0;

  task automatic divide(logic [31:0] n, logic [31:0] d);
    int cycles = 0;
    logic [7:0] e;
    num = n; den = d; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cycles++; end
    e = (d == 0) ? 8'd0 : ((n / d) > 255 ? 8'd255 : 8'(n / d));
    checks += 2;
    if (quot !== e) begin failures++; $display("FAIL %0d/%0d = %0d expected %0d", n, d, quot, e); end
    if (cycles != 33) begin failures++; $display("FAIL latency %0d", cycles); end
    num = $urandom; den = $urandom;   // inputs may change after start
    @(negedge clk);
  endtask

  initial begin
    start = 0; num = 0; den = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    divide(2112, 128);
    divide(2304, 128);
    divide(65280 * 255, 65280);
    divide(7, 0);
    divide(0, 4);
    divide(1000, 3);
    for (int i = 0; i < 200; i++) begin
      int unsigned pixels, s;
      pixels = 4 * $urandom_range(1, 16320);
      s = $urandom_range(0, 255) * pixels + $urandom_range(0, pixels - 1);
      if (i % 10 == 0) s = $urandom;   // beyond any image: saturates
      divide(s, pixels);
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
