// corr2_calb_seq_tb: the pass sequencer between two real FIFOs and four CALBs. Image A is
// put in FIFO A and image B in FIFO B; an X pass with feedback must leave A in FIFO A and give
// X in every lane, then a YZ pass must give Z and Y, drain B and again keep A. A YZ pass
// started while B is still being written must wait for it. Each lane's results are compared
// with sums formed here, and the X pass must take one clock per word plus the fixed overhead.
module corr2_calb_seq_tb;
  import corr2_pkg::*;

  localparam int unsigned N = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        go, feedback, busy, done;
  calb_mode_e  mode;
  logic [29:0] words;
  logic [7:0]  mean_a_in, mean_b_in, mean_a, mean_b;
  logic        a_empty, a_rd, a_fb_wr, b_empty, b_rd;
  logic [31:0] a_data, b_data, calb_a, calb_b;
  logic        calb_clear, calb_valid;
  logic [31:0] xz [4];
  logic [31:0] y  [4];
  logic        tb_a_wr, tb_b_wr;
  logic [31:0] tb_a_data, tb_b_data;
  logic [6:0]  a_used, b_used;

  corr2_calb_seq dut (.*);

  corr2_fifo #(.WIDTH(32), .DEPTH(64)) fa (.clk, .rst_n, .clear(1'b0),
    .wr_en(tb_a_wr || a_fb_wr), .wr_data(tb_a_wr ? tb_a_data : a_data), .rd_en(a_rd),
    .rd_data(a_data), .full(), .empty(a_empty), .used_words(a_used));
  corr2_fifo #(.WIDTH(32), .DEPTH(64)) fb (.clk, .rst_n, .clear(1'b0),
    .wr_en(tb_b_wr), .wr_data(tb_b_data), .rd_en(b_rd),
    .rd_data(b_data), .full(), .empty(b_empty), .used_words(b_used));

  for (genvar l = 0; l < 4; l++) begin : g
    logic signed [31:0] yl;
    corr2_calb c (.clk, .rst_n, .clear(calb_clear), .in_valid(calb_valid),
      .a(calb_a[8*l +: 8]), .b(calb_b[8*l +: 8]), .mean_a, .mean_b, .xz(xz[l]), .y(yl));
    assign y[l] = yl;
  end

  int checks = 0, failures = 0;
  logic [31:0] ia [N], ib [N];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  function automatic longint dsum(bit a_side, bit b_side, int l, int ma, int mb);
    longint s = 0;
    for (int w = 0; w < N; w++)
      s += (int'(a_side ? ia[w][8*l +: 8] : ib[w][8*l +: 8]) - ma) *
           (int'(b_side ? ia[w][8*l +: 8] : ib[w][8*l +: 8]) - mb);
    return s;
  endfunction

  task automatic start(calb_mode_e m);
    @(negedge clk); mode = m; go = 1; @(negedge clk); go = 0;
  endtask

  initial begin
    int cycles;
    go = 0; feedback = 1; mode = MODE_X; words = N; tb_a_wr = 0; tb_b_wr = 0;
    tb_a_data = 0; tb_b_data = 0;
    mean_a_in = 8'd120; mean_b_in = 8'd131;
    for (int w = 0; w < N; w++) begin ia[w] = $urandom; ib[w] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < N; w++) begin
      @(negedge clk); tb_a_wr = 1; tb_a_data = ia[w];
    end
    @(negedge clk); tb_a_wr = 0;

    // X pass
    start(MODE_X);
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check("X pass cycles", cycles, N + 5);
    for (int l = 0; l < 4; l++) begin
      check($sformatf("X lane %0d", l), xz[l], dsum(1, 1, l, 120, 120));
      check($sformatf("X as Y lane %0d", l), longint'($signed(y[l])), dsum(1, 1, l, 120, 120));
    end
    check("A kept after X pass", a_used, N);

    // YZ pass started before B is written; B arrives one word every other cycle
    start(MODE_YZ);
    for (int w = 0; w < N; w++) begin
      @(negedge clk); tb_b_wr = 1; tb_b_data = ib[w];
      @(negedge clk); tb_b_wr = 0;
    end
    while (busy) @(negedge clk);
    for (int l = 0; l < 4; l++) begin
      check($sformatf("Z lane %0d", l), xz[l], dsum(0, 0, l, 131, 131));
      check($sformatf("Y lane %0d", l), longint'($signed(y[l])), dsum(1, 0, l, 120, 131));
    end
    check("A kept after YZ pass", a_used, N);
    check("B drained", b_used, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
