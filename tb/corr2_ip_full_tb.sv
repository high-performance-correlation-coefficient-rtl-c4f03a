// corr2_ip_full_tb: the corr2 engine at its default size (16384-word FIFOs), one complete
// comparison session.
//
// Part 1 repeats a known small case: a 32-word reference image whose four byte lanes each hold
// the pixels 1..32, compared with itself and with an image whose lane l holds 1+l..32+l.
// Expected values, worked out by hand: pixel sums 2112 and 2304, means 16 and 18 (truncated),
// X = 2736 per lane, and for the shifted image Z = 2800, 2736, 2736, 2800 and
// Y = 2704, 2720, 2736, 2752. Part 2 loads a 16320-word reference image, the largest size
// measured for the engine, runs an X pass and one YZ pass against a second random image and
// compares every result with sums computed here. The pass time is checked against one word
// per clock.
module corr2_ip_full_tb;
  import corr2_pkg::*;

  localparam int unsigned NBIG = 16320;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  s_address;
  logic        s_read, s_write;
  logic [31:0] s_writedata, s_readdata;
  logic        m_read, m_waitrequest, m_readdatavalid;
  logic [31:0] m_address, m_readdata;
  logic [6:0]  m_burstcount;

  corr2_ip dut (.*);
  corr2_avmm_mem #(.WORDS(65536), .WAIT_PCT(5), .GAP_PCT(2)) mem (
    .clk, .rst_n, .m_read, .m_address, .m_burstcount,
    .m_waitrequest, .m_readdata, .m_readdatavalid);

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic csr_wr(csr_addr_e a, logic [31:0] d);
    @(negedge clk); s_address = a; s_write = 1'b1; s_writedata = d;
    @(negedge clk); s_write = 1'b0;
  endtask

  task automatic csr_rd(logic [4:0] a, output logic [31:0] d);
    @(negedge clk); s_address = a; s_read = 1'b1;
    @(negedge clk); s_read = 1'b0; d = s_readdata;
  endtask

  task automatic load(fifo_sel_e sel, int word_addr, int words);
    logic [31:0] st;
    csr_wr(CSR_DMA_START, 32'(word_addr * 4));
    csr_wr(CSR_DMA_END,   32'((word_addr + words) * 4));
    csr_wr(CSR_DMA_BURST, 32'd64);
    csr_wr(CSR_DMA_THRESH, 32'h3FFF);
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: MODE_X, fifo_sel: sel}));
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b0, dma_go: 1'b1}));
    do csr_rd(CSR_CMD_STATUS, st); while (st[0] || st[1]);
  endtask

  int t_go, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.calb_go) t_go = cyc;
  end

  task automatic pass(calb_mode_e mode, int words);
    logic [31:0] st;
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: mode, fifo_sel: SEL_FIFO_B}));
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b1, dma_go: 1'b0}));
    wait (dut.seq_done);
    checks++;
    if (cyc - t_go > words + 8) begin
      failures++;
      $display("FAIL pass of %0d words took %0d cycles", words, cyc - t_go);
    end
    do csr_rd(CSR_CMD_STATUS, st); while (!st[3]);
  endtask

  task automatic expect_results(string tag, longint xz[4], longint y[4]);
    logic [31:0] d;
    for (int l = 0; l < 4; l++) begin
      csr_rd(5'(CSR_XZ0 + l), d); check($sformatf("%s XZ[%0d]", tag, l), d, xz[l]);
      csr_rd(5'(CSR_Y0 + l), d);  check($sformatf("%s Y[%0d]", tag, l), longint'($signed(d)), y[l]);
    end
  endtask

  logic [31:0] big_a [NBIG];
  logic [31:0] big_b [NBIG];

  initial begin
    logic [31:0] d;
    longint xz[4], y[4];
    longint suma, sumb;
    int ma, mb;
    s_address = '0; s_read = 1'b0; s_write = 1'b0; s_writedata = '0;
    // part 1 images at word 0 (A) and word 64 (shifted B)
    for (int w = 0; w < 32; w++) begin
      mem.mem[w]      = {4{8'(w + 1)}};
      mem.mem[64 + w] = {8'(w + 4), 8'(w + 3), 8'(w + 2), 8'(w + 1)};
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    csr_rd(CSR_VERSION, d); check("version", d, 32'hABCD_0001);

    load(SEL_FIFO_A, 0, 32);
    csr_rd(CSR_ACC, d); check("sum A", d, 32'h840);
    csr_rd(CSR_MEAN_A, d); check("mean A", d, 16);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A used", d, 32);
    pass(MODE_X, 32);
    xz = '{2736, 2736, 2736, 2736}; y = xz;
    expect_results("X", xz, y);

    load(SEL_FIFO_B, 0, 32);            // A against itself
    csr_rd(CSR_FIFOB_USED, d); check("FIFO B used", d, 32);
    pass(MODE_YZ, 32);
    expect_results("A vs A", xz, y);

    load(SEL_FIFO_B, 64, 32);           // A against the lane-shifted image
    csr_rd(CSR_ACC, d); check("sum B", d, 32'h900);
    csr_rd(CSR_MEAN_B, d); check("mean B", d, 18);
    pass(MODE_YZ, 32);
    xz = '{32'hAF0, 32'hAB0, 32'hAB0, 32'hAF0};
    y  = '{32'hA90, 32'hAA0, 32'hAB0, 32'hAC0};
    expect_results("A vs shifted", xz, y);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A keeps A", d, 32);
    csr_rd(CSR_FIFOB_USED, d); check("FIFO B drained", d, 0);

    // part 2: largest image, random pixels
    suma = 0; sumb = 0;
    for (int w = 0; w < NBIG; w++) begin
      big_a[w] = $urandom;
      big_b[w] = (w % 3 == 0) ? big_a[w] : $urandom;   // partly correlated
      mem.mem[1024 + w]        = big_a[w];
      mem.mem[1024 + NBIG + w] = big_b[w];
      for (int l = 0; l < 4; l++) begin
        suma += big_a[w][8*l +: 8];
        sumb += big_b[w][8*l +: 8];
      end
    end
    ma = int'(suma / (4 * NBIG));
    mb = int'(sumb / (4 * NBIG));

    load(SEL_FIFO_A, 1024, NBIG);
    csr_rd(CSR_ACC, d); check("big sum A", d, suma);
    csr_rd(CSR_MEAN_A, d); check("big mean A", d, ma);
    csr_rd(CSR_FIFOA_USED, d); check("big FIFO A used", d, NBIG);
    pass(MODE_X, NBIG);
    for (int l = 0; l < 4; l++) begin
      xz[l] = 0;
      for (int w = 0; w < NBIG; w++) xz[l] += (int'(big_a[w][8*l +: 8]) - ma) ** 2;
    end
    y = xz;
    expect_results("big X", xz, y);

    load(SEL_FIFO_B, 1024 + NBIG, NBIG);
    csr_rd(CSR_MEAN_B, d); check("big mean B", d, mb);
    pass(MODE_YZ, NBIG);
    for (int l = 0; l < 4; l++) begin
      xz[l] = 0; y[l] = 0;
      for (int w = 0; w < NBIG; w++) begin
        xz[l] += (int'(big_b[w][8*l +: 8]) - mb) ** 2;
        y[l]  += (int'(big_a[w][8*l +: 8]) - ma) * (int'(big_b[w][8*l +: 8]) - mb);
      end
    end
    expect_results("big YZ", xz, y);
    csr_rd(CSR_FIFOA_USED, d); check("big FIFO A keeps A", d, NBIG);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
