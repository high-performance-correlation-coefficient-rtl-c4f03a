// corr2_ip_sizes_tb: a sweep over image sizes at the default size of the engine.
//
// For every image size at which the speed-up over software was measured, 1, 2, 4, ... 8192 and
// 16320 words (4 to 65280 pixels), with bursts of the image size up to 64 words, it loads a
// random reference image, runs an X pass, loads a second image and runs a YZ pass, and
// compares all eight results and both means with sums computed here. It prints the clock
// cycles each load took, and checks that a pass takes one clock per word plus a fixed
// overhead. A 16320-word image must
// fit both FIFOs without the DMA exceeding its threshold.
module corr2_ip_sizes_tb;
  import corr2_pkg::*;

  localparam int unsigned NMAX = 16320;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  s_address;
  logic        s_read, s_write;
  logic [31:0] s_writedata, s_readdata;
  logic        m_read, m_waitrequest, m_readdatavalid;
  logic [31:0] m_address, m_readdata;
  logic [6:0]  m_burstcount;

  corr2_ip dut (.*);
  corr2_avmm_mem #(.WORDS(65536), .WAIT_PCT(10), .GAP_PCT(5)) mem (
    .clk, .rst_n, .m_read, .m_address, .m_burstcount,
    .m_waitrequest, .m_readdata, .m_readdatavalid);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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

  task automatic load(fifo_sel_e sel, int word_addr, int words, int burst, output int cycles);
    logic [31:0] st;
    int t0;
    csr_wr(CSR_DMA_START, 32'(word_addr * 4));
    csr_wr(CSR_DMA_END,   32'((word_addr + words) * 4));
    csr_wr(CSR_DMA_BURST, 32'(burst));
    csr_wr(CSR_DMA_THRESH, 32'h3FFF);
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: MODE_X, fifo_sel: sel}));
    t0 = cyc;
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b0, dma_go: 1'b1}));
    do csr_rd(CSR_CMD_STATUS, st); while (st[0] || st[1]);
    cycles = cyc - t0;
  endtask

  task automatic pass(calb_mode_e mode, int words);
    logic [31:0] st;
    int t0;
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: mode, fifo_sel: SEL_FIFO_B}));
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b1, dma_go: 1'b0}));
    t0 = cyc;
    wait (dut.seq_done);
    checks++;
    if (cyc - t0 > words + 8) begin
      failures++;
      $display("FAIL pass of %0d words took %0d cycles", words, cyc - t0);
    end
    do csr_rd(CSR_CMD_STATUS, st); while (!st[3]);
  endtask

  logic [31:0] ia [NMAX];
  logic [31:0] ib [NMAX];

  initial begin
    logic [31:0] d;
    int sizes [15] = '{1, 2, 4, 8, 16, 32, 64, 128, 256, 512, 1024, 2048, 4096, 8192, 16320};
    s_address = '0; s_read = 1'b0; s_write = 1'b0; s_writedata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    foreach (sizes[k]) begin
      int n, burst, ma, mb, cyc_a, cyc_b;
      longint sa, sb, x, z, y;
      n = sizes[k];
      burst = (n < 64) ? n : 64;
      sa = 0; sb = 0;
      for (int w = 0; w < n; w++) begin
        ia[w] = $urandom;
        ib[w] = (w % 2 == 0) ? ia[w] ^ 32'h0101_0101 : $urandom;
        mem.mem[w]         = ia[w];
        mem.mem[32768 + w] = ib[w];
        for (int l = 0; l < 4; l++) begin sa += ia[w][8*l +: 8]; sb += ib[w][8*l +: 8]; end
      end
      ma = int'(sa / (4 * n));
      mb = int'(sb / (4 * n));

      load(SEL_FIFO_A, 0, n, burst, cyc_a);
      csr_rd(CSR_MEAN_A, d); check($sformatf("%0d words: mean A", n), d, ma);
      pass(MODE_X, n);
      for (int l = 0; l < 4; l++) begin
        x = 0;
        for (int w = 0; w < n; w++) x += (int'(ia[w][8*l +: 8]) - ma) ** 2;
        csr_rd(5'(CSR_XZ0 + l), d); check($sformatf("%0d words: X[%0d]", n, l), d, x);
      end

      load(SEL_FIFO_B, 32768, n, burst, cyc_b);
      csr_rd(CSR_MEAN_B, d); check($sformatf("%0d words: mean B", n), d, mb);
      pass(MODE_YZ, n);
      for (int l = 0; l < 4; l++) begin
        z = 0; y = 0;
        for (int w = 0; w < n; w++) begin
          z += (int'(ib[w][8*l +: 8]) - mb) ** 2;
          y += (int'(ia[w][8*l +: 8]) - ma) * (int'(ib[w][8*l +: 8]) - mb);
        end
        csr_rd(5'(CSR_XZ0 + l), d); check($sformatf("%0d words: Z[%0d]", n, l), d, z);
        csr_rd(5'(CSR_Y0 + l), d);  check($sformatf("%0d words: Y[%0d]", n, l), longint'($signed(d)), y);
      end
      csr_rd(CSR_FIFOA_USED, d); check($sformatf("%0d words: FIFO A keeps A", n), d, n);
      $display("%5d words, burst %2d: load A %6d cycles, load B %6d cycles", n, burst, cyc_a, cyc_b);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
