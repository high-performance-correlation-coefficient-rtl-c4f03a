// corr2_ip_tb: end-to-end test of the corr2 engine at a reduced FIFO depth.
//
// A reference image A and three images B (random 8-bit pixels, with runs of 0 and 255) sit in
// a behavioural Avalon memory with random wait states and gaps. The test drives the register
// port as the processor would: load A, run an X pass, load B1, run a YZ pass and, while it
// runs, load B2 into the same FIFO (which makes the DMA stop at the FIFO threshold), then
// compare B2 and B3. Every result register is compared with sums computed here from the
// images; r = Y / sqrt(X * Z) is formed from them and must lie in [-1, 1]. A pass must take
// one clock per word plus a fixed overhead. The test counts each mechanism of the design
// (multi-word and shortened bursts, wait states, threshold stall, feedback writes, X and YZ
// passes, a load overlapping a pass, commands refused by the interlocks); one that never
// happened is a failure. The shared runs of 0 and 255 make the images partly correlated.
module corr2_ip_tb;
  import corr2_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned N     = 48;          // words per image
  localparam int unsigned NIMG  = 4;           // A, B1, B2, B3

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  s_address;
  logic        s_read, s_write;
  logic [31:0] s_writedata, s_readdata;
  logic        m_read, m_waitrequest, m_readdatavalid;
  logic [31:0] m_address, m_readdata;
  logic [6:0]  m_burstcount;

  corr2_ip #(.FIFO_DEPTH(DEPTH)) dut (.*);
  corr2_avmm_mem #(.WORDS(1024)) mem (.clk, .rst_n, .m_read, .m_address, .m_burstcount,
                                      .m_waitrequest, .m_readdata, .m_readdatavalid);

  int checks = 0, failures = 0;
  logic [31:0] img [NIMG][N];

  // mechanism counters
  int n_bursts_long, n_bursts_short, n_waitreq, n_thresh_stall, n_feedback;
  int n_xpass, n_yzpass, n_overlap, n_ignored;

  always @(posedge clk) if (rst_n) begin
    if (m_read && !m_waitrequest && m_burstcount > 1) n_bursts_long++;
    if (m_read && !m_waitrequest && m_burstcount < dut.dma_burst) n_bursts_short++;
    if (m_read && m_waitrequest) n_waitreq++;
    if (dut.u_dma.busy && !dut.u_dma.m_read && dut.u_dma.to_request != 0 && !dut.u_dma.room)
      n_thresh_stall++;
    if (dut.a_fb_wr) n_feedback++;
    if ((dut.dma_go_req && !dut.dma_go) || (dut.calb_go_req && !dut.calb_go)) n_ignored++;
    if (dut.calb_go && dut.ctrl.calb_mode == MODE_X)  n_xpass++;
    if (dut.calb_go && dut.ctrl.calb_mode == MODE_YZ) n_yzpass++;
    if (dut.seq_busy && dut.dma_busy && dut.load_sel == SEL_FIFO_B) n_overlap++;
  end

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

  function automatic logic [7:0] pix(int i, int w, int l);
    return img[i][w][8*l +: 8];
  endfunction

  function automatic int img_sum(int i);
    int s = 0;
    for (int w = 0; w < N; w++) for (int l = 0; l < 4; l++) s += pix(i, w, l);
    return s;
  endfunction

  function automatic int img_mean(int i);
    return img_sum(i) / (4 * N);
  endfunction

  function automatic longint dev_sum(int ia, int ib, int l);   // sum (a - meanA)(b - meanB)
    longint s = 0;
    int ma = img_mean(ia), mb = img_mean(ib);
    for (int w = 0; w < N; w++) s += (int'(pix(ia, w, l)) - ma) * (int'(pix(ib, w, l)) - mb);
    return s;
  endfunction

  task automatic wait_status(int bitpos, bit value);
    logic [31:0] st;
    do csr_rd(CSR_CMD_STATUS, st); while (st[bitpos] != value);
  endtask

  task automatic load(fifo_sel_e sel, int i, int burst);
    csr_wr(CSR_DMA_START, 32'(i * N * 4));
    csr_wr(CSR_DMA_END,   32'((i + 1) * N * 4));
    csr_wr(CSR_DMA_BURST, 32'(burst));
    csr_wr(CSR_DMA_THRESH, 32'(DEPTH));
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: MODE_X, fifo_sel: sel}));
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b0, dma_go: 1'b1}));
  endtask

  task automatic wait_load_done();
    logic [31:0] st;
    do csr_rd(CSR_CMD_STATUS, st); while (st[0] || st[1]);
  endtask

  task automatic check_load(int i, bit is_b);
    logic [31:0] d;
    csr_rd(CSR_ACC, d);    check($sformatf("sum of image %0d", i), d, img_sum(i));
    csr_rd(CSR_PIXELS, d); check("pixel count", d, 4 * N);
    csr_rd(is_b ? CSR_MEAN_B : CSR_MEAN_A, d);
    check($sformatf("mean of image %0d", i), d, img_mean(i));
  endtask

  int pass_start;

  task automatic pass(calb_mode_e mode);
    csr_wr(CSR_CTRL, 32'(ctrl_t'{feedback: 1'b1, calb_mode: mode, fifo_sel: SEL_FIFO_B}));
    csr_wr(CSR_CMD_STATUS, 32'(cmd_t'{calb_go: 1'b1, dma_go: 1'b0}));
  endtask

  task automatic check_pass(int ib, bit timed);
    logic [31:0] d;
    longint x[4], z[4], yy[4];
    real num, den;
    wait_status(3, 1'b1);
    for (int l = 0; l < 4; l++) begin
      x[l]  = dev_sum(0, 0, l);
      z[l]  = dev_sum(ib, ib, l);
      yy[l] = dev_sum(0, ib, l);
      csr_rd(5'(CSR_XZ0 + l), d); check($sformatf("XZ[%0d] image %0d", l, ib), d, z[l]);
      csr_rd(5'(CSR_Y0 + l), d);  check($sformatf("Y[%0d] image %0d", l, ib), longint'($signed(d)), yy[l]);
    end
    if (ib != 0) begin   // r formed the way the processor does, against a direct evaluation
      num = 0; den = 0;
      for (int l = 0; l < 4; l++) num += real'(yy[l]);
      den = $sqrt(real'(x[0] + x[1] + x[2] + x[3]) * real'(z[0] + z[1] + z[2] + z[3]));
      $display("image %0d: r = %f", ib, num / den);
      checks++;
      if (num / den > 1.0001 || num / den < -1.0001) failures++;
    end
  endtask

  // pass duration: calb_go to done
  int t_go, t_done, pass_cycles [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.calb_go) t_go = cyc;
    if (dut.seq_done && !dut.dma_busy) pass_cycles.push_back(cyc - t_go);
  end

  initial begin
    logic [31:0] d;
    s_address = '0; s_read = 1'b0; s_write = 1'b0; s_writedata = '0;
    for (int i = 0; i < NIMG; i++)
      for (int w = 0; w < N; w++) begin
        img[i][w] = $urandom;
        if (w % 11 == 3) img[i][w] = 32'hFFFF_FFFF;
        if (w % 13 == 5) img[i][w] = 32'h0000_0000;
        mem.mem[i * N + w] = img[i][w];
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    csr_rd(CSR_VERSION, d); check("version", d, 32'hABCD_0001);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A empty after reset", d, 0);

    // a pass before any image is loaded is ignored
    pass(MODE_X);
    csr_rd(CSR_CMD_STATUS, d); check("pass without a mean ignored", d[2], 0);

    // reference image, 16-word bursts
    load(SEL_FIFO_A, 0, 16); wait_load_done(); check_load(0, 0);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A holds A", d, N);
    pass(MODE_X); check_pass(0, 1);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A keeps A after X pass", d, N);

    // B1 with 7-word bursts (the last one shortened)
    load(SEL_FIFO_B, 1, 7); wait_load_done(); check_load(1, 1);
    csr_rd(CSR_FIFOB_USED, d); check("FIFO B holds B1", d, N);

    // YZ pass on B1 while B2 loads behind it
    pass(MODE_YZ);
    load(SEL_FIFO_B, 2, 16);
    check_pass(1, 1);
    wait_load_done(); check_load(2, 1);
    csr_rd(CSR_FIFOB_USED, d); check("FIFO B holds only B2", d, N);
    pass(MODE_YZ); check_pass(2, 1);

    // B3 with single-word transfers, pass started as soon as the mean is known
    load(SEL_FIFO_B, 3, 1); wait_load_done(); check_load(3, 1);
    pass(MODE_YZ);
    load(SEL_FIFO_A, 1, 16);      // ignored: the running pass owns FIFO A
    csr_rd(CSR_CMD_STATUS, d); check("load of A during a pass ignored", d[0], 0);
    check_pass(3, 1);
    csr_rd(CSR_FIFOA_USED, d); check("FIFO A still holds A", d, N);
    csr_rd(CSR_FIFOB_USED, d); check("FIFO B drained", d, 0);

    // throughput: one word per clock plus a fixed overhead, when B is already stored
    foreach (pass_cycles[k]) begin
      checks++;
      if (pass_cycles[k] > N + 8) begin
        failures++;
        $display("FAIL pass %0d took %0d cycles for %0d words", k, pass_cycles[k], N);
      end
    end
    checks++; if (pass_cycles.size() < 3) failures++;

    check("multi-word bursts seen",  longint'(n_bursts_long  > 0), 1);
    check("shortened bursts seen",   longint'(n_bursts_short > 0), 1);
    check("wait states seen",        longint'(n_waitreq      > 0), 1);
    check("threshold stall seen",    longint'(n_thresh_stall > 0), 1);
    check("feedback writes",         n_feedback, 4 * N);   // X pass and three YZ passes
    check("X passes",                n_xpass, 1);
    check("YZ passes",               n_yzpass, 3);
    check("load overlapping a pass", longint'(n_overlap > 0), 1);
    check("commands ignored by the interlocks", n_ignored, 2);
    $display("mechanisms: long %0d short %0d wait %0d stall %0d fb %0d x %0d yz %0d overlap %0d ignored %0d",
             n_bursts_long, n_bursts_short, n_waitreq, n_thresh_stall, n_feedback,
             n_xpass, n_yzpass, n_overlap, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
