// corr2_dma_tb: the DMA reading images from the behavioural Avalon memory into a model FIFO
// that a consumer drains at random. For several burst counts (1, 7, 16, 64) and thresholds it
// checks that every word arrives once and in order, that each burst asks for the burst count
// or, for the last one, what is left, that burst addresses follow each other, and that the
// FIFO level never passes the threshold. The threshold stall is counted and must happen.
// Also checks that 64-word bursts load an image in fewer cycles than single-word transfers.
module corr2_dma_tb;
  import corr2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        go, busy, done;
  logic [31:0] start_addr, end_addr, fifo_thresh;
  logic [6:0]  burst_count;
  logic [14:0] fifo_used;
  logic        m_read, m_waitrequest, m_readdatavalid, out_valid;
  logic [31:0] m_address, m_readdata, out_data;
  logic [6:0]  m_burstcount;

  corr2_dma #(.FIFO_CW(15)) dut (.*);
  corr2_avmm_mem #(.WORDS(4096), .LATENCY(4)) mem (.clk, .rst_n, .m_read, .m_address,
    .m_burstcount, .m_waitrequest, .m_readdata, .m_readdatavalid);

  int checks = 0, failures = 0;
  logic [31:0] fifo [$];
  int drain_pct;
  int n_stall = 0;
  int exp_next_addr, words_left;

  // model FIFO: takes DMA words, drained at random
  always @(posedge clk) if (rst_n) begin
    if (out_valid) fifo.push_back(out_data);
    if (fifo.size() != 0 && $urandom_range(99) < drain_pct) void'(fifo.pop_front());
  end
  // what the FIFO would report; the popped words are tracked in the checker below
  assign fifo_used = 15'(fifo.size());

  always @(posedge clk) if (rst_n && busy) begin
    if (m_read && !m_waitrequest) begin
      checks += 2;
      if (m_address != exp_next_addr) begin
        failures++; $display("FAIL burst address %0h expected %0h", m_address, exp_next_addr);
      end
      if (m_burstcount != ((words_left < burst_count) ? words_left : burst_count)) begin
        failures++; $display("FAIL burst of %0d with %0d left", m_burstcount, words_left);
      end
      exp_next_addr += 4 * m_burstcount;
      words_left    -= m_burstcount;
    end
    checks++;
    if (fifo.size() > fifo_thresh) begin failures++; $display("FAIL FIFO over threshold"); end
    if (!m_read && words_left != 0 && !dut.room) n_stall++;
  end

  // words arriving, checked in order against memory
  int got;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_data !== mem.mem[(start_addr >> 2) + got]) begin
      failures++; $display("FAIL word %0d: %0h", got, out_data);
    end
    got++;
  end

  task automatic run(int first_word, int words, int burst, int thresh, int drain, output int cycles);
    start_addr = 32'(first_word * 4); end_addr = 32'((first_word + words) * 4);
    burst_count = 7'(burst); fifo_thresh = 32'(thresh); drain_pct = drain;
    exp_next_addr = first_word * 4; words_left = words; got = 0; cycles = 0;
    fifo.delete();
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (got != words) begin failures++; $display("FAIL %0d words of %0d", got, words); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int c1, c64, c;
    go = 0; start_addr = 0; end_addr = 0; burst_count = 1; fifo_thresh = 0; drain_pct = 100;
    for (int i = 0; i < 4096; i++) mem.mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(16, 200, 1,  32767, 100, c1);
    run(16, 200, 64, 32767, 100, c64);
    run(300, 123, 7, 32767, 100, c);
    run(500, 300, 16, 40, 20, c);     // slow consumer: the threshold throttles the DMA
    run(900, 500, 64, 100, 50, c);
    run(50, 0, 16, 100, 50, c);       // empty range
    checks++;
    if (!(c64 < c1)) begin failures++; $display("FAIL bursts not faster: %0d vs %0d", c64, c1); end
    $display("single-word load %0d cycles, 64-word bursts %0d cycles", c1, c64);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL threshold never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
