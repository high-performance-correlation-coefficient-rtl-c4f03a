// corr2_fifo_tb: random push/pop traffic against a queue model of the FIFO, at depth 16.
// Checks the data order, the fill level, full and empty, that pushes into a full FIFO and pops
// from an empty one are ignored, simultaneous push and pop, and clear.
module corr2_fifo_tb;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear, wr_en, rd_en, full, empty;
  logic [31:0] wr_data, rd_data;
  logic [4:0]  used_words;

  corr2_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [$];
  logic        expect_data;
  logic [31:0] expected;
  int n_full = 0, n_empty_pop = 0, n_both = 0;

  initial begin
    clear = 0; wr_en = 0; rd_en = 0; wr_data = 0; expect_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // data popped last cycle
      if (expect_data) begin
        checks++;
        if (rd_data !== expected) begin
          failures++; $display("FAIL data %0h expected %0h", rd_data, expected);
        end
      end
      checks++;
      if (used_words != model.size() || full != (model.size() == DEPTH) || empty != (model.size() == 0)) begin
        failures++; $display("FAIL level %0d expected %0d", used_words, model.size());
      end
      // phases: fill-biased, drain-biased, balanced
      wr_en   = $urandom_range(99) < ((cyc / 500) % 3 == 0 ? 80 : (cyc / 500) % 3 == 1 ? 20 : 50);
      rd_en   = $urandom_range(99) < ((cyc / 500) % 3 == 0 ? 20 : (cyc / 500) % 3 == 1 ? 80 : 50);
      wr_data = $urandom;
      clear   = (cyc == 3333);
      expect_data = 0;
      if (clear) model.delete();
      else begin
        // the RTL decides from the level before this cycle: no push when full, no pop when empty
        bit do_wr, do_rd;
        do_wr = wr_en && model.size() != DEPTH;
        do_rd = rd_en && model.size() != 0;
        if (wr_en && !do_wr) n_full++;
        if (rd_en && !do_rd) n_empty_pop++;
        if (do_wr && do_rd)  n_both++;
        if (do_rd) begin expected = model.pop_front(); expect_data = 1; end
        if (do_wr) model.push_back(wr_data);
      end
    end
    checks++; if (n_full == 0 || n_empty_pop == 0 || n_both == 0) failures++;
    $display("full %0d empty-pop %0d push+pop %0d", n_full, n_empty_pop, n_both);
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
