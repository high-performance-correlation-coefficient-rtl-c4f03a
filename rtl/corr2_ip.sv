// corr2_ip: hardware accelerator for the 2-D correlation coefficient of two 8-bit images,
//   r = sum (A - meanA)(B - meanB) / sqrt( sum (A - meanA)^2 * sum (B - meanB)^2 )
//
// The engine computes the three sums; the processor adds the four lanes and forms
// r = Y / sqrt(X * Z). A reference image A is loaded once and compared against any number of
// images B:
//   1. Load A: the DMA reads A from memory in bursts into FIFO A; on the way in the
//      accumulator sums its pixels, and at the end the mean divider gives meanA.
//   2. X pass: A is read out of FIFO A through the four CALBs (one per byte lane, four pixels
//      per clock) and, with feedback set, written straight back, so A stays stored. XZ[l] = X.
//   3. Load B into FIFO B the same way, giving meanB. B stays in FIFO B until its sum and mean
//      are known.
//   4. YZ pass: A (fed back again) and B are read in step; XZ[l] = Z and Y[l] = the cross sum.
//   Step 3 for the next image may be started as soon as a YZ pass has started: the pass keeps
//   its own copy of the means and reads only the words of the image it started on.
// That data flow (DMA, FIFO A with feedback, FIFO B holding B until summed, accumulator, four
// CALBs) is the original design's; the command and status protocol, the mean divider, the register
// addresses and the interlocks are this design's.
//
// Ports: an Avalon-MM slave for the registers (5-bit word address, read latency 1) and an
// Avalon-MM burst read master to memory (byte addresses, burstcount up to 64), one clock,
// asynchronous active-low reset. Interlocks: a load of A is ignored while a pass runs (the
// pass owns FIFO A), a pass is ignored while A is loading or while the mean it needs is not
// valid, and either command is ignored while its unit is busy.
module corr2_ip
  import corr2_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16384,   // words per FIFO (16320-word images fit)
  localparam int unsigned FIFO_CW   = $clog2(FIFO_DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // Avalon-MM slave: registers
  input  logic [4:0]         s_address,
  input  logic               s_read,
  input  logic               s_write,
  input  logic [31:0]        s_writedata,
  output logic [31:0]        s_readdata,
  // Avalon-MM burst read master: image memory
  output logic               m_read,
  output logic [31:0]        m_address,
  output logic [BURST_W-1:0] m_burstcount,
  input  logic               m_waitrequest,
  input  logic [WORD_W-1:0]  m_readdata,
  input  logic               m_readdatavalid
);

  // ---------------- registers ----------------
  logic [31:0]        dma_start, dma_end, dma_thresh;
  logic [BURST_W-1:0] dma_burst;
  ctrl_t              ctrl;
  logic               dma_go_req, calb_go_req;
  status_t            status;

  // ---------------- datapath signals ----------------
  logic               dma_busy, dma_done, dma_valid;
  logic [WORD_W-1:0]  dma_data;
  logic [FIFO_CW-1:0] a_used, b_used, sel_used;
  logic               a_full, a_empty, b_full, b_empty;
  logic               a_wr, a_rd, a_fb_wr, b_wr, b_rd, a_clear;
  logic [WORD_W-1:0]  a_wdata, a_rdata, b_rdata;
  logic [ACC_W-1:0]   acc_sum;
  logic [31:0]        acc_pixels;
  logic               div_busy, div_done;
  logic [PIX_W-1:0]   div_quot;
  logic               seq_busy, seq_done;
  logic               calb_clear, calb_valid;
  logic [WORD_W-1:0]  calb_a, calb_b;
  logic [PIX_W-1:0]   seq_mean_a, seq_mean_b;
  logic [ACC_W-1:0]   xz [LANES];
  logic [ACC_W-1:0]   y  [LANES];

  // ---------------- engine state ----------------
  fifo_sel_e          load_sel;          // FIFO the current load fills
  logic [PIX_W-1:0]   mean_a, mean_b;
  logic               mean_a_valid, mean_b_valid;
  logic [29:0]        words_a;           // size of the reference image
  logic               calb_done_flag;
  logic               dma_go, calb_go;

  assign dma_go  = dma_go_req && !dma_busy && !div_busy &&
                   !(ctrl.fifo_sel == SEL_FIFO_A && seq_busy);
  assign calb_go = calb_go_req && !seq_busy && mean_a_valid &&
                   !((dma_busy || div_busy) && load_sel == SEL_FIFO_A) &&
                   (ctrl.calb_mode == MODE_X || mean_b_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_sel       <= SEL_FIFO_A;
      mean_a         <= '0;
      mean_b         <= '0;
      mean_a_valid   <= 1'b0;
      mean_b_valid   <= 1'b0;
      words_a        <= '0;
      calb_done_flag <= 1'b0;
    end else begin
      if (dma_go) begin
        load_sel <= ctrl.fifo_sel;
        if (ctrl.fifo_sel == SEL_FIFO_A) mean_a_valid <= 1'b0;
        else                             mean_b_valid <= 1'b0;
      end
      if (div_done) begin
        if (load_sel == SEL_FIFO_A) begin
          mean_a       <= div_quot;
          mean_a_valid <= 1'b1;
          words_a      <= 30'(acc_pixels / LANES);
        end else begin
          mean_b       <= div_quot;
          mean_b_valid <= 1'b1;
        end
      end
      if (calb_go)       calb_done_flag <= 1'b0;
      else if (seq_done) calb_done_flag <= 1'b1;
    end
  end

  // a command is reported busy from the cycle it is written, and a load stays busy until
  // its mean is stored, so that a status read right after a command sees its effect
  assign status = '{mean_b_valid: mean_b_valid, mean_a_valid: mean_a_valid,
                    calb_done: calb_done_flag && !calb_go, calb_busy: seq_busy || calb_go,
                    mean_busy: div_busy || dma_done, dma_busy: dma_busy || dma_go};

  corr2_csr #(.FIFO_CW(FIFO_CW)) u_csr (
    .clk, .rst_n,
    .s_address, .s_read, .s_write, .s_writedata, .s_readdata,
    .dma_start, .dma_end, .dma_burst, .dma_thresh, .ctrl,
    .dma_go(dma_go_req), .calb_go(calb_go_req),
    .status, .fifoa_used(a_used), .fifob_used(b_used),
    .acc_sum, .mean_a, .mean_b, .pixels(acc_pixels), .xz, .y
  );

  // ---------------- load path: DMA -> FIFO A or B, accumulator alongside ----------------
  assign sel_used = (load_sel == SEL_FIFO_A) ? a_used : b_used;

  corr2_dma #(.FIFO_CW(FIFO_CW)) u_dma (
    .clk, .rst_n,
    .go(dma_go), .start_addr(dma_start), .end_addr(dma_end), .burst_count(dma_burst),
    .fifo_thresh(dma_thresh), .fifo_used(sel_used),
    .busy(dma_busy), .done(dma_done),
    .m_read, .m_address, .m_burstcount, .m_waitrequest, .m_readdata, .m_readdatavalid,
    .out_valid(dma_valid), .out_data(dma_data)
  );

  corr2_accumulator u_acc (
    .clk, .rst_n, .clear(dma_go), .in_valid(dma_valid), .in_word(dma_data),
    .sum(acc_sum), .pixels(acc_pixels)
  );

  corr2_mean_div #(.N_W(ACC_W), .D_W(32), .Q_W(PIX_W)) u_mean (
    .clk, .rst_n, .start(dma_done), .num(acc_sum), .den(acc_pixels),
    .busy(div_busy), .done(div_done), .quot(div_quot)
  );

  // FIFO A: written by the DMA while A loads, otherwise by the feedback path
  assign a_clear = dma_go && ctrl.fifo_sel == SEL_FIFO_A;
  assign a_wr    = (dma_valid && load_sel == SEL_FIFO_A) || a_fb_wr;
  assign a_wdata = (dma_valid && load_sel == SEL_FIFO_A) ? dma_data : a_rdata;
  assign b_wr    = dma_valid && load_sel == SEL_FIFO_B;

  corr2_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_a (
    .clk, .rst_n, .clear(a_clear), .wr_en(a_wr), .wr_data(a_wdata), .rd_en(a_rd),
    .rd_data(a_rdata), .full(a_full), .empty(a_empty), .used_words(a_used)
  );

  corr2_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk, .rst_n, .clear(1'b0), .wr_en(b_wr), .wr_data(dma_data), .rd_en(b_rd),
    .rd_data(b_rdata), .full(b_full), .empty(b_empty), .used_words(b_used)
  );

  // ---------------- compute path: FIFOs -> four CALBs ----------------
  corr2_calb_seq u_seq (
    .clk, .rst_n,
    .go(calb_go), .mode(ctrl.calb_mode), .feedback(ctrl.feedback), .words(words_a),
    .mean_a_in(mean_a), .mean_b_in(mean_b), .busy(seq_busy), .done(seq_done),
    .a_empty, .a_rd, .a_data(a_rdata), .a_fb_wr,
    .b_empty, .b_rd, .b_data(b_rdata),
    .calb_clear, .calb_valid, .calb_a, .calb_b, .mean_a(seq_mean_a), .mean_b(seq_mean_b)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_calb
    logic signed [ACC_W-1:0] y_lane;
    corr2_calb u_calb (
      .clk, .rst_n, .clear(calb_clear), .in_valid(calb_valid),
      .a(calb_a[l*PIX_W +: PIX_W]), .b(calb_b[l*PIX_W +: PIX_W]),
      .mean_a(seq_mean_a), .mean_b(seq_mean_b), .xz(xz[l]), .y(y_lane)
    );
    assign y[l] = y_lane;
  end

  // the load and feedback paths never write FIFO A in the same cycle
  a_single_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(dma_valid && load_sel == SEL_FIFO_A && a_fb_wr));
  // the DMA threshold keeps the FIFOs from overflowing
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(a_wr && a_full) && !(b_wr && b_full));

endmodule
