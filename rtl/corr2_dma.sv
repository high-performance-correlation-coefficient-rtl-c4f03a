// corr2_dma: Avalon-MM burst read master that copies one image from memory into a FIFO.
//
// It reads the 32-bit words from start_addr up to (not including) end_addr in bursts of
// burst_count words, the last burst shortened to what is left, and hands every returned word
// to the FIFO the CSRs select. Burst reads, the burst count and the FIFO threshold come from
// the original design, whose measurements show single-word transfers about five times slower
// than 64-word bursts. The flow control is this design's: the memory cannot be stalled once a burst is
// granted, so a new burst is requested only while the FIFO fill level, plus the words already
// requested but not yet returned, plus the new burst, stays within fifo_thresh. Bursts are
// pipelined: the next may be requested before the previous one has returned all its words.
//
// Interface: go (one cycle) latches the addresses; busy stays high until the last word has
// been delivered, then done pulses for one cycle. Avalon side: m_read/m_address/m_burstcount
// are held while m_waitrequest is high; m_readdatavalid marks returned words, which appear on
// out_valid/out_data in the same cycle. Addresses are byte addresses, word aligned.
module corr2_dma
  import corr2_pkg::*;
#(
  parameter int unsigned FIFO_CW = 15   // width of the FIFO fill level
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               go,
  input  logic [31:0]        start_addr,
  input  logic [31:0]        end_addr,
  input  logic [BURST_W-1:0] burst_count,   // 1..64, 0 is taken as 1
  input  logic [31:0]        fifo_thresh,
  input  logic [FIFO_CW-1:0] fifo_used,
  output logic               busy,
  output logic               done,
  // Avalon-MM read master
  output logic               m_read,
  output logic [31:0]        m_address,
  output logic [BURST_W-1:0] m_burstcount,
  input  logic               m_waitrequest,
  input  logic [WORD_W-1:0]  m_readdata,
  input  logic               m_readdatavalid,
  // to the selected FIFO
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_data
);

  logic [31:0]        next_addr;     // byte address of the next burst
  logic [29:0]        to_request;    // words not yet requested
  logic [29:0]        to_receive;    // words not yet returned
  logic [29:0]        in_flight;     // requested, not yet returned
  logic [BURST_W-1:0] blen;          // length of the next burst
  logic [BURST_W-1:0] burst_eff;
  logic               room;
  logic               grant;

  assign burst_eff = (burst_count == '0) ? BURST_W'(1) : burst_count;
  assign blen      = (to_request < 30'(burst_eff)) ? BURST_W'(to_request) : burst_eff;
  assign in_flight = to_receive - to_request;
  assign room      = (33'(fifo_used) + 33'(in_flight) + 33'(blen)) <= 33'(fifo_thresh);
  assign grant     = m_read && !m_waitrequest;

  assign out_valid = busy && m_readdatavalid;
  assign out_data  = m_readdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      next_addr    <= '0;
      to_request   <= '0;
      to_receive   <= '0;
      m_read       <= 1'b0;
      m_address    <= '0;
      m_burstcount <= '0;
    end else begin
      done <= 1'b0;
      if (go && !busy) begin
        next_addr  <= {start_addr[31:2], 2'b00};
        to_request <= (end_addr > start_addr) ? 30'((end_addr - start_addr) >> 2) : '0;
        to_receive <= (end_addr > start_addr) ? 30'((end_addr - start_addr) >> 2) : '0;
        busy       <= 1'b1;
      end else if (busy) begin
        // request side: hold a request until it is granted, then issue the next one
        if (grant) begin
          m_read <= 1'b0;
        end else if (!m_read && to_request != '0 && room) begin
          m_read       <= 1'b1;
          m_address    <= next_addr;
          m_burstcount <= blen;
          next_addr    <= next_addr + {23'd0, blen, 2'b00};
          to_request   <= to_request - 30'(blen);
        end
        // return side
        if (m_readdatavalid) to_receive <= to_receive - 1'b1;
        if (to_receive == '0 && !m_read) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Avalon-MM: a request must stay stable while it waits
  property p_hold_request;
    @(posedge clk) disable iff (!rst_n)
      (m_read && m_waitrequest) |=> (m_read && $stable(m_address) && $stable(m_burstcount));
  endproperty
  a_hold_request: assert property (p_hold_request);

endmodule
