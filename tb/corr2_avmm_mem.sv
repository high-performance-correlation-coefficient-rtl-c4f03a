// corr2_avmm_mem: behavioural model of the image memory seen through an Avalon-MM burst read
// slave, for testbenches only.
//
// It accepts one burst request at a time (m_waitrequest is high while a burst is being
// returned and, at random, for WAIT_PCT percent of the other cycles) and returns the burst's
// words in order after LATENCY cycles, with random one-cycle gaps for GAP_PCT percent of the
// beats. The contents are the array mem, written by the testbench through the hierarchy;
// byte address addr maps to mem[(addr >> 2) % WORDS].
module corr2_avmm_mem #(
  parameter int unsigned WORDS    = 65536,
  parameter int unsigned LATENCY  = 3,
  parameter int unsigned WAIT_PCT = 20,
  parameter int unsigned GAP_PCT  = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        m_read,
  input  logic [31:0] m_address,
  input  logic [6:0]  m_burstcount,
  output logic        m_waitrequest,
  output logic [31:0] m_readdata,
  output logic        m_readdatavalid
);

  logic [31:0] mem [WORDS];

  int unsigned left;          // beats of the current burst still to return
  int unsigned addr_w;        // word address of the next beat
  int unsigned delay;
  bit          stall;
  int unsigned waits;         // cycles with waitrequest high while a request was pending

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stall <= 1'b0;
    else        stall <= ($urandom_range(99) < WAIT_PCT);
  end

  assign m_waitrequest = (left != 0) || stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left            <= 0;
      addr_w          <= 0;
      delay           <= 0;
      waits           <= 0;
      m_readdatavalid <= 1'b0;
      m_readdata      <= '0;
    end else begin
      m_readdatavalid <= 1'b0;
      if (m_read && m_waitrequest) waits <= waits + 1;
      if (m_read && !m_waitrequest) begin
        left   <= (m_burstcount == 0) ? 1 : int'(m_burstcount);
        addr_w <= int'(m_address >> 2);
        delay  <= LATENCY;
      end else if (left != 0) begin
        if (delay != 0) delay <= delay - 1;
        else if ($urandom_range(99) >= GAP_PCT) begin
          m_readdatavalid <= 1'b1;
          m_readdata      <= mem[addr_w % WORDS];
          addr_w          <= addr_w + 1;
          left            <= left - 1;
        end
      end
    end
  end

endmodule
