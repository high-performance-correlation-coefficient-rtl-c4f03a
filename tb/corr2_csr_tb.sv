// corr2_csr_tb: writes and reads back every writable register, reads every status and
// result register with distinct random values on its input, checks the version word, the
// one-cycle command pulses and the one-cycle read latency.
module corr2_csr_tb;
  import corr2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  s_address;
  logic        s_read, s_write;
  logic [31:0] s_writedata, s_readdata;
  logic [31:0] dma_start, dma_end, dma_thresh;
  logic [6:0]  dma_burst;
  ctrl_t       ctrl;
  logic        dma_go, calb_go;
  status_t     status;
  logic [14:0] fifoa_used, fifob_used;
  logic [31:0] acc_sum, pixels;
  logic [7:0]  mean_a, mean_b;
  logic [31:0] xz [4];
  logic [31:0] y  [4];

  corr2_csr #(.FIFO_CW(15)) dut (.*);

  int checks = 0, failures = 0;
  int n_dma_go = 0, n_calb_go = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma_go)  n_dma_go++;
    if (calb_go) n_calb_go++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0h expected %0h", what, got, exp); end
  endtask

  task automatic wr(logic [4:0] a, logic [31:0] d);
    @(negedge clk); s_address = a; s_write = 1; s_writedata = d;
    @(negedge clk); s_write = 0;
  endtask

  task automatic rd(logic [4:0] a, output logic [31:0] d);
    @(negedge clk); s_address = a; s_read = 1;
    @(posedge clk); #1 d = s_readdata;     // valid right after the edge that follows s_read
    @(negedge clk); s_read = 0;
  endtask

  initial begin
    logic [31:0] d, v;
    s_address = 0; s_read = 0; s_write = 0; s_writedata = 0;
    status = status_t'(6'b101011);
    fifoa_used = 15'($urandom); fifob_used = 15'($urandom);
    acc_sum = $urandom; pixels = $urandom; mean_a = 8'($urandom); mean_b = 8'($urandom);
    foreach (xz[l]) begin xz[l] = $urandom; y[l] = $urandom; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    rd(CSR_VERSION, d); check("version", d, 32'hABCD_0001);
    v = $urandom; wr(CSR_DMA_START, v);  rd(CSR_DMA_START, d);  check("start", d, v);
    check("start out", dma_start, v);
    v = $urandom; wr(CSR_DMA_END, v);    rd(CSR_DMA_END, d);    check("end", d, v);
    check("end out", dma_end, v);
    wr(CSR_DMA_BURST, 64);               rd(CSR_DMA_BURST, d);  check("burst", d, 64);
    check("burst out", 32'(dma_burst), 64);
    wr(CSR_DMA_THRESH, 32'h3FFF);        rd(CSR_DMA_THRESH, d); check("thresh", d, 32'h3FFF);
    check("thresh out", dma_thresh, 32'h3FFF);
    wr(CSR_CTRL, 32'h5);                 rd(CSR_CTRL, d);       check("ctrl", d, 32'h5);
    check("ctrl feedback", 32'(ctrl.feedback), 1);
    check("ctrl mode", 32'(ctrl.calb_mode), 32'(MODE_X));
    check("ctrl sel", 32'(ctrl.fifo_sel), 32'(SEL_FIFO_B));

    rd(CSR_CMD_STATUS, d); check("status", d, 32'b101011);
    rd(CSR_FIFOA_USED, d); check("fifo a", d, 32'(fifoa_used));
    rd(CSR_FIFOB_USED, d); check("fifo b", d, 32'(fifob_used));
    rd(CSR_ACC, d);        check("acc", d, acc_sum);
    rd(CSR_MEAN_A, d);     check("mean a", d, 32'(mean_a));
    rd(CSR_MEAN_B, d);     check("mean b", d, 32'(mean_b));
    rd(CSR_PIXELS, d);     check("pixels", d, pixels);
    for (int l = 0; l < 4; l++) begin
      rd(5'(CSR_XZ0 + l), d); check($sformatf("xz%0d", l), d, xz[l]);
      rd(5'(CSR_Y0 + l), d);  check($sformatf("y%0d", l), d, y[l]);
    end
    rd(5'd31, d); check("unmapped", d, 0);

    wr(CSR_CMD_STATUS, 32'h1);
    wr(CSR_CMD_STATUS, 32'h2);
    wr(CSR_CMD_STATUS, 32'h3);
    repeat (3) @(negedge clk);
    check("dma_go pulses", n_dma_go, 2);
    check("calb_go pulses", n_calb_go, 2);

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
