// tb_spi_slave: sends {X,Y} frames to the SPI receiver as the vision
// processor would (mode 0, MSB first) and checks the received position, the
// interrupt, READY cleared by reading DATA, the overrun flag, a short frame
// raising FRAME_ERR without replacing the data, and the frame counter.
module tb_spi_slave;
  import cobot_pkg::*;
  logic clk = 0, rst_n = 0;
  mm_local_req_t req;
  mm_rdata_t rdata;
  logic irq, sclk = 0, cs_n = 1, mosi = 0;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  spi_slave dut (.clk, .rst_n, .req, .rdata, .irq_o(irq),
                 .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi));

  task automatic wr(input int a, input int d);
    @(negedge clk); req = '0; req.write = 1; req.addr = 4'(a); req.wdata = d;
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); req = '0; req.read = 1; req.addr = 4'(a);
    @(negedge clk); req = '0; d = rdata;
  endtask

  // SCLK period 80 ns = 8 system clocks.
  task automatic send(input logic [31:0] w, input int nbits);
    cs_n = 0; #100;
    for (int i = nbits - 1; i >= 0; i--) begin
      mosi = w[i]; #40; sclk = 1; #40; sclk = 0;
    end
    #60; cs_n = 1; #200;
  endtask

  int v;
  logic [15:0] x, y;
  initial begin
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(2, 1);
    for (int k = 0; k < 6; k++) begin
      x = 16'($urandom); y = 16'($urandom);
      send({x, y}, 32);
      check(irq == 1, "interrupt after frame");
      rd(1, v); check(v == 1, $sformatf("status READY only, got %0h", v));
      rd(0, v); check(v == {x, y}, $sformatf("data %08h expected %04h%04h", v, x, y));
      check(irq == 0, "interrupt cleared by reading DATA");
    end
    // Overrun: two frames without reading.
    send(32'h1234_5678, 32);
    send(32'h9abc_def0, 32);
    rd(1, v); check(v == 3, "READY and OVERRUN");
    rd(0, v); check(v == 32'h9abc_def0, "newest frame kept");
    wr(1, 2);
    rd(1, v); check(v == 0, "OVERRUN cleared");
    // Short frame.
    send(32'h0000_0abc, 12);
    rd(1, v); check(v == 4, "FRAME_ERR on 12-bit frame");
    check(irq == 0, "no interrupt for bad frame");
    rd(0, v); check(v == 32'h9abc_def0, "data kept after bad frame");
    wr(1, 4);
    rd(3, v); check(v == 8, $sformatf("frame count %0d", v));
    // Interrupt disabled.
    wr(2, 0);
    send(32'h0102_0304, 32);
    check(irq == 0, "interrupt masked");
    rd(0, v); check(v == 32'h0102_0304, "data with irq masked");
    report_and_finish();
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
