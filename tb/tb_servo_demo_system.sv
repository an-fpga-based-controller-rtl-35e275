// tb_servo_demo_system: the demonstrator IP seen from the processor's bus,
// at a reduced PWM and timer period. It checks that every register window
// reaches its own block (each servo channel gets its own target and its
// pulse width is measured), that the timer interrupt comes every
// TIMER_PERIOD clocks, and that an SPI frame raises the SPI interrupt and
// can be read through the bus. Unmapped windows read as zero.
module tb_servo_demo_system;
  import cobot_pkg::*;
  localparam int PER = 400, MINH = 10, RNG = 40, TPER = 400, NS = 5;
  logic clk = 0, rst_n = 0;
  mm_req_t m_req;
  mm_rdata_t m_rdata;
  logic m_rvalid, timer_irq, spi_irq;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic [NS-1:0] pwm, pstart;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  servo_demo_system #(.PWM_PERIOD(PER), .PWM_MIN_HIGH(MINH), .PWM_RANGE(RNG), .TIMER_PERIOD(TPER)) dut (
    .clk, .rst_n, .m_req, .m_rdata, .m_rvalid, .timer_irq, .spi_irq,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi),
    .servo_pwm(pwm), .servo_period_start(pstart));

  task automatic wr(input int a, input int d);
    @(negedge clk); m_req = '0; m_req.write = 1; m_req.addr = MM_ADDR_W'(a); m_req.wdata = d;
    @(negedge clk); m_req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); m_req = '0; m_req.read = 1; m_req.addr = MM_ADDR_W'(a);
    @(negedge clk); m_req = '0; d = m_rdata;
    check(m_rvalid, "rvalid");
  endtask
  function automatic int pwm_reg(int ch, int r); return (DEMO_SLV_PWM0 + ch) * 16 + r; endfunction

  task automatic send(input logic [31:0] w);
    cs_n = 0; #100;
    for (int i = 31; i >= 0; i--) begin mosi = w[i]; #40; sclk = 1; #40; sclk = 0; end
    #60; cs_n = 1; #200;
  endtask

  int hc [NS], last_hc [NS];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NS; c++)
      if (pstart[c]) begin last_hc[c] = hc[c]; hc[c] = pwm[c]; end
      else hc[c] += pwm[c];

  longint cyc = 0, t0, t1;
  always @(posedge clk) cyc++;

  int v;
  initial begin
    m_req = '0;
    for (int c = 0; c < NS; c++) begin hc[c] = 0; last_hc[c] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // Each servo channel: own target, jump there at full speed.
    for (int c = 0; c < NS; c++) begin
      wr(pwm_reg(c, 1), RNG);
      wr(pwm_reg(c, 0), 3 + 7 * c);
      wr(pwm_reg(c, 3), 1);
    end
    repeat (3) @(posedge pstart[0]);
    @(posedge clk); @(negedge clk);
    for (int c = 0; c < NS; c++) begin
      check(last_hc[c] == MINH + 3 + 7 * c, $sformatf("servo %0d width %0d", c, last_hc[c]));
      rd(pwm_reg(c, 2), v); check(v == 3 + 7 * c, $sformatf("servo %0d position", c));
    end
    // Timer: start continuous with interrupt.
    wr(DEMO_SLV_TIMER * 16 + 1, 32'b0111);
    @(posedge timer_irq); t0 = cyc;
    wr(DEMO_SLV_TIMER * 16 + 0, 0);
    @(posedge timer_irq); t1 = cyc;
    check(t1 - t0 == TPER, $sformatf("timer spacing %0d", t1 - t0));
    wr(DEMO_SLV_TIMER * 16 + 1, 32'b1000);
    wr(DEMO_SLV_TIMER * 16 + 0, 0);
    // SPI through the bus.
    wr(DEMO_SLV_SPI * 16 + 2, 1);
    send(32'h0123_4567);
    check(spi_irq == 1, "SPI interrupt");
    rd(DEMO_SLV_SPI * 16 + 0, v); check(v == 32'h0123_4567, "SPI data via bus");
    check(spi_irq == 0, "SPI interrupt cleared");
    // Unmapped window.
    rd((DEMO_SLV_PWM0 + NS) * 16, v); check(v == 0, "unmapped window reads zero");
    report_and_finish();
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
