// tb_six_axis_drive: the six drive axes seen from the processor's bus at a
// reduced PWM period and decimation. Each axis gets its own duty, encoder
// movement and modulator stream; the test reads every axis back through its
// own register window and measures its pulse widths, so a mix-up between
// axes is caught. It also checks the control interrupt spacing (one per PWM
// period), reaches the FOC accelerator in the window after the axes, and
// sends one word over the external processor's SPI link in the last window.
module tb_six_axis_drive;
  import cobot_pkg::*;
  localparam int NA = 6, HALF = 100, D = 8;
  logic clk = 0, rst_n = 0;
  mm_req_t m_req;
  mm_rdata_t m_rdata;
  logic m_rvalid, ctrl_irq, host_irq;
  logic host_sclk = 0, host_cs_n = 1, host_mosi = 0;
  logic [NA-1:0] mod_clk, enc_a = '0, enc_b = '0;
  logic [1:0] mod_data [NA];
  logic [2:0] pwm_h [NA], pwm_l [NA];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  six_axis_drive #(.PWM_HALF(HALF), .DEADTIME(5), .DECIMATION(D)) dut (
    .clk, .rst_n, .m_req, .m_rdata, .m_rvalid, .ctrl_irq, .host_irq,
    .host_sclk, .host_cs_n, .host_mosi, .mod_clk, .mod_data,
    .enc_a, .enc_b, .pwm_h, .pwm_l);

  task automatic wr(input int a, input int d);
    @(negedge clk); m_req = '0; m_req.write = 1; m_req.addr = MM_ADDR_W'(a); m_req.wdata = d;
    @(negedge clk); m_req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); m_req = '0; m_req.read = 1; m_req.addr = MM_ADDR_W'(a);
    @(negedge clk); m_req = '0; d = m_rdata;
  endtask

  // One 32-bit SPI frame, MSB first, 8 system clocks per SPI bit.
  task automatic spi_send(input logic [31:0] w);
    host_cs_n = 0; repeat (8) @(negedge clk);
    for (int i = 31; i >= 0; i--) begin
      host_mosi = w[i]; repeat (4) @(negedge clk);
      host_sclk = 1;    repeat (4) @(negedge clk);
      host_sclk = 0;
    end
    repeat (4) @(negedge clk); host_cs_n = 1; repeat (8) @(negedge clk);
  endtask

  // Axis a: channel 0 all ones on odd axes, zeros on even; channel 1 zeros.
  initial for (int a = 0; a < NA; a++) mod_data[a] = {1'b0, 1'(a % 2)};

  int hc [NA], last_hc [NA];
  always @(posedge clk) if (rst_n)
    for (int a = 0; a < NA; a++)
      if (ctrl_irq) begin last_hc[a] = hc[a]; hc[a] = pwm_h[a][1]; end
      else hc[a] += pwm_h[a][1];

  longint cyc = 0, t0;
  int irq_gap_bad = 0, irqs = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && ctrl_irq) begin
      if (irqs > 0 && cyc - t0 != 2 * HALF) irq_gap_bad++;
      t0 = cyc; irqs++;
    end
  end

  int v;
  logic [1:0] seq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  initial begin
    m_req = '0;
    for (int a = 0; a < NA; a++) begin hc[a] = 0; last_hc[a] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < NA; a++) begin
      wr(a * 16 + 1, 10 * (a + 1));
      wr(a * 16 + 3, 1);
    end
    // Encoder: axis a moves a+3 steps forward.
    for (int s = 0; s < NA + 3; s++) begin
      for (int a = 0; a < NA; a++)
        if (s < a + 3) {enc_a[a], enc_b[a]} = seq[(s + 1) % 4];
      repeat (4) @(negedge clk);
    end
    repeat (3) @(posedge ctrl_irq);
    @(posedge clk); @(negedge clk);
    for (int a = 0; a < NA; a++) begin
      check(last_hc[a] == 20 * (a + 1), $sformatf("axis %0d width %0d", a, last_hc[a]));
      rd(a * 16 + 1, v); check(v == 10 * (a + 1), $sformatf("axis %0d duty read", a));
      rd(a * 16 + 4, v); check(v == a + 3, $sformatf("axis %0d position %0d", a, v));
      rd(a * 16 + 6, v); check(v == ((a % 2) ? D * D * D : 0), $sformatf("axis %0d ADC0 %0d", a, v));
    end
    check(irqs >= 3 && irq_gap_bad == 0, "control interrupt once per PWM period");
    // FOC accelerator in window NA.
    wr(NA * 16 + 7, 1234);
    rd(NA * 16 + 7, v); check(v == 1234, "FOC KP read back");
    wr(NA * 16 + 2, 1000);      // ia
    wr(NA * 16 + 4, 0);         // theta 0: id = ia
    wr(NA * 16 + 0, 1);
    repeat (60) @(negedge clk);
    rd(NA * 16 + 0, v); check(v == 2, "FOC step done");
    rd(NA * 16 + 9, v); check(v >= 994 && v <= 1006, $sformatf("FOC id %0d", v));
    // External processor link in window NA+1.
    wr((NA + 1) * 16 + 2, 1);   // interrupt enable
    check(host_irq == 0, "host SPI interrupt idle");
    spi_send(32'hC0DE_1234);
    check(host_irq == 1, "host SPI interrupt after frame");
    rd((NA + 1) * 16 + 0, v); check(v == 32'hC0DE_1234, $sformatf("host SPI word %h", v));
    @(negedge clk); check(host_irq == 0, "host SPI interrupt cleared by read");
    rd(NA * 16 + 7, v); check(v == 1234, "FOC window untouched by SPI link");
    report_and_finish();
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
