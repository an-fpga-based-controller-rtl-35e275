// tb_drive_subsystem: exercises one drive axis through its register window
// at a reduced PWM period and decimation: duty write/read-back and the
// resulting high-side pulse widths, the period counter, encoder counting,
// error and clear through CTRL, the modulator clock rate, and the sinc3
// results for modulator streams of known density.
module tb_drive_subsystem;
  import cobot_pkg::*;
  localparam int HALF = 100, DT = 5, D = 8, MDIV = 5;
  logic clk = 0, rst_n = 0;
  mm_local_req_t req;
  mm_rdata_t rdata;
  logic mod_clk;
  logic [1:0] mod_data = 2'b00;
  logic enc_a = 0, enc_b = 0;
  logic [2:0] h, l;
  logic sync;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  drive_subsystem #(.PWM_HALF(HALF), .DEADTIME(DT), .N_ADC(2), .DECIMATION(D), .MOD_DIV(MDIV)) dut (
    .clk, .rst_n, .req, .rdata, .mod_clk, .mod_data, .enc_a, .enc_b,
    .pwm_h(h), .pwm_l(l), .sync_o(sync));

  task automatic wr(input int a, input int d);
    @(negedge clk); req = '0; req.write = 1; req.addr = 4'(a); req.wdata = d;
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); req = '0; req.read = 1; req.addr = 4'(a);
    @(negedge clk); req = '0; d = rdata;
  endtask

  // High-side pulse widths per period.
  int hc [3], last_hc [3];
  always @(posedge clk) if (rst_n) begin
    if (sync) for (int p = 0; p < 3; p++) begin last_hc[p] = hc[p]; hc[p] = h[p]; end
    else      for (int p = 0; p < 3; p++) hc[p] += h[p];
  end

  // Modulator clock period and stimulus: channel 0 all ones, channel 1
  // alternating ones and zeros.
  longint cyc = 0, last_rise = 0;
  int mclk_bad = 0, mclk_rises = 0;
  always @(posedge clk) cyc++;
  always @(posedge mod_clk) if (rst_n) begin
    if (mclk_rises > 0 && cyc - last_rise != MDIV) mclk_bad++;
    last_rise = cyc; mclk_rises++;
    mod_data[0] <= 1'b1;
    mod_data[1] <= ~mod_data[1];
  end

  task automatic enc_steps(input int n);
    logic [1:0] seq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    static int ph = 0;
    for (int i = 0; i < n; i++) begin
      ph = (ph + 1) % 4;
      {enc_a, enc_b} = seq[ph];
      repeat (4) @(negedge clk);
    end
  endtask

  int v, per0;
  initial begin
    for (int p = 0; p < 3; p++) begin hc[p] = 0; last_hc[p] = 0; end
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(0, 10); wr(1, 50); wr(2, 90);
    rd(0, v); check(v == 10, "duty U read back");
    rd(2, v); check(v == 90, "duty W read back");
    wr(3, 1);
    repeat (3) @(posedge sync);
    @(posedge clk); @(negedge clk);
    check(last_hc[0] == 20 && last_hc[1] == 100 && last_hc[2] == 180,
          $sformatf("pulse widths %0d %0d %0d", last_hc[0], last_hc[1], last_hc[2]));
    repeat (10) @(negedge clk);
    rd(8, per0);
    repeat (4) @(posedge sync);
    repeat (10) @(negedge clk);
    rd(8, v); check(v == per0 + 4, $sformatf("period counter %0d -> %0d", per0, v));
    // Encoder.
    enc_steps(37);
    rd(4, v); check(v == 37, $sformatf("position %0d", v));
    {enc_a, enc_b} = ~{enc_a, enc_b};
    repeat (5) @(negedge clk);
    rd(5, v); check(v == 1, "encoder error flag");
    wr(3, 32'b111);
    rd(5, v); check(v == 0, "encoder error cleared");
    rd(4, v); check(v == 0, "position cleared");
    rd(3, v); check(v == 1, "PWM still enabled");
    // ADC: wait for several decimation windows.
    repeat (5 * D * MDIV) @(negedge clk);
    rd(6, v); check(v == D * D * D, $sformatf("ADC0 full scale %0d", v));
    rd(7, v); check(v == D * D * D / 2, $sformatf("ADC1 half scale %0d", v));
    check(mclk_rises > 100 && mclk_bad == 0, "modulator clock = clk / MOD_DIV");
    wr(3, 0);
    repeat (3 * HALF) @(negedge clk);
    check(h == 0 && l == 0, "power stage off when disabled");
    report_and_finish();
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
