// tb_drive_pwm: checks the three-phase centre-aligned PWM at its default
// 16 kHz period (6250 clocks at 100 MHz). For random duties it measures per
// phase the high-side on-time (2*duty clocks), the low-side on-time
// (2*(HALF-duty-DEADTIME) clocks), that the two switches are never on
// together, that the sync pulse comes every 6250 clocks, that a duty change
// only takes effect at the next period, and that disable turns all off.
module tb_drive_pwm;
  localparam int HALF = 3125, DT = 50, CW = 12;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [CW-1:0] duty [3];
  logic [2:0] h, l;
  logic sync;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  drive_pwm dut (.clk, .rst_n, .enable, .duty, .pwm_h(h), .pwm_l(l), .sync_o(sync));

  int hcnt [3], lcnt [3], len = 0, periods = 0;
  int cur_duty [3], next_duty [3];
  bit measure = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 3; p++) check(!(h[p] && l[p]), "shoot-through");
    if (sync) begin
      if (measure) begin
        check(len == 2 * HALF, $sformatf("period %0d", len));
        for (int p = 0; p < 3; p++) begin
          int el;
          el = 2 * (HALF - cur_duty[p] - DT);
          if (el < 0) el = 0;
          check(hcnt[p] == 2 * cur_duty[p], $sformatf("phase %0d high %0d expected %0d", p, hcnt[p], 2 * cur_duty[p]));
          check(lcnt[p] == el, $sformatf("phase %0d low %0d expected %0d", p, lcnt[p], el));
        end
      end
      periods++;
      len = 1;
      for (int p = 0; p < 3; p++) begin hcnt[p] = h[p]; lcnt[p] = l[p]; end
    end else begin
      len++;
      for (int p = 0; p < 3; p++) begin hcnt[p] += h[p]; lcnt[p] += l[p]; end
    end
  end

  task automatic set_duties();
    for (int p = 0; p < 3; p++) begin
      next_duty[p] = $urandom_range(HALF);
      duty[p] = CW'(next_duty[p]);
    end
  endtask

  initial begin
    for (int p = 0; p < 3; p++) duty[p] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    enable = 1;
    set_duties();
    @(posedge sync); @(posedge sync); @(posedge clk); @(negedge clk);
    for (int p = 0; p < 3; p++) cur_duty[p] = next_duty[p];
    measure = 1;
    for (int k = 0; k < 6; k++) begin
      // Change the duties mid-period: the running period keeps its duties.
      repeat (1000) @(negedge clk);
      set_duties();
      @(posedge sync);
      @(posedge clk); @(negedge clk);
      for (int p = 0; p < 3; p++) cur_duty[p] = next_duty[p];
    end
    // Extremes: 0 and full.
    duty[0] = 0; duty[1] = CW'(HALF); duty[2] = CW'(HALF - 10);
    next_duty[0] = 0; next_duty[1] = HALF; next_duty[2] = HALF - 10;
    @(posedge sync); @(posedge clk); @(negedge clk);
    for (int p = 0; p < 3; p++) cur_duty[p] = next_duty[p];
    @(posedge sync); @(posedge clk); @(negedge clk);
    measure = 0;
    enable = 0;
    repeat (2 * HALF) begin
      @(negedge clk);
      check(h == 0 && l == 0, "all off when disabled");
    end
    check(periods >= 9, "periods counted");
    report_and_finish();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
