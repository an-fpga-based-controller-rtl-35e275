// tb_servo_pwm: self-checking test of one servo PWM channel at a reduced
// period. It measures the period length and the high time of every pulse
// and compares them with a reference model of "step towards the target by
// at most speed per period", covering moves up and down, a move that ends
// exactly on the target, clamping of an out-of-range target, the disable
// state and the register read-back.
module tb_servo_pwm;
  import cobot_pkg::*;
  localparam int unsigned PERIOD = 200, MIN_HIGH = 5, RANGE = 40;

  logic clk = 0, rst_n = 0;
  mm_local_req_t req;
  mm_rdata_t rdata;
  logic pwm, pstart;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  servo_pwm #(.PERIOD(PERIOD), .MIN_HIGH(MIN_HIGH), .POS_RANGE(RANGE)) dut (
    .clk, .rst_n, .req, .rdata, .pwm_o(pwm), .period_start_o(pstart));

  task automatic wr(input int a, input int d);
    @(negedge clk); req = '0; req.write = 1; req.addr = 4'(a); req.wdata = d;
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); req = '0; req.read = 1; req.addr = 4'(a);
    @(negedge clk); req = '0; d = rdata;
  endtask

  // Reference model and pulse measurement.
  int ref_pos = RANGE / 2, ref_tgt = RANGE / 2, ref_spd = 0;
  bit ref_en = 0, skip = 1;
  int hi = 0, len = 0, exp_w = 0, periods = 0, at_target_periods = 0;

  function automatic int step(int p, int t, int s);
    if (p < t) return (t - p > s) ? p + s : t;
    if (p > t) return (p - t > s) ? p - s : t;
    return p;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (pstart) begin
      if (periods > 0) begin
        check(len == PERIOD, $sformatf("period length %0d", len));
        if (!skip) check(hi == exp_w, $sformatf("high time %0d expected %0d", hi, exp_w));
      end
      periods++;
      skip = 0;
      ref_pos = step(ref_pos, ref_tgt, ref_spd);
      if (ref_pos == ref_tgt) at_target_periods++;
      exp_w = ref_en ? MIN_HIGH + ref_pos : 0;
      hi = pwm; len = 1;
    end else begin
      hi += pwm; len++;
    end
  end

  task automatic wait_periods(input int n);
    repeat (n) @(posedge pstart);
  endtask

  // Register writes are made just after a period start; that period is not
  // compared because the write lands part-way through it.
  task automatic set(input int a, input int d);
    @(posedge pstart); wr(a, d); skip = 1;
    case (a)
      0: ref_tgt = (d > RANGE) ? RANGE : d;
      1: ref_spd = (d > RANGE) ? RANGE : d;
      2: ref_pos = (d > RANGE) ? RANGE : d;
      3: ref_en  = d[0];
      default: ;
    endcase
  endtask

  int v;
  initial begin
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(2, v); check(v == RANGE / 2, "reset position is mid-range");
    wait_periods(2);
    check(pwm == 0, "output low while disabled");
    set(3, 1);
    wait_periods(2);
    set(2, 3);              // preset position 3
    set(1, 7);              // speed 7 per period
    set(0, 30);             // move up: 10, 17, 24, 30
    wait_periods(6);
    rd(2, v); check(v == 30, "reached target 30");
    rd(3, v); check(v == 3, "CTRL reads enable and at-target");
    set(1, 4);
    set(0, 1);              // move down in steps of 4
    wait_periods(3);
    rd(3, v); check(v[1] == 0, "not at target while moving");
    wait_periods(6);
    rd(2, v); check(v == 1, "reached target 1");
    set(1, 100);            // speed clamped to range
    set(0, 1000);           // target clamped to RANGE
    wait_periods(3);
    rd(0, v); check(v == RANGE, "target clamped");
    rd(2, v); check(v == RANGE, "moved to clamped target");
    set(3, 0);
    wait_periods(2);
    check(at_target_periods > 0, "target reached in some period");
    report_and_finish();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
