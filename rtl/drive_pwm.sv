// drive_pwm: three-phase centre-aligned PWM for the power stage of one
// motor axis.
//
// A counter runs up from 0 to HALF and back down, so one PWM period is
// 2*HALF clocks (6250 clocks = 16 kHz at 100 MHz, the control update rate).
// The compare index is the count on the way up (0..HALF-1) and the count
// minus one on the way down (HALF-1..0), so every index occurs twice per
// period, symmetric about the top. The three duty values (0..HALF, the
// high-side on-time in counts of the half period) are taken from the duty
// inputs only on the last clock before the bottom of the count, so a new set
// of duties from the control calculation never changes a pulse half-way.
// For each phase the high-side switch is on while index < duty (2*duty
// clocks per period) and the low-side switch while index >= duty + DEADTIME,
// which leaves DEADTIME clocks with both switches off at each commutation.
// With enable low all six gate signals are off. sync_o pulses for one clock
// at the bottom of the count, the instant to sample currents and start the
// next control update. The 16 kHz rate follows the source article's control rate;
// the centre-aligned scheme, the dead time and the duty format are this
// design's choices (the space-vector modulation itself is computed in
// software and arrives as the three duty values).
module drive_pwm #(
  parameter int unsigned HALF     = 3125,  // half period in clocks
  parameter int unsigned DEADTIME = 50,    // clocks with both switches off
  parameter int unsigned CNT_W    = $clog2(HALF + DEADTIME + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] duty [3],
  output logic [2:0]       pwm_h,
  output logic [2:0]       pwm_l,
  output logic             sync_o
);

  logic [CNT_W-1:0] cnt;
  logic             up;
  logic [CNT_W-1:0] duty_q [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      up  <= 1'b1;
      for (int p = 0; p < 3; p++) duty_q[p] <= '0;
    end else begin
      if (up) begin
        if (cnt == CNT_W'(HALF - 1)) up <= 1'b0;
        cnt <= cnt + 1'b1;
      end else begin
        if (cnt == CNT_W'(1)) up <= 1'b1;
        cnt <= cnt - 1'b1;
      end
      if (!up && cnt == CNT_W'(1))
        for (int p = 0; p < 3; p++)
          duty_q[p] <= (duty[p] > CNT_W'(HALF)) ? CNT_W'(HALF) : duty[p];
    end
  end

  logic [CNT_W-1:0] idx;
  assign idx = up ? cnt : cnt - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_h  <= '0;
      pwm_l  <= '0;
      sync_o <= 1'b0;
    end else begin
      for (int p = 0; p < 3; p++) begin
        pwm_h[p] <= enable && (idx < duty_q[p]);
        pwm_l[p] <= enable && (32'(idx) >= 32'(duty_q[p]) + DEADTIME);
      end
      sync_o <= (cnt == '0);
    end
  end

  // The two switches of a phase are never on together.
  a_no_shoot_through : assert property (@(posedge clk) disable iff (!rst_n)
                                        (pwm_h & pwm_l) == 3'b000);

endmodule
