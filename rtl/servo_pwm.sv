// servo_pwm: one channel of the servo PWM IP of the robot-arm demonstrator.
//
// It drives a hobby servo with a fixed-frequency pulse (50 Hz by default)
// whose high time runs from 2.5 % to 12.5 % of the period. The pulse width is
// held as a position value in 0 .. POS_RANGE (100,000 values across that
// 10 % band at 50 MHz). The processor writes a target position and a speed;
// at the end of every PWM period the current position steps towards the
// target by at most "speed" values, and stops exactly on the target, so the
// servo sweeps at the commanded speed until the commanded position is
// reached. The period, the duty band, the 100,000-value resolution and the
// "move at the speed command until the position command is reached"
// behaviour follow the source article; the register map, the per-period step, the
// reset position (mid-range) and the enable bit are this design's choices.
//
// Registers (word offsets, read latency one cycle):
//   0 TARGET  [16:0] target position, values above POS_RANGE are clamped
//   1 SPEED   [16:0] maximum change of position per PWM period
//   2 CURRENT [16:0] current position (a write presets it, also clamped)
//   3 CTRL    [0] output enable; [1] (read only) position equals target
// Other offsets are ignored on write and read as zero.
//
// Output pwm_o is high for MIN_HIGH + current_position clocks at the start
// of each period while enabled, and low otherwise. period_start_o pulses for
// one clock at the first clock of each period.
module servo_pwm
  import cobot_pkg::*;
#(
  parameter int unsigned PERIOD    = SERVO_PERIOD,    // clocks per PWM period
  parameter int unsigned MIN_HIGH  = SERVO_MIN_HIGH,  // high time at position 0
  parameter int unsigned POS_RANGE = SERVO_RANGE      // position values above 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mm_local_req_t req,
  output mm_rdata_t     rdata,
  output logic          pwm_o,
  output logic          period_start_o
);

  localparam int unsigned CNT_W = $clog2(PERIOD);
  localparam int unsigned POS_W = $clog2(POS_RANGE + 1);

  logic [CNT_W-1:0] cnt;
  logic [POS_W-1:0] target, speed, pos;
  logic             enable;
  logic             last;

  function automatic logic [POS_W-1:0] clamp(input logic [MM_DATA_W-1:0] v);
    return (v > MM_DATA_W'(POS_RANGE)) ? POS_W'(POS_RANGE) : v[POS_W-1:0];
  endfunction

  assign last = (cnt == CNT_W'(PERIOD - 1));

  // Next position: one step of at most "speed" towards the target.
  logic [POS_W-1:0] pos_next;
  always_comb begin
    if (pos < target)
      pos_next = ((target - pos) > speed) ? pos + speed : target;
    else if (pos > target)
      pos_next = ((pos - target) > speed) ? pos - speed : target;
    else
      pos_next = pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      target <= POS_W'(POS_RANGE / 2);
      pos    <= POS_W'(POS_RANGE / 2);
      speed  <= '0;
      enable <= 1'b0;
    end else begin
      cnt <= last ? '0 : cnt + 1'b1;
      if (last) pos <= pos_next;
      if (req.write) begin
        unique case (req.addr)
          4'd0: target <= clamp(req.wdata);
          4'd1: speed  <= clamp(req.wdata);
          4'd2: pos    <= clamp(req.wdata);
          4'd3: enable <= req.wdata[0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.read) begin
      unique case (req.addr)
        4'd0:    rdata <= MM_DATA_W'(target);
        4'd1:    rdata <= MM_DATA_W'(speed);
        4'd2:    rdata <= MM_DATA_W'(pos);
        4'd3:    rdata <= MM_DATA_W'({(pos == target), enable});
        default: rdata <= '0;
      endcase
    end
  end

  // High time = MIN_HIGH + position, measured from the start of the period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm_o          <= 1'b0;
      period_start_o <= 1'b0;
    end else begin
      pwm_o          <= enable && (32'(cnt) < MIN_HIGH + 32'(pos));
      period_start_o <= (cnt == '0);
    end
  end

endmodule
