// servo_demo_system: the FPGA IP of the robot-arm demonstrator.
//
// The vision processor sends the hand position over SPI; the SPI receiver
// interrupts the soft processor, which buffers it. A 50 Hz interval timer
// interrupts the processor, whose interrupt routine writes a target position
// (changed every 5 Hz) and a speed (changed every 50 Hz) into each of the
// five servo PWM channels (base, shoulder, elbow, wrist, gripper). Each
// channel then moves its pulse width at that speed until the target is
// reached. The processor itself is outside this block: its data-master bus
// port (m_req / m_rdata / m_rvalid) and its two interrupt inputs are brought
// out. The set of IP blocks, their rates and the interrupt flow follow the
// document; the address map is this design's choice:
//   word window 0 (0x000-0x00F): interval timer
//   word window 1 (0x010-0x01F): SPI receiver
//   word window 2+n            : servo PWM channel n, n = 0..NUM_SERVOS-1
// Read data returns one clock after the read strobe (m_rvalid).
module servo_demo_system
  import cobot_pkg::*;
#(
  parameter int unsigned N_SERVO      = NUM_SERVOS,
  parameter int unsigned PWM_PERIOD   = SERVO_PERIOD,
  parameter int unsigned PWM_MIN_HIGH = SERVO_MIN_HIGH,
  parameter int unsigned PWM_RANGE    = SERVO_RANGE,
  parameter int unsigned TIMER_PERIOD = DEMO_CLK_HZ / SERVO_PWM_HZ,
  parameter int unsigned SPI_BITS     = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor data-master port
  input  mm_req_t            m_req,
  output mm_rdata_t          m_rdata,
  output logic               m_rvalid,
  // interrupts to the processor
  output logic               timer_irq,
  output logic               spi_irq,
  // SPI from the vision processor
  input  logic               spi_sclk,
  input  logic               spi_cs_n,
  input  logic               spi_mosi,
  // servo pulses to the servo driver board
  output logic [N_SERVO-1:0] servo_pwm,
  output logic [N_SERVO-1:0] servo_period_start
);

  localparam int unsigned N_SLV = DEMO_SLV_PWM0 + N_SERVO;

  mm_local_req_t s_req   [N_SLV];
  mm_rdata_t     s_rdata [N_SLV];

  mm_interconnect #(.N_SLAVES(N_SLV)) u_bus (
    .clk, .rst_n,
    .m_req, .m_rdata, .m_rvalid,
    .s_req, .s_rdata
  );

  interval_timer #(.DEFAULT_PERIOD(TIMER_PERIOD)) u_timer (
    .clk, .rst_n,
    .req   (s_req[DEMO_SLV_TIMER]),
    .rdata (s_rdata[DEMO_SLV_TIMER]),
    .irq_o (timer_irq)
  );

  spi_slave #(.FRAME_BITS(SPI_BITS)) u_spi (
    .clk, .rst_n,
    .req   (s_req[DEMO_SLV_SPI]),
    .rdata (s_rdata[DEMO_SLV_SPI]),
    .irq_o (spi_irq),
    .spi_sclk, .spi_cs_n, .spi_mosi
  );

  for (genvar i = 0; i < N_SERVO; i++) begin : g_servo
    servo_pwm #(
      .PERIOD   (PWM_PERIOD),
      .MIN_HIGH (PWM_MIN_HIGH),
      .POS_RANGE(PWM_RANGE)
    ) u_pwm (
      .clk, .rst_n,
      .req            (s_req[DEMO_SLV_PWM0 + i]),
      .rdata          (s_rdata[DEMO_SLV_PWM0 + i]),
      .pwm_o          (servo_pwm[i]),
      .period_start_o (servo_period_start[i])
    );
  end

endmodule
