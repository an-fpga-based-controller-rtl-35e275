// cobot_controller_top: FPGA logic of the collaborative-robot controller.
//
// Two parts stand side by side, each with its own clock, reset and
// processor bus port (the soft processor, its memories and the hard
// processor are outside this RTL and connect through these ports):
//   demo_*  : the robot-arm demonstrator (50 MHz): SPI receiver for the hand
//             position from the vision processor, 50 Hz interval timer and
//             five 50 Hz servo PWM channels. See servo_demo_system.
//   axis_*  : the six-axis drive (100 MHz): per joint a sinc3 ADC interface,
//             a quadrature encoder interface and a three-phase 16 kHz PWM,
//             with a 16 kHz control interrupt, the FOC accelerator and
//             the SPI link to the external processor. See six_axis_drive.
// Both parts are from the source article; keeping them as two independent
// subsystems in one top is this design's choice.
module cobot_controller_top
  import cobot_pkg::*;
(
  // ---- demonstrator ----
  input  logic                  demo_clk,
  input  logic                  demo_rst_n,
  input  mm_req_t               demo_req,
  output mm_rdata_t             demo_rdata,
  output logic                  demo_rvalid,
  output logic                  demo_timer_irq,
  output logic                  demo_spi_irq,
  input  logic                  demo_spi_sclk,
  input  logic                  demo_spi_cs_n,
  input  logic                  demo_spi_mosi,
  output logic [NUM_SERVOS-1:0] demo_servo_pwm,
  output logic [NUM_SERVOS-1:0] demo_servo_period_start,
  // ---- six-axis drive ----
  input  logic                  axis_clk,
  input  logic                  axis_rst_n,
  input  mm_req_t               axis_req,
  output mm_rdata_t             axis_rdata,
  output logic                  axis_rvalid,
  output logic                  axis_ctrl_irq,
  output logic                  axis_host_irq,
  input  logic                  axis_host_sclk,
  input  logic                  axis_host_cs_n,
  input  logic                  axis_host_mosi,
  output logic [NUM_AXES-1:0]   axis_mod_clk,
  input  logic [1:0]            axis_mod_data [NUM_AXES],
  input  logic [NUM_AXES-1:0]   axis_enc_a,
  input  logic [NUM_AXES-1:0]   axis_enc_b,
  output logic [2:0]            axis_pwm_h [NUM_AXES],
  output logic [2:0]            axis_pwm_l [NUM_AXES]
);

  servo_demo_system u_demo (
    .clk                (demo_clk),
    .rst_n              (demo_rst_n),
    .m_req              (demo_req),
    .m_rdata            (demo_rdata),
    .m_rvalid           (demo_rvalid),
    .timer_irq          (demo_timer_irq),
    .spi_irq            (demo_spi_irq),
    .spi_sclk           (demo_spi_sclk),
    .spi_cs_n           (demo_spi_cs_n),
    .spi_mosi           (demo_spi_mosi),
    .servo_pwm          (demo_servo_pwm),
    .servo_period_start (demo_servo_period_start)
  );

  six_axis_drive u_axis (
    .clk      (axis_clk),
    .rst_n    (axis_rst_n),
    .m_req    (axis_req),
    .m_rdata  (axis_rdata),
    .m_rvalid (axis_rvalid),
    .ctrl_irq (axis_ctrl_irq),
    .host_irq (axis_host_irq),
    .host_sclk(axis_host_sclk),
    .host_cs_n(axis_host_cs_n),
    .host_mosi(axis_host_mosi),
    .mod_clk  (axis_mod_clk),
    .mod_data (axis_mod_data),
    .enc_a    (axis_enc_a),
    .enc_b    (axis_enc_b),
    .pwm_h    (axis_pwm_h),
    .pwm_l    (axis_pwm_l)
  );

endmodule
