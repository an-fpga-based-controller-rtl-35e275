// six_axis_drive: the motor-drive part of the six-axis collaborative-robot
// controller: one drive subsystem per joint, the shared fixed-point FOC
// accelerator and the SPI link to the external (hard) processor, all on the
// soft processor's bus.
//
// The soft processor reads all axes' measurements, runs the control
// calculation for each axis in turn (using the FOC accelerator, which keeps
// each axis's PI integrators) and writes each axis's PWM duties. All
// axes' PWM counters start together at reset, so they run in phase and the
// period-start pulse of axis 0 serves as the 16 kHz control interrupt
// (ctrl_irq). Register window n (word addresses 16*n .. 16*n+15) belongs to
// axis n; window N_AXES holds the FOC accelerator and window N_AXES+1 the
// SPI receiver (see spi_slave) through which the external processor sends
// 32-bit words, with its own interrupt (host_irq). Six axes, one drive
// subsystem per joint, the FOC accelerator, the SPI interface to the external
// processor and the 16 kHz rate follow the source article; the shared
// interrupt, the address map and the use of the same receiver as in the
// demonstrator are this design's.
module six_axis_drive
  import cobot_pkg::*;
#(
  parameter int unsigned N_AXES     = NUM_AXES,
  parameter int unsigned PWM_HALF   = DRIVE_PWM_HALF,
  parameter int unsigned DEADTIME   = 50,
  parameter int unsigned N_ADC      = 2,
  parameter int unsigned DECIMATION = 64,
  parameter int unsigned MOD_DIV    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mm_req_t          m_req,
  output mm_rdata_t        m_rdata,
  output logic             m_rvalid,
  output logic             ctrl_irq,
  output logic             host_irq,
  input  logic             host_sclk,
  input  logic             host_cs_n,
  input  logic             host_mosi,
  output logic [N_AXES-1:0] mod_clk,
  input  logic [N_ADC-1:0] mod_data [N_AXES],
  input  logic [N_AXES-1:0] enc_a,
  input  logic [N_AXES-1:0] enc_b,
  output logic [2:0]       pwm_h [N_AXES],
  output logic [2:0]       pwm_l [N_AXES]
);

  mm_local_req_t s_req   [N_AXES + 2];
  mm_rdata_t     s_rdata [N_AXES + 2];
  logic [N_AXES-1:0] sync;

  mm_interconnect #(.N_SLAVES(N_AXES + 2)) u_bus (
    .clk, .rst_n,
    .m_req, .m_rdata, .m_rvalid,
    .s_req, .s_rdata
  );

  for (genvar a = 0; a < N_AXES; a++) begin : g_axis
    drive_subsystem #(
      .PWM_HALF  (PWM_HALF),
      .DEADTIME  (DEADTIME),
      .N_ADC     (N_ADC),
      .DECIMATION(DECIMATION),
      .MOD_DIV   (MOD_DIV)
    ) u_drive (
      .clk, .rst_n,
      .req      (s_req[a]),
      .rdata    (s_rdata[a]),
      .mod_clk  (mod_clk[a]),
      .mod_data (mod_data[a]),
      .enc_a    (enc_a[a]),
      .enc_b    (enc_b[a]),
      .pwm_h    (pwm_h[a]),
      .pwm_l    (pwm_l[a]),
      .sync_o   (sync[a])
    );
  end

  foc_accel #(.N_AXES(N_AXES)) u_foc (
    .clk, .rst_n,
    .req   (s_req[N_AXES]),
    .rdata (s_rdata[N_AXES])
  );

  spi_slave u_host_spi (
    .clk, .rst_n,
    .req      (s_req[N_AXES + 1]),
    .rdata    (s_rdata[N_AXES + 1]),
    .irq_o    (host_irq),
    .spi_sclk (host_sclk),
    .spi_cs_n (host_cs_n),
    .spi_mosi (host_mosi)
  );

  assign ctrl_irq = sync[0];

endmodule
