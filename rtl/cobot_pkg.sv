// cobot_pkg: types and constants shared by the controller's FPGA IP.
//
// All IP blocks are slaves of one simple memory-mapped bus driven by the
// soft processor (the central data master of the controller). A request is
// a single-cycle read or write strobe with a word address and write data;
// read data is returned exactly one clock after the read strobe. The bus
// protocol, the register maps and the field widths are this design's own
// choices; the clock rates and servo timing numbers follow the controller
// they were written for (50 Hz servo PWM with 100,000 pulse-width values,
// 16 kHz motor control update).
package cobot_pkg;

  // Bus widths.
  localparam int unsigned MM_ADDR_W = 12;      // word address from the master
  localparam int unsigned MM_DATA_W = 32;
  localparam int unsigned MM_LOCAL_W = 4;      // 16 registers per slave window

  typedef struct packed {
    logic                 read;
    logic                 write;
    logic [MM_ADDR_W-1:0] addr;
    logic [MM_DATA_W-1:0] wdata;
  } mm_req_t;

  typedef logic [MM_DATA_W-1:0] mm_rdata_t;

  // Request as seen by one slave: only the local register offset.
  typedef struct packed {
    logic                  read;
    logic                  write;
    logic [MM_LOCAL_W-1:0] addr;
    logic [MM_DATA_W-1:0]  wdata;
  } mm_local_req_t;

  // Servo demonstrator: 50 MHz IP clock, 50 Hz PWM, 2.5 % .. 12.5 % duty.
  localparam int unsigned DEMO_CLK_HZ      = 50_000_000;
  localparam int unsigned SERVO_PWM_HZ     = 50;
  localparam int unsigned SERVO_PERIOD     = DEMO_CLK_HZ / SERVO_PWM_HZ;  // 1,000,000
  localparam int unsigned SERVO_MIN_HIGH   = SERVO_PERIOD / 40;            // 2.5 %  = 25,000
  localparam int unsigned SERVO_RANGE      = SERVO_PERIOD / 10;            // 10 %   = 100,000 values
  localparam int unsigned NUM_SERVOS       = 5;   // base, shoulder, elbow, wrist, gripper

  // Six-axis drive: 100 MHz clock, 16 kHz control / PWM rate.
  localparam int unsigned DRIVE_CLK_HZ     = 100_000_000;
  localparam int unsigned DRIVE_PWM_HZ     = 16_000;
  localparam int unsigned DRIVE_PWM_HALF   = DRIVE_CLK_HZ / DRIVE_PWM_HZ / 2;  // 3125
  localparam int unsigned NUM_AXES         = 6;

  // Demonstrator slave windows (slave index = addr[MM_ADDR_W-1:MM_LOCAL_W]).
  localparam int unsigned DEMO_SLV_TIMER   = 0;
  localparam int unsigned DEMO_SLV_SPI     = 1;
  localparam int unsigned DEMO_SLV_PWM0    = 2;   // PWM n at window 2+n

  function automatic mm_local_req_t to_local(input mm_req_t r);
    mm_local_req_t l;
    l.read  = r.read;
    l.write = r.write;
    l.addr  = r.addr[MM_LOCAL_W-1:0];
    l.wdata = r.wdata;
    return l;
  endfunction

endpackage
