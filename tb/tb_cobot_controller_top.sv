// tb_cobot_controller_top: end-to-end run of the whole controller at its
// default sizes (no parameter overrides).
//
// Demonstrator half (50 MHz): a vision-board model sends the hand position
// {X,Y} over SPI at 30 Hz. A processor model answers the SPI interrupt by
// reading the position into an 8-entry history, and answers the 50 Hz
// timer interrupt by writing the servo commands: every tenth tick (5 Hz) it
// computes new targets for the four arm joints from the average of the last eight positions,
// and on every tick it writes a speed from a trapezoidal profile (five
// rising speeds, then five equal) sized so that each servo reaches its
// target within the ten ticks. Every servo pulse is measured and compared
// with a reference model of the PWM channel built from the writes seen on
// the bus, every period must be 1,000,000 clocks (50 Hz), and at each 5 Hz boundary every servo must have arrived.
//
// Six-axis half (100 MHz): on each 16 kHz control interrupt a processor
// model serves one axis in turn: it reads its ADC and encoder position, runs
// one step of the FOC accelerator for that axis (checked against a
// floating-point Clarke/Park model and the 1.5 us time budget) and writes
// three new duties from the resulting voltage vector. Between axes it also
// collects the numbered words that an external-processor model sends over
// the drive's SPI link every millisecond, and checks that none is lost or
// changed. Encoder and modulator models drive every axis;
// the values read are compared with what the models produced, and every
// PWM period's high-side pulse width with the duty in force.
//
// Each mechanism is counted (SPI frames, timer interrupts, 5 Hz target
// updates, 50 Hz speed updates, periods in which a servo moved, moves that
// ended on their target, control interrupts, ADC reads, encoder reads, duty
// updates, FOC steps, words from the external processor); one that never happened counts as a failure.
module tb_cobot_controller_top;
  import cobot_pkg::*;
  localparam int NS = NUM_SERVOS, NA = NUM_AXES;
  localparam int WINDOWS = 2;                  // 5 Hz windows of 10 ticks
  localparam int HALF = DRIVE_PWM_HALF;
  localparam int DADC = 64;

  logic demo_clk = 0, axis_clk = 0, demo_rst_n = 0, axis_rst_n = 0;
  always #10 demo_clk = ~demo_clk;   // 50 MHz
  always #5  axis_clk = ~axis_clk;   // 100 MHz
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask
  task automatic report_and_finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  mm_req_t demo_req, axis_req;
  mm_rdata_t demo_rdata, axis_rdata;
  logic demo_rvalid, axis_rvalid, timer_irq, spi_irq, ctrl_irq;
  logic sclk = 0, cs_n = 1, mosi = 0;
  logic [NS-1:0] servo, pstart;
  logic [NA-1:0] mod_clk, enc_a = '0, enc_b = '0;
  logic host_irq, host_sclk = 0, host_cs_n = 1, host_mosi = 0;
  logic [1:0] mod_data [NA];
  logic [2:0] pwm_h [NA], pwm_l [NA];

  cobot_controller_top dut (
    .demo_clk, .demo_rst_n, .demo_req, .demo_rdata, .demo_rvalid,
    .demo_timer_irq(timer_irq), .demo_spi_irq(spi_irq),
    .demo_spi_sclk(sclk), .demo_spi_cs_n(cs_n), .demo_spi_mosi(mosi),
    .demo_servo_pwm(servo), .demo_servo_period_start(pstart),
    .axis_clk, .axis_rst_n, .axis_req, .axis_rdata, .axis_rvalid,
    .axis_ctrl_irq(ctrl_irq), .axis_host_irq(host_irq),
    .axis_host_sclk(host_sclk), .axis_host_cs_n(host_cs_n), .axis_host_mosi(host_mosi), .axis_mod_clk(mod_clk), .axis_mod_data(mod_data),
    .axis_enc_a(enc_a), .axis_enc_b(enc_b), .axis_pwm_h(pwm_h), .axis_pwm_l(pwm_l));

  // Mechanism counters.
  int n_spi_frames = 0, n_timer_irq = 0, n_target_upd = 0, n_speed_upd = 0;
  int n_moving = 0, n_arrived = 0, n_ctrl_irq = 0, n_adc_reads = 0;
  int n_enc_reads = 0, n_duty_upd = 0, n_foc = 0;
  localparam int FOC = NA * 16;                // FOC accelerator window
  localparam int HOST = (NA + 1) * 16;         // external-processor SPI window
  int n_host_words = 0, host_sent = 0;

  // ------------------------------------------------------------------
  // Demonstrator bus master (one access at a time).
  // ------------------------------------------------------------------
  semaphore demo_bus = new(1);
  task automatic dwr(input int a, input int d);
    demo_bus.get();
    @(negedge demo_clk); demo_req = '0; demo_req.write = 1; demo_req.addr = MM_ADDR_W'(a); demo_req.wdata = d;
    @(negedge demo_clk); demo_req = '0;
    demo_bus.put();
  endtask
  task automatic drd(input int a, output int d);
    demo_bus.get();
    @(negedge demo_clk); demo_req = '0; demo_req.read = 1; demo_req.addr = MM_ADDR_W'(a);
    @(negedge demo_clk); demo_req = '0; d = demo_rdata;
    demo_bus.put();
  endtask
  function automatic int preg(int ch, int r); return (DEMO_SLV_PWM0 + ch) * 16 + r; endfunction

  longint dcyc = 0, last_tick = -1;
  always @(posedge demo_clk) dcyc++;

  // Reference model of the servo channels, fed from the bus writes.
  int sh_tgt [NS], sh_spd [NS], ref_pos [NS], hc [NS], exp_w [NS];
  longint last_ps [NS];
  bit ref_en [NS], first [NS];
  function automatic int step(int p, int t, int s);
    if (p < t) return (t - p > s) ? p + s : t;
    if (p > t) return (p - t > s) ? p - s : t;
    return p;
  endfunction
  function automatic int clampr(int v); return (v > SERVO_RANGE) ? SERVO_RANGE : v; endfunction

  always @(posedge demo_clk) if (demo_rst_n) begin
    if (demo_req.write) begin
      int slv, r;
      slv = int'(demo_req.addr) / 16; r = int'(demo_req.addr) % 16;
      if (slv >= DEMO_SLV_PWM0 && slv < DEMO_SLV_PWM0 + NS) begin
        case (r)
          0: sh_tgt[slv - DEMO_SLV_PWM0] = clampr(demo_req.wdata);
          1: sh_spd[slv - DEMO_SLV_PWM0] = clampr(demo_req.wdata);
          3: begin   // the period in which the output is switched is not compared
            ref_en[slv - DEMO_SLV_PWM0] = demo_req.wdata[0];
            first[slv - DEMO_SLV_PWM0]  = 1;
          end
          default: ;
        endcase
      end
    end
    for (int c = 0; c < NS; c++) begin
      if (pstart[c]) begin
        int np;
        if (last_ps[c] >= 0) check(dcyc - last_ps[c] == SERVO_PERIOD,
                                   $sformatf("servo %0d period %0d clocks", c, dcyc - last_ps[c]));
        last_ps[c] = dcyc;
        if (!first[c]) check(hc[c] == exp_w[c], $sformatf("servo %0d pulse %0d expected %0d", c, hc[c], exp_w[c]));
        first[c] = 0;
        np = step(ref_pos[c], sh_tgt[c], sh_spd[c]);
        if (np != ref_pos[c]) begin
          n_moving++;
          if (np == sh_tgt[c]) n_arrived++;
        end
        ref_pos[c] = np;
        exp_w[c] = ref_en[c] ? SERVO_MIN_HIGH + ref_pos[c] : 0;
        hc[c] = servo[c];
      end else hc[c] += servo[c];
    end
  end

  // Vision board: one {X,Y} frame every 1/30 s (SCLK 1 MHz).
  logic [15:0] hand_x [$], hand_y [$];
  task automatic send(input logic [31:0] w);
    cs_n = 0; #1000;
    for (int i = 31; i >= 0; i--) begin mosi = w[i]; #500; sclk = 1; #500; sclk = 0; end
    #1000; cs_n = 1;
  endtask
  initial begin
    wait (demo_rst_n);
    #5_000_000;
    forever begin
      logic [15:0] x, y;
      x = 16'($urandom_range(0, 40000)); y = 16'($urandom_range(0, 40000));
      hand_x.push_back(x); hand_y.push_back(y);
      send({x, y});
      #(33_333_333 - 36_000);
    end
  end

  // Processor: SPI interrupt routine keeps the last eight positions.
  int fifo_x [$], fifo_y [$];
  initial begin
    int v;
    wait (demo_rst_n);
    forever begin
      @(posedge demo_clk iff spi_irq);
      drd(DEMO_SLV_SPI * 16 + 0, v);
      n_spi_frames++;
      check(hand_x.size() > 0, "frame sent before read");
      if (hand_x.size() > 0) begin
        check(v == {hand_x[0], hand_y[0]}, $sformatf("SPI position %08h", v));
        void'(hand_x.pop_front()); void'(hand_y.pop_front());
      end
      fifo_x.push_back(v[31:16]); fifo_y.push_back(v[15:0]);
      if (fifo_x.size() > 8) begin void'(fifo_x.pop_front()); void'(fifo_y.pop_front()); end
      @(negedge demo_clk);
      @(negedge demo_clk);
    end
  end

  // Processor: timer interrupt routine and 5 Hz tasks.
  int accel [NS];
  int tick = 0;
  bit demo_done = 0;
  initial begin
    int v, ax, ay, tgt, k, delta;
    wait (demo_rst_n);
    for (int c = 0; c < NS; c++) begin
      dwr(preg(c, 1), 0);
      dwr(preg(c, 3), 1);
    end
    dwr(DEMO_SLV_SPI * 16 + 2, 1);
    dwr(DEMO_SLV_TIMER * 16 + 1, 32'b0111);
    while (tick < 10 * WINDOWS + 1) begin
      @(posedge demo_clk iff timer_irq);
      if (last_tick >= 0) check(dcyc - last_tick == DEMO_CLK_HZ / SERVO_PWM_HZ,
                                $sformatf("50 Hz tick spacing %0d", dcyc - last_tick));
      last_tick = dcyc;
      n_timer_irq++;
      dwr(DEMO_SLV_TIMER * 16 + 0, 0);
      k = tick % 10;
      if (k == 0) begin
        // 5 Hz: every servo must have reached the previous target.
        for (int c = 0; c < NS; c++) begin
          drd(preg(c, 2), v);
          check(tick == 0 || v == sh_tgt[c], $sformatf("servo %0d at %0d, target %0d", c, v, sh_tgt[c]));
        end
        // New targets for the four arm joints from the average of the last
        // eight positions; the gripper (servo 4) keeps its position.
        ax = 0; ay = 0;
        foreach (fifo_x[i]) begin ax += fifo_x[i]; ay += fifo_y[i]; end
        if (fifo_x.size() > 0) begin ax /= fifo_x.size(); ay /= fifo_y.size(); end
        for (int c = 0; c < 4; c++) begin
          tgt = (ax + 13_000 * c + ((c % 2) ? ay : 0)) % (SERVO_RANGE + 1);
          drd(preg(c, 2), v);
          delta = (tgt > v) ? tgt - v : v - tgt;
          accel[c] = (delta + 39) / 40;       // 15a + 25a >= delta
          dwr(preg(c, 0), tgt);
        end
        n_target_upd++;
      end
      // 50 Hz speed: 1a..5a, then 5a for five ticks.
      for (int c = 0; c < NS; c++)
        dwr(preg(c, 1), accel[c] * ((k < 5) ? k + 1 : 5));
      n_speed_upd++;
      tick++;
    end
    demo_done = 1;
  end

  // ------------------------------------------------------------------
  // Six-axis drive.
  // ------------------------------------------------------------------
  task automatic awr(input int a, input int d);
    @(negedge axis_clk); axis_req = '0; axis_req.write = 1; axis_req.addr = MM_ADDR_W'(a); axis_req.wdata = d;
    @(negedge axis_clk); axis_req = '0;
  endtask
  task automatic ard(input int a, output int d);
    @(negedge axis_clk); axis_req = '0; axis_req.read = 1; axis_req.addr = MM_ADDR_W'(a);
    @(negedge axis_clk); axis_req = '0; d = axis_rdata;
  endtask

  // Modulators: axis a channel 0 has density (a+1)/8 in a period-8
  // pattern, so its sinc3 output settles to (a+1) * 64^3 / 8; channel 1 is
  // all zeros.
  int mbit [NA];
  for (genvar a = 0; a < NA; a++) begin : g_mod
    always @(posedge mod_clk[a] or negedge axis_rst_n)
      if (!axis_rst_n) begin mbit[a] <= 0; mod_data[a] <= 2'b00; end
      else begin
        mod_data[a] <= {1'b0, 1'((mbit[a] % 8) <= a)};
        mbit[a] <= mbit[a] + 1;
      end
  end

  // Encoders: 3000 clocks after each control interrupt every axis makes
  // one step, forward on even axes and backward on odd axes.
  int enc_cnt [NA], enc_ph [NA];
  longint acyc = 0, irq_at = -1;
  int gap_bad = 0;
  logic [1:0] seq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  always @(posedge axis_clk) if (axis_rst_n) begin
    acyc++;
    if (ctrl_irq) begin
      if (irq_at >= 0 && acyc - irq_at != 2 * HALF) gap_bad++;
      irq_at = acyc;
      n_ctrl_irq++;
    end
    if (irq_at >= 0 && acyc - irq_at == 3000)
      for (int a = 0; a < NA; a++) begin
        int d;
        d = (a % 2) ? -1 : 1;
        enc_ph[a] = (enc_ph[a] + d + 4) % 4;
        {enc_a[a], enc_b[a]} <= seq[enc_ph[a]];
        enc_cnt[a] += d;
      end
  end

  // Duty shadow and high-side pulse check (phase U of every axis).
  int sh_duty [NA][3], eff_duty [NA], ahc [NA], aperiods = 0;
  always @(posedge axis_clk) if (axis_rst_n) begin
    if (axis_req.write && axis_req.addr[3:0] < 3 && int'(axis_req.addr) / 16 < NA)
      sh_duty[int'(axis_req.addr) / 16][axis_req.addr[1:0]] = int'(axis_req.wdata);
    for (int a = 0; a < NA; a++)
      if (ctrl_irq) begin
        if (aperiods > 1) check(ahc[a] == 2 * eff_duty[a], $sformatf("axis %0d width %0d expected %0d", a, ahc[a], 2 * eff_duty[a]));
        ahc[a] = pwm_h[a][0];
      end else ahc[a] += pwm_h[a][0];
    if (ctrl_irq) begin
      aperiods++;
      for (int a = 0; a < NA; a++) eff_duty[a] = sh_duty[a][0];
    end
  end

  // External processor: one numbered 32-bit word every millisecond over SPI,
  // 10 system clocks per SPI bit.
  initial begin
    wait (axis_rst_n);
    forever begin
      repeat (100_000) @(negedge axis_clk);
      host_cs_n = 0; repeat (10) @(negedge axis_clk);
      for (int i = 31; i >= 0; i--) begin
        host_mosi = 1'(((32'hA5C3_0000 + host_sent) >> i) & 1);
        repeat (5) @(negedge axis_clk); host_sclk = 1;
        repeat (5) @(negedge axis_clk); host_sclk = 0;
      end
      repeat (5) @(negedge axis_clk); host_cs_n = 1;
      host_sent++;
    end
  end

  // Drive processor: on each control interrupt serve one axis in turn.
  initial begin
    int v, a, t = 0;
    wait (axis_rst_n);
    for (int i = 0; i < NA; i++) awr(i * 16 + 3, 1);
    awr(HOST + 2, 1);
    forever begin
      @(posedge axis_clk iff ctrl_irq);
      if (host_irq) begin
        ard(HOST + 0, v);
        check(v == 32'hA5C3_0000 + n_host_words, $sformatf("host word %h", v));
        n_host_words++;
      end
      a = t % NA;
      ard(a * 16 + 4, v);
      check(v == enc_cnt[a], $sformatf("axis %0d position %0d expected %0d", a, v, enc_cnt[a]));
      n_enc_reads++;
      if (t >= 2 * NA) begin
        int adc0, adc1, ia, ib, th, id, iq, va, vb, lat;
        real al, be, ang, rid, riq, vu, vv, vw;
        ard(a * 16 + 6, adc0);
        check(adc0 == (a + 1) * DADC * DADC * DADC / 8, $sformatf("axis %0d ADC %0d", a, adc0));
        ard(a * 16 + 7, adc1);
        check(adc1 == 0, "ADC channel 1 zero");
        n_adc_reads++;
        // FOC step for this axis: currents from the ADC samples (mid-scale
        // = 0 A), electrical angle from the encoder count.
        ia = (adc0 - DADC * DADC * DADC / 2) / 8;
        ib = (adc1 - DADC * DADC * DADC / 2) / 8;
        th = (v * 500) & 16'hffff;
        awr(FOC + 1, a); awr(FOC + 2, ia); awr(FOC + 3, ib); awr(FOC + 4, th);
        awr(FOC + 5, 0); awr(FOC + 6, 4000); awr(FOC + 7, 2048); awr(FOC + 8, 100);
        awr(FOC + 0, 1);
        do ard(FOC + 0, lat); while (lat[1] == 0);
        ard(FOC + 15, lat);
        check(lat < 150, $sformatf("FOC step %0d clocks, budget 150 (1.5 us)", lat));
        ard(FOC + 9, id); ard(FOC + 10, iq); ard(FOC + 13, va); ard(FOC + 14, vb);
        id = int'($signed(16'(id))); iq = int'($signed(16'(iq)));
        va = int'($signed(16'(va))); vb = int'($signed(16'(vb)));
        al = ia; be = (ia + 2.0 * ib) / $sqrt(3.0);
        if (be < -32768) be = -32768;
        ang = 2.0 * 3.14159265358979 * th / 65536.0;
        rid =  al * $cos(ang) + be * $sin(ang);
        riq = -al * $sin(ang) + be * $cos(ang);
        check(id - rid < 7 && rid - id < 7 && iq - riq < 7 && riq - iq < 7,
              $sformatf("axis %0d FOC id/iq %0d %0d expected %0.1f %0.1f", a, id, iq, rid, riq));
        n_foc++;
        // Software modulation: sinusoidal phase voltages around mid duty.
        vu = va;
        vv = (-va + $sqrt(3.0) * vb) / 2.0;
        vw = (-va - $sqrt(3.0) * vb) / 2.0;
        awr(a * 16 + 0, HALF / 2 + $rtoi(vu * (HALF / 2) / 32768.0));
        awr(a * 16 + 1, HALF / 2 + $rtoi(vv * (HALF / 2) / 32768.0));
        awr(a * 16 + 2, HALF / 2 + $rtoi(vw * (HALF / 2) / 32768.0));
      end else begin
        for (int p = 0; p < 3; p++) awr(a * 16 + p, (t * 37 + p * 1000 + a * 100) % (HALF + 1));
      end
      n_duty_upd++;
      t++;
    end
  end

  // ------------------------------------------------------------------
  initial begin
    demo_req = '0; axis_req = '0;
    for (int c = 0; c < NS; c++) begin
      sh_tgt[c] = SERVO_RANGE / 2; sh_spd[c] = 0; ref_pos[c] = SERVO_RANGE / 2;
      ref_en[c] = 0; first[c] = 1; hc[c] = 0; exp_w[c] = 0; accel[c] = 0; last_ps[c] = -1;
    end
    for (int a = 0; a < NA; a++) begin
      enc_cnt[a] = 0; enc_ph[a] = 0; eff_duty[a] = 0; ahc[a] = 0;
      for (int p = 0; p < 3; p++) sh_duty[a][p] = 0;
    end
    #100; demo_rst_n = 1; axis_rst_n = 1;
    wait (demo_done);
    check(gap_bad == 0, "16 kHz control interrupt spacing");
    check(n_spi_frames > 0, "SPI frames received");
    check(n_timer_irq > 0, "timer interrupts");
    check(n_target_upd > 0, "5 Hz target updates");
    check(n_speed_upd > 0, "50 Hz speed updates");
    check(n_moving > 0, "servo moved at commanded speed");
    check(n_arrived > 0, "servo move ended on its target");
    check(n_ctrl_irq > 0, "control interrupts");
    check(n_adc_reads > 0, "ADC samples read");
    check(n_enc_reads > 0, "encoder positions read");
    check(n_duty_upd > 0, "duty updates");
    check(n_foc > 0, "FOC accelerator steps");
    check(n_host_words > 0 && n_host_words >= host_sent - 1, "external-processor words received");
    $display("mechanisms: spi=%0d timer=%0d target=%0d speed=%0d moving=%0d arrived=%0d ctrl=%0d adc=%0d enc=%0d duty=%0d foc=%0d host=%0d",
             n_spi_frames, n_timer_irq, n_target_upd, n_speed_upd, n_moving, n_arrived,
             n_ctrl_irq, n_adc_reads, n_enc_reads, n_duty_upd, n_foc, n_host_words);
    report_and_finish();
  end

  // Watchdog: 30 % beyond the expected run of 10*WINDOWS+1 ticks.
  initial begin
    repeat (((10 * WINDOWS + 3) * (DEMO_CLK_HZ / SERVO_PWM_HZ)) * 13 / 10) @(posedge demo_clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
