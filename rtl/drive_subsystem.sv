// drive_subsystem: the FPGA side of one motor axis (one per joint) of the
// six-axis controller: ADC interface, encoder interface and power-stage PWM
// behind one register window of the processor's bus.
//
// - ADC interface: N_ADC sigma-delta modulator inputs, each filtered by a
//   sinc3 decimator. The block supplies the modulator clock (system clock
//   divided by MOD_DIV) and samples each modulator bit on the clock before
//   the next rising modulator edge.
// - Encoder interface: quadrature decoder giving a signed position count.
// - PWM: three-phase centre-aligned PWM with dead time; its period-start
//   pulse (sync_o) is the 16 kHz control tick.
// The processor runs the control calculation for each axis in turn: it reads
// the latest ADC samples and the position, and writes three duty values.
// The partition into these units is from the source article; the drive state
// machine it also shows is not modelled here, so a plain enable bit switches
// the power stage. Register map (word offsets, read latency one clock):
//   0..2 DUTY_U/V/W   duty per phase (0..PWM_HALF), used from the next period
//   3    CTRL         [0] PWM enable; write [1]=1 clears the position count,
//                     write [2]=1 clears the encoder error
//   4    POSITION     encoder count (two's complement, read only)
//   5    STATUS       [0] encoder error (read only)
//   6..  ADC_n        latest sinc3 output of channel n (read only)
//   6+N_ADC PERIODS   PWM periods since reset (read only)
module drive_subsystem
  import cobot_pkg::*;
#(
  parameter int unsigned PWM_HALF   = DRIVE_PWM_HALF,
  parameter int unsigned DEADTIME   = 50,
  parameter int unsigned N_ADC      = 2,
  parameter int unsigned DECIMATION = 64,
  parameter int unsigned MOD_DIV    = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mm_local_req_t    req,
  output mm_rdata_t        rdata,
  // sigma-delta modulators
  output logic             mod_clk,
  input  logic [N_ADC-1:0] mod_data,
  // position encoder
  input  logic             enc_a,
  input  logic             enc_b,
  // power stage
  output logic [2:0]       pwm_h,
  output logic [2:0]       pwm_l,
  output logic             sync_o
);

  localparam int unsigned ADC_W = 3 * $clog2(DECIMATION) + 1;
  localparam int unsigned CNT_W = $clog2(PWM_HALF + DEADTIME + 1);
  localparam int unsigned MD_W  = $clog2(MOD_DIV);

  // ---- modulator clock ----------------------------------------------------
  logic [MD_W-1:0] md_cnt;
  logic            mod_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_cnt  <= '0;
      mod_clk <= 1'b0;
    end else begin
      md_cnt  <= (md_cnt == MD_W'(MOD_DIV - 1)) ? '0 : md_cnt + 1'b1;
      mod_clk <= (md_cnt < MD_W'(MOD_DIV / 2));
    end
  end
  assign mod_en = (md_cnt == MD_W'(MOD_DIV - 1));

  // ---- ADC interface ------------------------------------------------------
  logic [ADC_W-1:0] adc_sample [N_ADC];
  logic [ADC_W-1:0] adc_q      [N_ADC];
  logic [N_ADC-1:0] adc_valid;

  for (genvar c = 0; c < N_ADC; c++) begin : g_adc
    sinc3_filter #(.DECIMATION(DECIMATION)) u_sinc3 (
      .clk, .rst_n,
      .mod_en   (mod_en),
      .mod_bit  (mod_data[c]),
      .sample_o (adc_sample[c]),
      .valid_o  (adc_valid[c])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)              adc_q[c] <= '0;
      else if (adc_valid[c])   adc_q[c] <= adc_sample[c];
    end
  end

  // ---- registers ----------------------------------------------------------
  logic [CNT_W-1:0] duty [3];
  logic             enable, clr_pos, clr_err;
  logic [31:0]      position;
  logic             enc_err;
  logic [31:0]      periods;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 3; p++) duty[p] <= '0;
      enable  <= 1'b0;
      clr_pos <= 1'b0;
      clr_err <= 1'b0;
      periods <= '0;
    end else begin
      clr_pos <= 1'b0;
      clr_err <= 1'b0;
      if (sync_o) periods <= periods + 1;
      if (req.write) begin
        if (req.addr < 4'd3) duty[req.addr[1:0]] <= CNT_W'(req.wdata);
        if (req.addr == 4'd3) begin
          enable  <= req.wdata[0];
          clr_pos <= req.wdata[1];
          clr_err <= req.wdata[2];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.read) begin
      rdata <= '0;
      if (req.addr < 4'd3)  rdata <= MM_DATA_W'(duty[req.addr[1:0]]);
      if (req.addr == 4'd3) rdata <= {31'd0, enable};
      if (req.addr == 4'd4) rdata <= position;
      if (req.addr == 4'd5) rdata <= {31'd0, enc_err};
      for (int c = 0; c < N_ADC; c++)
        if (32'(req.addr) == 6 + c) rdata <= MM_DATA_W'(adc_q[c]);
      if (32'(req.addr) == 6 + N_ADC) rdata <= periods;
    end
  end

  // ---- encoder interface --------------------------------------------------
  quad_encoder #(.POS_W(32)) u_enc (
    .clk, .rst_n,
    .enc_a, .enc_b,
    .clear_pos  (clr_pos),
    .clear_err  (clr_err),
    .position_o (position),
    .err_o      (enc_err)
  );

  // ---- PWM ----------------------------------------------------------------
  drive_pwm #(.HALF(PWM_HALF), .DEADTIME(DEADTIME), .CNT_W(CNT_W)) u_pwm (
    .clk, .rst_n,
    .enable,
    .duty,
    .pwm_h, .pwm_l,
    .sync_o
  );

endmodule
