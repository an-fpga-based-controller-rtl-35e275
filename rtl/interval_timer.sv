// interval_timer: periodic interrupt source that paces the processor's
// main control loop (50 Hz in the demonstrator, set by the PERIOD register).
//
// A down-counter is loaded with PERIOD-1 on start and decrements every
// clock. When it passes zero the time-out flag TO is set, the counter
// reloads, and in continuous mode it keeps running (otherwise it stops).
// irq_o is TO gated by the interrupt enable; the processor's interrupt
// routine clears TO by writing the STATUS register. That the timer raises
// interrupts at 50 Hz is from the source article; the register layout, the
// stopped-at-reset state and the single-shot option are this design's
// choices, modelled on a common soft-processor interval timer.
//
// Registers (word offsets, read latency one cycle):
//   0 STATUS  [0] TO (write anything to clear), [1] RUN (read only)
//   1 CONTROL [0] ITO interrupt enable, [1] CONT continuous mode,
//             [2] START (write 1 to start), [3] STOP (write 1 to stop)
//   2 PERIOD  [31:0] period in clocks (values below 2 act as 2)
//   3 SNAP    [31:0] current counter value (read only)
//   4 COUNT   [31:0] number of time-outs since reset (read only)
module interval_timer
  import cobot_pkg::*;
#(
  parameter int unsigned DEFAULT_PERIOD = DEMO_CLK_HZ / SERVO_PWM_HZ  // 50 Hz
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mm_local_req_t req,
  output mm_rdata_t     rdata,
  output logic          irq_o
);

  logic [31:0] period, counter, tick_count;
  logic        to_flag, run, ito, cont;
  logic        expire;

  assign expire = run && (counter == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period     <= 32'(DEFAULT_PERIOD);
      counter    <= 32'(DEFAULT_PERIOD - 1);
      tick_count <= '0;
      to_flag    <= 1'b0;
      run        <= 1'b0;
      ito        <= 1'b0;
      cont       <= 1'b0;
    end else begin
      if (run) begin
        if (expire) begin
          counter    <= period - 1;
          to_flag    <= 1'b1;
          tick_count <= tick_count + 1;
          if (!cont) run <= 1'b0;
        end else begin
          counter <= counter - 1;
        end
      end
      if (req.write) begin
        unique case (req.addr)
          4'd0: to_flag <= 1'b0;
          4'd1: begin
            ito  <= req.wdata[0];
            cont <= req.wdata[1];
            if (req.wdata[2]) begin
              run     <= 1'b1;
              counter <= period - 1;
            end
            if (req.wdata[3]) run <= 1'b0;
          end
          4'd2: begin
            period  <= (req.wdata < 32'd2) ? 32'd2 : req.wdata;
            counter <= ((req.wdata < 32'd2) ? 32'd2 : req.wdata) - 1;
          end
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
        4'd0:    rdata <= {30'd0, run, to_flag};
        4'd1:    rdata <= {30'd0, cont, ito};
        4'd2:    rdata <= period;
        4'd3:    rdata <= counter;
        4'd4:    rdata <= tick_count;
        default: rdata <= '0;
      endcase
    end
  end

  assign irq_o = to_flag && ito;

endmodule
