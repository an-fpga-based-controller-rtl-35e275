// tb_interval_timer: checks the interval timer at a short period: the
// interrupt spacing in clocks, the time-out flag and its clearing, the
// interrupt enable, single-shot and continuous modes, stop, the counter
// snapshot and the time-out count.
module tb_interval_timer;
  import cobot_pkg::*;
  logic clk = 0, rst_n = 0;
  mm_local_req_t req;
  mm_rdata_t rdata;
  logic irq;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  interval_timer #(.DEFAULT_PERIOD(100)) dut (.clk, .rst_n, .req, .rdata, .irq_o(irq));

  task automatic wr(input int a, input int d);
    @(negedge clk); req = '0; req.write = 1; req.addr = 4'(a); req.wdata = d;
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); req = '0; req.read = 1; req.addr = 4'(a);
    @(negedge clk); req = '0; d = rdata;
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  int v;
  longint t0, t1;
  initial begin
    req = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(2, v); check(v == 100, "default period");
    rd(0, v); check(v == 0, "stopped, no time-out after reset");
    repeat (150) @(negedge clk);
    check(irq == 0, "no interrupt while stopped");
    // Continuous with interrupt, period 37.
    wr(2, 37);
    wr(1, 32'b0111);
    @(posedge irq); t0 = cyc;
    rd(0, v); check(v == 3, "TO and RUN set");
    wr(0, 0);
    check(irq == 0, "interrupt cleared by STATUS write");
    @(posedge irq); t1 = cyc;
    check(t1 - t0 == 37, $sformatf("interrupt spacing %0d, expected 37", t1 - t0));
    wr(0, 0);
    @(posedge irq); t0 = cyc;
    check(t0 - t1 == 37, $sformatf("interrupt spacing %0d, expected 37", t0 - t1));
    rd(4, v); check(v == 3, $sformatf("time-out count %0d", v));
    rd(3, v); check(v < 37, "snapshot within period");
    // Interrupt disabled: TO still sets, irq stays low.
    wr(1, 32'b0010);
    wr(0, 0);
    repeat (40) @(negedge clk);
    rd(0, v); check(v[0] == 1, "TO sets with interrupt disabled");
    check(irq == 0, "irq masked");
    // Stop.
    wr(1, 32'b1000);
    rd(0, v); check(v[1] == 0, "stopped");
    wr(0, 0);
    repeat (80) @(negedge clk);
    rd(0, v); check(v[0] == 0, "no time-out while stopped");
    // Single shot: exactly one time-out.
    wr(2, 20);
    wr(1, 32'b0101);
    t0 = cyc;
    @(posedge irq); t1 = cyc;
    check(t1 - t0 >= 19 && t1 - t0 <= 21, $sformatf("single-shot delay %0d", t1 - t0));
    wr(0, 0);
    repeat (60) @(negedge clk);
    check(irq == 0, "single shot fires once");
    rd(0, v); check(v == 0, "single shot stopped");
    report_and_finish();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
