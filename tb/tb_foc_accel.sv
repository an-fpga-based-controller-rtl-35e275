// tb_foc_accel: checks the FOC accelerator against a floating-point model.
// For random phase currents, angles, references and gains, serving three
// axes in turn, it checks:
//   - id/iq against the Clarke and Park transforms computed with real sin/cos
//     (within 6 LSB of Q1.15);
//   - the PI outputs and per-axis integrator state against an integer model
//     fed with the block's own id/iq, so that each axis keeps its own
//     integrators;
//   - v_alpha/v_beta against the inverse Park transform of the block's vd/vq
//     (within 6 LSB);
//   - the step latency, which must stay under 150 clocks (1.5 us at 100 MHz).
// It also checks saturation at large gains and the integrator clear.
module tb_foc_accel;
  import cobot_pkg::*;
  logic clk = 0, rst_n = 0;
  mm_local_req_t req;
  mm_rdata_t rdata;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  foc_accel dut (.clk, .rst_n, .req, .rdata);

  task automatic wr(input int a, input int d);
    @(negedge clk); req = '0; req.write = 1; req.addr = 4'(a); req.wdata = d;
    @(negedge clk); req = '0;
  endtask
  task automatic rd(input int a, output int d);
    @(negedge clk); req = '0; req.read = 1; req.addr = 4'(a);
    @(negedge clk); req = '0; d = rdata;
  endtask

  function automatic int s16(int v); return int'($signed(16'(v))); endfunction
  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int rnd(real v); return $rtoi(v < 0 ? v - 0.5 : v + 0.5); endfunction

  int integ_d [6], integ_q [6];
  longint cyc = 0;
  always @(posedge clk) cyc++;
  int max_lat = 0;

  task automatic step(input int axis, input int ia, input int ib, input int th,
                      input int idr, input int iqr, input int kp, input int ki);
    int v, id, iq, vd, vq, va, vb, ed, eq, nid, niq, evd, evq;
    real al, be, t, rid, riq, rva, rvb;
    longint t0;
    wr(1, axis); wr(2, ia); wr(3, ib); wr(4, th); wr(5, idr); wr(6, iqr); wr(7, kp); wr(8, ki);
    @(negedge clk); req = '0; req.write = 1; req.addr = 0; req.wdata = 1; t0 = cyc;
    @(negedge clk); req = '0;
    do rd(0, v); while (v[1] == 0 && cyc - t0 < 1000);
    rd(15, v);
    if (v > max_lat) max_lat = v;
    check(v < 150, $sformatf("latency %0d clocks", v));
    rd(9, id); rd(10, iq); rd(11, vd); rd(12, vq); rd(13, va); rd(14, vb);
    id = s16(id); iq = s16(iq); vd = s16(vd); vq = s16(vq); va = s16(va); vb = s16(vb);
    // Clarke / Park reference.
    al = s16(ia);
    be = (s16(ia) + 2.0 * s16(ib)) / $sqrt(3.0);
    if (be > 32767) be = 32767;
    if (be < -32768) be = -32768;
    t = 2.0 * 3.14159265358979 * th / 65536.0;
    rid =  al * $cos(t) + be * $sin(t);
    riq = -al * $sin(t) + be * $cos(t);
    rid = (rid > 32767) ? 32767 : (rid < -32768) ? -32768 : rid;
    riq = (riq > 32767) ? 32767 : (riq < -32768) ? -32768 : riq;
    check(id - rnd(rid) <= 6 && rnd(rid) - id <= 6, $sformatf("id %0d expected %0d", id, rnd(rid)));
    check(iq - rnd(riq) <= 6 && rnd(riq) - iq <= 6, $sformatf("iq %0d expected %0d", iq, rnd(riq)));
    // PI reference from the block's own id/iq.
    ed = s16(idr) - id; eq = s16(iqr) - iq;
    nid = sat(longint'(integ_d[axis]) + ((longint'(ed) * ki) >>> 12));
    niq = sat(longint'(integ_q[axis]) + ((longint'(eq) * ki) >>> 12));
    evd = sat(longint'(nid) + ((longint'(ed) * kp) >>> 12));
    evq = sat(longint'(niq) + ((longint'(eq) * kp) >>> 12));
    integ_d[axis] = nid; integ_q[axis] = niq;
    check(vd == evd && vq == evq, $sformatf("axis %0d vd/vq %0d %0d expected %0d %0d", axis, vd, vq, evd, evq));
    // Inverse Park reference from the block's vd/vq.
    rva = vd * $cos(t) - vq * $sin(t);
    rvb = vd * $sin(t) + vq * $cos(t);
    rva = (rva > 32767) ? 32767 : (rva < -32768) ? -32768 : rva;
    rvb = (rvb > 32767) ? 32767 : (rvb < -32768) ? -32768 : rvb;
    check(va - rnd(rva) <= 6 && rnd(rva) - va <= 6, $sformatf("valpha %0d expected %0d", va, rnd(rva)));
    check(vb - rnd(rvb) <= 6 && rnd(rvb) - vb <= 6, $sformatf("vbeta %0d expected %0d", vb, rnd(rvb)));
  endtask

  initial begin
    int ia, ib;
    req = '0;
    for (int a = 0; a < 6; a++) begin integ_d[a] = 0; integ_q[a] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    // Balanced currents of amplitude ~0.6 at many angles, three axes in turn.
    for (int k = 0; k < 120; k++) begin
      real amp, ph;
      amp = 20000.0 * ($urandom_range(100) / 100.0);
      ph = 2.0 * 3.14159265358979 * $urandom_range(65535) / 65536.0;
      ia = rnd(amp * $cos(ph));
      ib = rnd(amp * $cos(ph - 2.0 * 3.14159265358979 / 3.0));
      step(k % 3, ia, ib, $urandom_range(65535), $urandom_range(16000) - 8000,
           $urandom_range(16000) - 8000, $urandom_range(4096), $urandom_range(400));
    end
    // Large gains: outputs saturate.
    step(4, 0, 0, 1000, 30000, -30000, 65535, 65535);
    step(4, 0, 0, 1000, 30000, -30000, 65535, 65535);
    // Clear the integrators of axis 4 and compare with the model.
    wr(1, 4); wr(0, 2);
    integ_d[4] = 0; integ_q[4] = 0;
    step(4, 100, 200, 3000, 1000, 2000, 4096, 100);
    $display("largest FOC step latency: %0d clocks", max_lat);
    report_and_finish();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
