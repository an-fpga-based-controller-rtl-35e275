// foc_accel: fixed-point field-oriented-control (FOC) accelerator shared by
// all motor axes. The processor serves the axes one after another and runs
// one FOC step per axis through this block.
//
// One step, started by writing CTRL.START, computes in order:
//   Clarke      i_alpha = ia,  i_beta = (ia + 2*ib) / sqrt(3)
//   Park        (id, iq) = (i_alpha, i_beta) rotated by -theta
//   PI (d, q)   e = ref - i;  integ = sat(integ + KI*e);  v = sat(integ + KP*e)
//   inv. Park   (v_alpha, v_beta) = (vd, vq) rotated by +theta
// v_alpha and v_beta feed the space-vector modulation, which stays in
// software. Both rotations use one CORDIC rotator (ITER iterations, one per
// clock) after a half-turn pre-rotation that brings the angle into +-90
// degrees; its gain of 1.6468 is removed by a multiply with 19898/32768.
// The CORDIC angle table holds round(atan(2**-i) * 2**20 / (2*pi)).
// All signals are Q1.15 (full scale +-1.0); theta is unsigned, 65536 = one
// electrical turn; KP and KI are unsigned Q4.12. Results saturate to Q1.15.
// The PI integrators are kept per axis (N_AXES pairs), chosen by AXIS, so
// one block can serve every axis in turn.
// Latency: DONE is set 2*ITER + 6 clocks after the START write (38 clocks
// by default, 0.38 us at 100 MHz); CYCLES reads back that count.
// The source article gives the block's purpose (fixed-point FOC as FPGA IP
// reused for each axis) and a time of 1.5 us per axis; the algorithm
// partition, the number formats, the CORDIC method and the register map are
// this design's choices.
//
// Registers (word offsets, read latency one clock):
//   0 CTRL    write: [0] START, [1] clear the selected axis's integrators;
//             read: [0] BUSY, [1] DONE (cleared by START)
//   1 AXIS    [2:0] axis whose integrators are used
//   2 IA  3 IB  4 THETA  5 ID_REF  6 IQ_REF  7 KP  8 KI      (inputs)
//   9 ID  10 IQ  11 VD  12 VQ  13 VALPHA  14 VBETA  15 CYCLES (results)
module foc_accel
  import cobot_pkg::*;
#(
  parameter int unsigned N_AXES = NUM_AXES,
  parameter int unsigned ITER   = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mm_local_req_t req,
  output mm_rdata_t     rdata
);

  localparam int unsigned W  = 24;   // CORDIC datapath: Q15 with 4 guard bits
  localparam int unsigned GB = 4;
  localparam int unsigned AW = $clog2(N_AXES);
  localparam logic signed [15:0] INV_SQRT3 = 16'sd18919;  // 32768/sqrt(3)
  localparam logic signed [15:0] INV_K     = 16'sd19898;  // 32768/1.64676

  typedef enum logic [3:0] {
    S_IDLE, S_CLARKE, S_ROT1, S_SCALE1, S_PI1, S_PI2, S_ROT2, S_SCALE2, S_DONE
  } state_t;

  function automatic logic signed [19:0] atan_tab(input int unsigned i);
    unique case (i)
      0: return 20'sd131072;  1: return 20'sd77376;  2: return 20'sd40884;
      3: return 20'sd20753;   4: return 20'sd10417;  5: return 20'sd5213;
      6: return 20'sd2607;    7: return 20'sd1304;   8: return 20'sd652;
      9: return 20'sd326;    10: return 20'sd163;   11: return 20'sd81;
     12: return 20'sd41;     13: return 20'sd20;    14: return 20'sd10;
     15: return 20'sd5;      16: return 20'sd3;     17: return 20'sd1;
      default: return 20'sd0;
    endcase
  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)  return 16'sd32767;
    if (v < -40'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction

  // ---- registers ----------------------------------------------------------
  logic signed [15:0] ia, ib, id_ref, iq_ref;
  logic        [15:0] theta, kp, ki;
  logic        [2:0]  axis;
  logic signed [15:0] id_q, iq_q, vd_q, vq_q, valpha_q, vbeta_q;
  logic        [15:0] cycles, cyc_cnt;
  logic               done;
  logic signed [15:0] integ_d [N_AXES];
  logic signed [15:0] integ_q [N_AXES];
  logic        [AW-1:0] ax;

  assign ax = (32'(axis) < N_AXES) ? AW'(axis) : '0;

  // ---- datapath state -----------------------------------------------------
  state_t             st;
  logic signed [W-1:0]  cx, cy;
  logic signed [19:0]   cz;
  logic [4:0]           it;
  logic signed [16:0]   e_d, e_q;
  logic signed [15:0]   new_integ_d, new_integ_q;

  // CORDIC start values for vector (x, y) and rotation angle phi
  // (2^20 = one turn), with the half-turn pre-rotation applied.
  typedef struct packed {
    logic signed [W-1:0] x;
    logic signed [W-1:0] y;
    logic signed [19:0]  z;
  } cordic_t;

  function automatic cordic_t cordic_init(input logic signed [15:0] x,
                                          input logic signed [15:0] y,
                                          input logic signed [19:0] phi);
    cordic_t c;
    c.x = W'(x) <<< GB;
    c.y = W'(y) <<< GB;
    c.z = phi;
    if (phi > 20'sd262144 || phi < -20'sd262144) begin  // beyond +-90 degrees
      c.x = -c.x;
      c.y = -c.y;
      c.z = phi + 20'sh80000;                            // half a turn
    end
    return c;
  endfunction

  // CORDIC output scaled back to Q15 (removes the gain and guard bits).
  function automatic logic signed [15:0] unscale(input logic signed [W-1:0] v);
    logic signed [W+16:0] p;
    p = (W+17)'(v) * (W+17)'(INV_K);
    return sat16(40'(p >>> (15 + GB)));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      ia <= '0; ib <= '0; id_ref <= '0; iq_ref <= '0;
      theta <= '0; kp <= '0; ki <= '0; axis <= '0;
      id_q <= '0; iq_q <= '0; vd_q <= '0; vq_q <= '0; valpha_q <= '0; vbeta_q <= '0;
      cycles <= '0; cyc_cnt <= '0; done <= 1'b0;
      cx <= '0; cy <= '0; cz <= '0; it <= '0;
      e_d <= '0; e_q <= '0;
      new_integ_d <= '0; new_integ_q <= '0;
      for (int a = 0; a < N_AXES; a++) begin integ_d[a] <= '0; integ_q[a] <= '0; end
    end else begin
      // Register writes (inputs are ignored while a step runs).
      if (req.write && st == S_IDLE) begin
        unique case (req.addr)
          4'd0: begin
            if (req.wdata[1]) begin integ_d[ax] <= '0; integ_q[ax] <= '0; end
            if (req.wdata[0]) begin st <= S_CLARKE; done <= 1'b0; cyc_cnt <= 16'd1; end
          end
          4'd1: axis   <= req.wdata[2:0];
          4'd2: ia     <= req.wdata[15:0];
          4'd3: ib     <= req.wdata[15:0];
          4'd4: theta  <= req.wdata[15:0];
          4'd5: id_ref <= req.wdata[15:0];
          4'd6: iq_ref <= req.wdata[15:0];
          4'd7: kp     <= req.wdata[15:0];
          4'd8: ki     <= req.wdata[15:0];
          default: ;
        endcase
      end
      if (st != S_IDLE && st != S_DONE) cyc_cnt <= cyc_cnt + 1'b1;

      unique case (st)
        S_IDLE: ;
        S_CLARKE: begin
          logic signed [33:0] p;
          cordic_t c;
          p = (34'(ia) + 34'(ib) + 34'(ib)) * 34'(INV_SQRT3);
          c = cordic_init(ia, sat16(40'(p >>> 15)), -$signed({theta, 4'b0}));
          {cx, cy, cz} <= c;
          it <= '0;
          st <= S_ROT1;
        end
        S_ROT1, S_ROT2: begin
          if (cz >= 0) begin
            cx <= cx - (cy >>> it);
            cy <= cy + (cx >>> it);
            cz <= cz - atan_tab(32'(it));
          end else begin
            cx <= cx + (cy >>> it);
            cy <= cy - (cx >>> it);
            cz <= cz + atan_tab(32'(it));
          end
          it <= it + 1'b1;
          if (32'(it) == ITER - 1) st <= (st == S_ROT1) ? S_SCALE1 : S_SCALE2;
        end
        S_SCALE1: begin
          id_q <= unscale(cx);
          iq_q <= unscale(cy);
          st   <= S_PI1;
        end
        S_PI1: begin
          logic signed [16:0] ed, eq;
          ed = 17'(id_ref) - 17'(id_q);
          eq = 17'(iq_ref) - 17'(iq_q);
          e_d <= ed;
          e_q <= eq;
          new_integ_d <= sat16(40'(integ_d[ax]) + ((40'(ed) * $signed({24'd0, ki})) >>> 12));
          new_integ_q <= sat16(40'(integ_q[ax]) + ((40'(eq) * $signed({24'd0, ki})) >>> 12));
          st <= S_PI2;
        end
        S_PI2: begin
          logic signed [15:0] vd, vq;
          vd = sat16(40'(new_integ_d) + ((40'(e_d) * $signed({24'd0, kp})) >>> 12));
          vq = sat16(40'(new_integ_q) + ((40'(e_q) * $signed({24'd0, kp})) >>> 12));
          integ_d[ax] <= new_integ_d;
          integ_q[ax] <= new_integ_q;
          vd_q <= vd;
          vq_q <= vq;
          {cx, cy, cz} <= cordic_init(vd, vq, $signed({theta, 4'b0}));
          it <= '0;
          st <= S_ROT2;
        end
        S_SCALE2: begin
          valpha_q <= unscale(cx);
          vbeta_q  <= unscale(cy);
          st <= S_DONE;
        end
        S_DONE: begin
          cycles <= cyc_cnt;
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.read) begin
      unique case (req.addr)
        4'd0:  rdata <= {30'd0, done, (st != S_IDLE)};
        4'd1:  rdata <= {29'd0, axis};
        4'd2:  rdata <= MM_DATA_W'(ia);
        4'd3:  rdata <= MM_DATA_W'(ib);
        4'd4:  rdata <= {16'd0, theta};
        4'd5:  rdata <= MM_DATA_W'(id_ref);
        4'd6:  rdata <= MM_DATA_W'(iq_ref);
        4'd7:  rdata <= {16'd0, kp};
        4'd8:  rdata <= {16'd0, ki};
        4'd9:  rdata <= MM_DATA_W'(id_q);
        4'd10: rdata <= MM_DATA_W'(iq_q);
        4'd11: rdata <= MM_DATA_W'(vd_q);
        4'd12: rdata <= MM_DATA_W'(vq_q);
        4'd13: rdata <= MM_DATA_W'(valpha_q);
        4'd14: rdata <= MM_DATA_W'(vbeta_q);
        default: rdata <= {16'd0, cycles};
      endcase
    end
  end

endmodule
