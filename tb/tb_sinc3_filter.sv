// tb_sinc3_filter: checks the sinc3 decimator against a direct convolution.
// One filter (decimation 8) is fed random modulator bits and every output
// is compared with the sum of the bit history weighted by the sinc3 impulse
// response (three length-8 boxcars convolved), computed here from scratch.
// A second filter at the default decimation of 64 is fed fixed bit
// densities and must settle to density * 64^3, and its output rate is
// checked (one sample per 64 modulator bits).
module tb_sinc3_filter;
  localparam int D = 8;
  localparam int HL = 3 * D - 2;
  logic clk = 0, rst_n = 0;
  logic mod_en = 0, mod_bit = 0, bit64 = 0;
  logic [9:0] s8; logic v8;
  logic [18:0] s64; logic v64;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  sinc3_filter #(.DECIMATION(D)) dut8 (.clk, .rst_n, .mod_en, .mod_bit, .sample_o(s8), .valid_o(v8));
  sinc3_filter dut64 (.clk, .rst_n, .mod_en, .mod_bit(bit64), .sample_o(s64), .valid_o(v64));

  // Impulse response of three cascaded length-D boxcars.
  int h [HL];
  initial begin
    int a [3*D];
    int b [3*D];
    for (int i = 0; i < 3*D; i++) a[i] = (i < D);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 3*D; i++) begin
        b[i] = 0;
        for (int j = 0; j < D; j++) if (i - j >= 0) b[i] += a[i - j];
      end
      a = b;
    end
    for (int i = 0; i < HL; i++) h[i] = a[i];
  end

  // Modulator bit history (index = bit number).
  bit hist [$];
  int nbits = 0, outs8 = 0, outs64 = 0;
  int last_v64_bit = -1;
  int density_num = 1, density_den = 4;

  // Stimulus: a modulator strobe every 5 clocks.
  int ph = 0;
  always @(posedge clk) if (rst_n) begin
    ph <= (ph == 4) ? 0 : ph + 1;
    mod_en <= (ph == 4);
  end
  always @(negedge clk) if (rst_n && ph == 0) begin
    mod_bit = $urandom_range(1);
    bit64   = ((nbits % density_den) < density_num);
  end
  always @(posedge clk) if (rst_n && mod_en) begin
    hist.push_back(mod_bit);
    nbits++;
  end

  // Reference: output after bit n covers bits n-2-k, k = 0..HL-1.
  always @(posedge clk) if (v8) begin
    int n, y;
    n = nbits - 1;
    y = 0;
    for (int k = 0; k < HL; k++)
      if (n - 2 - k >= 0) y += h[k] * hist[n - 2 - k];
    outs8++;
    if (nbits > 3 * D) check(int'(s8) == y, $sformatf("D=8 sample %0d expected %0d", s8, y));
  end

  always @(posedge clk) if (v64) begin
    if (last_v64_bit >= 0) check(nbits - last_v64_bit == 64, "one D=64 sample per 64 bits");
    last_v64_bit = nbits;
    outs64++;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // Density 1/4: 64^3/4 = 65536 once settled (three windows).
    wait (outs64 == 5);
    @(posedge v64); @(negedge clk);
    check(s64 == 19'd65536, $sformatf("density 1/4 gives %0d", s64));
    density_num = 4;   // all ones: full scale 64^3 = 262144
    wait (outs64 == 10);
    @(posedge v64); @(negedge clk);
    check(s64 == 19'd262144, $sformatf("all ones gives %0d", s64));
    density_num = 0;
    wait (outs64 == 15);
    @(posedge v64); @(negedge clk);
    check(s64 == 19'd0, $sformatf("all zeros gives %0d", s64));
    density_num = 3;   // 3/4 of full scale
    wait (outs64 == 20);
    @(posedge v64); @(negedge clk);
    check(s64 == 19'd196608, $sformatf("density 3/4 gives %0d", s64));
    check(outs8 > 100, "enough D=8 samples compared");
    report_and_finish();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
