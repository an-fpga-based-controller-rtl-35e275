// sinc3_filter: third-order sinc (CIC) decimation filter for a sigma-delta
// ADC interface, turning a 1-bit modulator stream (phase current or other
// analogue measurement) into multi-bit samples.
//
// Three integrators run at the modulator bit rate (one step per mod_en
// strobe); every DECIMATION bits the last integrator is sampled and passed
// through three first-difference (comb) stages, giving one output sample and
// a one-clock valid strobe. Two's-complement wrap-around in the integrators
// is harmless because the combs undo it, as long as the register width holds
// the full output range: W = 3*log2(DECIMATION)+1 bits. A modulator bit of 1
// counts as +1 and 0 as 0, so the output runs from 0 (all zeros) to
// DECIMATION**3 (all ones), with mid-scale at DECIMATION**3/2. The source article
// names the ADC interface as built of Sinc3 filters; the decimation ratio,
// the unipolar input mapping and the output width are this design's choices.
// Latency: an output appears two clocks after the mod_en strobe that
// completes a decimation window, and reflects the last three windows.
module sinc3_filter #(
  parameter int unsigned DECIMATION = 64,
  parameter int unsigned W          = 3 * $clog2(DECIMATION) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mod_en,    // one strobe per modulator clock
  input  logic         mod_bit,   // modulator data, sampled on mod_en
  output logic [W-1:0] sample_o,
  output logic         valid_o
);

  localparam int unsigned DC_W = $clog2(DECIMATION);

  logic [W-1:0]    i1, i2, i3;
  logic [W-1:0]    c1_d, c2_d, c3_d;
  logic [DC_W-1:0] dec_cnt;
  logic            dec_strobe;

  // Integrator section at the modulator rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; i2 <= '0; i3 <= '0;
      dec_cnt    <= '0;
      dec_strobe <= 1'b0;
    end else begin
      dec_strobe <= 1'b0;
      if (mod_en) begin
        i1 <= i1 + W'(mod_bit);
        i2 <= i2 + i1;
        i3 <= i3 + i2;
        if (dec_cnt == DC_W'(DECIMATION - 1)) begin
          dec_cnt    <= '0;
          dec_strobe <= 1'b1;
        end else begin
          dec_cnt <= dec_cnt + 1'b1;
        end
      end
    end
  end

  // Comb section at the output rate.
  logic [W-1:0] c1, c2, c3;
  always_comb begin
    c1 = i3 - c1_d;
    c2 = c1 - c2_d;
    c3 = c2 - c3_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_d <= '0; c2_d <= '0; c3_d <= '0;
      sample_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= dec_strobe;
      if (dec_strobe) begin
        c1_d     <= i3;
        c2_d     <= c1;
        c3_d     <= c2;
        sample_o <= c3;
      end
    end
  end

endmodule
