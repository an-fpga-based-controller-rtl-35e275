// spi_slave: SPI receiver through which the vision processor sends the
// closest-point (hand) position to the FPGA, about 30 times a second. The
// six-axis drive uses a second copy as its link to the external processor.
//
// Each transfer is one frame of FRAME_BITS bits (32 by default: a 16-bit X
// followed by a 16-bit Y, most significant bit first) framed by an active-low
// chip select. The SPI pins are synchronised into the system clock with two
// flip-flops and the data line is sampled on rising SCLK edges (SPI mode 0),
// so the system clock must be at least four times the SCLK rate. When chip
// select is released after exactly FRAME_BITS bits, the frame is copied to
// the DATA register, READY is set and, if enabled, irq_o asks the processor
// to buffer the position. A frame of any other length sets FRAME_ERR and is
// dropped; a frame that arrives while READY is still set replaces the data
// and sets OVERRUN. The 16-bit {X,Y} payload and the interrupt per position
// are from the source article; the SPI mode, the error flags and the register map
// are this design's choices. MISO is not used: the link is receive-only.
//
// Registers (word offsets, read latency one cycle):
//   0 DATA    [31:16] X, [15:0] Y (reading it clears READY)
//   1 STATUS  [0] READY, [1] OVERRUN, [2] FRAME_ERR (write 1s to clear)
//   2 CONTROL [0] interrupt enable
//   3 FRAMES  [31:0] frames received since reset (read only)
module spi_slave
  import cobot_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mm_local_req_t req,
  output mm_rdata_t     rdata,
  output logic          irq_o,
  // SPI pins from the external processor
  input  logic          spi_sclk,
  input  logic          spi_cs_n,
  input  logic          spi_mosi
);

  localparam int unsigned BC_W = $clog2(FRAME_BITS + 1);

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic       sclk_rise, cs_rise, cs_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[1:0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  assign cs_active = !cs_s[1];
  assign sclk_rise = cs_active && sclk_s[1] && !sclk_s[2];
  assign cs_rise   = cs_s[1] && !cs_s[2];

  logic [FRAME_BITS-1:0] shreg, data;
  logic [BC_W-1:0]       bit_cnt;
  logic                  ready, overrun, frame_err, ien;
  logic [31:0]           frames;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      bit_cnt   <= '0;
      data      <= '0;
      ready     <= 1'b0;
      overrun   <= 1'b0;
      frame_err <= 1'b0;
      ien       <= 1'b0;
      frames    <= '0;
    end else begin
      // Shift in on SCLK rising edges while selected.
      if (sclk_rise) begin
        shreg <= {shreg[FRAME_BITS-2:0], mosi_s[1]};
        if (bit_cnt <= BC_W'(FRAME_BITS)) bit_cnt <= bit_cnt + 1'b1;
      end
      // Processor side: reads and writes.
      if (req.read && req.addr == 4'd0) ready <= 1'b0;
      if (req.write) begin
        unique case (req.addr)
          4'd1: begin
            if (req.wdata[0]) ready     <= 1'b0;
            if (req.wdata[1]) overrun   <= 1'b0;
            if (req.wdata[2]) frame_err <= 1'b0;
          end
          4'd2: ien <= req.wdata[0];
          default: ;
        endcase
      end
      // End of frame (takes priority over a simultaneous clear).
      if (cs_rise) begin
        bit_cnt <= '0;
        if (bit_cnt == BC_W'(FRAME_BITS)) begin
          data   <= shreg;
          ready  <= 1'b1;
          frames <= frames + 1;
          if (ready) overrun <= 1'b1;
        end else if (bit_cnt != '0) begin
          frame_err <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.read) begin
      unique case (req.addr)
        4'd0:    rdata <= MM_DATA_W'(data);
        4'd1:    rdata <= {29'd0, frame_err, overrun, ready};
        4'd2:    rdata <= {31'd0, ien};
        4'd3:    rdata <= frames;
        default: rdata <= '0;
      endcase
    end
  end

  assign irq_o = ready && ien;

endmodule
