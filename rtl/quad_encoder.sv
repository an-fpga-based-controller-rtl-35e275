// quad_encoder: position encoder interface of one drive axis.
//
// It decodes the two quadrature signals A and B of an incremental position
// encoder into a signed position count, counting every edge of either signal
// (4 counts per encoder line). Both inputs pass through a two-flip-flop
// synchroniser. Each clock the previous and present {A,B} states are
// compared: a Gray-code step forward (00->01->11->10->00) adds one, a step
// back subtracts one, and a change of both signals at once is an illegal
// step that leaves the count unchanged and sets err_o until clear_err. The
// document names an encoder interface fed by position signals; the
// quadrature format, the 4x decoding, the count width and the error flag are
// this design's choices. Latency: a count change appears three clocks after
// the input edge.
module quad_encoder #(
  parameter int unsigned POS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enc_a,
  input  logic             enc_b,
  input  logic             clear_pos,   // set count to zero
  input  logic             clear_err,
  output logic [POS_W-1:0] position_o,  // two's complement
  output logic             err_o
);

  logic [1:0] a_s, b_s;
  logic [1:0] cur, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_s <= '0;
      b_s <= '0;
    end else begin
      a_s <= {a_s[0], enc_a};
      b_s <= {b_s[0], enc_b};
    end
  end

  assign cur = {a_s[1], b_s[1]};

  // Gray position of an {A,B} state: 00=0, 01=1, 11=2, 10=3.
  function automatic logic [1:0] phase(input logic [1:0] ab);
    return {ab[1], ab[1] ^ ab[0]};
  endfunction

  logic [1:0] step;
  assign step = phase(cur) - phase(prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      position_o <= '0;
      err_o      <= 1'b0;
    end else begin
      prev <= cur;
      if (clear_pos) begin
        position_o <= '0;
      end else begin
        unique case (step)
          2'd1:    position_o <= position_o + 1'b1;
          2'd3:    position_o <= position_o - 1'b1;
          default: ;
        endcase
      end
      if (clear_err)      err_o <= 1'b0;
      else if (step == 2'd2) err_o <= 1'b1;
    end
  end

endmodule
