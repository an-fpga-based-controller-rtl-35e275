// tb_quad_encoder: moves a simulated encoder forwards and backwards by
// random numbers of quadrature steps and checks the position count against
// the net number of steps, then checks that a jump of both signals at once
// sets the error flag without counting, and the clear inputs.
module tb_quad_encoder;
  logic clk = 0, rst_n = 0;
  logic a = 0, b = 0, clear_pos = 0, clear_err = 0;
  logic [31:0] pos;
  logic err;
  always #5 clk = ~clk;
  `include "tb_common.svh"

  quad_encoder dut (.clk, .rst_n, .enc_a(a), .enc_b(b), .clear_pos, .clear_err,
                    .position_o(pos), .err_o(err));

  // Encoder state as a phase 0..3 (00, 01, 11, 10).
  int phase = 0, expect_pos = 0;
  task automatic move(input int dir);
    phase = (phase + dir + 4) % 4;
    {a, b} = (phase == 0) ? 2'b00 : (phase == 1) ? 2'b01 : (phase == 2) ? 2'b11 : 2'b10;
    expect_pos += dir;
    repeat ($urandom_range(2, 6)) @(negedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      n = $urandom_range(1, 30);
      for (int i = 0; i < n; i++) move((k % 2) ? -1 : 1);
      repeat (4) @(negedge clk);
      check($signed(pos) == expect_pos, $sformatf("position %0d expected %0d", $signed(pos), expect_pos));
    end
    check(err == 0, "no error for legal steps");
    // Go negative.
    repeat (500) move(-1);
    repeat (4) @(negedge clk);
    check($signed(pos) == expect_pos, $sformatf("negative position %0d expected %0d", $signed(pos), expect_pos));
    // Illegal jump: both signals change together.
    phase = (phase + 2) % 4;
    {a, b} = ~{a, b};
    repeat (5) @(negedge clk);
    check(err == 1, "error on double step");
    check($signed(pos) == expect_pos, "no count on double step");
    clear_err = 1; @(negedge clk); clear_err = 0;
    @(negedge clk);
    check(err == 0, "error cleared");
    clear_pos = 1; @(negedge clk); clear_pos = 0;
    expect_pos = 0;
    repeat (7) move(1);
    repeat (4) @(negedge clk);
    check($signed(pos) == 7, "count after clear");
    report_and_finish();
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
