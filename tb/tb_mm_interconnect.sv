// tb_mm_interconnect: drives random reads and writes through the
// interconnect into simple register-file slaves modelled in the testbench,
// and checks that each write reaches only the addressed slave, that read
// data comes back from the right slave one clock later, and that addresses
// with no slave read as zero.
module tb_mm_interconnect;
  import cobot_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  mm_req_t m_req;
  mm_rdata_t m_rdata;
  logic m_rvalid;
  mm_local_req_t s_req [N];
  mm_rdata_t s_rdata [N];
  always #5 clk = ~clk;
  `include "tb_common.svh"

  mm_interconnect #(.N_SLAVES(N)) dut (.clk, .rst_n, .m_req, .m_rdata, .m_rvalid, .s_req, .s_rdata);

  // Slave models: 16 registers each, one-clock read latency.
  logic [31:0] regs [N][16];
  int writes_seen [N];
  for (genvar i = 0; i < N; i++) begin : g_slv
    always @(posedge clk) begin
      if (s_req[i].write) begin
        regs[i][s_req[i].addr] <= s_req[i].wdata;
        writes_seen[i]++;
      end
      if (s_req[i].read) s_rdata[i] <= regs[i][s_req[i].addr];
    end
  end

  logic [31:0] model [N][16];
  int exp_writes [N];
  int v, idx, off;
  initial begin
    m_req = '0;
    for (int i = 0; i < N; i++) begin
      exp_writes[i] = 0; writes_seen[i] = 0;
      for (int r = 0; r < 16; r++) begin regs[i][r] = 0; model[i][r] = 0; end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      idx = $urandom_range(N + 1);     // sometimes beyond the last slave
      off = $urandom_range(15);
      @(negedge clk);
      m_req = '0;
      m_req.addr = MM_ADDR_W'(idx * 16 + off);
      if ($urandom_range(1)) begin
        m_req.write = 1; m_req.wdata = $urandom;
        if (idx < N) begin model[idx][off] = m_req.wdata; exp_writes[idx]++; end
        @(negedge clk); m_req = '0;
        check(m_rvalid == 0, "no rvalid after write");
      end else begin
        m_req.read = 1;
        @(negedge clk); m_req = '0;
        #1;   // let the returned data settle after the request is withdrawn
        check(m_rvalid == 1, "rvalid one clock after read");
        check(m_rdata == ((idx < N) ? model[idx][off] : 32'd0),
              $sformatf("read slave %0d reg %0d got %08h", idx, off, m_rdata));
      end
    end
    for (int i = 0; i < N; i++)
      check(writes_seen[i] == exp_writes[i], $sformatf("slave %0d write count", i));
    report_and_finish();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    report_and_finish();
  end
endmodule
