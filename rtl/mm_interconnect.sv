// mm_interconnect: memory-mapped interconnect from the soft processor (the
// single bus master) to N register slaves.
//
// The master's word address is split into a slave index (upper bits) and a
// 16-word local register offset (lower MM_LOCAL_W bits). A read or write
// strobe is forwarded only to the addressed slave, in the same cycle. Every
// slave returns read data one cycle after its read strobe; the interconnect
// remembers which slave was read and returns that slave's data together with
// m_rvalid one cycle after the master's read. Accesses to an index with no
// slave are ignored on write and read back as zero, with m_rvalid as usual,
// so the master never waits. The source article only names the interconnect and
// shows the processor as central data master; the decoding scheme, the fixed
// one-cycle read latency and the empty-window behaviour are this design's
// choices.
module mm_interconnect
  import cobot_pkg::*;
#(
  parameter int unsigned N_SLAVES = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  // master side
  input  mm_req_t       m_req,
  output mm_rdata_t     m_rdata,
  output logic          m_rvalid,
  // slave side
  output mm_local_req_t s_req   [N_SLAVES],
  input  mm_rdata_t     s_rdata [N_SLAVES]
);

  localparam int unsigned IDX_W = MM_ADDR_W - MM_LOCAL_W;

  logic [IDX_W-1:0] sel;
  logic             sel_ok;
  logic [IDX_W-1:0] rd_sel_q;
  logic             rd_ok_q;
  logic             rd_q;

  assign sel    = m_req.addr[MM_ADDR_W-1:MM_LOCAL_W];
  assign sel_ok = (32'(sel) < N_SLAVES);

  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      s_req[i]       = to_local(m_req);
      s_req[i].read  = m_req.read  && (32'(sel) == i);
      s_req[i].write = m_req.write && (32'(sel) == i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q     <= 1'b0;
      rd_ok_q  <= 1'b0;
      rd_sel_q <= '0;
    end else begin
      rd_q     <= m_req.read;
      rd_ok_q  <= m_req.read && sel_ok;
      if (m_req.read) rd_sel_q <= sel;
    end
  end

  always_comb begin
    m_rdata = '0;
    for (int i = 0; i < N_SLAVES; i++)
      if (rd_ok_q && (32'(rd_sel_q) == i)) m_rdata = s_rdata[i];
  end
  assign m_rvalid = rd_q;

  // A bus cycle is either a read or a write, never both.
  a_one_strobe : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(m_req.read && m_req.write));

endmodule
