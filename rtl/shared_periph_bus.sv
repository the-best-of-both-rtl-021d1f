// shared_periph_bus: lower-level bus that lets several DEUs reach one shared
// peripheral without joining their buses.
//
// Each DEU bus connects to one master port of this bus; the single slave port
// connects to the shared peripheral. The DEU buses stay separate: DEUs can
// only delay each other while they access the shared peripheral itself.
// Arbitration is per transaction. When the bus is idle it registers a grant
// for one master with a pending AW or AR (a write is preferred over a read of
// the same master), chosen round-robin starting after the last winner, so a
// waiting master is served after at most NUM_MASTERS-1 other transactions.
// While granted, only that master's channels are connected to the slave; the
// bus returns to idle after the B (write) or R (read) handshake. An
// uncontended access therefore costs one arbitration cycle plus the
// peripheral's own latency. 'contention' is high for each cycle after one in
// which a master waited because another master held or won the bus. Mutual exclusion over a sequence of accesses is
// the job of hw_semaphore, not of this bus.
// The one-slave, many-master bus follows the architecture; the round-robin
// policy and per-transaction grant are this design's choice.
module shared_periph_bus
  import r2d2_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req [NUM_MASTERS],
  output axil_rsp_t m_rsp [NUM_MASTERS],
  output axil_req_t s_req,
  input  axil_rsp_t s_rsp,
  output logic      contention   // a master waits because another one holds or wins the bus
);
  localparam int unsigned IW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  typedef enum logic [1:0] {IDLE, WRITE, READ} state_e;
  state_e        state_q;
  logic [IW-1:0] owner_q, last_q;
  logic [IW-1:0] pick;
  logic          pick_ok, pick_wr;
  logic [NUM_MASTERS-1:0] pend;

  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) pend[m] = m_req[m].awvalid || m_req[m].arvalid;
    pick    = '0;
    pick_ok = 1'b0;
    // Round-robin: scan from last winner + 1.
    for (int k = 1; k <= NUM_MASTERS; k++) begin
      int unsigned c;
      c = (32'(last_q) + k) % NUM_MASTERS;
      if (!pick_ok && pend[c]) begin
        pick    = IW'(c);
        pick_ok = 1'b1;
      end
    end
    pick_wr = m_req[pick].awvalid;
  end

  always_comb begin
    s_req = '0;
    for (int m = 0; m < NUM_MASTERS; m++) m_rsp[m] = '0;
    if (state_q == WRITE) begin
      s_req.awaddr  = m_req[owner_q].awaddr;
      s_req.awvalid = m_req[owner_q].awvalid;
      s_req.wdata   = m_req[owner_q].wdata;
      s_req.wstrb   = m_req[owner_q].wstrb;
      s_req.wvalid  = m_req[owner_q].wvalid;
      s_req.bready  = m_req[owner_q].bready;
      m_rsp[owner_q].awready = s_rsp.awready;
      m_rsp[owner_q].wready  = s_rsp.wready;
      m_rsp[owner_q].bvalid  = s_rsp.bvalid;
      m_rsp[owner_q].bresp   = s_rsp.bresp;
    end else if (state_q == READ) begin
      s_req.araddr  = m_req[owner_q].araddr;
      s_req.arvalid = m_req[owner_q].arvalid;
      s_req.rready  = m_req[owner_q].rready;
      m_rsp[owner_q].arready = s_rsp.arready;
      m_rsp[owner_q].rvalid  = s_rsp.rvalid;
      m_rsp[owner_q].rdata   = s_rsp.rdata;
      m_rsp[owner_q].rresp   = s_rsp.rresp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      owner_q    <= '0;
      last_q     <= IW'(NUM_MASTERS - 1);
      contention <= 1'b0;
    end else begin
      contention <= (state_q == IDLE) ? ($countones(pend) > 1)
                                      : |(pend & ~(NUM_MASTERS'(1) << owner_q));
      unique case (state_q)
        IDLE: if (pick_ok) begin
          state_q    <= pick_wr ? WRITE : READ;
          owner_q    <= pick;
          last_q     <= pick;
        end
        WRITE: if (s_rsp.bvalid && m_req[owner_q].bready) state_q <= IDLE;
        READ:  if (s_rsp.rvalid && m_req[owner_q].rready) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
