// deu_axi_bus: the private AXI4-Lite bus of one DEU.
//
// A DEU's core is the only master on its bus, so the bus needs no arbiter and
// no access ever waits for another core: the access time of each slave is the
// same whatever the rest of the chip is doing. The bus decodes the address to
// one of NUM_SLAVES slaves (slave s owns addresses with (addr & MASK[s]) ==
// BASE[s]) and routes the channels combinationally, so it adds no cycles.
// Unmapped addresses are answered by an internal responder with DECERR one
// cycle after the access is accepted.
// One write and one read may be in flight at a time: after AW is accepted the
// next AW waits for the B handshake, and after AR is accepted the next AR
// waits for the R handshake. The write target is latched when AW is accepted,
// so W may follow AW later.
// The sole-master bus per DEU follows the architecture; AXI4-Lite and the
// single outstanding transaction per direction are this design's choice.
module deu_axi_bus
  import r2d2_pkg::*;
#(
  parameter int unsigned                 NUM_SLAVES = 4,
  parameter logic [NUM_SLAVES-1:0][31:0] BASE       = '0,
  parameter logic [NUM_SLAVES-1:0][31:0] MASK       = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [NUM_SLAVES],
  input  axil_rsp_t s_rsp [NUM_SLAVES]
);
  localparam int unsigned SW = $clog2(NUM_SLAVES + 1);
  localparam int unsigned IW = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;
  localparam logic [SW-1:0] ERR = SW'(NUM_SLAVES);

  function automatic logic [SW-1:0] decode(input logic [31:0] a);
    logic [SW-1:0] s = ERR;
    for (int i = NUM_SLAVES - 1; i >= 0; i--)
      if ((a & MASK[i]) == BASE[i]) s = SW'(i);
    return s;
  endfunction

  logic          aw_done_q, w_done_q, r_busy_q;
  logic [SW-1:0] wsel_q, rsel_q, wsel, rsel;
  logic          err_b_q, err_r_q;
  logic          aw_fire, w_fire, b_fire, ar_fire, r_fire;

  assign wsel = aw_done_q ? wsel_q : decode(m_req.awaddr);
  assign rsel = r_busy_q  ? rsel_q : decode(m_req.araddr);

  logic aw_open, w_open;
  assign aw_open = m_req.awvalid && !aw_done_q;
  assign w_open  = m_req.wvalid && (m_req.awvalid || aw_done_q) && !w_done_q;

  always_comb begin
    for (int s = 0; s < NUM_SLAVES; s++) begin
      s_req[s]         = m_req;
      s_req[s].awvalid = aw_open && (wsel == SW'(s));
      s_req[s].wvalid  = w_open  && (wsel == SW'(s));
      s_req[s].bready  = m_req.bready && (wsel == SW'(s));
      s_req[s].arvalid = m_req.arvalid && !r_busy_q && (rsel == SW'(s));
      s_req[s].rready  = m_req.rready && r_busy_q && (rsel == SW'(s));
    end
  end

  always_comb begin
    axil_rsp_t sel_w, sel_r;
    // Responses of the selected slave, or of the DECERR responder.
    sel_w = '0;
    sel_r = '0;
    if (wsel == ERR) begin
      sel_w.awready = aw_open && w_open;
      sel_w.wready  = aw_open && w_open;
      sel_w.bvalid  = err_b_q;
      sel_w.bresp   = RESP_DECERR;
    end else begin
      sel_w = s_rsp[IW'(wsel)];
    end
    if (rsel == ERR) begin
      sel_r.arready = m_req.arvalid && !r_busy_q;
      sel_r.rvalid  = err_r_q;
      sel_r.rresp   = RESP_DECERR;
    end else begin
      sel_r = s_rsp[IW'(rsel)];
    end
    m_rsp         = '0;
    m_rsp.awready = aw_open && sel_w.awready;
    m_rsp.wready  = w_open && sel_w.wready;
    m_rsp.bvalid  = sel_w.bvalid;
    m_rsp.bresp   = sel_w.bresp;
    m_rsp.arready = m_req.arvalid && !r_busy_q && sel_r.arready;
    m_rsp.rvalid  = r_busy_q && sel_r.rvalid;
    m_rsp.rdata   = sel_r.rdata;
    m_rsp.rresp   = sel_r.rresp;
  end

  assign aw_fire = m_req.awvalid && m_rsp.awready;
  assign w_fire  = m_req.wvalid  && m_rsp.wready;
  assign b_fire  = m_rsp.bvalid  && m_req.bready;
  assign ar_fire = m_req.arvalid && m_rsp.arready;
  assign r_fire  = m_rsp.rvalid  && m_req.rready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      wsel_q    <= '0;
      r_busy_q  <= 1'b0;
      rsel_q    <= '0;
      err_b_q   <= 1'b0;
      err_r_q   <= 1'b0;
    end else begin
      if (b_fire) begin
        aw_done_q <= 1'b0;
        w_done_q  <= 1'b0;
      end else begin
        if (aw_fire) begin
          aw_done_q <= 1'b1;
          wsel_q    <= wsel;
        end
        if (w_fire) w_done_q <= 1'b1;
      end
      if (r_fire) r_busy_q <= 1'b0;
      else if (ar_fire) begin
        r_busy_q <= 1'b1;
        rsel_q   <= rsel;
      end
      if (aw_fire && wsel == ERR) err_b_q <= 1'b1;
      else if (b_fire)            err_b_q <= 1'b0;
      if (ar_fire && rsel == ERR) err_r_q <= 1'b1;
      else if (r_fire)            err_r_q <= 1'b0;
    end
  end

endmodule
