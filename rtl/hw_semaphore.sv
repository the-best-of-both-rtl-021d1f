// hw_semaphore: hardware semaphore guarding one shared peripheral, with one
// AXI4-Lite slave port per DEU that uses it.
//
// A task asks for the lock by setting the request flag in its port's CTRL
// register and then polls STATUS until 'granted' is set; no scheduler is
// involved, since each DEU runs a single task. It releases the lock by
// clearing the flag. Whenever the semaphore is free and requests are pending,
// it grants the port with the highest static priority, port 0 being the
// highest; a holder is never pre-empted. The grant takes effect in the cycle
// after the request is written, so a poll issued after the request's write
// response already sees it when the lock was free.
// Per-port registers (byte offsets):
//   0x0 CTRL   [0] request (R/W)
//   0x4 STATUS [0] granted to this port, [1] held by some port,
//              [15:8] number of the holding port  (R)
// One semaphore per shared resource, a control flag, a polled status register
// and static port priorities follow the architecture; the register layout and
// the grant timing are this design's choice.
module hw_semaphore
  import r2d2_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axil_req_t            req [NUM_PORTS],
  output axil_rsp_t            rsp [NUM_PORTS],
  output logic [NUM_PORTS-1:0] grant
);
  localparam int unsigned IW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic [NUM_PORTS-1:0] we, re, werr, rerr;
  logic [11:0]          waddr [NUM_PORTS];
  logic [11:0]          raddr [NUM_PORTS];
  logic [31:0]          wdata [NUM_PORTS];
  logic [31:0]          rdata [NUM_PORTS];
  logic [3:0]           wstrb [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    axil_reg_port #(.AW(12)) u_port (
      .clk, .rst_n, .req(req[p]), .rsp(rsp[p]),
      .reg_we(we[p]), .reg_waddr(waddr[p]), .reg_wdata(wdata[p]), .reg_wstrb(wstrb[p]),
      .reg_werr(werr[p]),
      .reg_re(re[p]), .reg_raddr(raddr[p]), .reg_rdata(rdata[p]), .reg_rerr(rerr[p])
    );
  end

  logic [NUM_PORTS-1:0] req_q;
  logic                 held_q;
  logic [IW-1:0]        owner_q;

  assign grant = held_q ? (NUM_PORTS'(1) << owner_q) : '0;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      werr[p]  = (waddr[p] != 12'h000) || !wstrb[p][0];
      rerr[p]  = !(raddr[p] == 12'h000 || raddr[p] == 12'h004);
      rdata[p] = (raddr[p] == 12'h000)
               ? {31'd0, req_q[p]}
               : {16'd0, 8'(owner_q), 6'd0, held_q, grant[p]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q   <= '0;
      held_q  <= 1'b0;
      owner_q <= '0;
    end else begin
      for (int p = 0; p < NUM_PORTS; p++)
        if (we[p] && !werr[p]) req_q[p] <= wdata[p][0];
      // Release when the holder drops its request; grant by static priority.
      if (held_q && !req_q[owner_q]) begin
        held_q <= 1'b0;
      end else if (!held_q && |req_q) begin
        held_q <= 1'b1;
        for (int p = NUM_PORTS - 1; p >= 0; p--)
          if (req_q[p]) owner_q <= IW'(p);
      end
    end
  end

endmodule
