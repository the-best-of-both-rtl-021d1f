// axil_reg_port: AXI4-Lite slave front end for a register block.
//
// Turns the five AXI4-Lite channels into a plain register port. A write is
// accepted when AW and W are both valid and no write response is pending; in
// that same cycle reg_we pulses with the address, data and strobes, and the
// register block answers with reg_werr (combinational), which becomes BRESP
// one cycle later. A read is accepted when AR is valid and no read response is
// pending; reg_re pulses with the address, the block returns reg_rdata and
// reg_rerr combinationally, and both are registered into the R channel.
// So every access costs exactly one cycle from acceptance to response, which
// keeps the bus timing of every peripheral fixed. Errors answer SLVERR.
// The AXI interface follows the architecture; the fixed one-cycle timing and
// accept-AW-with-W rule are this design's choice.
module axil_reg_port
  import r2d2_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  axil_req_t     req,
  output axil_rsp_t     rsp,
  output logic          reg_we,
  output logic [AW-1:0] reg_waddr,
  output logic [31:0]   reg_wdata,
  output logic [3:0]    reg_wstrb,
  input  logic          reg_werr,
  output logic          reg_re,
  output logic [AW-1:0] reg_raddr,
  input  logic [31:0]   reg_rdata,
  input  logic          reg_rerr
);

  logic        bvalid_q, rvalid_q;
  logic [1:0]  bresp_q, rresp_q;
  logic [31:0] rdata_q;

  assign reg_we    = req.awvalid && req.wvalid && !bvalid_q;
  assign reg_waddr = req.awaddr[AW-1:0];
  assign reg_wdata = req.wdata;
  assign reg_wstrb = req.wstrb;
  assign reg_re    = req.arvalid && !rvalid_q;
  assign reg_raddr = req.araddr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      bresp_q  <= RESP_OKAY;
      rvalid_q <= 1'b0;
      rresp_q  <= RESP_OKAY;
      rdata_q  <= '0;
    end else begin
      if (reg_we) begin
        bvalid_q <= 1'b1;
        bresp_q  <= reg_werr ? RESP_SLVERR : RESP_OKAY;
      end else if (req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (reg_re) begin
        rvalid_q <= 1'b1;
        rresp_q  <= reg_rerr ? RESP_SLVERR : RESP_OKAY;
        rdata_q  <= reg_rerr ? '0 : reg_rdata;
      end else if (req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = reg_we;
    rsp.wready  = reg_we;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = bresp_q;
    rsp.arready = reg_re;
    rsp.rvalid  = rvalid_q;
    rsp.rresp   = rresp_q;
    rsp.rdata   = rdata_q;
  end

endmodule
