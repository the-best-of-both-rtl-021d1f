// axil_master_bfm: AXI4-Lite master for testbenches.
//
// write() and read() run one transaction each and return the response code
// and the number of clock cycles from issue to the response handshake. Inputs
// are driven one time unit after a rising edge and responses are sampled at
// the falling edge, so there are no races with the design. The channels are
// driven independently, as AXI allows. Assertions check that a slave keeps a
// response valid until it is taken.
module axil_master_bfm
  import r2d2_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  initial req = '0;

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) rsp.bvalid && !req.bready |=> rsp.bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) rsp.rvalid && !req.rready |=> rsp.rvalid && $stable(rsp.rdata));

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       output logic [1:0] resp, output int cycles,
                       input logic [3:0] strb = 4'hF);
    bit aw_done = 0, w_done = 0, b_done = 0;
    bit aw_hs, w_hs, b_hs;
    @(posedge clk); #1;
    req.awaddr = addr; req.awvalid = 1'b1;
    req.wdata  = data; req.wstrb   = strb; req.wvalid = 1'b1;
    req.bready = 1'b1;
    cycles = 0;
    while (!b_done) begin
      @(negedge clk);
      aw_hs = req.awvalid && rsp.awready;
      w_hs  = req.wvalid  && rsp.wready;
      b_hs  = req.bready  && rsp.bvalid;
      if (b_hs) resp = rsp.bresp;
      @(posedge clk); #1;
      cycles++;
      if (aw_hs) begin req.awvalid = 1'b0; aw_done = 1; end
      if (w_hs)  begin req.wvalid  = 1'b0; w_done  = 1; end
      if (b_hs)  begin req.bready  = 1'b0; b_done  = 1; end
      if (cycles > 100000) begin
        $display("BFM: write to %h never completed", addr);
        resp = 2'bxx; b_done = 1;
      end
    end
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp, output int cycles);
    bit r_done = 0;
    bit ar_hs, r_hs;
    @(posedge clk); #1;
    req.araddr = addr; req.arvalid = 1'b1; req.rready = 1'b1;
    cycles = 0;
    while (!r_done) begin
      @(negedge clk);
      ar_hs = req.arvalid && rsp.arready;
      r_hs  = req.rready  && rsp.rvalid;
      if (r_hs) begin data = rsp.rdata; resp = rsp.rresp; end
      @(posedge clk); #1;
      cycles++;
      if (ar_hs) req.arvalid = 1'b0;
      if (r_hs)  begin req.rready = 1'b0; r_done = 1; end
      if (cycles > 100000) begin
        $display("BFM: read of %h never completed", addr);
        resp = 2'b11; r_done = 1;
      end
    end
  endtask

endmodule
