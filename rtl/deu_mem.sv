// deu_mem: dedicated local memory of one DEU, an AXI4-Lite slave.
//
// Each DEU owns a private block RAM holding its task's code and data; no other
// DEU and no general-purpose core can reach it, so no access from outside can
// corrupt or delay it and no memory protection unit is needed. The RAM is a
// word array with byte-write strobes and a synchronous read port, which maps
// onto FPGA block RAM.
// Timing: a write is accepted when AW and W are both valid (and no response is
// pending) and is answered on B one cycle later; a read is accepted when AR is
// valid and its data appear on R one cycle later. The latency never depends on
// anything outside the DEU. Addresses wrap modulo SIZE_BYTES.
// The private per-DEU memory follows the architecture; the default size of
// 64 KiB (five DEUs then take 320 KiB of the 560 KiB of on-chip memory) and
// the fixed timing are this design's choice.
module deu_mem
  import r2d2_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned IW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic          we, re;
  logic [IW-1:0] widx, ridx;
  logic          bvalid_q, rvalid_q;
  logic [31:0]   rdata_q;

  assign we   = req.awvalid && req.wvalid && !bvalid_q;
  assign re   = req.arvalid && !rvalid_q;
  assign widx = req.awaddr[IW+1:2];
  assign ridx = req.araddr[IW+1:2];

  // Memory array: no reset, as block RAM has none.
  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < 4; b++)
        if (req.wstrb[b]) mem[widx][8*b +: 8] <= req.wdata[8*b +: 8];
    end
    if (re) rdata_q <= mem[ridx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
    end else begin
      if (we)               bvalid_q <= 1'b1;
      else if (req.bready)  bvalid_q <= 1'b0;
      if (re)               rvalid_q <= 1'b1;
      else if (req.rready)  rvalid_q <= 1'b0;
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = we;
    rsp.wready  = we;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = re;
    rsp.rvalid  = rvalid_q;
    rsp.rresp   = RESP_OKAY;
    rsp.rdata   = rdata_q;
  end

endmodule
