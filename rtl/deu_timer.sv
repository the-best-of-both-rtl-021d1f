// deu_timer: periodic timer of one DEU, an AXI4-Lite slave.
//
// Releases the DEU's task once per period. While enabled, a counter runs from
// 0 to PERIOD-1 and wraps; at each wrap the pending flag is set and, if the
// interrupt is enabled, irq is raised until software clears the flag. A task
// that polls instead of taking the interrupt reads STATUS. The period is
// exact: wraps are PERIOD clock cycles apart.
// Registers (byte offsets):
//   0x00 CTRL    [0] enable, [1] interrupt enable            (R/W)
//   0x04 PERIOD  period in cycles, at least 2                (R/W)
//   0x08 COUNT   current counter value                        (R)
//   0x0C STATUS  [0] period elapsed; write 1 to clear         (R/W1C)
// Writing PERIOD or CTRL restarts the count at 0. Other offsets answer SLVERR.
// The timer for periodic execution is part of every DEU in the architecture;
// the register layout is this design's choice. The reset period, 100000
// cycles, is the 1 ms task period at an assumed 100 MHz clock.
module deu_timer
  import r2d2_pkg::*;
#(
  parameter int unsigned RESET_PERIOD = 100_000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output logic      irq,
  output logic      tick       // one-cycle pulse at each period boundary
);
  logic        we, re, werr, rerr;
  logic [11:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;

  axil_reg_port #(.AW(12)) u_port (
    .clk, .rst_n, .req, .rsp,
    .reg_we(we), .reg_waddr(waddr), .reg_wdata(wdata), .reg_wstrb(wstrb), .reg_werr(werr),
    .reg_re(re), .reg_raddr(raddr), .reg_rdata(rdata), .reg_rerr(rerr)
  );

  logic        en_q, ie_q, pend_q;
  logic [31:0] period_q, count_q;

  assign tick = en_q && (count_q >= period_q - 32'd1);
  assign irq  = pend_q && ie_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q     <= 1'b0;
      ie_q     <= 1'b0;
      pend_q   <= 1'b0;
      period_q <= RESET_PERIOD;
      count_q  <= '0;
    end else begin
      if (en_q) count_q <= tick ? '0 : count_q + 32'd1;
      if (tick) pend_q <= 1'b1;
      if (we && !werr) begin
        unique case (waddr)
          12'h000: begin en_q <= wdata[0]; ie_q <= wdata[1]; count_q <= '0; end
          12'h004: begin period_q <= wdata; count_q <= '0; end
          12'h00C: if (wdata[0]) pend_q <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    werr = !(waddr == 12'h000 || waddr == 12'h004 || waddr == 12'h00C) || wstrb != 4'hF
           || (waddr == 12'h004 && wdata < 32'd2);
    rerr  = 1'b0;
    rdata = '0;
    unique case (raddr)
      12'h000: rdata = {30'd0, ie_q, en_q};
      12'h004: rdata = period_q;
      12'h008: rdata = count_q;
      12'h00C: rdata = {31'd0, pend_q};
      default: rerr = 1'b1;
    endcase
  end

endmodule
