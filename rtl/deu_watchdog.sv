// deu_watchdog: fail-safe watchdog of one DEU, an AXI4-Lite slave.
//
// Once enabled, a counter counts down from TIMEOUT every cycle. The task must
// kick the watchdog (write KICK_KEY to KICK) before the counter reaches zero;
// a kick reloads TIMEOUT. If the counter reaches zero the watchdog expires:
// 'expired' rises and stays high until reset or until software clears it, and
// 'reset_req' pulses for one cycle, meant to restart the DEU's core. The
// counter then reloads, so a task that stays hung expires again.
// Registers (byte offsets):
//   0x00 CTRL    [0] enable                                   (R/W)
//   0x04 TIMEOUT reload value in cycles, at least 1           (R/W)
//   0x08 KICK    write KICK_KEY to reload; other values ignored(W)
//   0x0C COUNT   cycles left                                  (R)
//   0x10 STATUS  [0] expired; write 1 to clear                (R/W1C)
// Only the existence of a watchdog is the architecture's; its behaviour,
// register layout, key and the default timeout (two 1 ms task periods at an
// assumed 100 MHz) are this design's choice.
module deu_watchdog
  import r2d2_pkg::*;
#(
  parameter int unsigned RESET_TIMEOUT = 200_000,
  parameter logic [31:0] KICK_KEY      = 32'h5A5A_0F0F
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output logic      expired,
  output logic      reset_req
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

  logic        en_q, exp_q, fire;
  logic [31:0] timeout_q, count_q;

  assign fire      = en_q && (count_q == 32'd1);
  assign expired   = exp_q;
  assign reset_req = fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q      <= 1'b0;
      exp_q     <= 1'b0;
      timeout_q <= RESET_TIMEOUT;
      count_q   <= RESET_TIMEOUT;
    end else begin
      if (en_q) count_q <= fire ? timeout_q : count_q - 32'd1;
      if (fire) exp_q <= 1'b1;
      if (we && !werr) begin
        unique case (waddr)
          12'h000: begin en_q <= wdata[0]; count_q <= timeout_q; end
          12'h004: begin timeout_q <= wdata; count_q <= wdata; end
          12'h008: if (wdata == KICK_KEY) count_q <= timeout_q;
          12'h010: if (wdata[0]) exp_q <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    werr = !(waddr == 12'h000 || waddr == 12'h004 || waddr == 12'h008 || waddr == 12'h010)
           || wstrb != 4'hF || (waddr == 12'h004 && wdata == '0);
    rerr  = 1'b0;
    rdata = '0;
    unique case (raddr)
      12'h000: rdata = {31'd0, en_q};
      12'h004: rdata = timeout_q;
      12'h00C: rdata = count_q;
      12'h010: rdata = {31'd0, exp_q};
      default: rerr = 1'b1;
    endcase
  end

endmodule
