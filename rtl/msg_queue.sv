// msg_queue: hardware message queue between two tasks, with two AXI4-Lite
// slave ports.
//
// A message queue is a FIFO with one slave port on the bus of the sending DEU
// (write side) and one on the bus of the receiving DEU (read side). Each side
// has exclusive access to its own port, so the two tasks never contend for a
// bus; they share only the FIFO storage. Neither side ever blocks: a write to
// a full queue and a read from an empty one answer SLVERR at once, so the
// access time is fixed and the task decides what to do (software checks
// STATUS first).
// Write port (byte offsets): 0x0 DATA push (W); 0x4 STATUS (R):
//   [0] full, [31:16] free entries.
// Read port:                 0x0 DATA pop  (R); 0x4 STATUS (R):
//   [0] empty, [31:16] used entries.
// Pushing and popping in the same cycle is allowed. A pushed word can be popped
// from the cycle after the push is accepted. Storage depends on the size, as
// the architecture maps small queues to registers and large ones to RAM: up to
// REG_MAX_DEPTH words it is a register file read asynchronously; above that it
// is a RAM with a synchronous read port behind an output register that always
// holds the oldest message, so the timing seen by the tasks is the same.
// The FIFO with two AXI slave ports follows the architecture; the
// non-blocking error behaviour, register layout, default DEPTH of 16 words and
// the threshold REG_MAX_DEPTH of 16 words are this design's choice.
module msg_queue
  import r2d2_pkg::*;
#(
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned REG_MAX_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t wr_req,
  output axil_rsp_t wr_rsp,
  input  axil_req_t rd_req,
  output axil_rsp_t rd_rsp,
  output logic      full,
  output logic      empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic        w_we, w_re, w_werr, w_rerr;
  logic [11:0] w_waddr, w_raddr;
  logic [31:0] w_wdata, w_rdata;
  logic [3:0]  w_wstrb;
  logic        r_we, r_re, r_werr, r_rerr;
  logic [11:0] r_waddr, r_raddr;
  logic [31:0] r_wdata, r_rdata;
  logic [3:0]  r_wstrb;

  axil_reg_port #(.AW(12)) u_wport (
    .clk, .rst_n, .req(wr_req), .rsp(wr_rsp),
    .reg_we(w_we), .reg_waddr(w_waddr), .reg_wdata(w_wdata), .reg_wstrb(w_wstrb), .reg_werr(w_werr),
    .reg_re(w_re), .reg_raddr(w_raddr), .reg_rdata(w_rdata), .reg_rerr(w_rerr)
  );
  axil_reg_port #(.AW(12)) u_rport (
    .clk, .rst_n, .req(rd_req), .rsp(rd_rsp),
    .reg_we(r_we), .reg_waddr(r_waddr), .reg_wdata(r_wdata), .reg_wstrb(r_wstrb), .reg_werr(r_werr),
    .reg_re(r_re), .reg_raddr(r_raddr), .reg_rdata(r_rdata), .reg_rerr(r_rerr)
  );

  logic [CW-1:0] cnt_q;
  logic [31:0]   head;         // oldest message, valid when !empty
  logic          push, pop;

  assign full  = (cnt_q == CW'(DEPTH));
  assign empty = (cnt_q == '0);
  assign push  = w_we && !w_werr;
  assign pop   = r_re && !r_rerr && r_raddr == 12'h000;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + PW'(1);
  endfunction

  always_comb begin
    w_werr  = (w_waddr != 12'h000) || (w_wstrb != 4'hF) || full;
    w_rerr  = (w_raddr != 12'h004);
    w_rdata = {16'(CW'(DEPTH) - cnt_q), 15'd0, full};
    r_werr  = 1'b1;                       // nothing to write on the read side
    r_rerr  = !(r_raddr == 12'h004 || (r_raddr == 12'h000 && !empty));
    r_rdata = (r_raddr == 12'h000) ? head : {16'(cnt_q), 15'd0, empty};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q + CW'(push) - CW'(pop);
  end

  if (DEPTH <= REG_MAX_DEPTH) begin : g_regs
    // Small queue: register file, read asynchronously at the read pointer.
    logic [31:0]   buf_q [DEPTH];
    logic [PW-1:0] wp_q, rp_q;

    assign head = buf_q[rp_q];

    always_ff @(posedge clk) begin
      if (push) buf_q[wp_q] <= w_wdata;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp_q <= '0;
        rp_q <= '0;
      end else begin
        if (push) wp_q <= inc(wp_q);
        if (pop)  rp_q <= inc(rp_q);
      end
    end
  end else begin : g_ram
    // Large queue: block RAM with a synchronous read port. The oldest message
    // is kept in an output register (head_q), so the reader sees it without
    // waiting for the RAM. A push into a queue whose RAM part is empty goes
    // straight into head_q when that register is free or being popped;
    // otherwise it is written to the RAM, and head_q is refilled from the RAM
    // whenever it is free or being popped.
    logic [31:0]   ram [DEPTH];
    logic [PW-1:0] wp_q, rp_q;
    logic [CW-1:0] ram_cnt_q;
    logic [31:0]   head_q;
    logic          take, load, bypass;

    assign take   = empty || pop;                    // head register free next cycle
    assign load   = take && ram_cnt_q != '0;
    assign bypass = take && ram_cnt_q == '0 && push;
    assign head   = head_q;

    always_ff @(posedge clk) begin
      if (push && !bypass) ram[wp_q] <= w_wdata;
      if (load)            head_q <= ram[rp_q];
      else if (bypass)     head_q <= w_wdata;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp_q      <= '0;
        rp_q      <= '0;
        ram_cnt_q <= '0;
      end else begin
        if (push && !bypass) wp_q <= inc(wp_q);
        if (load)            rp_q <= inc(rp_q);
        ram_cnt_q <= ram_cnt_q + CW'(push && !bypass) - CW'(load);
      end
    end
  end

endmodule
