// msg_queue_tester: test procedure for one msg_queue of a given DEPTH, used
// by tb_msg_queue for both storage styles. It fills the queue to overflow,
// checks STATUS on both sides, pops in order, runs pushes and pops issued in
// the same cycle across the pointer wrap, and finally runs random mixes of
// pushes and pops against a queue model. checks/failures/done report back.
module msg_queue_tester
  import r2d2_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  axil_req_t wr_req, rd_req; axil_rsp_t wr_rsp, rd_rsp;
  logic full, empty;
  msg_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_req, .wr_rsp, .rd_req, .rd_rsp, .full, .empty);
  axil_master_bfm wbfm (.clk, .rst_n, .req(wr_req), .rsp(wr_rsp));
  axil_master_bfm rbfm (.clk, .rst_n, .req(rd_req), .rsp(rd_rsp));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL (DEPTH %0d): %s", DEPTH, msg); end
  endtask

  initial begin
    logic [1:0] resp, resp2; int cyc, cyc2; logic [31:0] d, st;
    logic [31:0] q[$];
    checks = 0; failures = 0; done = 0;
    wait (rst_n);
    @(posedge clk);
    check(empty && !full, "empty after reset");
    rbfm.read(32'h0, d, resp, cyc);
    check(resp == RESP_SLVERR && cyc == 2, "pop from empty rejected at once");
    for (int i = 0; i < DEPTH; i++) begin
      d = $urandom; q.push_back(d);
      wbfm.write(32'h0, d, resp, cyc);
      check(resp == RESP_OKAY && cyc == 2, "push");
      wbfm.read(32'h4, st, resp, cyc);
      check(st == {16'(DEPTH - 1 - i), 15'd0, (i == DEPTH - 1)}, $sformatf("write status %h", st));
    end
    check(full, "full after DEPTH pushes");
    wbfm.write(32'h0, 32'hBAD, resp, cyc);
    check(resp == RESP_SLVERR && cyc == 2, "push to full rejected at once");
    rbfm.read(32'h4, st, resp, cyc);
    check(st == {16'(DEPTH), 16'd0}, $sformatf("read status %h", st));
    for (int i = 0; i < 2; i++) begin
      rbfm.read(32'h0, d, resp, cyc);
      check(resp == RESP_OKAY && cyc == 2 && d == q.pop_front(), "pop in order");
    end
    // simultaneous push and pop, wrapping the pointers
    for (int i = 0; i < DEPTH + 2; i++) begin
      logic [31:0] nd; nd = $urandom; q.push_back(nd);
      fork
        wbfm.write(32'h0, nd, resp, cyc);
        rbfm.read(32'h0, d, resp2, cyc2);
      join
      check(resp == RESP_OKAY && resp2 == RESP_OKAY && d == q.pop_front(), "concurrent push/pop");
    end
    while (q.size() > 0) begin
      rbfm.read(32'h0, d, resp, cyc);
      check(resp == RESP_OKAY && d == q.pop_front(), "drain in order");
    end
    check(empty, "empty after drain");
    // push then pop at once: the word is visible the cycle after the push
    fork
      wbfm.write(32'h0, 32'h0BAD_CAFE, resp, cyc);
      begin @(posedge clk); rbfm.read(32'h0, d, resp2, cyc2); end
    join
    check(resp2 == RESP_OKAY && d == 32'h0BAD_CAFE, "word readable right after push");
    // random traffic against a model
    for (int i = 0; i < 300; i++) begin
      bit do_w, do_r; logic [31:0] nd;
      do_w = ($urandom % 100) < 55; do_r = ($urandom % 100) < 50; nd = $urandom;
      fork
        if (do_w) wbfm.write(32'h0, nd, resp, cyc);
        if (do_r) rbfm.read(32'h0, d, resp2, cyc2);
      join
      // Both sides are accepted in the same cycle and see the queue as it
      // was before that cycle.
      begin
        int pre; pre = q.size();
        if (do_r) begin
          if (pre > 0) check(resp2 == RESP_OKAY && d == q.pop_front(), "random pop");
          else         check(resp2 == RESP_SLVERR, "random pop from empty");
        end
        if (do_w) begin
          if (pre < DEPTH) begin check(resp == RESP_OKAY, "random push"); q.push_back(nd); end
          else check(resp == RESP_SLVERR, "random push to full");
        end
      end
    end
    rbfm.write(32'h0, 32'h1, resp, cyc);
    check(resp == RESP_SLVERR, "write on read side rejected");
    done = 1;
  end
endmodule
