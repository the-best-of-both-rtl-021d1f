// tb_hw_semaphore: checks the semaphore with three ports. A lone request is
// granted at once; while the lock is held other requests wait; on release the
// waiting port with the highest static priority (lowest number) wins; the
// holder is never pre-empted by a higher-priority request.
module tb_hw_semaphore;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  axil_req_t req [3]; axil_rsp_t rsp [3];
  logic [2:0] grant;
  hw_semaphore #(.NUM_PORTS(3)) dut (.clk, .rst_n, .req, .rsp, .grant);
  axil_master_bfm b0 (.clk, .rst_n, .req(req[0]), .rsp(rsp[0]));
  axil_master_bfm b1 (.clk, .rst_n, .req(req[1]), .rsp(rsp[1]));
  axil_master_bfm b2 (.clk, .rst_n, .req(req[2]), .rsp(rsp[2]));

  always @(posedge clk) if (rst_n) check($countones(grant) <= 1, "at most one holder");

  task automatic status(input int p, output logic [31:0] st);
    logic [1:0] resp; int cyc;
    case (p)
      0: b0.read(32'h4, st, resp, cyc);
      1: b1.read(32'h4, st, resp, cyc);
      default: b2.read(32'h4, st, resp, cyc);
    endcase
  endtask
  task automatic set_req(input int p, input logic r);
    logic [1:0] resp; int cyc;
    case (p)
      0: b0.write(32'h0, {31'd0, r}, resp, cyc);
      1: b1.write(32'h0, {31'd0, r}, resp, cyc);
      default: b2.write(32'h0, {31'd0, r}, resp, cyc);
    endcase
  endtask

  initial begin
    logic [31:0] st;
    repeat (3) @(posedge clk); rst_n = 1;
    status(1, st); check(st[1:0] == 2'b00, "free after reset");
    set_req(2, 1);
    status(2, st); check(st[0] == 1 && st[15:8] == 2, "lone request granted");
    set_req(0, 1);
    set_req(1, 1);
    status(0, st); check(st[1:0] == 2'b10, "port 0 waits, lock held");
    status(1, st); check(st[1:0] == 2'b10, "port 1 waits, lock held");
    status(2, st); check(st[0] == 1, "holder not pre-empted");
    set_req(2, 0);
    repeat (2) @(posedge clk);
    status(0, st); check(st[0] == 1, "highest priority waiting port wins");
    status(1, st); check(st[0] == 0, "lower priority still waits");
    set_req(0, 0);
    repeat (2) @(posedge clk);
    status(1, st); check(st[0] == 1 && st[15:8] == 1, "port 1 gets it next");
    set_req(1, 0);
    repeat (2) @(posedge clk);
    check(grant == 0, "free after last release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
