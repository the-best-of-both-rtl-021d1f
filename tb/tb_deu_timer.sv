// tb_deu_timer: checks the periodic timer. The reset period must be the
// 100000-cycle (1 ms at 100 MHz) default; with a short period the ticks must
// be exactly PERIOD cycles apart, the pending flag and interrupt must follow
// the enable bits and clear on write-1, and bad accesses must answer SLVERR.
module tb_deu_timer;
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
  axil_req_t req; axil_rsp_t rsp;
  logic irq, tick;
  deu_timer dut (.clk, .rst_n, .req, .rsp, .irq, .tick);
  axil_master_bfm bfm (.clk, .rst_n, .req, .rsp);

  longint cyc_now = 0, last_tick = -1;
  int n_ticks = 0, bad_gaps = 0, gap_target = 0;
  always @(posedge clk) begin
    cyc_now++;
    if (tick) begin
      if (last_tick >= 0 && gap_target != 0 && cyc_now - last_tick != gap_target) bad_gaps++;
      last_tick = cyc_now; n_ticks++;
    end
  end

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d;
    repeat (3) @(posedge clk); rst_n = 1;
    bfm.read(32'h4, d, resp, cyc);
    check(d == 100_000 && resp == RESP_OKAY && cyc == 2, $sformatf("reset period %0d", d));
    bfm.read(32'h0, d, resp, cyc);
    check(d == 0, "timer disabled after reset");
    bfm.write(32'h4, 32'd1, resp, cyc);
    check(resp == RESP_SLVERR, "period 1 rejected");
    bfm.write(32'h20, 32'd1, resp, cyc);
    check(resp == RESP_SLVERR, "unmapped write rejected");
    bfm.read(32'h20, d, resp, cyc);
    check(resp == RESP_SLVERR, "unmapped read rejected");
    bfm.write(32'h4, 32'd37, resp, cyc);
    check(resp == RESP_OKAY, "period write");
    gap_target = 37;
    bfm.write(32'h0, 32'd1, resp, cyc);          // enable, no interrupt
    repeat (40) @(posedge clk);
    check(!irq, "no irq when interrupt disabled");
    bfm.read(32'hC, d, resp, cyc);
    check(d == 1, "pending after one period");
    bfm.write(32'hC, 32'd1, resp, cyc);
    bfm.read(32'hC, d, resp, cyc);
    check(d == 0, "pending cleared");
    bfm.write(32'h0, 32'd3, resp, cyc);          // enable with interrupt (restarts the count)
    last_tick = -1;
    n_ticks = 0;
    repeat (37 * 10 + 5) @(posedge clk);
    check(n_ticks == 10, $sformatf("10 ticks in 10 periods, got %0d", n_ticks));
    check(bad_gaps == 0, $sformatf("tick spacing wrong %0d times", bad_gaps));
    check(irq, "irq raised");
    bfm.write(32'hC, 32'd1, resp, cyc);
    @(negedge clk);
    check(!irq, "irq cleared");
    bfm.read(32'h8, d, resp, cyc);
    check(d < 37, "count within period");
    bfm.write(32'h0, 32'd0, resp, cyc);
    n_ticks = 0;
    repeat (100) @(posedge clk);
    check(n_ticks == 0, "disabled timer does not tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
