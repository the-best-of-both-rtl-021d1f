// tb_deu_watchdog: checks the watchdog. Regular kicks with the key keep it
// from expiring, a wrong key does not reload it, and without kicks it expires
// exactly TIMEOUT cycles after the last reload, pulsing reset_req once and
// holding 'expired' until it is cleared.
module tb_deu_watchdog;
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
  logic expired, reset_req;
  localparam logic [31:0] KEY = 32'h5A5A_0F0F;
  deu_watchdog dut (.clk, .rst_n, .req, .rsp, .expired, .reset_req);
  axil_master_bfm bfm (.clk, .rst_n, .req, .rsp);

  longint cyc_now = 0, fire_at = -1; int n_fire = 0;
  always @(posedge clk) begin
    cyc_now++;
    if (reset_req) begin n_fire++; fire_at = cyc_now; end
  end

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d; longint t0;
    repeat (3) @(posedge clk); rst_n = 1;
    bfm.read(32'h4, d, resp, cyc);
    check(d == 200_000, "reset timeout");
    bfm.write(32'h4, 32'd50, resp, cyc);
    bfm.write(32'h0, 32'd1, resp, cyc);
    for (int i = 0; i < 10; i++) begin
      repeat (30) @(posedge clk);
      bfm.write(32'h8, KEY, resp, cyc);
    end
    check(n_fire == 0 && !expired, "kicked watchdog stays quiet");
    repeat (30) @(posedge clk);
    bfm.write(32'h8, 32'h1234, resp, cyc);       // wrong key: must not reload
    // expiry is due 50 cycles after the last good kick, about 57 from here
    // if the wrong key had reloaded the counter
    repeat (25) @(posedge clk);
    check(n_fire == 1 && expired, "wrong key does not reload");
    bfm.read(32'h10, d, resp, cyc);
    check(d == 1, "status shows expiry");
    bfm.write(32'h10, 32'd1, resp, cyc);
    check(!expired, "expiry cleared");
    // exact timeout: kick, then measure the time to the reset pulse
    n_fire = 0;
    bfm.write(32'h8, KEY, resp, cyc);
    t0 = cyc_now;                                // B handshake edge; reload was one edge before
    repeat (60) @(posedge clk);
    check(n_fire == 1 && fire_at - (t0 - 1) == 50,
          $sformatf("expired %0d cycles after kick", fire_at - (t0 - 1)));
    bfm.write(32'h0, 32'd0, resp, cyc);
    n_fire = 0;
    repeat (200) @(posedge clk);
    check(n_fire == 0, "disabled watchdog is quiet");
    bfm.write(32'h4, 32'd0, resp, cyc);
    check(resp == RESP_SLVERR, "timeout 0 rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
