// tb_deu: one DEU at its default sizes, with two external slots holding small
// memories. The test plays the core: it reaches every slave through the
// DEU's address map, checks that local slaves answer in exactly two cycles,
// that the timer ticks with the programmed period, that the watchdog expires
// when not kicked, that owned shared variables leave the DEU and wired ones
// come in, that external slots get their own accesses, and that holes in the
// map answer DECERR.
module tb_deu;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  axil_req_t core_req; axil_rsp_t core_rsp;
  axil_req_t ext_req [2]; axil_rsp_t ext_rsp [2];
  logic [31:0] var_q [16], var_in [16];
  logic [15:0] var_wr;
  logic timer_irq, timer_tick, wdt_expired, wdt_reset_req;

  deu #(.NUM_EXT(2), .OWN_MASK(16'h0003), .READ_MASK(16'h0030)) dut (
    .clk, .rst_n, .core_req, .core_rsp, .ext_req, .ext_rsp, .var_q, .var_in, .var_wr,
    .timer_irq, .timer_tick, .wdt_expired, .wdt_reset_req);
  for (genvar k = 0; k < 2; k++) begin : g_ext
    deu_mem #(.SIZE_BYTES(4096)) m (.clk, .rst_n, .req(ext_req[k]), .rsp(ext_rsp[k]));
  end
  axil_master_bfm bfm (.clk, .rst_n, .req(core_req), .rsp(core_rsp));

  int n_tick = 0, n_wdt = 0;
  always @(posedge clk) if (rst_n) begin n_tick += timer_tick; n_wdt += wdt_reset_req; end

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d;
    for (int v = 0; v < 16; v++) var_in[v] = 32'hAB00 + v;
    repeat (3) @(posedge clk); rst_n = 1;
    // memory, full range
    bfm.write(MEM_BASE + 32'hFFFC, 32'h1111_2222, resp, cyc);
    check(resp == RESP_OKAY && cyc == 2, "mem write top word");
    bfm.write(MEM_BASE + 32'h0, 32'h3333_4444, resp, cyc);
    bfm.read(MEM_BASE + 32'hFFFC, d, resp, cyc);
    check(d == 32'h1111_2222 && cyc == 2, "mem read top word");
    bfm.read(MEM_BASE, d, resp, cyc);
    check(d == 32'h3333_4444, "mem read word 0");
    bfm.read(32'h0001_0000, d, resp, cyc);
    check(resp == RESP_DECERR, "address just past memory DECERR");
    // timer
    bfm.read(TIMER_BASE + 4, d, resp, cyc);
    check(d == 100_000 && cyc == 2, "timer default period 100000");
    bfm.write(TIMER_BASE + 4, 32'd1000, resp, cyc);
    bfm.write(TIMER_BASE, 32'd3, resp, cyc);
    repeat (5000) @(posedge clk);
    check(n_tick == 5, $sformatf("5 ticks in 5000 cycles at period 1000, got %0d", n_tick));
    check(timer_irq, "timer interrupt");
    bfm.write(TIMER_BASE + 32'hC, 32'd1, resp, cyc);
    bfm.write(TIMER_BASE, 32'd0, resp, cyc);
    // watchdog
    bfm.read(WDT_BASE + 4, d, resp, cyc);
    check(d == 200_000, "watchdog default timeout 200000");
    bfm.write(WDT_BASE + 4, 32'd300, resp, cyc);
    bfm.write(WDT_BASE, 32'd1, resp, cyc);
    repeat (200) @(posedge clk);
    bfm.write(WDT_BASE + 8, 32'h5A5A_0F0F, resp, cyc);
    repeat (200) @(posedge clk);
    check(n_wdt == 0 && !wdt_expired, "kicked watchdog quiet");
    repeat (200) @(posedge clk);
    check(n_wdt == 1 && wdt_expired, "unkicked watchdog expires");
    bfm.write(WDT_BASE, 32'd0, resp, cyc);
    // shared variables
    bfm.write(IPC_BASE + 4, 32'hC0FF_EE00, resp, cyc);
    check(resp == RESP_OKAY && var_q[1] == 32'hC0FF_EE00, "owned variable leaves the DEU");
    bfm.write(IPC_BASE + 8, 32'h1, resp, cyc);
    check(resp == RESP_SLVERR, "foreign variable write rejected");
    bfm.read(IPC_BASE + 4 * 5, d, resp, cyc);
    check(resp == RESP_OKAY && d == 32'hAB05, "wired variable comes in");
    // external slots
    bfm.write(EXT_BASE + 32'h10, 32'hE0E0, resp, cyc);
    bfm.write(EXT_BASE + EXT_WIN + 32'h10, 32'hE1E1, resp, cyc);
    check(g_ext[0].m.mem[4] == 32'hE0E0 && g_ext[1].m.mem[4] == 32'hE1E1, "external slots separate");
    bfm.read(EXT_BASE + EXT_WIN + 32'h10, d, resp, cyc);
    check(d == 32'hE1E1 && cyc == 2, "external slot read");
    bfm.read(EXT_BASE + 2 * EXT_WIN, d, resp, cyc);
    check(resp == RESP_DECERR, "slot beyond NUM_EXT DECERR");
    bfm.write(32'h5000_0000, 32'h0, resp, cyc);
    check(resp == RESP_DECERR, "unmapped write DECERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
