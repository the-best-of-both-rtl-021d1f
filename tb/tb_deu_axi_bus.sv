// tb_deu_axi_bus: one master, three memory slaves at 0x0000, 0x1000 and
// 0x2000 (4 KiB each). Every address must reach exactly its slave with no
// added cycles (2-cycle accesses), unmapped addresses must answer DECERR, and
// a write whose W comes later than AW must still reach the right slave.
module tb_deu_axi_bus;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  axil_req_t m_req; axil_rsp_t m_rsp;
  axil_req_t s_req [3]; axil_rsp_t s_rsp [3];
  localparam logic [2:0][31:0] B = {32'h2000, 32'h1000, 32'h0000};
  localparam logic [2:0][31:0] M = {3{32'hFFFF_F000}};
  deu_axi_bus #(.NUM_SLAVES(3), .BASE(B), .MASK(M)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  for (genvar s = 0; s < 3; s++) begin : g_s
    deu_mem #(.SIZE_BYTES(4096)) mem (.clk, .rst_n, .req(s_req[s]), .rsp(s_rsp[s]));
  end
  axil_master_bfm bfm (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++)
      for (int w = 0; w < 4; w++) begin
        bfm.write(32'h1000 * s + 4 * w, 32'(s * 256 + w), resp, cyc);
        check(resp == RESP_OKAY && cyc == 2, $sformatf("write slave %0d cyc %0d", s, cyc));
      end
    // each slave holds only its own data (address bits above 12 dropped)
    for (int s = 0; s < 3; s++)
      for (int w = 0; w < 4; w++) begin
        check(g_s[0].mem.mem[w] == 32'(w) && g_s[1].mem.mem[w] == 32'(256 + w)
              && g_s[2].mem.mem[w] == 32'(512 + w), "data landed in its slave");
        bfm.read(32'h1000 * s + 4 * w, d, resp, cyc);
        check(resp == RESP_OKAY && cyc == 2 && d == 32'(s * 256 + w),
              $sformatf("read slave %0d word %0d = %h", s, w, d));
      end
    bfm.write(32'h3000, 32'h1, resp, cyc);
    check(resp == RESP_DECERR && cyc == 2, "unmapped write DECERR");
    bfm.read(32'h8000_0000, d, resp, cyc);
    check(resp == RESP_DECERR && cyc == 2, "unmapped read DECERR");
    // AW first, W three cycles later
    @(posedge clk); #1;
    m_req.awaddr = 32'h2010; m_req.awvalid = 1; m_req.bready = 1;
    repeat (3) @(posedge clk); #1;
    m_req.wdata = 32'hFEED; m_req.wstrb = 4'hF; m_req.wvalid = 1;
    @(negedge clk);
    wait (m_rsp.bvalid); @(posedge clk); #1;
    m_req = '0;
    check(g_s[2].mem.mem[4] == 32'hFEED, $sformatf("late W write: %h", g_s[2].mem.mem[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
