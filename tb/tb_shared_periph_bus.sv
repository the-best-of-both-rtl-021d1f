// tb_shared_periph_bus: two masters reach one shared slave (a small memory).
// An uncontended access must cost one arbitration cycle more than the slave
// itself (3 cycles for write and read); simultaneous accesses must both
// complete with the right data, one of them delayed by exactly one
// transaction, and repeated contention must alternate the winner
// (round-robin).
module tb_shared_periph_bus;
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
  axil_req_t m_req [2]; axil_rsp_t m_rsp [2];
  axil_req_t s_req; axil_rsp_t s_rsp;
  logic contention;
  shared_periph_bus #(.NUM_MASTERS(2)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .contention);
  deu_mem #(.SIZE_BYTES(4096)) periph (.clk, .rst_n, .req(s_req), .rsp(s_rsp));
  axil_master_bfm b0 (.clk, .rst_n, .req(m_req[0]), .rsp(m_rsp[0]));
  axil_master_bfm b1 (.clk, .rst_n, .req(m_req[1]), .rsp(m_rsp[1]));

  int n_cont = 0;
  always @(posedge clk) if (rst_n && contention) n_cont++;

  initial begin
    logic [1:0] r0, r1; int c0, c1; logic [31:0] d0, d1;
    int first0 = 0, first1 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    b0.write(32'h10, 32'hA0A0_0001, r0, c0);
    check(r0 == RESP_OKAY && c0 == 3, $sformatf("uncontended write %0d cycles", c0));
    b1.read(32'h10, d1, r1, c1);
    check(r1 == RESP_OKAY && c1 == 3 && d1 == 32'hA0A0_0001,
          $sformatf("uncontended read %0d cycles data %h", c1, d1));
    // After a solo access by one master, simultaneous requests must go to
    // the other one first (round-robin; fixed priority would always pick 0).
    for (int i = 0; i < 8; i++) begin
      if (i % 2 == 0) b0.write(32'h800, 32'h0, r0, c0);
      else            b1.write(32'h800, 32'h0, r1, c1);
      fork
        b0.write(32'h100 + 8*i, 32'h1000 + i, r0, c0);
        b1.write(32'h104 + 8*i, 32'h2000 + i, r1, c1);
      join
      check(r0 == RESP_OKAY && r1 == RESP_OKAY, "both contended writes complete");
      check((c0 == 3 && c1 == 6) || (c1 == 3 && c0 == 6),
            $sformatf("contended latencies %0d/%0d", c0, c1));
      check((i % 2 == 0) ? (c1 < c0) : (c0 < c1), $sformatf("round-robin order in round %0d", i));
      if (c0 < c1) first0++; else first1++;
    end
    check(first0 == 4 && first1 == 4, $sformatf("round-robin winners %0d/%0d", first0, first1));
    check(n_cont == 24, $sformatf("waiting cycles flagged %0d (3 per contended round)", n_cont));
    for (int i = 0; i < 8; i++) begin
      fork
        b0.read(32'h104 + 8*i, d0, r0, c0);
        b1.read(32'h100 + 8*i, d1, r1, c1);
      join
      check(d0 == 32'h2000 + i && d1 == 32'h1000 + i, "contended reads return the right data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
