// tb_deu_mem: checks the DEU local memory at its full default size.
// Random word writes, byte-strobed writes and reads over the whole address
// range are compared with a model in the testbench; every access must take
// exactly two cycles (accept, then respond).
module tb_deu_mem;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t req; axil_rsp_t rsp;
  int checks = 0, failures = 0;

  deu_mem dut (.clk, .rst_n, .req, .rsp);
  axil_master_bfm bfm (.clk, .rst_n, .req, .rsp);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] model [int];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d, a, w;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      a = ($urandom % 16384) * 4;
      w = $urandom;
      bfm.write(a, w, resp, cyc);
      model[a] = w;
      check(resp == RESP_OKAY && cyc == 2, $sformatf("write %h resp %0d cyc %0d", a, resp, cyc));
    end
    // highest and lowest word
    bfm.write(32'hFFFC, 32'hCAFE_F00D, resp, cyc); model[32'hFFFC] = 32'hCAFE_F00D;
    bfm.write(32'h0000, 32'h1234_5678, resp, cyc); model[0] = 32'h1234_5678;
    // byte strobes
    bfm.write(32'h0000, 32'hAABB_CCDD, resp, cyc, 4'b0101);
    model[0] = 32'h12BB_56DD;
    foreach (model[k]) begin
      bfm.read(k, d, resp, cyc);
      check(resp == RESP_OKAY && d == model[k] && cyc == 2,
            $sformatf("read %h got %h exp %h cyc %0d", k, d, model[k], cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
