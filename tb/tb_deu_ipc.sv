// tb_deu_ipc: checks the shared-variable controller. The DEU owns variables
// 0-7 and may read 8-11 from other DEUs. Owned variables must appear on var_q
// one cycle after the write and pulse var_wr; writes to foreign variables and
// reads of variables that are neither owned nor wired must answer SLVERR;
// wired variables must read back what the owner drives.
module tb_deu_ipc;
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
  logic [31:0] var_q [16];
  logic [31:0] var_in [16];
  logic [15:0] var_wr;
  deu_ipc #(.NUM_VARS(16), .OWN_MASK(16'h00FF), .READ_MASK(16'h0F00)) dut (
    .clk, .rst_n, .req, .rsp, .var_q, .var_in, .var_wr);
  axil_master_bfm bfm (.clk, .rst_n, .req, .rsp);

  int n_wr = 0;
  always @(posedge clk) if (rst_n) n_wr += $countones(var_wr);

  initial begin
    logic [1:0] resp; int cyc; logic [31:0] d; logic [31:0] exp_v [16];
    for (int v = 0; v < 16; v++) var_in[v] = 32'h1000_0000 + v;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 8; v++) begin
      exp_v[v] = $urandom;
      bfm.write(IPC_BASE + 4*v, exp_v[v], resp, cyc);
      check(resp == RESP_OKAY && cyc == 2, $sformatf("write own var %0d", v));
      check(var_q[v] == exp_v[v], $sformatf("var_q[%0d] = %h", v, var_q[v]));
    end
    check(n_wr == 8, $sformatf("var_wr pulses %0d", n_wr));
    bfm.write(IPC_BASE + 4*2, 32'hFFFF_FFFF, resp, cyc, 4'b0010);
    exp_v[2][15:8] = 8'hFF;
    check(var_q[2] == exp_v[2], "byte strobe");
    for (int v = 8; v < 16; v++) begin
      bfm.write(IPC_BASE + 4*v, 32'hDEAD, resp, cyc);
      check(resp == RESP_SLVERR, $sformatf("write foreign var %0d rejected", v));
    end
    for (int v = 8; v < 16; v++) check(var_q[v] == 0, "foreign var register stays zero");
    for (int v = 0; v < 16; v++) begin
      bfm.read(IPC_BASE + 4*v, d, resp, cyc);
      if (v < 8)       check(resp == RESP_OKAY && d == exp_v[v], $sformatf("read own %0d", v));
      else if (v < 12) check(resp == RESP_OKAY && d == var_in[v], $sformatf("read wired %0d", v));
      else             check(resp == RESP_SLVERR, $sformatf("read unwired %0d rejected", v));
    end
    var_in[9] = 32'h55AA_55AA;                   // owner updates the variable
    bfm.read(IPC_BASE + 4*9, d, resp, cyc);
    check(d == 32'h55AA_55AA, "reader sees the owner's new value");
    bfm.read(IPC_BASE + 32'h100, d, resp, cyc);
    check(resp == RESP_SLVERR, "beyond variable window rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
