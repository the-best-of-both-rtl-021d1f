// tb_msg_queue: checks the message queue in both storage styles, a 4-word
// queue held in registers and a 40-word queue held in RAM behind an output
// register, with the same procedure (msg_queue_tester).
module tb_msg_queue;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c_reg, f_reg, c_ram, f_ram;
  bit d_reg, d_ram;

  msg_queue_tester #(.DEPTH(4))  t_reg (.clk, .rst_n, .checks(c_reg), .failures(f_reg), .done(d_reg));
  msg_queue_tester #(.DEPTH(40)) t_ram (.clk, .rst_n, .checks(c_ram), .failures(f_ram), .done(d_ram));

  initial begin
    repeat (60000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_reg + c_ram, f_reg + f_ram + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (d_reg && d_ram);
    $display("TB_RESULT checks=%0d failures=%0d", c_reg + c_ram, f_reg + f_ram);
    $finish;
  end
endmodule
