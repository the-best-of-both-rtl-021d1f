// tb_control_loop_jitter: runs the flight-control loop for 20 timer periods
// and measures the execution time of every task in each period, as the
// minimum, maximum and mean number of cycles from its timer tick to the end of
// its work. Sensor Control, IMU and PID Control run fixed access sequences on
// their own DEUs. At the same time Mission Control and MAVLink hammer the
// shared peripheral at random moments, and the general-purpose cores post
// random landing messages. The three control-loop tasks must show no jitter
// at all (max == min), because nothing they touch is shared. The two
// shared-bus users must see contention at least once. The timer period is
// shortened to 3000 cycles to keep the run short.
module tb_control_loop_jitter;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam int PERIOD = 3000, N_PERIODS = 20;

  axil_req_t core_req [5]; axil_rsp_t core_rsp [5];
  axil_req_t ps_req; axil_rsp_t ps_rsp;
  axil_req_t io_req [5]; axil_rsp_t io_rsp [5];
  axil_req_t shp_req; axil_rsp_t shp_rsp;
  logic [4:0] timer_irq, timer_tick, wdt_expired, wdt_reset_req;
  logic [2:0] queue_full, queue_empty;
  logic [1:0] sem_grant;
  logic shbus_contention;
  logic [15:0] var_written;
  logic pix_valid = 0, pix_sof = 0; logic [7:0] pix = 0;
  logic edge_valid; logic [7:0] edge_pix; logic [9:0] edge_x; logic [15:0] edge_y;

  quadcopter_soc #(.TIMER_PERIOD(PERIOD)) dut (.*);

  for (genvar i = 0; i < 5; i++) begin : g_io
    deu_mem #(.SIZE_BYTES(4096)) io (.clk, .rst_n, .req(io_req[i]), .rsp(io_rsp[i]));
  end
  deu_mem #(.SIZE_BYTES(4096)) shared_periph (.clk, .rst_n, .req(shp_req), .rsp(shp_rsp));
  axil_master_bfm c0 (.clk, .rst_n, .req(core_req[0]), .rsp(core_rsp[0]));
  axil_master_bfm c1 (.clk, .rst_n, .req(core_req[1]), .rsp(core_rsp[1]));
  axil_master_bfm c2 (.clk, .rst_n, .req(core_req[2]), .rsp(core_rsp[2]));
  axil_master_bfm c3 (.clk, .rst_n, .req(core_req[3]), .rsp(core_rsp[3]));
  axil_master_bfm c4 (.clk, .rst_n, .req(core_req[4]), .rsp(core_rsp[4]));
  axil_master_bfm ps (.clk, .rst_n, .req(ps_req), .rsp(ps_rsp));

  longint cyc_now = 0;
  always @(posedge clk) cyc_now++;
  int n_cont = 0;
  always @(posedge clk) if (rst_n) n_cont += shbus_contention;

  longint t_min [5], t_max [5], t_sum [5];
  int     t_n [5];
  bit     stop = 0;

  function automatic void record(int c, longint t);
    if (t_n[c] == 0 || t < t_min[c]) t_min[c] = t;
    if (t_n[c] == 0 || t > t_max[c]) t_max[c] = t;
    t_sum[c] += t; t_n[c]++;
  endfunction

  // One period of a task: fixed access sequences for the control loop.
  task automatic sensor_body();
    logic [1:0] r; int cyc; logic [31:0] d;
    for (int i = 0; i < 6; i++) begin
      c0.read(EXT_BASE + 4 * i, d, r, cyc);
      c0.write(IPC_BASE + 4 * i, d + 1, r, cyc);
    end
    c0.write(TIMER_BASE + 32'hC, 32'd1, r, cyc);
  endtask
  task automatic imu_body();
    logic [1:0] r; int cyc; logic [31:0] d, acc;
    acc = 0;
    for (int i = 0; i < 6; i++) begin c1.read(IPC_BASE + 4 * i, d, r, cyc); acc += d; end
    for (int i = 0; i < 8; i++) begin            // filter state in local memory
      c1.read(MEM_BASE + 4 * i, d, r, cyc);
      c1.write(MEM_BASE + 4 * i, d + acc, r, cyc);
    end
    for (int v = 6; v <= 10; v++) c1.write(IPC_BASE + 4 * v, acc + v, r, cyc);
    c1.write(TIMER_BASE + 32'hC, 32'd1, r, cyc);
  endtask
  task automatic pid_body();
    logic [1:0] r; int cyc; logic [31:0] d, st;
    for (int v = 6; v <= 14; v++) c2.read(IPC_BASE + 4 * v, d, r, cyc);
    c2.read(EXT_BASE + EXT_WIN + 4, st, r, cyc);  // parameter queue status
    for (int m = 0; m < 4; m++) c2.write(EXT_BASE + 4 * m, d + m, r, cyc);   // motors
    c2.write(IPC_BASE + 4 * 15, d, r, cyc);
    c2.write(TIMER_BASE + 32'hC, 32'd1, r, cyc);
  endtask
  // Shared-bus users: random bursts of accesses under the semaphore-free path.
  task automatic shared_user(int c);
    logic [1:0] r; int cyc; logic [31:0] d; longint t0;
    repeat ($urandom % 200) @(posedge clk);
    t0 = cyc_now;
    for (int i = 0; i < 6; i++) begin
      if (c == 3) c3.write(EXT_BASE + 4 * EXT_WIN + 4 * i, 32'(i), r, cyc);
      else        c4.read(EXT_BASE + 4 * EXT_WIN + 4 * i, d, r, cyc);
    end
    record(c, cyc_now - t0);
  endtask

  task automatic run_task(int c);
    longint t0;
    while (!stop) begin
      wait (timer_tick[c] || stop);
      if (stop) break;
      @(posedge clk);
      t0 = cyc_now;
      case (c)
        0: sensor_body();
        1: imu_body();
        2: pid_body();
        default: shared_user(c);
      endcase
      if (c < 3) record(c, cyc_now - t0);
    end
  endtask

  initial begin
    logic [1:0] r; int cyc;
    for (int c = 0; c < 5; c++) begin t_min[c] = 0; t_max[c] = 0; t_sum[c] = 0; t_n[c] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    // enable the timers of all five DEUs
    fork
      c0.write(TIMER_BASE, 32'd1, r, cyc);
      c1.write(TIMER_BASE, 32'd1, r, cyc);
      c2.write(TIMER_BASE, 32'd1, r, cyc);
      c3.write(TIMER_BASE, 32'd1, r, cyc);
      c4.write(TIMER_BASE, 32'd1, r, cyc);
    join
    fork
      run_task(0); run_task(1); run_task(2); run_task(3); run_task(4);
      begin                                       // general-purpose cores
        while (!stop) begin
          repeat (100 + $urandom % 400) @(posedge clk);
          if (!stop) ps.write(32'h0, $urandom, r, cyc);
        end
      end
      begin
        repeat (PERIOD * N_PERIODS + 100) @(posedge clk);
        stop = 1;
      end
    join
    for (int c = 0; c < 5; c++)
      $display("task %0d: periods %0d  min %0d  max %0d  mean %0d cycles", c, t_n[c], t_min[c],
               t_max[c], t_n[c] ? t_sum[c] / t_n[c] : 0);
    for (int c = 0; c < 3; c++) begin
      check(t_n[c] >= N_PERIODS - 1, $sformatf("task %0d ran in every period (%0d)", c, t_n[c]));
      check(t_max[c] == t_min[c], $sformatf("task %0d jitter %0d cycles", c, t_max[c] - t_min[c]));
    end
    // 13 two-cycle accesses, each preceded by one alignment cycle of the BFM
    check(t_min[0] >= 13 * 3 && t_min[0] <= 13 * 3 + 1, $sformatf("Sensor Control time %0d", t_min[0]));
    check(n_cont > 0, $sformatf("shared-bus contention happened %0d times", n_cont));
    check(t_max[3] > t_min[3] || t_max[4] > t_min[4], "shared-bus users see variable times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
