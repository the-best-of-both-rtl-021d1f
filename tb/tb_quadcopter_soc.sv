// tb_quadcopter_soc: end-to-end test of the flight-controller fabric with
// every parameter at its default. The testbench plays the five DEU cores and
// the general-purpose cores; small memories stand in for each task's I/O
// peripheral and for the shared peripheral. It runs one control-loop period:
// Sensor Control publishes sensor data, IMU reads it and publishes the
// attitude, Mission Control publishes setpoints, PID Control reads both and
// publishes its status, MAVLink reads everything and sends controller
// parameters to PID through a queue; the general-purpose cores report a
// landing mark to Mission Control and a camera frame runs through the Sobel
// accelerator. Along the way it provokes every mechanism of the fabric and
// counts how often each happened: a count of zero is a failure.
module tb_quadcopter_soc;
  import r2d2_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam int SENSOR = 0, IMU = 1, PID = 2, MISSION = 3, MAVLINK = 4;
  localparam int IMG_W = 640;

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

  quadcopter_soc dut (.*);

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

  // Mechanism counters
  int n_var_pub = 0, n_var_read = 0, n_var_reject = 0;
  int n_msg = 0, n_q_full = 0, n_q_empty = 0, n_landing = 0;
  int n_sem_wait = 0, n_sem_prio = 0, n_bus_cont = 0;
  int n_tick_ok = 0, n_wdt = 0, n_decerr = 0, n_isolated = 0, n_io = 0, n_edges = 0;

  longint cyc_now = 0, last_tick0 = -1;
  always @(posedge clk) begin
    cyc_now++;
    if (rst_n) begin
      if (timer_tick[SENSOR]) begin
        if (last_tick0 >= 0) begin
          check(cyc_now - last_tick0 == 100_000, $sformatf("timer period %0d", cyc_now - last_tick0));
          n_tick_ok++;
        end
        last_tick0 = cyc_now;
      end
      n_wdt      += $countones(wdt_reset_req);
      n_bus_cont += shbus_contention;
      n_var_pub  += $countones(var_written);
    end
  end

  task automatic wr(input int c, input logic [31:0] a, input logic [31:0] d,
                    output logic [1:0] resp, output int cyc);
    case (c)
      0: c0.write(a, d, resp, cyc);
      1: c1.write(a, d, resp, cyc);
      2: c2.write(a, d, resp, cyc);
      3: c3.write(a, d, resp, cyc);
      default: c4.write(a, d, resp, cyc);
    endcase
  endtask
  task automatic rd(input int c, input logic [31:0] a, output logic [31:0] d,
                    output logic [1:0] resp, output int cyc);
    case (c)
      0: c0.read(a, d, resp, cyc);
      1: c1.read(a, d, resp, cyc);
      2: c2.read(a, d, resp, cyc);
      3: c3.read(a, d, resp, cyc);
      default: c4.read(a, d, resp, cyc);
    endcase
  endtask

  function automatic logic [31:0] var_addr(int v); return IPC_BASE + 4 * v; endfunction
  function automatic logic [31:0] slot(int k);     return EXT_BASE + EXT_WIN * k; endfunction

  // Sobel reference over a 640 x 4 test frame
  int img [4][IMG_W];
  function automatic int ref_mag(int x, int y);
    int gx, gy, m;
    gx = (img[y-1][x+1] + 2*img[y][x+1] + img[y+1][x+1]) - (img[y-1][x-1] + 2*img[y][x-1] + img[y+1][x-1]);
    gy = (img[y+1][x-1] + 2*img[y+1][x] + img[y+1][x+1]) - (img[y-1][x-1] + 2*img[y-1][x] + img[y-1][x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 255 ? 255 : m;
  endfunction
  always @(posedge clk) if (rst_n && edge_valid) begin
    check(edge_pix == ref_mag(int'(edge_x), int'(edge_y)),
          $sformatf("edge (%0d,%0d) = %0d", edge_x, edge_y, edge_pix));
    n_edges++;
  end

  initial begin
    logic [1:0] r, r2; int cyc, cyc2; logic [31:0] d, d2;
    int lat_busy;
    repeat (3) @(posedge clk); rst_n = 1;

    // --- start every task's periodic timer (1 ms default period) ---
    for (int c = 0; c < 5; c++) begin
      wr(c, TIMER_BASE, 32'd3, r, cyc);
      check(r == RESP_OKAY, "timer start");
    end

    // --- Sensor Control: read its sensor I/O, publish vars 0-5 ---
    for (int i = 0; i < 6; i++) g_io[SENSOR].io.mem[i] = 32'h100 + i;
    for (int i = 0; i < 6; i++) begin
      rd(SENSOR, slot(0) + 4 * i, d, r, cyc);
      check(d == 32'h100 + i, "sensor I/O read");
      n_io++;
      wr(SENSOR, var_addr(i), d * 3, r, cyc);
      check(r == RESP_OKAY, "sensor publishes");
    end
    // --- IMU: read sensor vars, publish attitude 6-10 ---
    for (int i = 0; i < 6; i++) begin
      rd(IMU, var_addr(i), d, r, cyc);
      check(r == RESP_OKAY && d == (32'h100 + i) * 3, $sformatf("IMU reads var %0d", i));
      n_var_read++;
    end
    for (int v = 6; v <= 10; v++) wr(IMU, var_addr(v), 32'h6000 + v, r, cyc);
    wr(IMU, var_addr(0), 32'h0, r, cyc);                // IMU may not write sensor data
    check(r == RESP_SLVERR, "non-owner write rejected");
    n_var_reject += (r == RESP_SLVERR);
    rd(SENSOR, var_addr(0), d, r, cyc);
    check(d == 32'h300, "sensor data unchanged by foreign write");
    // --- Mission Control: setpoints 11-14 ---
    for (int v = 11; v <= 14; v++) wr(MISSION, var_addr(v), 32'hB000 + v, r, cyc);
    // --- PID Control: reads attitude and setpoints, drives motors, publishes 15 ---
    for (int v = 6; v <= 14; v++) begin
      rd(PID, var_addr(v), d, r, cyc);
      check(r == RESP_OKAY && d == (v <= 10 ? 32'h6000 + v : 32'hB000 + v), $sformatf("PID reads var %0d", v));
      n_var_read++;
    end
    rd(PID, var_addr(0), d, r, cyc);
    check(r == RESP_SLVERR, "PID is not wired to raw sensor data");
    n_var_reject += (r == RESP_SLVERR);
    wr(PID, slot(0), 32'h0000_0FA0, r, cyc);           // motor command to its I/O
    check(g_io[PID].io.mem[0] == 32'h0FA0, "PID motor output");
    n_io++;
    wr(PID, var_addr(15), 32'h0000_0F15, r, cyc);
    // --- MAVLink: telemetry reads ---
    for (int v = 6; v <= 15; v++) begin
      rd(MAVLINK, var_addr(v), d, r, cyc);
      check(r == RESP_OKAY && d != 0, $sformatf("MAVLink reads var %0d", v));
      n_var_read++;
    end
    check(n_var_pub == 6 + 5 + 4 + 1, $sformatf("variables published %0d", n_var_pub));

    // --- Q0: MAVLink sends PID parameters; fill it up to overflow ---
    for (int i = 0; i < 17; i++) begin
      wr(MAVLINK, slot(1), 32'hA000 + i, r, cyc);
      if (i < 16) begin check(r == RESP_OKAY, "parameter queued"); n_msg++; end
      else begin check(r == RESP_SLVERR && queue_full[0], "full queue rejects"); n_q_full++; end
    end
    for (int i = 0; i < 16; i++) begin
      rd(PID, slot(1), d, r, cyc);
      check(r == RESP_OKAY && d == 32'hA000 + i, "PID receives parameters in order");
    end
    rd(PID, slot(1), d, r, cyc);
    check(r == RESP_SLVERR && queue_empty[0], "empty queue rejects");
    n_q_empty += (r == RESP_SLVERR);
    // --- Q1: mission command ---
    wr(MAVLINK, slot(2), 32'hC0DE_0001, r, cyc);
    rd(MISSION, slot(1), d, r, cyc);
    check(d == 32'hC0DE_0001, "mission command delivered");
    n_msg++;
    // --- Q2: landing mark from the general-purpose cores ---
    ps.write(32'h0, 32'h1A4D_0001, r, cyc);
    check(r == RESP_OKAY, "landing mark posted");
    rd(MISSION, slot(2) + 4, d, r, cyc);
    check(d[0] == 0 && d[31:16] == 1, "mission sees one message");
    rd(MISSION, slot(2), d, r, cyc);
    check(d == 32'h1A4D_0001, "landing mark received");
    n_landing++;

    // --- shared peripheral: both ask the semaphore at once ---
    fork
      wr(MISSION, slot(3), 32'h1, r, cyc);
      wr(MAVLINK, slot(3), 32'h1, r2, cyc2);
    join
    rd(MISSION, slot(3) + 4, d, r, cyc);
    rd(MAVLINK, slot(3) + 4, d2, r2, cyc2);
    check(d[0] == 1 && d2[0] == 0 && d2[1] == 1, "Mission Control (higher priority) holds the lock");
    n_sem_prio += (d[0] == 1 && d2[0] == 0);
    n_sem_wait += (d2[0] == 0);
    wr(MISSION, slot(4) + 32'h20, 32'h6055_0001, r, cyc);   // use the peripheral
    check(shared_periph.mem[8] == 32'h6055_0001, "Mission Control writes shared peripheral");
    wr(MISSION, slot(3), 32'h0, r, cyc);                    // release
    do rd(MAVLINK, slot(3) + 4, d2, r2, cyc2); while (d2[0] == 0);
    wr(MAVLINK, slot(4) + 32'h24, 32'h6055_0004, r, cyc);
    check(shared_periph.mem[9] == 32'h6055_0004, "MAVLink writes shared peripheral after grant");
    wr(MAVLINK, slot(3), 32'h0, r, cyc);
    // --- raw bus contention on the shared peripheral, while the Sensor
    //     Control DEU keeps running: its latency must not change ---
    fork
      begin
        for (int i = 0; i < 4; i++) begin
          fork
            wr(MISSION, slot(4) + 4 * i, 32'h10 + i, r, cyc);
            wr(MAVLINK, slot(4) + 32'h40 + 4 * i, 32'h20 + i, r2, cyc2);
          join
        end
      end
      begin
        for (int i = 0; i < 12; i++) begin
          rd(SENSOR, MEM_BASE + 4 * i, d, r, lat_busy);
          check(lat_busy == 2, $sformatf("Sensor DEU latency %0d under load", lat_busy));
          n_isolated += (lat_busy == 2);
        end
      end
    join
    check(shared_periph.mem[3] == 32'h13 && shared_periph.mem[19] == 32'h23, "contended writes landed");

    // --- decode error ---
    rd(IMU, 32'h7000_0000, d, r, cyc);
    check(r == RESP_DECERR, "unmapped address");
    n_decerr += (r == RESP_DECERR);

    // --- Sobel: one 640 x 4 frame from the camera ---
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < IMG_W; x++) begin
        img[y][x] = (x / 40 + y) % 2 ? 220 : $urandom % 40;
        @(posedge clk); #1;
        pix_valid = 1; pix_sof = (x == 0 && y == 0); pix = 8'(img[y][x]);
      end
    @(posedge clk); #1; pix_valid = 0;
    repeat (4) @(posedge clk);
    check(n_edges == (IMG_W - 2) * 2, $sformatf("edge outputs %0d", n_edges));

    // --- watchdog: MAVLink's task stops kicking ---
    wr(MAVLINK, WDT_BASE + 4, 32'd500, r, cyc);
    wr(MAVLINK, WDT_BASE, 32'd1, r, cyc);
    repeat (600) @(posedge clk);
    check(wdt_expired == 5'b10000, "only MAVLink's watchdog expired");

    // --- let two timer periods pass ---
    wait (n_tick_ok >= 2);
    check(timer_irq == 5'b11111, "all task timers raised their interrupt");

    check(n_var_pub > 0,    "mechanism: shared variable published");
    check(n_var_read > 0,   "mechanism: shared variable read by another DEU");
    check(n_var_reject > 0, "mechanism: shared variable access rejected");
    check(n_msg > 0,        "mechanism: queue message");
    check(n_q_full > 0,     "mechanism: queue overflow");
    check(n_q_empty > 0,    "mechanism: queue underflow");
    check(n_landing > 0,    "mechanism: landing signal from general-purpose cores");
    check(n_sem_wait > 0,   "mechanism: semaphore wait");
    check(n_sem_prio > 0,   "mechanism: semaphore priority");
    check(n_bus_cont > 0,   "mechanism: shared bus contention");
    check(n_isolated > 0,   "mechanism: DEU isolation under load");
    check(n_tick_ok > 0,    "mechanism: periodic timer");
    check(n_wdt > 0,        "mechanism: watchdog expiry");
    check(n_decerr > 0,     "mechanism: decode error");
    check(n_io > 0,         "mechanism: task I/O slot");
    check(n_edges > 0,      "mechanism: Sobel edge output");
    $display("mechanisms: var_pub=%0d var_read=%0d var_reject=%0d msg=%0d q_full=%0d q_empty=%0d landing=%0d sem_wait=%0d sem_prio=%0d bus_cont=%0d isolated=%0d ticks=%0d wdt=%0d decerr=%0d io=%0d edges=%0d",
             n_var_pub, n_var_read, n_var_reject, n_msg, n_q_full, n_q_empty, n_landing,
             n_sem_wait, n_sem_prio, n_bus_cont, n_isolated, n_tick_ok, n_wdt, n_decerr, n_io, n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
