// quadcopter_soc: application-specific multi-core fabric of a quadcopter
// flight controller.
//
// Five safety-relevant tasks each get a Deterministic Execution Unit (deu):
//   DEU 0 Sensor Control, DEU 1 IMU (position/attitude estimation),
//   DEU 2 PID Control (motor control), DEU 3 Mission Control, DEU 4 MAVLink.
// The landing-mark detection runs on the general-purpose cores, helped by the
// Sobel edge-detection accelerator (sobel_accel). The DEUs share no memory
// and no bus; every link between tasks is a dedicated piece of hardware:
//  * Shared variables (deu_ipc): sensor data (vars 0-5, written by Sensor
//    Control, read by IMU), the attitude/position estimate (vars 6-10, written
//    by IMU, read by PID, Mission Control and MAVLink), the setpoints (vars
//    11-14, written by Mission Control, read by PID and MAVLink) and the
//    controller status (var 15, written by PID, read by MAVLink). A reader's
//    IPC is wired to the writer's register; the global variable bus below is
//    the OR of all owners' registers, since a register is zero in every DEU
//    that does not own it.
//  * Message queues (msg_queue): Q0 MAVLink -> PID (controller parameters),
//    Q1 MAVLink -> Mission Control (mission commands), Q2 general-purpose
//    cores -> Mission Control (landing mark detected).
//  * One shared peripheral used by Mission Control and MAVLink, reached
//    through a lower-level bus (shared_periph_bus) and guarded by a hardware
//    semaphore (hw_semaphore) in which Mission Control has the higher
//    priority.
// External parts are ports: the five cores' AXI4-Lite master ports
// (core_req/core_rsp), each task's own I/O peripheral slot (io_req/io_rsp),
// the general-purpose cores' master port to Q2 (ps_req/ps_rsp), the shared
// peripheral's slave port (shp_req/shp_rsp) and the pixel streams of the Sobel
// accelerator.
// External slot numbers per DEU (slot k at 0x4003_0000 + k*0x1000):
//   all DEUs: slot 0 = own I/O peripheral
//   PID:      slot 1 = Q0 read side
//   Mission:  slot 1 = Q1 read side, slot 2 = Q2 read side,
//             slot 3 = semaphore port 0, slot 4 = shared peripheral bus
//   MAVLink:  slot 1 = Q0 write side, slot 2 = Q1 write side,
//             slot 3 = semaphore port 1, slot 4 = shared peripheral bus
// The five DEUs, shared variables between Sensor Control, IMU and PID
// Control, MAVLink setting PID parameters, the landing signal to Mission
// Control and the Sobel accelerator follow the flight-controller showcase;
// the variable numbering, the queue assignment and the choice of Mission
// Control and MAVLink as the users of the shared peripheral are this design's.
module quadcopter_soc
  import r2d2_pkg::*;
#(
  parameter int unsigned MEM_BYTES    = 65536,
  parameter int unsigned TIMER_PERIOD = 100_000,
  parameter int unsigned WDT_TIMEOUT  = 200_000,
  parameter int unsigned QUEUE_DEPTH  = 16,
  parameter int unsigned IMG_W        = 640
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Masters: the DEU cores and the general-purpose cores
  input  axil_req_t                core_req [5],
  output axil_rsp_t                core_rsp [5],
  input  axil_req_t                ps_req,
  output axil_rsp_t                ps_rsp,
  // Slaves outside the fabric
  output axil_req_t                io_req   [5],
  input  axil_rsp_t                io_rsp   [5],
  output axil_req_t                shp_req,
  input  axil_rsp_t                shp_rsp,
  // Per-DEU events
  output logic [4:0]               timer_irq,
  output logic [4:0]               timer_tick,
  output logic [4:0]               wdt_expired,
  output logic [4:0]               wdt_reset_req,
  // Status
  output logic [2:0]               queue_full,
  output logic [2:0]               queue_empty,
  output logic [1:0]               sem_grant,
  output logic                     shbus_contention,
  output logic [15:0]              var_written,
  // Sobel accelerator pixel streams
  input  logic                     pix_valid,
  input  logic                     pix_sof,
  input  logic [7:0]               pix,
  output logic                     edge_valid,
  output logic [7:0]               edge_pix,
  output logic [$clog2(IMG_W)-1:0] edge_x,
  output logic [15:0]              edge_y
);
  localparam int unsigned NV = 16;

  localparam logic [NV-1:0] OWN_SENSOR  = 16'h003F;
  localparam logic [NV-1:0] OWN_IMU     = 16'h07C0;
  localparam logic [NV-1:0] OWN_PID     = 16'h8000;
  localparam logic [NV-1:0] OWN_MISSION = 16'h7800;
  localparam logic [NV-1:0] OWN_MAVLINK = 16'h0000;
  localparam logic [NV-1:0] RD_SENSOR   = 16'h0000;
  localparam logic [NV-1:0] RD_IMU      = OWN_SENSOR;
  localparam logic [NV-1:0] RD_PID      = OWN_IMU | OWN_MISSION;
  localparam logic [NV-1:0] RD_MISSION  = OWN_IMU;
  localparam logic [NV-1:0] RD_MAVLINK  = OWN_IMU | OWN_MISSION | OWN_PID;

  // Shared-variable registers of each DEU and the global variable bus.
  logic [31:0]   var_q  [5][NV];
  logic [31:0]   var_bus [NV];
  logic [NV-1:0] var_wr [5];

  always_comb begin
    for (int v = 0; v < NV; v++)
      var_bus[v] = var_q[0][v] | var_q[1][v] | var_q[2][v] | var_q[3][v] | var_q[4][v];
    var_written = var_wr[0] | var_wr[1] | var_wr[2] | var_wr[3] | var_wr[4];
  end

  axil_req_t ext0_req [1];  axil_rsp_t ext0_rsp [1];
  axil_req_t ext1_req [1];  axil_rsp_t ext1_rsp [1];
  axil_req_t ext2_req [2];  axil_rsp_t ext2_rsp [2];
  axil_req_t ext3_req [5];  axil_rsp_t ext3_rsp [5];
  axil_req_t ext4_req [5];  axil_rsp_t ext4_rsp [5];

  deu #(.NUM_EXT(1), .NUM_VARS(NV), .OWN_MASK(OWN_SENSOR), .READ_MASK(RD_SENSOR),
        .MEM_BYTES(MEM_BYTES), .TIMER_PERIOD(TIMER_PERIOD), .WDT_TIMEOUT(WDT_TIMEOUT))
  u_sensor (
    .clk, .rst_n, .core_req(core_req[0]), .core_rsp(core_rsp[0]),
    .ext_req(ext0_req), .ext_rsp(ext0_rsp),
    .var_q(var_q[0]), .var_in(var_bus), .var_wr(var_wr[0]),
    .timer_irq(timer_irq[0]), .timer_tick(timer_tick[0]),
    .wdt_expired(wdt_expired[0]), .wdt_reset_req(wdt_reset_req[0])
  );

  deu #(.NUM_EXT(1), .NUM_VARS(NV), .OWN_MASK(OWN_IMU), .READ_MASK(RD_IMU),
        .MEM_BYTES(MEM_BYTES), .TIMER_PERIOD(TIMER_PERIOD), .WDT_TIMEOUT(WDT_TIMEOUT))
  u_imu (
    .clk, .rst_n, .core_req(core_req[1]), .core_rsp(core_rsp[1]),
    .ext_req(ext1_req), .ext_rsp(ext1_rsp),
    .var_q(var_q[1]), .var_in(var_bus), .var_wr(var_wr[1]),
    .timer_irq(timer_irq[1]), .timer_tick(timer_tick[1]),
    .wdt_expired(wdt_expired[1]), .wdt_reset_req(wdt_reset_req[1])
  );

  deu #(.NUM_EXT(2), .NUM_VARS(NV), .OWN_MASK(OWN_PID), .READ_MASK(RD_PID),
        .MEM_BYTES(MEM_BYTES), .TIMER_PERIOD(TIMER_PERIOD), .WDT_TIMEOUT(WDT_TIMEOUT))
  u_pid (
    .clk, .rst_n, .core_req(core_req[2]), .core_rsp(core_rsp[2]),
    .ext_req(ext2_req), .ext_rsp(ext2_rsp),
    .var_q(var_q[2]), .var_in(var_bus), .var_wr(var_wr[2]),
    .timer_irq(timer_irq[2]), .timer_tick(timer_tick[2]),
    .wdt_expired(wdt_expired[2]), .wdt_reset_req(wdt_reset_req[2])
  );

  deu #(.NUM_EXT(5), .NUM_VARS(NV), .OWN_MASK(OWN_MISSION), .READ_MASK(RD_MISSION),
        .MEM_BYTES(MEM_BYTES), .TIMER_PERIOD(TIMER_PERIOD), .WDT_TIMEOUT(WDT_TIMEOUT))
  u_mission (
    .clk, .rst_n, .core_req(core_req[3]), .core_rsp(core_rsp[3]),
    .ext_req(ext3_req), .ext_rsp(ext3_rsp),
    .var_q(var_q[3]), .var_in(var_bus), .var_wr(var_wr[3]),
    .timer_irq(timer_irq[3]), .timer_tick(timer_tick[3]),
    .wdt_expired(wdt_expired[3]), .wdt_reset_req(wdt_reset_req[3])
  );

  deu #(.NUM_EXT(5), .NUM_VARS(NV), .OWN_MASK(OWN_MAVLINK), .READ_MASK(RD_MAVLINK),
        .MEM_BYTES(MEM_BYTES), .TIMER_PERIOD(TIMER_PERIOD), .WDT_TIMEOUT(WDT_TIMEOUT))
  u_mavlink (
    .clk, .rst_n, .core_req(core_req[4]), .core_rsp(core_rsp[4]),
    .ext_req(ext4_req), .ext_rsp(ext4_rsp),
    .var_q(var_q[4]), .var_in(var_bus), .var_wr(var_wr[4]),
    .timer_irq(timer_irq[4]), .timer_tick(timer_tick[4]),
    .wdt_expired(wdt_expired[4]), .wdt_reset_req(wdt_reset_req[4])
  );

  // Own I/O peripheral slot of each task.
  assign io_req[0] = ext0_req[0];  assign ext0_rsp[0] = io_rsp[0];
  assign io_req[1] = ext1_req[0];  assign ext1_rsp[0] = io_rsp[1];
  assign io_req[2] = ext2_req[0];  assign ext2_rsp[0] = io_rsp[2];
  assign io_req[3] = ext3_req[0];  assign ext3_rsp[0] = io_rsp[3];
  assign io_req[4] = ext4_req[0];  assign ext4_rsp[0] = io_rsp[4];

  // Q0: MAVLink -> PID Control (controller parameters).
  msg_queue #(.DEPTH(QUEUE_DEPTH)) u_q0 (
    .clk, .rst_n,
    .wr_req(ext4_req[1]), .wr_rsp(ext4_rsp[1]),
    .rd_req(ext2_req[1]), .rd_rsp(ext2_rsp[1]),
    .full(queue_full[0]), .empty(queue_empty[0])
  );

  // Q1: MAVLink -> Mission Control (mission commands).
  msg_queue #(.DEPTH(QUEUE_DEPTH)) u_q1 (
    .clk, .rst_n,
    .wr_req(ext4_req[2]), .wr_rsp(ext4_rsp[2]),
    .rd_req(ext3_req[1]), .rd_rsp(ext3_rsp[1]),
    .full(queue_full[1]), .empty(queue_empty[1])
  );

  // Q2: general-purpose cores -> Mission Control (landing mark detected).
  msg_queue #(.DEPTH(QUEUE_DEPTH)) u_q2 (
    .clk, .rst_n,
    .wr_req(ps_req), .wr_rsp(ps_rsp),
    .rd_req(ext3_req[2]), .rd_rsp(ext3_rsp[2]),
    .full(queue_full[2]), .empty(queue_empty[2])
  );

  // Semaphore of the shared peripheral: port 0 Mission Control, port 1 MAVLink.
  axil_req_t sem_req [2];
  axil_rsp_t sem_rsp [2];
  assign sem_req[0]  = ext3_req[3];
  assign sem_req[1]  = ext4_req[3];
  assign ext3_rsp[3] = sem_rsp[0];
  assign ext4_rsp[3] = sem_rsp[1];

  hw_semaphore #(.NUM_PORTS(2)) u_sem (
    .clk, .rst_n, .req(sem_req), .rsp(sem_rsp), .grant(sem_grant)
  );

  // Lower-level bus to the shared peripheral.
  axil_req_t shb_req [2];
  axil_rsp_t shb_rsp [2];
  assign shb_req[0]  = ext3_req[4];
  assign shb_req[1]  = ext4_req[4];
  assign ext3_rsp[4] = shb_rsp[0];
  assign ext4_rsp[4] = shb_rsp[1];

  shared_periph_bus #(.NUM_MASTERS(2)) u_shbus (
    .clk, .rst_n, .m_req(shb_req), .m_rsp(shb_rsp),
    .s_req(shp_req), .s_rsp(shp_rsp), .contention(shbus_contention)
  );

  sobel_accel #(.IMG_W(IMG_W), .PIX_W(8)) u_sobel (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_sof(pix_sof), .in_pix(pix),
    .out_valid(edge_valid), .out_pix(edge_pix), .out_x(edge_x), .out_y(edge_y)
  );

endmodule
