// deu: Deterministic Execution Unit, the complete microcontroller that runs
// exactly one safety-critical task.
//
// A DEU gives its task hardware of its own: the task's core is the only master
// on a private AXI4-Lite bus (deu_axi_bus) that reaches a private memory
// (deu_mem), a periodic timer (deu_timer), a watchdog (deu_watchdog) and the
// IPC controller holding the shared variables this task writes (deu_ipc).
// NUM_EXT further slave slots are brought out for slaves outside the DEU:
// the task's own I/O peripherals, the ports of message queues, a semaphore
// port or a master port of a shared-peripheral bus. Because nothing inside is
// shared, the timing of every access is the same as on a single-core
// microcontroller and can be analysed on its own.
// The core itself is outside this module: core_req/core_rsp is its AXI4-Lite
// master port.
// Address map (see r2d2_pkg): memory at 0x0000_0000 (MEM_BYTES), timer at
// 0x4000_0000, watchdog at 0x4001_0000, IPC at 0x4002_0000, external slot k at
// 0x4003_0000 + k*0x1000. Anything else answers DECERR.
// Timing: memory and registers answer one cycle after acceptance; external
// slots add whatever the attached slave needs.
// The set of default peripherals and the sole-master bus follow the
// architecture; the address map and sizes are this design's choice.
module deu
  import r2d2_pkg::*;
#(
  parameter int unsigned         NUM_EXT      = 1,
  parameter int unsigned         NUM_VARS     = 16,
  parameter logic [NUM_VARS-1:0] OWN_MASK     = '0,
  parameter logic [NUM_VARS-1:0] READ_MASK    = '0,
  parameter int unsigned         MEM_BYTES    = 65536,
  parameter int unsigned         TIMER_PERIOD = 100_000,
  parameter int unsigned         WDT_TIMEOUT  = 200_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           core_req,
  output axil_rsp_t           core_rsp,
  output axil_req_t           ext_req [NUM_EXT],
  input  axil_rsp_t           ext_rsp [NUM_EXT],
  output logic [31:0]         var_q   [NUM_VARS],
  input  logic [31:0]         var_in  [NUM_VARS],
  output logic [NUM_VARS-1:0] var_wr,
  output logic                timer_irq,
  output logic                timer_tick,
  output logic                wdt_expired,
  output logic                wdt_reset_req
);
  localparam int unsigned NS = S_EXT0 + NUM_EXT;

  function automatic logic [NS-1:0][31:0] bases();
    logic [NS-1:0][31:0] b;
    b[S_MEM]   = MEM_BASE;
    b[S_TIMER] = TIMER_BASE;
    b[S_WDT]   = WDT_BASE;
    b[S_IPC]   = IPC_BASE;
    for (int k = 0; k < NUM_EXT; k++) b[S_EXT0 + k] = EXT_BASE + 32'(k) * EXT_WIN;
    return b;
  endfunction

  function automatic logic [NS-1:0][31:0] masks();
    logic [NS-1:0][31:0] m;
    m[S_MEM]   = ~(MEM_BYTES - 32'd1);
    m[S_TIMER] = ~(PERIPH_WIN - 32'd1);
    m[S_WDT]   = ~(PERIPH_WIN - 32'd1);
    m[S_IPC]   = ~(PERIPH_WIN - 32'd1);
    for (int k = 0; k < NUM_EXT; k++) m[S_EXT0 + k] = ~(EXT_WIN - 32'd1);
    return m;
  endfunction

  axil_req_t s_req [NS];
  axil_rsp_t s_rsp [NS];

  deu_axi_bus #(.NUM_SLAVES(NS), .BASE(bases()), .MASK(masks())) u_bus (
    .clk, .rst_n, .m_req(core_req), .m_rsp(core_rsp), .s_req, .s_rsp
  );

  deu_mem #(.SIZE_BYTES(MEM_BYTES)) u_mem (
    .clk, .rst_n, .req(s_req[S_MEM]), .rsp(s_rsp[S_MEM])
  );

  deu_timer #(.RESET_PERIOD(TIMER_PERIOD)) u_timer (
    .clk, .rst_n, .req(s_req[S_TIMER]), .rsp(s_rsp[S_TIMER]),
    .irq(timer_irq), .tick(timer_tick)
  );

  deu_watchdog #(.RESET_TIMEOUT(WDT_TIMEOUT)) u_wdt (
    .clk, .rst_n, .req(s_req[S_WDT]), .rsp(s_rsp[S_WDT]),
    .expired(wdt_expired), .reset_req(wdt_reset_req)
  );

  deu_ipc #(.NUM_VARS(NUM_VARS), .OWN_MASK(OWN_MASK), .READ_MASK(READ_MASK)) u_ipc (
    .clk, .rst_n, .req(s_req[S_IPC]), .rsp(s_rsp[S_IPC]),
    .var_q, .var_in, .var_wr
  );

  for (genvar k = 0; k < NUM_EXT; k++) begin : g_ext
    assign ext_req[k]          = s_req[S_EXT0 + k];
    assign s_rsp[S_EXT0 + k]   = ext_rsp[k];
  end

endmodule
