// r2d2_pkg: types and constants shared by the DEU fabric.
//
// Every bus in this design is AXI4-Lite: 32-bit addresses, 32-bit data, one
// transfer per transaction. A master drives an axil_req_t and receives an
// axil_rsp_t; a slave does the reverse. The structs carry all five channels so
// that one port pair describes a whole link. The address map below is the one
// every DEU uses; the shared-variable window in particular sits at the same
// address in all DEUs, so a shared variable has one global address.
// The AXI bus, the default peripheral set and the global shared-variable
// addresses follow the architecture; the concrete base addresses, sizes and
// register layouts are this design's choice.
package r2d2_pkg;

  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // DEU address map. Local memory at 0, default peripherals in 64 KiB windows,
  // further (task-specific, queue, semaphore, shared-bus) slaves in 4 KiB slots.
  localparam logic [31:0] MEM_BASE   = 32'h0000_0000;
  localparam logic [31:0] TIMER_BASE = 32'h4000_0000;
  localparam logic [31:0] WDT_BASE   = 32'h4001_0000;
  localparam logic [31:0] IPC_BASE   = 32'h4002_0000;
  localparam logic [31:0] EXT_BASE   = 32'h4003_0000;
  localparam int unsigned PERIPH_WIN = 32'h0001_0000;
  localparam int unsigned EXT_WIN    = 32'h0000_1000;

  // Slave indices on a DEU bus.
  localparam int unsigned S_MEM   = 0;
  localparam int unsigned S_TIMER = 1;
  localparam int unsigned S_WDT   = 2;
  localparam int unsigned S_IPC   = 3;
  localparam int unsigned S_EXT0  = 4;

endpackage
