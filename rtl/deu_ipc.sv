// deu_ipc: inter-processor communication controller of one DEU (shared
// variables), an AXI4-Lite slave.
//
// Shared variables are not kept in a common memory. Every variable is a
// dedicated hardware register that lives in the IPC controller of the one DEU
// whose task writes it; the registers are wired straight to the IPC
// controllers of the DEUs whose tasks read it. Reading a variable therefore
// never waits for another DEU, and a DEU cannot write a variable it does not
// own. Variable v has byte offset 4*v in every DEU, so each shared variable
// has one global address.
// Ports: var_q[v] is the register of variable v (zero unless OWN_MASK[v]);
// var_in[v] is the value of variable v as seen by this DEU (wired from the
// owner). A write to an owned variable takes effect one cycle after it is
// accepted and is seen by all readers from then on; 'var_wr' pulses for that
// write. Writes to variables not owned and reads of variables neither owned
// nor listed in READ_MASK answer SLVERR. Byte strobes are honoured.
// Dedicated registers with physical read connections follow the architecture;
// the 32-bit width, NUM_VARS default and error rules are this design's choice.
module deu_ipc
  import r2d2_pkg::*;
#(
  parameter int unsigned         NUM_VARS  = 16,
  parameter logic [NUM_VARS-1:0] OWN_MASK  = '0,
  parameter logic [NUM_VARS-1:0] READ_MASK = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           req,
  output axil_rsp_t           rsp,
  output logic [31:0]         var_q  [NUM_VARS],
  input  logic [31:0]         var_in [NUM_VARS],
  output logic [NUM_VARS-1:0] var_wr
);
  localparam int unsigned VW = $clog2(NUM_VARS);

  logic        we, re, werr, rerr;
  logic [11:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;

  axil_reg_port #(.AW(12)) u_port (
    .clk, .rst_n, .req, .rsp,
    .reg_we(we), .reg_waddr(waddr), .reg_wdata(wdata), .reg_wstrb(wstrb), .reg_werr(werr),
    .reg_re(re), .reg_raddr(raddr), .reg_rdata(rdata), .reg_rerr(rerr)
  );

  logic [VW-1:0] wv, rv;
  logic          win, rin;   // address inside the variable window
  assign wv  = VW'(waddr[11:2]);
  assign rv  = VW'(raddr[11:2]);
  assign win = (32'(waddr[11:2]) < NUM_VARS);
  assign rin = (32'(raddr[11:2]) < NUM_VARS);

  always_comb begin
    werr  = !(win && OWN_MASK[wv]);
    rerr  = !(rin && (OWN_MASK[rv] || READ_MASK[rv]));
    rdata = OWN_MASK[rv] ? var_q[rv] : var_in[rv];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VARS; v++) var_q[v] <= '0;
      var_wr <= '0;
    end else begin
      var_wr <= '0;
      if (we && !werr) begin
        for (int b = 0; b < 4; b++)
          if (wstrb[b]) var_q[wv][8*b +: 8] <= wdata[8*b +: 8];
        var_wr[wv] <= 1'b1;
      end
    end
  end

endmodule
