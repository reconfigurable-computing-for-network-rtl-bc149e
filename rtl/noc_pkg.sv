// noc_pkg: types and constants shared by the NFV platform.
//
// The platform moves Ethernet traffic between PHY ports and partial
// reconfiguration regions (PRRs) over a network on chip (NoC). Every NoC
// link is an AXI4-stream link; the NoC destination address travels in the
// stream's user channel next to the data, as the platform description
// requires. Configuration of NoC interfaces and routers uses AXI4-lite.
//
// Choices of this design (the description gives no widths): a 64-bit data
// path, which is what a 10 Gb/s port needs at the 156.25 MHz PHY clock;
// 8-bit NoC addresses; 32-bit AXI4-lite with 24-bit addresses, whose top
// byte selects the slave and whose low 16 bits select the register.
package noc_pkg;

  localparam int unsigned DATA_W     = 64;
  localparam int unsigned KEEP_W     = DATA_W / 8;
  localparam int unsigned NOC_ADDR_W = 8;
  localparam int unsigned AXIL_AW    = 24;
  localparam int unsigned AXIL_DW    = 32;

  typedef logic [NOC_ADDR_W-1:0] noc_addr_t;

  // One AXI4-stream beat. tuser carries the NoC destination.
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
    noc_addr_t         tuser;
  } axis_beat_t;

  // AXI4-lite, master to slave.
  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_m2s_t;

  // AXI4-lite, slave to master.
  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_s2m_t;


  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Virtual network functions a PRR can hold (Table I of the description,
  // without the Ethernet MAC, which is vendor IP and not modelled).
  typedef enum logic [1:0] {
    VNF_EMPTY      = 2'd0,
    VNF_ETH_PARSER = 2'd1,
    VNF_IP_PARSER  = 2'd2,
    VNF_UDP_PARSER = 2'd3
  } vnf_e;

  // Host commands of the central controller.
  typedef enum logic [1:0] {
    CMD_WRITE  = 2'd0,  // AXI4-lite write now
    CMD_READ   = 2'd1,  // AXI4-lite read now
    CMD_STAGE  = 2'd2,  // store a write for the next switch-over
    CMD_SWITCH = 2'd3   // run the loss-free switch-over, data = buffer mask
  } host_op_e;

  typedef struct packed {
    host_op_e           op;
    logic [AXIL_AW-1:0] addr;
    logic [AXIL_DW-1:0] data;
  } host_cmd_t;

  // Byte b of a beat (byte 0 is the first on the wire).
  function automatic logic [7:0] beat_byte(logic [DATA_W-1:0] d, int unsigned b);
    return d[8*b +: 8];
  endfunction

  // Number of valid bytes of a beat whose tkeep is contiguous from byte 0.
  function automatic logic [3:0] keep_bytes(logic [KEEP_W-1:0] k);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < KEEP_W; i++) n += {3'b0, k[i]};
    return n;
  endfunction

endpackage
