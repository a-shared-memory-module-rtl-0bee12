// smm_pkg: types and constants shared by the FIFO-buffered shared memory module.
//
// A processor talks to the memory module with 18-bit tokens: a 16-bit word plus
// two flag bits, cfgen (configuration address space) and wren (write, or "more
// data tokens follow"). The command encodings below are the module's programming
// interface: memory read/write (cfgen=0), port configuration (cfgen=1, wren=0,
// bits 15:12 = 0000), address generator configuration (cfgen=1, wren=1, 1000),
// burst read/write (cfgen=1, 1100) and mutex request/release (cfgen=1, wren=0,
// 1111, bits 7:4 = 0001 / 0010). Port register layouts follow the port and data
// configuration registers: {p, -, -, out_port[2:0], mode[1:0]} and
// {-, -, data_out[2:0], data_in[2:0]}.
//
// The pipeline item that leaves an input port for a shared resource is a
// request_t; its kinds are this design's own naming.
package smm_pkg;

  localparam int unsigned DW      = 16;  // data and address word
  localparam int unsigned NPORTS  = 4;   // input/output port pairs
  localparam int unsigned NMUTEX  = 4;   // hardware mutexes
  localparam int unsigned NAGEN   = 4;   // address generators

  typedef struct packed {
    logic          cfgen;
    logic          wren;
    logic [DW-1:0] data;
  } token_t;

  // Input port modes (mode field of port configuration register 0)
  typedef enum logic [1:0] {
    MODE_DISABLED  = 2'b00,
    MODE_DATA_ONLY = 2'b01,
    MODE_ADDR_ONLY = 2'b10,
    MODE_ADDR_DATA = 2'b11
  } port_mode_e;

  // Upper nibble of a configuration-space command token
  localparam logic [3:0] OP_PORT_CFG = 4'b0000;
  localparam logic [3:0] OP_AGEN_CFG = 4'b1000;
  localparam logic [3:0] OP_BURST    = 4'b1100;
  localparam logic [3:0] OP_MUTEX    = 4'b1111;
  localparam logic [3:0] MUTEX_REQ   = 4'b0001;
  localparam logic [3:0] MUTEX_REL   = 4'b0010;

  // Address generator configuration space
  localparam logic [7:0] AG_OFFSET    = 8'd0;
  localparam logic [7:0] AG_BLOCKSIZE = 8'd1;
  localparam logic [7:0] AG_STRIDE    = 8'd2;

  // Input port FSM. Bit 2 marks a burst in progress and bit 0 that incoming
  // tokens are data for the request held in AR (port_ps2 / port_ps0 of the
  // issue equations).
  typedef enum logic [2:0] {
    PS_INIT     = 3'b000,
    PS_MEM_WR   = 3'b001,
    PS_CFG_WR   = 3'b011,
    PS_BURST    = 3'b100,
    PS_BURST_WR = 3'b101
  } port_state_e;

  // Request held in the second input port stage, waiting for a shared resource
  typedef enum logic [1:0] {
    RQ_MEM_RD    = 2'd0,
    RQ_MEM_WR    = 2'd1,
    RQ_MUTEX_REQ = 2'd2,
    RQ_MUTEX_REL = 2'd3
  } req_kind_e;

  typedef struct packed {
    logic              valid;
    req_kind_e         kind;
    logic [DW-1:0]     addr;
    logic [DW-1:0]     wdata;
    logic [1:0]        dest;    // output port for read data
    logic [NMUTEX-1:0] mutex;   // one-hot mutex select
  } request_t;

  typedef struct packed {
    logic       prio;
    logic [1:0] unused;
    logic [2:0] out_port;
    port_mode_e mode;
  } port_cfg0_t;

  typedef struct packed {
    logic [1:0] unused;
    logic [2:0] data_out;
    logic [2:0] data_in;
  } port_cfg1_t;

endpackage
