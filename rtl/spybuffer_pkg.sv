// spybuffer_pkg: types and constants shared by the SpyBuffer and the Fast
// Monitoring (FM) control path.
//
// playback_mode_e is the two-bit playback command sent from the FM control
// block to each SpyBuffer. The values (0 none, 1 once, 2 loop, 3 write) are
// the ones the reference simulation shows on the playback bus; the register
// field GLOBAL_PLAYBACK_MODE (bits 2:1 of SPY_CTRL) carries the same code.
//
// The control bus is this design's own simple register bus: a request is
// taken in one spy_clock cycle and answered, with read data, in the next.
// Addresses are 32-bit word addresses as on IPbus, cut to 16 bits because
// every register of the design lies below 0x10000.
package spybuffer_pkg;

  typedef enum logic [1:0] {
    PB_NONE  = 2'd0,  // data from block A flows to block B, monitoring on
    PB_ONCE  = 2'd1,  // spy memory contents replace the stream, one pass
    PB_LOOP  = 2'd2,  // spy memory contents replace the stream, repeated
    PB_WRITE = 2'd3   // spy memory is being loaded with test words
  } playback_mode_e;

  localparam int unsigned BUS_ADDR_WIDTH = 16;
  localparam int unsigned BUS_DATA_WIDTH = 32;

  typedef struct packed {
    logic                      req;    // one-cycle access request
    logic                      we;     // 1 write, 0 read
    logic [BUS_ADDR_WIDTH-1:0] addr;   // word address
    logic [BUS_DATA_WIDTH-1:0] wdata;  // write data
  } fm_bus_req_t;

  typedef struct packed {
    logic                      ack;    // request of the previous cycle done
    logic [BUS_DATA_WIDTH-1:0] rdata;  // read data, valid with ack
  } fm_bus_rsp_t;

  // Field positions of SPY_CTRL
  localparam int unsigned CTRL_FREEZE_BIT = 0;
  localparam int unsigned CTRL_PB_LSB     = 1;
  localparam int unsigned CTRL_INIT_BIT   = 3;

endpackage
