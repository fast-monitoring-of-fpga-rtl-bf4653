// fm_dummy_top: the Fast Monitoring demonstrator. A "Master" generator feeds
// SpyBuffer SB_DUMMY0, whose output goes through a pass-through "Slave" into
// SpyBuffer SB_DUMMY1; both SpyBuffers belong to one FM block whose control
// bus is brought out for the SoC.
//
//   master -> SB_DUMMY0 -> slave -> SB_DUMMY1 -> out_*
//
// In normal operation the words of the master reach out_data and both spy
// memories keep the last 16 words (0x20 32-bit spy words) that passed. With
// SB_DUMMY0 frozen its memory can be read at 0x1440..0x145F while data keeps
// flowing; loaded with test words and set to playback, SB_DUMMY0 sends those
// words to the slave instead of the master's, and they appear in SB_DUMMY1's
// memory (0x1460..0x147F) and at the output. SPY_CTRL is at 0x2000, the
// masks at 0x2001..0x2004 (bit 0 of each mask word is SB_DUMMY0, bit 1
// SB_DUMMY1). The chain, addresses and sizes follow the document; exposing
// SB_DUMMY1's output as ports and using a single data clock for master,
// slave and both SpyBuffers are this design's choices. The SoC side (AXI
// interconnect, chip-to-chip link) is outside this design: bus_req/bus_rsp
// is the register bus it would drive.
module fm_dummy_top
  import spybuffer_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 64
) (
  input  logic                  clk,           // data-path clock
  input  logic                  rst_n,         // data-path reset, active low
  input  logic                  spy_clock,     // control clock
  input  logic                  spy_resetbar,  // control reset, active low
  input  fm_bus_req_t           bus_req,
  output fm_bus_rsp_t           bus_rsp,
  input  logic                  error_in,
  output logic                  irq,
  input  logic                  out_read_enable,
  output logic [DATA_WIDTH-1:0] out_data,
  output logic                  out_empty
);

  logic [1:0][DATA_WIDTH-1:0] sb_wdata, sb_rdata;
  logic [1:0]                 sb_we, sb_af, sb_re, sb_empty;

  fm_dummy_master #(.DATA_WIDTH(DATA_WIDTH)) u_master (
    .clk(clk), .rst_n(rst_n), .almost_full(sb_af[0]), .data(sb_wdata[0]), .valid(sb_we[0]));

  fm_dummy_slave #(.DATA_WIDTH(DATA_WIDTH)) u_slave (
    .clk(clk), .rst_n(rst_n), .up_data(sb_rdata[0]), .up_empty(sb_empty[0]),
    .up_read_enable(sb_re[0]), .down_data(sb_wdata[1]), .down_valid(sb_we[1]),
    .down_almost_full(sb_af[1]));

  fm_block #(
    .N_SB(2), .DATA_WIDTH_A(DATA_WIDTH),
    .SPY_MEM_WIDTH_A(5 - $clog2(DATA_WIDTH / BUS_DATA_WIDTH)), .SPY_MEM_WIDTH_B(5)
  ) u_fm (
    .spy_clock(spy_clock), .spy_resetbar(spy_resetbar), .bus_req(bus_req), .bus_rsp(bus_rsp),
    .error_in(error_in), .irq(irq),
    .wclock(clk), .wresetbar(rst_n), .rclock(clk), .rresetbar(rst_n),
    .write_data(sb_wdata), .write_enable(sb_we), .almost_full(sb_af),
    .read_enable(sb_re), .read_data(sb_rdata), .empty(sb_empty));

  assign sb_re[1]  = out_read_enable;
  assign out_data  = sb_rdata[1];
  assign out_empty = sb_empty[1];

endmodule
