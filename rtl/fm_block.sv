// fm_block: the Fast Monitoring block, i.e. one FM control block and N_SB
// SpyBuffers that it drives.
//
// Each SpyBuffer i is placed on one data connection of the user firmware:
// write_data[i]/write_enable[i]/almost_full[i] face the block that produces
// the words (wclock), read_data[i]/empty[i]/read_enable[i] face the block
// that consumes them (rclock). The control bus (spy_clock) reaches the FM
// control registers and, through them, the memories of all SpyBuffers, which
// share the address, write-enable and write-data lines and are selected one
// at a time by their spy_en. error_in freezes all SpyBuffers and raises irq.
// The playback-busy status of each SpyBuffer is returned to the control
// block. The arrangement (global control signals, masks, N SpyBuffers, a
// read and a write interface for their memories, status back) follows the
// document; sharing widths and clocks among all SpyBuffers of one block is
// this design's choice. The default sizes are those of the document's
// two-SpyBuffer demonstrator: 0x20 memory words of 32 bits per SpyBuffer
// (64-bit data words, 16 entries deep) with the output FIFO in place.
module fm_block
  import spybuffer_pkg::*;
#(
  parameter int unsigned N_SB            = 2,
  parameter int unsigned N_MASK_REGS     = 2,
  parameter int unsigned DATA_WIDTH_A    = 64,
  parameter int unsigned SPY_MEM_WIDTH_A = 4,
  parameter int unsigned SPY_MEM_WIDTH_B = 5,
  parameter bit          PASSTHROUGH     = 1'b0,
  parameter int unsigned FIFO_ADDR_WIDTH = 5,
  parameter logic [BUS_ADDR_WIDTH-1:0] CTRL_BASE = 16'h2000,
  parameter logic [BUS_ADDR_WIDTH-1:0] SB_BASE   = 16'h1440,
  parameter logic [32*N_MASK_REGS-1:0] PLAYBACK_MASK_DEFAULT = 64'hFFFFFFFF_F7FFFFFF
) (
  // control path
  input  logic                                spy_clock,
  input  logic                                spy_resetbar,
  input  fm_bus_req_t                         bus_req,
  output fm_bus_rsp_t                         bus_rsp,
  input  logic                                error_in,
  output logic                                irq,
  // data path
  input  logic                                wclock,
  input  logic                                wresetbar,
  input  logic                                rclock,
  input  logic                                rresetbar,
  input  logic [N_SB-1:0][DATA_WIDTH_A-1:0]   write_data,
  input  logic [N_SB-1:0]                     write_enable,
  output logic [N_SB-1:0]                     almost_full,
  input  logic [N_SB-1:0]                     read_enable,
  output logic [N_SB-1:0][DATA_WIDTH_A-1:0]   read_data,
  output logic [N_SB-1:0]                     empty
);

  logic [N_SB-1:0]                       sb_freeze, sb_spy_en, sb_busy;
  playback_mode_e [N_SB-1:0]             sb_playback;
  logic                                  sb_init, sb_spy_we;
  logic [SPY_MEM_WIDTH_B-1:0]            sb_spy_addr;
  logic [BUS_DATA_WIDTH-1:0]             sb_spy_wdata;
  logic [N_SB-1:0][BUS_DATA_WIDTH-1:0]   sb_spy_data;

  fm_control #(
    .N_SB(N_SB), .N_MASK_REGS(N_MASK_REGS), .SPY_MEM_WIDTH_B(SPY_MEM_WIDTH_B),
    .CTRL_BASE(CTRL_BASE), .SB_BASE(SB_BASE), .PLAYBACK_MASK_DEFAULT(PLAYBACK_MASK_DEFAULT)
  ) u_ctrl (
    .clk(spy_clock), .rst_n(spy_resetbar), .bus_req(bus_req), .bus_rsp(bus_rsp),
    .error_in(error_in), .irq(irq),
    .sb_freeze(sb_freeze), .sb_playback(sb_playback), .sb_initialize(sb_init),
    .sb_spy_en(sb_spy_en), .sb_spy_addr(sb_spy_addr), .sb_spy_write_enable(sb_spy_we),
    .sb_spy_write_data(sb_spy_wdata), .sb_spy_data(sb_spy_data), .sb_playback_busy(sb_busy));

  for (genvar i = 0; i < N_SB; i++) begin : gen_sb
    spybuffer #(
      .DATA_WIDTH_A(DATA_WIDTH_A), .DATA_WIDTH_B(BUS_DATA_WIDTH),
      .SPY_MEM_WIDTH_A(SPY_MEM_WIDTH_A), .SPY_MEM_WIDTH_B(SPY_MEM_WIDTH_B),
      .PASSTHROUGH(PASSTHROUGH), .FIFO_ADDR_WIDTH(FIFO_ADDR_WIDTH)
    ) u_sb (
      .wclock(wclock), .wresetbar(wresetbar), .write_data(write_data[i]),
      .write_enable(write_enable[i]), .almost_full(almost_full[i]), .playback_busy(sb_busy[i]),
      .rclock(rclock), .rresetbar(rresetbar), .read_enable(read_enable[i]),
      .read_data(read_data[i]), .empty(empty[i]),
      .spy_clock(spy_clock), .freeze(sb_freeze[i]), .playback(sb_playback[i]),
      .initialize(sb_init), .spy_en(sb_spy_en[i]), .spy_addr(sb_spy_addr),
      .spy_write_enable(sb_spy_we), .spy_write_data(sb_spy_wdata), .spy_data(sb_spy_data[i]));
  end

endmodule
