// fm_control: the Fast Monitoring (FM) control block. It turns register
// writes from the SoC into the freeze, playback and initialise signals of
// every SpyBuffer, and routes the SoC's reads and writes of the SpyBuffer
// memories.
//
// Registers (32-bit words at word addresses, all in clk = spy_clock):
//   CTRL_BASE+0               SPY_CTRL: bit 0 GLOBAL_FREEZE (reset 1),
//                             bits 2:1 GLOBAL_PLAYBACK_MODE (reset 0 = none),
//                             bit 3 INITIALIZE_SPY_MEMORY (reset 1)
//   CTRL_BASE+1 .. +N         FREEZE_MASK_k   (reset 0)
//   CTRL_BASE+1+N .. +2N      PLAYBACK_MASK_k (reset PLAYBACK_MASK_DEFAULT)
//   CTRL_BASE+1+2N            STATUS (read only): bit 0 error freeze active
//   CTRL_BASE+2+2N+k          PLAYBACK_BUSY_k (read only): bit i = SpyBuffer
//                             32k+i is playing back
//   SB_BASE + i*2**SPY_MEM_WIDTH_B + a
//                             word a of SpyBuffer i's spy memory
// with N = N_MASK_REGS. Bit i of mask word k belongs to SpyBuffer 32k+i. A
// mask bit of 0 makes that SpyBuffer follow the global signal; with a 1 it
// ignores it (freeze 0, playback none). SpyBuffer i therefore gets
//   freeze_i   = (GLOBAL_FREEZE & ~FREEZE_MASK[i]) | error_freeze
//   playback_i = PLAYBACK_MASK[i] ? none : GLOBAL_PLAYBACK_MODE.
// Error freeze: a rising edge on error_in (any clock; synchronised here)
// freezes every SpyBuffer whatever the masks and raises irq, so the SoC can
// read out the data around the error; writing SPY_CTRL with GLOBAL_FREEZE = 0
// (the unfreeze command) clears it.
//
// Following the document: the SPY_CTRL fields, their reset values, the mask
// registers and their reset values, the addresses (0x2000.., 0x1440,
// 0x1460), the mask polarity, and the error freeze with interrupt. This
// design's own: the bus protocol, STATUS and PLAYBACK_BUSY registers and
// the placement of windows beyond the first two.
//
// Bus timing: a request (bus_req.req) is acted on at the next clk edge and
// answered in the following cycle with bus_rsp.ack and, for reads,
// bus_rsp.rdata; a request may be made every cycle. Unmapped reads return 0,
// unmapped and read-only writes are ignored.
module fm_control
  import spybuffer_pkg::*;
#(
  parameter int unsigned                  N_SB            = 2,
  parameter int unsigned                  N_MASK_REGS     = 2,
  parameter int unsigned                  SPY_MEM_WIDTH_B = 5,
  parameter logic [BUS_ADDR_WIDTH-1:0]    CTRL_BASE       = 16'h2000,
  parameter logic [BUS_ADDR_WIDTH-1:0]    SB_BASE         = 16'h1440,
  parameter logic [32*N_MASK_REGS-1:0]    PLAYBACK_MASK_DEFAULT = 64'hFFFFFFFF_F7FFFFFF
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // control bus from the SoC
  input  fm_bus_req_t                            bus_req,
  output fm_bus_rsp_t                            bus_rsp,
  // error freeze
  input  logic                                   error_in,
  output logic                                   irq,
  // to the SpyBuffers
  output logic [N_SB-1:0]                        sb_freeze,
  output playback_mode_e [N_SB-1:0]              sb_playback,
  output logic                                   sb_initialize,
  output logic [N_SB-1:0]                        sb_spy_en,
  output logic [SPY_MEM_WIDTH_B-1:0]             sb_spy_addr,
  output logic                                   sb_spy_write_enable,
  output logic [BUS_DATA_WIDTH-1:0]              sb_spy_write_data,
  input  logic [N_SB-1:0][BUS_DATA_WIDTH-1:0]    sb_spy_data,
  input  logic [N_SB-1:0]                        sb_playback_busy
);

  localparam int unsigned MASK_BITS  = 32 * N_MASK_REGS;
  localparam int unsigned WIN        = 2 ** SPY_MEM_WIDTH_B;
  localparam int unsigned A_FMASK    = 1;
  localparam int unsigned A_PMASK    = 1 + N_MASK_REGS;
  localparam int unsigned A_STATUS   = 1 + 2 * N_MASK_REGS;
  localparam int unsigned A_BUSY     = 2 + 2 * N_MASK_REGS;
  localparam int unsigned A_END      = 2 + 3 * N_MASK_REGS;   // first unused offset
  localparam int unsigned IDX_W      = N_SB > 1 ? $clog2(N_SB) : 1;

  if (N_SB > MASK_BITS) begin : gen_check_masks
    $error("fm_control: N_MASK_REGS too small for N_SB");
  end

  // ---------------- registers ----------------
  logic                 g_freeze, g_init;
  playback_mode_e       g_playback;
  logic [MASK_BITS-1:0] freeze_mask, playback_mask;
  logic                 error_freeze;

  // ---------------- address decode ----------------
  logic                          ctrl_hit, sb_hit;
  logic [BUS_ADDR_WIDTH-1:0]     ctrl_off, sb_off;
  logic [IDX_W-1:0]     sb_idx;

  assign ctrl_off = bus_req.addr - CTRL_BASE;
  assign ctrl_hit = bus_req.addr >= CTRL_BASE && ctrl_off < BUS_ADDR_WIDTH'(A_END);
  assign sb_off   = bus_req.addr - SB_BASE;
  assign sb_hit   = bus_req.addr >= SB_BASE && sb_off < BUS_ADDR_WIDTH'(N_SB * WIN);
  assign sb_idx   = IDX_W'(sb_off >> SPY_MEM_WIDTH_B);

  // ---------------- SpyBuffer memory access ----------------
  always_comb begin
    sb_spy_en = '0;
    if (bus_req.req && sb_hit) sb_spy_en[sb_idx] = 1'b1;
  end
  assign sb_spy_addr         = sb_off[SPY_MEM_WIDTH_B-1:0];
  assign sb_spy_write_enable = bus_req.we;
  assign sb_spy_write_data   = bus_req.wdata;

  // ---------------- status inputs ----------------
  logic [N_SB-1:0]      busy_s;
  logic [MASK_BITS-1:0] busy_bits;
  logic                 error_s, error_q;

  cdc_sync #(.WIDTH(N_SB)) u_sync_busy (.clk(clk), .rst_n(rst_n), .d(sb_playback_busy), .q(busy_s));
  cdc_sync #(.WIDTH(1))    u_sync_err  (.clk(clk), .rst_n(rst_n), .d(error_in),         .q(error_s));
  assign busy_bits = MASK_BITS'(busy_s);

  // ---------------- register writes ----------------
  logic ctrl_wr;
  assign ctrl_wr = bus_req.req && bus_req.we && ctrl_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_freeze      <= 1'b1;
      g_playback    <= PB_NONE;
      g_init        <= 1'b1;
      freeze_mask   <= '0;
      playback_mask <= PLAYBACK_MASK_DEFAULT;
      error_freeze  <= 1'b0;
      error_q       <= 1'b0;
    end else begin
      error_q <= error_s;
      if (error_s && !error_q) error_freeze <= 1'b1;
      if (ctrl_wr) begin
        if (ctrl_off == '0) begin
          g_freeze   <= bus_req.wdata[CTRL_FREEZE_BIT];
          g_playback <= playback_mode_e'(bus_req.wdata[CTRL_PB_LSB +: 2]);
          g_init     <= bus_req.wdata[CTRL_INIT_BIT];
          if (!bus_req.wdata[CTRL_FREEZE_BIT]) error_freeze <= 1'b0;
        end
        for (int unsigned k = 0; k < N_MASK_REGS; k++) begin
          if (ctrl_off == BUS_ADDR_WIDTH'(A_FMASK + k)) freeze_mask[32*k +: 32]   <= bus_req.wdata;
          if (ctrl_off == BUS_ADDR_WIDTH'(A_PMASK + k)) playback_mask[32*k +: 32] <= bus_req.wdata;
        end
      end
    end
  end

  // ---------------- per-SpyBuffer control ----------------
  always_comb begin
    for (int unsigned i = 0; i < N_SB; i++) begin
      sb_freeze[i]   = (g_freeze && !freeze_mask[i]) || error_freeze;
      sb_playback[i] = playback_mask[i] ? PB_NONE : g_playback;
    end
  end
  assign sb_initialize = g_init;
  assign irq           = error_freeze;

  // ---------------- read data ----------------
  logic [BUS_DATA_WIDTH-1:0] reg_rdata, reg_rdata_q;
  logic                      sb_rd_q;
  logic [IDX_W-1:0] sb_idx_q;

  always_comb begin
    reg_rdata = '0;
    if (ctrl_hit) begin
      if (ctrl_off == '0) begin
        reg_rdata[CTRL_FREEZE_BIT]     = g_freeze;
        reg_rdata[CTRL_PB_LSB +: 2]    = g_playback;
        reg_rdata[CTRL_INIT_BIT]       = g_init;
      end
      if (ctrl_off == BUS_ADDR_WIDTH'(A_STATUS)) reg_rdata[0] = error_freeze;
      for (int unsigned k = 0; k < N_MASK_REGS; k++) begin
        if (ctrl_off == BUS_ADDR_WIDTH'(A_FMASK + k)) reg_rdata = freeze_mask[32*k +: 32];
        if (ctrl_off == BUS_ADDR_WIDTH'(A_PMASK + k)) reg_rdata = playback_mask[32*k +: 32];
        if (ctrl_off == BUS_ADDR_WIDTH'(A_BUSY + k))  reg_rdata = busy_bits[32*k +: 32];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rsp.ack <= 1'b0;
      reg_rdata_q <= '0;
      sb_rd_q     <= 1'b0;
      sb_idx_q    <= '0;
    end else begin
      bus_rsp.ack <= bus_req.req;
      reg_rdata_q <= reg_rdata;
      sb_rd_q     <= bus_req.req && sb_hit;
      sb_idx_q    <= sb_idx;
    end
  end

  assign bus_rsp.rdata = sb_rd_q ? sb_spy_data[sb_idx_q] : reg_rdata_q;

  // Bus rule: every request is acknowledged in the next cycle, and only then.
  assert property (@(posedge clk) disable iff (!rst_n) bus_req.req |=> bus_rsp.ack)
    else $error("fm_control: request not acknowledged");
  assert property (@(posedge clk) disable iff (!rst_n) !bus_req.req |=> !bus_rsp.ack)
    else $error("fm_control: acknowledge without request");

endmodule
