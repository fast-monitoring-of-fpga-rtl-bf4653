// spybuffer: a small block placed on the connection between two firmware
// blocks A and B that "spies" on the words passing from A to B and can
// "inject" words of its own.
//
// Data path (wclock): every valid word from A (write_data/write_enable) goes
// through the playback mux to B without added latency, and a copy is written
// into the spy memory, a circular buffer that always holds the last
// 2**SPY_MEM_WIDTH_A words (spy_write_controller). With PASSTHROUGH = 0 a
// dual-clock FIFO sits after the mux and B reads it in rclock (read_enable,
// read_data, empty; almost_full tells A to pause). With PASSTHROUGH = 1 there
// is no FIFO, wclock and rclock must be the same clock, read_data/empty follow
// the mux output directly (empty = no valid word this cycle), read_enable,
// rclock and rresetbar are unused and almost_full is 0.
//
// Control path (spy_clock): freeze stops monitoring while the data keeps
// flowing, so the memory holds a snapshot; spy_en/spy_addr/spy_write_enable/
// spy_write_data/spy_data read and write that memory DATA_WIDTH_B bits at a
// time (one spy_clock of read latency). playback (spybuffer_pkg::
// playback_mode_e) selects NONE, WRITE (memory being loaded with test words),
// ONCE or LOOP; in ONCE/LOOP the mux sends the memory contents to B instead of
// A's words (spy_playback_controller).
//
// Following the document: the port names and the parameters DATA_WIDTH_A,
// DATA_WIDTH_B, SPY_MEM_WIDTH_A, SPY_MEM_WIDTH_B and PASSTHROUGH, with the
// defaults of its resource-usage example (128, 32, 9, 11, 0), the three
// clock domains, freeze, the playback modes and the mux/FIFO arrangement.
// This design's own choices: the 'initialize' input (the FM control bit
// INITIALIZE_SPY_MEMORY: clears the write pointer and the record of loaded
// words), the 'playback_busy' status output, the playback length (entries 0
// up to the highest one loaded in WRITE mode), the FIFO depth and
// almost_full margin, and that monitoring pauses in every playback mode.
//
// Clock crossings: freeze, playback and initialize are levels from
// spy_clock; each passes a two-flop synchroniser into wclock, and the two
// playback bits are only taken once they have agreed for two cycles, so a
// mode change never shows an intermediate code. Control changes therefore
// act three to four wclock edges after they are made. There is no reset in
// the spy_clock domain (none is listed for it); its only state, the record of
// loaded words, is cleared by 'initialize'.
module spybuffer
  import spybuffer_pkg::*;
#(
  parameter int unsigned DATA_WIDTH_A    = 128,
  parameter int unsigned DATA_WIDTH_B    = 32,
  parameter int unsigned SPY_MEM_WIDTH_A = 9,
  parameter int unsigned SPY_MEM_WIDTH_B = 11,
  parameter bit          PASSTHROUGH     = 1'b0,
  parameter int unsigned FIFO_ADDR_WIDTH = 5
) (
  // WCLOCK domain
  input  logic                       wclock,
  input  logic                       wresetbar,
  input  logic [DATA_WIDTH_A-1:0]    write_data,
  input  logic                       write_enable,
  output logic                       almost_full,
  output logic                       playback_busy,
  // RCLOCK domain
  input  logic                       rclock,
  input  logic                       rresetbar,
  input  logic                       read_enable,
  output logic [DATA_WIDTH_A-1:0]    read_data,
  output logic                       empty,
  // SPY_CLOCK domain
  input  logic                       spy_clock,
  input  logic                       freeze,
  input  playback_mode_e             playback,
  input  logic                       initialize,
  input  logic                       spy_en,
  input  logic [SPY_MEM_WIDTH_B-1:0] spy_addr,
  input  logic                       spy_write_enable,
  input  logic [DATA_WIDTH_B-1:0]    spy_write_data,
  output logic [DATA_WIDTH_B-1:0]    spy_data
);

  localparam int unsigned LANE_W = SPY_MEM_WIDTH_B - SPY_MEM_WIDTH_A;

  // ------------------------------------------------------------------
  // spy_clock domain: record how far the memory was loaded in WRITE mode
  // ------------------------------------------------------------------
  playback_mode_e             pb_spy_q;
  logic [SPY_MEM_WIDTH_A-1:0] last_entry, spy_entry;
  logic                       last_valid, load_start, load_wr;

  assign spy_entry  = spy_addr[SPY_MEM_WIDTH_B-1:LANE_W];
  assign load_start = playback == PB_WRITE && pb_spy_q != PB_WRITE;
  assign load_wr    = playback == PB_WRITE && spy_en && spy_write_enable;

  always_ff @(posedge spy_clock) begin
    if (initialize) begin
      pb_spy_q   <= PB_NONE;
      last_valid <= 1'b0;
      last_entry <= '0;
    end else begin
      pb_spy_q <= playback;
      if (load_wr) begin
        last_valid <= 1'b1;
        if (load_start || !last_valid || spy_entry > last_entry) last_entry <= spy_entry;
      end else if (load_start) begin
        last_valid <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------
  // control levels into wclock
  // ------------------------------------------------------------------
  logic           freeze_w, init_w;
  logic [1:0]     pb_s, pb_s2;
  playback_mode_e mode_w;

  cdc_sync #(.WIDTH(1)) u_sync_freeze (.clk(wclock), .rst_n(wresetbar), .d(freeze),     .q(freeze_w));
  cdc_sync #(.WIDTH(1)) u_sync_init   (.clk(wclock), .rst_n(wresetbar), .d(initialize), .q(init_w));
  cdc_sync #(.WIDTH(2)) u_sync_pb     (.clk(wclock), .rst_n(wresetbar), .d(playback),   .q(pb_s));

  always_ff @(posedge wclock or negedge wresetbar) begin
    if (!wresetbar) begin
      pb_s2  <= PB_NONE;
      mode_w <= PB_NONE;
    end else begin
      pb_s2 <= pb_s;
      if (pb_s == pb_s2) mode_w <= playback_mode_e'(pb_s);
    end
  end

  // ------------------------------------------------------------------
  // wclock domain: write controller, playback controller, memory, mux
  // ------------------------------------------------------------------
  logic                       mem_we, pb_rd_en, pb_select, pb_valid, out_ready;
  logic [SPY_MEM_WIDTH_A-1:0] wr_ptr, pb_addr, addr_a;
  logic [DATA_WIDTH_A-1:0]    rdata_a, mux_data;
  logic                       mux_valid;

  spy_write_controller #(.SPY_MEM_WIDTH_A(SPY_MEM_WIDTH_A)) u_wr_ctrl (
    .clk(wclock), .rst_n(wresetbar), .write_enable(write_enable), .freeze(freeze_w),
    .mode(mode_w), .initialize(init_w), .mem_we(mem_we), .mem_addr(wr_ptr));

  spy_playback_controller #(.SPY_MEM_WIDTH_A(SPY_MEM_WIDTH_A)) u_pb_ctrl (
    .clk(wclock), .rst_n(wresetbar), .mode(mode_w), .last_entry(last_entry),
    .last_valid(last_valid), .out_ready(out_ready), .rd_en(pb_rd_en), .rd_addr(pb_addr),
    .pb_select(pb_select), .pb_valid(pb_valid), .busy(playback_busy));

  assign addr_a = pb_select ? pb_addr : wr_ptr;

  spy_memory #(
    .DATA_WIDTH_A(DATA_WIDTH_A), .DATA_WIDTH_B(DATA_WIDTH_B),
    .SPY_MEM_WIDTH_A(SPY_MEM_WIDTH_A), .SPY_MEM_WIDTH_B(SPY_MEM_WIDTH_B)
  ) u_spy_memory (
    .clk_a(wclock), .en_a(mem_we || pb_rd_en), .we_a(mem_we), .addr_a(addr_a), .wdata_a(write_data), .rdata_a(rdata_a),
    .clk_b(spy_clock), .en_b(spy_en), .we_b(spy_write_enable), .addr_b(spy_addr),
    .wdata_b(spy_write_data), .rdata_b(spy_data));

  playback_mux #(.WIDTH(DATA_WIDTH_A)) u_mux (
    .sel(pb_select), .in_data(write_data), .in_valid(write_enable),
    .pb_data(rdata_a), .pb_valid(pb_valid), .out_data(mux_data), .out_valid(mux_valid));

  // ------------------------------------------------------------------
  // output: direct or through the dual-clock FIFO
  // ------------------------------------------------------------------
  if (PASSTHROUGH) begin : gen_passthrough
    assign read_data   = mux_data;
    assign empty       = !mux_valid;
    assign almost_full = 1'b0;
    assign out_ready   = 1'b1;
  end else begin : gen_fifo
    logic fifo_full, fifo_af;
    spy_async_fifo #(.WIDTH(DATA_WIDTH_A), .ADDR_WIDTH(FIFO_ADDR_WIDTH)) u_fifo (
      .wclk(wclock), .wrst_n(wresetbar), .wr_en(mux_valid), .wdata(mux_data),
      .full(fifo_full), .almost_full(fifo_af),
      .rclk(rclock), .rrst_n(rresetbar), .rd_en(read_enable), .rdata(read_data), .empty(empty));
    assign almost_full = fifo_af;
    assign out_ready   = !fifo_af;

    // Block A must respect almost_full: a word offered to a full FIFO is lost.
    assert property (@(posedge wclock) disable iff (!wresetbar) mux_valid |-> !fifo_full)
      else $error("spybuffer: word written while the output FIFO is full");
  end

endmodule
