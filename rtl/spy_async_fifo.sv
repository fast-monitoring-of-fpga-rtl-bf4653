// spy_async_fifo: the optional dual-clock FIFO at the SpyBuffer output, used
// when the SpyBuffer also moves the data path from wclock to rclock
// (PASSTHROUGH = 0) or when block B needs a buffered interface.
//
// Classic Gray-pointer design: each side keeps a binary pointer one bit wider
// than the address and publishes its Gray code; the other side brings that in
// through a two-flop synchroniser. Storage is a 2**ADDR_WIDTH-entry array
// written in wclock and read asynchronously, so read_data shows the word at
// the head of the queue whenever empty is low (first-word-fall-through):
// read_enable with empty low pops it. almost_full rises when AF_MARGIN or
// fewer entries are free, which leaves room for words already in flight in
// the writer; a write while full is dropped. Depth, threshold and read style
// are this design's choices; the document only says that a dual-clock FIFO
// can be added.
//
// Timing: a write becomes visible to the reader two to three rclock edges
// later; a pop frees space for the writer two to three wclock edges later.
module spy_async_fifo #(
  parameter int unsigned WIDTH      = 128,
  parameter int unsigned ADDR_WIDTH = 5,
  parameter int unsigned AF_MARGIN  = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             almost_full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned DEPTH = 2 ** ADDR_WIDTH;
  typedef logic [ADDR_WIDTH:0] ptr_t;

  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[ADDR_WIDTH] = g[ADDR_WIDTH];
    for (int i = int'(ADDR_WIDTH) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];
  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w, wgray_r;      // synchronised copies
  ptr_t rbin_w, used_w;

  // ---------------- write side (wclk) ----------------
  cdc_sync #(.WIDTH(ADDR_WIDTH + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_w));

  assign rbin_w      = gray2bin(rgray_w);
  assign used_w      = wbin - rbin_w;
  assign full        = used_w == ptr_t'(DEPTH);
  assign almost_full = used_w >= ptr_t'(DEPTH - AF_MARGIN);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[ADDR_WIDTH-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr_en && !full) begin
      wbin  <= wbin + 1'b1;
      wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
    end
  end

  // ---------------- read side (rclk) ----------------
  cdc_sync #(.WIDTH(ADDR_WIDTH + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r));

  assign empty = rgray == wgray_r;
  assign rdata = mem[rbin[ADDR_WIDTH-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en && !empty) begin
      rbin  <= rbin + 1'b1;
      rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
    end
  end

endmodule
