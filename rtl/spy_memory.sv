// spy_memory: the SpyBuffer's circular-buffer storage, a true dual-port RAM
// whose two ports see the same bits with different word widths.
//
// Port A belongs to the data path (clkA = wclock). It is DATA_WIDTH_A wide and
// 2**SPY_MEM_WIDTH_A deep; the write controller stores monitored words through
// it and the playback controller reads test words back through it. Port B
// belongs to the control path (clkB = spy_clock). It is DATA_WIDTH_B wide with
// a SPY_MEM_WIDTH_B-bit address, the width the control interface fixes. With
// the default 128/32 and 9/11 both views cover 512 x 128 = 2048 x 32 bits, so
// SPY_MEM_WIDTH_B must equal SPY_MEM_WIDTH_A + log2(DATA_WIDTH_A/DATA_WIDTH_B);
// elaboration stops otherwise. B-word a*R+k is lane k (bits k*B .. k*B+B-1) of
// A-entry a, the lowest lane at the lowest spy address (this design's choice).
//
// Each port acts only while its enable (en_a, en_b) is high; a write also
// needs we_a/we_b. Timing: both ports are synchronous, read-first, with one cycle of read
// latency (block-RAM style; the latency is this design's choice). A and B
// writing the same location in the same instant is not resolved, as in the
// FPGA primitive this infers; the SpyBuffer never does it in normal use.
//
// The RAM is plain RTL so that synthesis picks block RAM or LUT RAM. The two
// ports run on different clocks and both write the array, which is the usual
// true-dual-port inference template; that is why the two processes are
// written as plain 'always' blocks: SystemVerilog forbids one variable being
// written from two always_ff processes. Lint reports the array as driven from
// two clock domains; that is the dual-port RAM itself and stands as intended.
module spy_memory #(
  parameter int unsigned DATA_WIDTH_A    = 128,
  parameter int unsigned DATA_WIDTH_B    = 32,
  parameter int unsigned SPY_MEM_WIDTH_A = 9,
  parameter int unsigned SPY_MEM_WIDTH_B = 11
) (
  // port A: data path
  input  logic                       clk_a,
  input  logic                       en_a,
  input  logic                       we_a,
  input  logic [SPY_MEM_WIDTH_A-1:0] addr_a,
  input  logic [DATA_WIDTH_A-1:0]    wdata_a,
  output logic [DATA_WIDTH_A-1:0]    rdata_a,
  // port B: control path (memory I/O)
  input  logic                       clk_b,
  input  logic                       en_b,
  input  logic                       we_b,
  input  logic [SPY_MEM_WIDTH_B-1:0] addr_b,
  input  logic [DATA_WIDTH_B-1:0]    wdata_b,
  output logic [DATA_WIDTH_B-1:0]    rdata_b
);

  localparam int unsigned RATIO   = DATA_WIDTH_A / DATA_WIDTH_B;
  localparam int unsigned LANE_W  = $clog2(RATIO);
  localparam int unsigned DEPTH_B = 2 ** SPY_MEM_WIDTH_B;

  if (DATA_WIDTH_A % DATA_WIDTH_B != 0 || RATIO != (1 << LANE_W)) begin : gen_check_ratio
    $error("DATA_WIDTH_A must be a power-of-two multiple of DATA_WIDTH_B");
  end
  if (SPY_MEM_WIDTH_B != SPY_MEM_WIDTH_A + LANE_W) begin : gen_check_width
    $error("SPY_MEM_WIDTH_B must be SPY_MEM_WIDTH_A + log2(DATA_WIDTH_A/DATA_WIDTH_B)");
  end

  logic [DATA_WIDTH_B-1:0]    mem [DEPTH_B];
  logic [SPY_MEM_WIDTH_B-1:0] base_a;   // first B-word of the A-entry

  assign base_a = (SPY_MEM_WIDTH_B)'(addr_a) << LANE_W;

  // Port A: one access covers RATIO consecutive B-words.
  always @(posedge clk_a) begin
    if (en_a) begin
      for (int unsigned k = 0; k < RATIO; k++) begin
        rdata_a[k*DATA_WIDTH_B +: DATA_WIDTH_B] <= mem[base_a + (SPY_MEM_WIDTH_B)'(k)];
        if (we_a)
          mem[base_a + (SPY_MEM_WIDTH_B)'(k)] <= wdata_a[k*DATA_WIDTH_B +: DATA_WIDTH_B];
      end
    end
  end

  // Port B: one B-word per access.
  always @(posedge clk_b) begin
    if (en_b) begin
      rdata_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

endmodule
