// spy_write_controller: the SpyBuffer's write-pointer logic, which turns the
// spy memory into a circular buffer of the most recent incoming words.
//
// Every cycle in which block A presents a valid word (write_enable) the word
// is stored at the write pointer and the pointer advances by one, wrapping
// from 2**SPY_MEM_WIDTH_A-1 to 0, so the memory always holds the last
// 2**SPY_MEM_WIDTH_A words. While 'freeze' is high monitoring stops: nothing
// is written and the pointer holds, so the snapshot can be read out. This
// follows the document. Two further rules are this design's own: monitoring
// also stops while any playback mode is set (the memory then holds test words
// that must not be overwritten), and while 'initialize' is high the pointer
// is cleared to 0 and nothing is written.
//
// Interface: all inputs are in the wclock domain (freeze, mode and
// initialize already synchronised). mem_we/mem_addr drive spy memory port A
// combinationally, so the word is written at the same clock edge at which
// block A's word is taken: monitoring adds no latency to the data path.
module spy_write_controller
  import spybuffer_pkg::*;
#(
  parameter int unsigned SPY_MEM_WIDTH_A = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       write_enable,  // valid word from block A
  input  logic                       freeze,
  input  playback_mode_e             mode,
  input  logic                       initialize,
  output logic                       mem_we,
  output logic [SPY_MEM_WIDTH_A-1:0] mem_addr       // current write pointer
);

  logic [SPY_MEM_WIDTH_A-1:0] wr_ptr;
  logic                       monitoring;

  assign monitoring = !freeze && mode == PB_NONE && !initialize;
  assign mem_we     = write_enable && monitoring;
  assign mem_addr   = wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
    end else if (initialize) begin
      wr_ptr <= '0;
    end else if (mem_we) begin
      wr_ptr <= wr_ptr + 1'b1;
    end
  end

  // A frozen SpyBuffer never writes its memory.
  assert property (@(posedge clk) disable iff (!rst_n) freeze |-> !mem_we)
    else $error("spy_write_controller: memory written while frozen");

endmodule
