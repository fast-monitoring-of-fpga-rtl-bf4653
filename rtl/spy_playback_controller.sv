// spy_playback_controller: reads the spy memory back into the data path in
// the playback modes.
//
// When the playback mode changes to ONCE or LOOP the controller starts at
// entry 0 and, on every cycle in which the output can take a word (out_ready,
// i.e. the downstream FIFO is not almost full), reads the next entry through
// spy memory port A. ONCE stops after the last entry; LOOP goes back to entry
// 0 and repeats for as long as the mode stays LOOP. Any other mode stops it.
// That playback replaces the stream from block A, once or in a loop, follows
// the document. How far a playback runs is this design's choice: up to
// last_entry, the highest entry loaded through the spy port while the mode
// was WRITE (last_valid high), or the whole memory if nothing was loaded.
// This reproduces the document's example, where ten loaded words arrive
// downstream as ten words.
//
// Timing: mode is in the wclock domain. last_entry/last_valid come from the
// spy_clock domain but only change while the mode is WRITE; they are sampled
// when a playback starts, by which time the mode change has passed a two-flop
// synchroniser, so they are stable. rd_en/rd_addr drive port A; the memory
// answers one cycle later, and pb_valid marks that cycle. Throughput is one
// word per clock.
module spy_playback_controller
  import spybuffer_pkg::*;
#(
  parameter int unsigned SPY_MEM_WIDTH_A = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  playback_mode_e             mode,
  input  logic [SPY_MEM_WIDTH_A-1:0] last_entry,
  input  logic                       last_valid,
  input  logic                       out_ready,
  output logic                       rd_en,
  output logic [SPY_MEM_WIDTH_A-1:0] rd_addr,
  output logic                       pb_select,   // mux takes memory words
  output logic                       pb_valid,    // memory word valid this cycle
  output logic                       busy
);

  playback_mode_e             mode_q;
  logic                       active;
  logic [SPY_MEM_WIDTH_A-1:0] ptr, last_q;
  logic                       start, playing;

  assign playing   = mode == PB_ONCE || mode == PB_LOOP;
  assign start     = playing && mode != mode_q;
  assign pb_select = playing;
  assign rd_en     = active && playing && !start && out_ready;
  assign rd_addr   = ptr;
  assign busy      = active || pb_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q   <= PB_NONE;
      active   <= 1'b0;
      ptr      <= '0;
      last_q   <= '0;
      pb_valid <= 1'b0;
    end else begin
      mode_q   <= mode;
      pb_valid <= rd_en;
      if (start) begin
        active <= 1'b1;
        ptr    <= '0;
        last_q <= last_valid ? last_entry : '1;
      end else if (!playing) begin
        active <= 1'b0;
      end else if (rd_en) begin
        if (ptr == last_q) begin
          ptr <= '0;
          if (mode == PB_ONCE) active <= 1'b0;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
