// playback_mux: chooses the word the SpyBuffer sends on towards block B.
//
// With sel low the incoming word from block A and its valid pass straight
// through (no register, no added latency). With sel high, in the playback
// modes ONCE and LOOP, the word read from the spy memory and its valid are
// sent instead, and words arriving from block A are dropped. The selection
// follows the document; dropping block A's words during playback is this
// design's choice. Purely combinational.
module playback_mux #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] pb_data,
  input  logic             pb_valid,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid
);

  always_comb begin
    if (sel) begin
      out_data  = pb_data;
      out_valid = pb_valid;
    end else begin
      out_data  = in_data;
      out_valid = in_valid;
    end
  end

endmodule
