// fm_dummy_master: the "Master" of the Fast Monitoring demonstrator, a
// generator that sends a fixed sequence of five words over and over.
//
// The words are the ones seen in the demonstrator's spy-memory dumps, read
// as 48-bit values 0x4000_0400_0BAD, 0x4000_0600_0BEE, 0x4000_0700_D0E5,
// 0x4000_0780_0FAB, 0x4000_07C0_DEED, zero-extended to DATA_WIDTH; the
// sequence starts with 0x..0BAD after reset. One word is sent every clock
// (valid high) except while the consumer signals almost_full, when the
// generator pauses without losing its place. The loop and its words follow
// the document; the rate and the pause are this design's choices.
module fm_dummy_master #(
  parameter int unsigned DATA_WIDTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  almost_full,
  output logic [DATA_WIDTH-1:0] data,
  output logic                  valid
);

  localparam int unsigned N_WORDS = 5;
  localparam logic [47:0] WORDS [N_WORDS] = '{
    48'h4000_0400_0BAD, 48'h4000_0600_0BEE, 48'h4000_0700_D0E5,
    48'h4000_0780_0FAB, 48'h4000_07C0_DEED };

  logic [2:0] idx;

  assign valid = !almost_full;
  assign data  = DATA_WIDTH'(WORDS[idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     idx <= '0;
    else if (valid) idx <= (idx == 3'(N_WORDS - 1)) ? '0 : idx + 1'b1;
  end

endmodule
