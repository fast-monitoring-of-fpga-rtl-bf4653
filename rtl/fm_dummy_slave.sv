// fm_dummy_slave: the "Slave" of the Fast Monitoring demonstrator, a
// pass-through block between two SpyBuffers.
//
// It pops a word from the upstream SpyBuffer's FIFO whenever one is there
// (up_empty low) and the downstream SpyBuffer is not almost full, and
// presents it, unchanged, on down_data/down_valid in the next cycle: one
// register stage, one word per clock. The pass-through function follows the
// document; the register stage and the flow control are this design's.
module fm_dummy_slave #(
  parameter int unsigned DATA_WIDTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DATA_WIDTH-1:0] up_data,
  input  logic                  up_empty,
  output logic                  up_read_enable,
  output logic [DATA_WIDTH-1:0] down_data,
  output logic                  down_valid,
  input  logic                  down_almost_full
);

  assign up_read_enable = !up_empty && !down_almost_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      down_valid <= 1'b0;
      down_data  <= '0;
    end else begin
      down_valid <= up_read_enable;
      if (up_read_enable) down_data <= up_data;
    end
  end

endmodule
