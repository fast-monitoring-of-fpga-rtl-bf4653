// tb_fm_dummy_slave: an upstream queue model with random availability and a
// downstream with random almost_full. Checks that the slave pops only when a
// word is there and downstream has room, and that every popped word appears
// unchanged on down_data/down_valid exactly one cycle later, in order.
module tb_fm_dummy_slave;
  localparam int unsigned W = 64;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] up_data, down_data;
  logic up_empty, up_read_enable, down_valid, down_almost_full;
  logic [W-1:0] src[400], pend[$];
  int checks = 0, failures = 0, seen = 0, head = 0;

  fm_dummy_slave #(.DATA_WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign up_data = head < 400 ? src[head] : '0;

  always @(posedge clk) if (rst_n) begin
    if (down_valid) begin
      checks++;
      if (pend.size() == 0 || down_data !== pend[0]) begin failures++; $display("FAIL output word"); end
      if (pend.size() > 0) void'(pend.pop_front());
      seen++;
    end
    checks++;
    if (up_read_enable !== (!up_empty && !down_almost_full)) begin failures++; $display("FAIL pop rule"); end
    if (up_read_enable && head < 400) begin
      pend.push_back(src[head]);
      head <= head + 1;
    end
  end

  initial begin
    up_empty = 1; down_almost_full = 0;
    for (int i = 0; i < 400; i++) src[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000 && head < 400; n++) begin
      @(negedge clk);
      up_empty = head >= 400 || ($urandom % 3) == 0;
      down_almost_full = ($urandom % 4) == 0;
    end
    @(negedge clk); up_empty = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (seen != 400) begin failures++; $display("FAIL %0d of 400 words passed", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
