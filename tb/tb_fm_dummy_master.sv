// tb_fm_dummy_master: with random almost_full, checks that valid is the
// inverse of almost_full and that the accepted words run through the
// five-word loop (..0BAD, ..0BEE, ..D0E5, ..0FAB, ..DEED) in order without
// skipping or repeating across stalls.
module tb_fm_dummy_master;
  localparam int unsigned W = 64;
  logic clk = 0, rst_n = 0, almost_full, valid;
  logic [W-1:0] data;
  logic [W-1:0] exp [5] = '{64'h4000_0400_0BAD, 64'h4000_0600_0BEE, 64'h4000_0700_D0E5,
                            64'h4000_0780_0FAB, 64'h4000_07C0_DEED};
  int checks = 0, failures = 0, k = 0;

  fm_dummy_master #(.DATA_WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    almost_full = 1;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      almost_full = ($urandom % 3) == 0;
      #1;
      checks++;
      if (valid !== !almost_full) begin failures++; $display("FAIL valid"); end
      if (valid) begin
        checks++;
        if (data !== exp[k]) begin failures++; $display("FAIL word %0d: %h exp %h", n, data, exp[k]); end
        k = (k + 1) % 5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
