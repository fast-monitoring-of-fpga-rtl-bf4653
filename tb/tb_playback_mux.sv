// tb_playback_mux: random words on both inputs; checks that the output (data
// and valid) is the block A input with sel low and the memory input with sel
// high, in the same cycle.
module tb_playback_mux;
  localparam int unsigned W = 128;
  logic sel, in_valid, pb_valid, out_valid;
  logic [W-1:0] in_data, pb_data, out_data;
  int checks = 0, failures = 0;

  playback_mux #(.WIDTH(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      sel = $urandom; in_valid = $urandom; pb_valid = $urandom;
      for (int k = 0; k < W / 32; k++) begin
        in_data[k*32 +: 32] = $urandom; pb_data[k*32 +: 32] = $urandom;
      end
      #1;
      checks++;
      if (out_data !== (sel ? pb_data : in_data) || out_valid !== (sel ? pb_valid : in_valid)) begin
        failures++;
        $display("FAIL sel=%b", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
