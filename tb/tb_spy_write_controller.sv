// tb_spy_write_controller: random stimulus on write_enable, freeze, playback
// mode and initialize, compared every cycle with a reference pointer model:
// a word is written (mem_we) exactly when write_enable is high, freeze is low,
// the mode is NONE and initialize is low; the address is the pointer, which
// then advances and wraps at 2**SPY_MEM_WIDTH_A; initialize clears it. Also
// checks that a full lap of the buffer wraps to entry 0.
module tb_spy_write_controller;
  import spybuffer_pkg::*;
  localparam int unsigned MA = 4;

  logic clk = 0, rst_n = 0;
  logic write_enable, freeze, initialize, mem_we;
  playback_mode_e mode;
  logic [MA-1:0] mem_addr, ref_ptr;
  int checks = 0, failures = 0, wraps = 0;

  spy_write_controller #(.SPY_MEM_WIDTH_A(MA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_we;
    write_enable = 0; freeze = 0; initialize = 0; mode = PB_NONE; ref_ptr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      write_enable = ($urandom % 4) != 0;
      freeze       = n > 2000 ? ($urandom % 3) == 0 : 1'b0;
      initialize   = ($urandom % 97) == 0;
      mode         = n > 3000 && ($urandom % 4) == 0 ? playback_mode_e'($urandom % 4) : PB_NONE;
      #1;
      exp_we = write_enable && !freeze && mode == PB_NONE && !initialize;
      checks++;
      if (mem_we !== exp_we || mem_addr !== ref_ptr) begin
        failures++;
        $display("FAIL cycle %0d: we %b/%b addr %0d/%0d", n, mem_we, exp_we, mem_addr, ref_ptr);
      end
      if (initialize) ref_ptr = 0;
      else if (exp_we) begin
        if (&ref_ptr) wraps++;
        ref_ptr = ref_ptr + 1'b1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
