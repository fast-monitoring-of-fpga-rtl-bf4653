// tb_spy_playback_controller: drives playback modes and records the entries
// read (rd_en/rd_addr). Checks: ONCE reads entries 0..last_entry exactly once
// in order and then stops, LOOP repeats 0..last_entry, with last_valid low
// the whole memory is played, out_ready low stalls the reads, pb_valid
// follows rd_en by one cycle, pb_select follows the mode, busy drops after a
// ONCE pass, and with out_ready high a pass of N entries takes N consecutive
// cycles (one word per clock) starting one cycle after the mode change.
module tb_spy_playback_controller;
  import spybuffer_pkg::*;
  localparam int unsigned MA = 3;

  logic clk = 0, rst_n = 0;
  playback_mode_e mode;
  logic [MA-1:0] last_entry, rd_addr;
  logic last_valid, out_ready, rd_en, pb_select, pb_valid, busy;
  int checks = 0, failures = 0;
  int got[$];
  logic rd_en_q;

  spy_playback_controller #(.SPY_MEM_WIDTH_A(MA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record reads and check the valid timing and the mux select
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (pb_valid !== rd_en_q) begin failures++; $display("FAIL pb_valid timing"); end
      if (pb_select !== (mode == PB_ONCE || mode == PB_LOOP)) begin failures++; $display("FAIL pb_select"); end
      if (rd_en) got.push_back(int'(rd_addr));
    end
    rd_en_q <= rst_n && rd_en;
  end

  task automatic expect_seq(input int exp[$], input string what);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d reads, expected %0d", what, got.size(), exp.size());
    end else
      foreach (exp[i]) if (got[i] != exp[i]) begin
        failures++;
        $display("FAIL %s: read %0d is %0d, expected %0d", what, i, got[i], exp[i]);
        break;
      end
  endtask

  initial begin
    int exp[$];
    int first, cnt;
    mode = PB_NONE; last_entry = 0; last_valid = 0; out_ready = 1; rd_en_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ONCE over 5 entries, full speed: check rate and latency
    @(negedge clk); mode = PB_WRITE; last_entry = 4; last_valid = 1;
    @(negedge clk); got.delete(); mode = PB_ONCE;
    first = -1; cnt = 0;
    for (int c = 0; c < 20; c++) begin
      @(posedge clk); #1;
      if (rd_en && first < 0) first = c;
    end
    exp = '{0, 1, 2, 3, 4};
    expect_seq(exp, "once full speed");
    checks++;
    if (first != 0) begin failures++; $display("FAIL first read presented %0d cycles after the mode change, expected 0", first); end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after once"); end
    // ONCE again with random stalls
    @(negedge clk); mode = PB_NONE;
    @(negedge clk); got.delete(); mode = PB_ONCE;
    for (int c = 0; c < 60; c++) begin @(negedge clk); out_ready = $urandom; end
    out_ready = 1;
    expect_seq(exp, "once with stalls");
    // stall: out_ready low means no reads
    @(negedge clk); mode = PB_NONE;
    @(negedge clk); got.delete(); mode = PB_LOOP; last_entry = 2; out_ready = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got.size() != 0) begin failures++; $display("FAIL read while out_ready low"); end
    out_ready = 1;
    repeat (9) @(negedge clk);
    exp = '{0, 1, 2, 0, 1, 2, 0, 1, 2};
    expect_seq(exp, "loop");
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy in loop"); end
    // leaving loop stops the reads
    mode = PB_NONE;
    @(negedge clk); got.delete();
    repeat (5) @(negedge clk);
    checks++;
    if (got.size() != 0 || busy) begin failures++; $display("FAIL reads after leaving loop"); end
    // nothing loaded: whole memory
    last_valid = 0; mode = PB_ONCE;
    repeat (20) @(negedge clk);
    exp = '{0, 1, 2, 3, 4, 5, 6, 7};
    expect_seq(exp, "once whole memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
