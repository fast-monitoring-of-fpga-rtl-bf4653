// tb_fm_dummy_top: end-to-end run of the Fast Monitoring demonstrator at its
// default parameters (master -> SB_DUMMY0 -> slave -> SB_DUMMY1), driven only
// through the control bus as the SoC software would, while the consumer at
// the output reads at random (which makes the FIFOs back up and the master
// stall). Each mechanism is counted and must occur at least once:
//  - initialise: INITIALIZE_SPY_MEMORY and GLOBAL_FREEZE come up set; clearing
//    them starts monitoring;
//  - flow: every output word follows its predecessor in the master's loop;
//  - stall: the master pauses on almost_full;
//  - freeze/readout: with FREEZE_MASK_0 = 0xFFFFFFFE only SB_DUMMY0 freezes;
//    its 16 entries read at 0x1440.. are master words in loop order (one
//    break, at the write pointer), they stay the same on a second read while
//    data keeps flowing, and SB_DUMMY1's memory keeps changing;
//  - load: ten words written to SB_DUMMY0 in PLAYBACK_WRITE read back as
//    written, while master words still reach the output and SB_DUMMY1's
//    memory keeps changing;
//  - playback once: ten words loaded into SB_DUMMY0 in PLAYBACK_WRITE come out
//    once, and afterwards are the last ten entries in SB_DUMMY1's memory;
//  - playback loop: three loaded words come out repeatedly;
//  - error freeze: error_in freezes both SpyBuffers whatever the masks and
//    raises irq; an unfreeze write clears both.
module tb_fm_dummy_top;
  import spybuffer_pkg::*;
  localparam int unsigned W = 64;

  logic clk = 0, spy_clock = 0, rst_n = 0, spy_resetbar = 0;
  fm_bus_req_t bus_req;
  fm_bus_rsp_t bus_rsp;
  logic error_in, irq, out_read_enable, out_empty;
  logic [W-1:0] out_data;

  fm_dummy_top dut (.*);

  always #5 clk = ~clk;
  always #7 spy_clock = ~spy_clock;

  int checks = 0, failures = 0;
  int n_init = 0, n_flow = 0, n_stall = 0, n_freeze = 0, n_load = 0, n_once = 0, n_loop = 0, n_error = 0;
  logic [W-1:0] loopw [5] = '{64'h4000_0400_0BAD, 64'h4000_0600_0BEE, 64'h4000_0700_D0E5,
                              64'h4000_0780_0FAB, 64'h4000_07C0_DEED};
  logic [W-1:0] outq[$];
  bit check_order = 0;
  logic [W-1:0] last_out;
  bit have_last = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int loop_index(input logic [W-1:0] w);
    for (int i = 0; i < 5; i++) if (loopw[i] == w) return i;
    return -1;
  endfunction

  // consumer at the output, reading at random
  always @(negedge clk) out_read_enable <= rst_n && ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && out_read_enable && !out_empty) begin
    outq.push_back(out_data);
    if (check_order) begin
      checks++;
      if (loop_index(out_data) < 0 ||
          (have_last && loop_index(out_data) != (loop_index(last_out) + 1) % 5)) begin
        failures++; $display("FAIL flow order: %h after %h", out_data, last_out);
      end else n_flow++;
      last_out = out_data; have_last = 1;
    end
  end
  always @(posedge clk) if (rst_n && dut.u_master.almost_full) n_stall++;

  task automatic bus(input logic we, input logic [15:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge spy_clock);
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    @(negedge spy_clock);
    bus_req.req = 1'b0;
    rd = bus_rsp.rdata;
  endtask
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] rd;
    bus(1'b1, a, d, rd);
  endtask
  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    bus(1'b0, a, '0, d);
  endtask
  // 16 entries of 64 bits from the 32-word window at base
  task automatic dump(input logic [15:0] base, output logic [W-1:0] e[16]);
    logic [31:0] lo, hi;
    for (int i = 0; i < 16; i++) begin
      rd(base + 16'(2 * i), lo);
      rd(base + 16'(2 * i + 1), hi);
      e[i] = {hi, lo};
    end
  endtask
  task automatic wait_data(input int cycles);
    repeat (cycles) @(posedge clk);
  endtask
  // set SPY_CTRL: freeze bit, playback mode, initialise bit
  task automatic ctrl(input logic f, input playback_mode_e m, input logic init);
    wr(16'h2000, {28'b0, init, m, f});
    wait_data(8);
  endtask

  initial begin
    logic [31:0] d;
    logic [W-1:0] snap[16], snap2[16], s1a[16], s1b[16], once_w[10], loop_w[3];
    int breaks, pre;
    bus_req = '0; error_in = 0;
    repeat (3) @(negedge spy_clock);
    rst_n = 1; spy_resetbar = 1;

    // --- initialise: reset state of SPY_CTRL, then start monitoring
    rd(16'h2000, d);
    checks++;
    if (d !== 32'h9) begin failures++; $display("FAIL SPY_CTRL reset %h", d); end else n_init++;
    wr(16'h2001, 32'hFFFFFFFF);          // no SpyBuffer follows GLOBAL_FREEZE
    ctrl(1'b1, PB_NONE, 1'b0);
    wait_data(300);

    // --- normal flow
    check_order = 1;
    wait_data(400);

    // --- freeze SB_DUMMY0 only and read it out
    wr(16'h2001, 32'hFFFFFFFE);
    wait_data(10);
    dump(16'h1440, snap);
    dump(16'h1460, s1a);
    wait_data(200);
    dump(16'h1440, snap2);
    dump(16'h1460, s1b);
    breaks = 0;
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (loop_index(snap[i]) < 0) begin failures++; $display("FAIL snapshot entry %0d = %h", i, snap[i]); end
      if (loop_index(snap[(i + 1) % 16]) != (loop_index(snap[i]) + 1) % 5) breaks++;
      if (snap2[i] !== snap[i]) begin failures++; $display("FAIL frozen entry %0d changed", i); end
    end
    checks++;
    if (breaks > 1) begin failures++; $display("FAIL snapshot not in loop order (%0d breaks)", breaks); end
    checks++;
    if (s1a == s1b) begin failures++; $display("FAIL SB_DUMMY1 memory did not change"); end
    if (breaks <= 1 && s1a != s1b) n_freeze++;

    // --- playback once on SB_DUMMY0 (PLAYBACK_MASK_0 bit 0 cleared)
    wr(16'h2003, 32'hFFFFFFFE);
    ctrl(1'b1, PB_WRITE, 1'b0);
    for (int i = 0; i < 10; i++) begin
      once_w[i] = 64'h0004_000C_AAFF_EE00 + 64'(i);
      wr(16'h1440 + 16'(2 * i), once_w[i][31:0]);
      wr(16'h1440 + 16'(2 * i + 1), once_w[i][63:32]);
    end
    // loaded but not yet played: SB_DUMMY0 holds the ten words, master words
    // still flow (order checked above) and SB_DUMMY1 keeps being overwritten
    dump(16'h1460, s1a);
    dump(16'h1440, snap);
    dump(16'h1460, s1b);
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (snap[i] !== once_w[i]) begin
          ok = 0; failures++; $display("FAIL loaded entry %0d = %h", i, snap[i]);
        end
      end
      checks++;
      if (s1a == s1b) begin ok = 0; failures++; $display("FAIL SB_DUMMY1 frozen during load"); end
      if (ok) n_load++;
    end
    wait_data(50);
    check_order = 0;
    outq.delete();
    ctrl(1'b1, PB_ONCE, 1'b0);
    wait_data(400);
    // master words may still drain before the ten; nothing after them
    pre = outq.size() - 10;
    checks++;
    if (pre < 0) begin failures++; $display("FAIL once: only %0d words", outq.size()); end
    else begin
      bit ok;
      ok = 1;
      for (int i = 0; i < pre; i++) if (loop_index(outq[i]) < 0) ok = 0;
      for (int i = 0; i < 10; i++) if (outq[pre + i] !== once_w[i]) ok = 0;
      if (!ok) begin failures++; $display("FAIL once: output sequence"); end
      else n_once++;
    end
    // SB_DUMMY1 now holds the ten words as its last ten entries
    wr(16'h2001, 32'hFFFFFFFC);
    wait_data(10);
    dump(16'h1460, s1a);
    begin
      int hit;
      hit = -1;
      for (int s = 0; s < 16; s++) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < 10; i++) if (s1a[(s + i) % 16] !== once_w[i]) ok = 0;
        if (ok) hit = s;
      end
      checks++;
      if (hit < 0) begin
        failures++; $display("FAIL SB_DUMMY1 does not hold the played words");
        foreach (s1a[i]) $display("  SB_DUMMY1[%0d] = %h", i, s1a[i]);
      end
    end

    // --- playback loop
    wr(16'h2001, 32'hFFFFFFFE);
    ctrl(1'b1, PB_WRITE, 1'b0);
    for (int i = 0; i < 3; i++) begin
      loop_w[i] = 64'h0000_0000_5AFE_0000 + 64'(i);
      wr(16'h1440 + 16'(2 * i), loop_w[i][31:0]);
      wr(16'h1440 + 16'(2 * i + 1), loop_w[i][63:32]);
    end
    wait_data(50);
    outq.delete();
    ctrl(1'b1, PB_LOOP, 1'b0);
    wait_data(300);
    begin
      int first, cnt;
      bit ok;
      first = -1; cnt = 0; ok = 1;
      foreach (outq[i]) if (first < 0 && outq[i] === loop_w[0]) first = i;
      if (first >= 0)
        for (int i = first; i < outq.size(); i++) begin
          if (outq[i] !== loop_w[(i - first) % 3]) ok = 0;
          cnt++;
        end
      checks++;
      if (first < 0 || !ok || cnt < 30) begin failures++; $display("FAIL loop: first %0d count %0d", first, cnt); end
      else n_loop++;
    end
    ctrl(1'b1, PB_NONE, 1'b0);
    wr(16'h2001, 32'hFFFFFFFF);
    wait_data(200);

    // --- error freeze
    @(negedge clk); error_in = 1;
    repeat (5) @(negedge clk);
    error_in = 0;
    wait_data(20);
    rd(16'h2005, d);
    dump(16'h1440, snap);
    dump(16'h1460, s1a);
    wait_data(200);
    dump(16'h1440, snap2);
    dump(16'h1460, s1b);
    checks++;
    if (!irq || d[0] !== 1'b1 || snap != snap2 || s1a != s1b) begin
      failures++; $display("FAIL error freeze: irq %b status %h", irq, d);
    end else n_error++;
    ctrl(1'b0, PB_NONE, 1'b0);          // unfreeze command
    wait_data(200);
    dump(16'h1460, s1b);
    checks++;
    if (irq || s1a == s1b) begin failures++; $display("FAIL unfreeze after error"); end

    // --- every mechanism seen
    $display("mechanisms: init %0d flow %0d stall %0d freeze %0d load %0d once %0d loop %0d error %0d",
             n_init, n_flow, n_stall, n_freeze, n_load, n_once, n_loop, n_error);
    checks++;
    if (n_init == 0 || n_flow == 0 || n_stall == 0 || n_freeze == 0 || n_load == 0 || n_once == 0 ||
        n_loop == 0 || n_error == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
