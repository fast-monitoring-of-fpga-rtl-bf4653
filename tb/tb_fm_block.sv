// tb_fm_block: the FM block at its default size (two SpyBuffers, 64-bit
// words, 0x20-word windows, output FIFOs), with a data clock, a separate read
// clock and the spy clock. Each SpyBuffer carries its own counter stream.
// Checks: both streams pass unchanged and in order; a freeze masked to
// SpyBuffer 1 freezes only it (its window holds consecutive counter values,
// one break at the write pointer, and stays fixed; window 0 keeps changing);
// a playback masked to SpyBuffer 0 replaces stream 0 with the loaded words
// while stream 1 keeps counting; PLAYBACK_BUSY reports the playing buffer;
// error_in freezes both SpyBuffers and raises irq until an unfreeze write.
module tb_fm_block;
  import spybuffer_pkg::*;
  localparam int unsigned N = 2, W = 64;

  logic spy_clock = 0, spy_resetbar = 0, wclock = 0, wresetbar = 0, rclock = 0, rresetbar = 0;
  fm_bus_req_t bus_req;
  fm_bus_rsp_t bus_rsp;
  logic error_in, irq;
  logic [N-1:0][W-1:0] write_data, read_data;
  logic [N-1:0] write_enable, almost_full, read_enable, empty;

  fm_block dut (.*);

  always #5 wclock = ~wclock;
  always #6 rclock = ~rclock;
  always #7 spy_clock = ~spy_clock;

  int checks = 0, failures = 0;
  logic [W-1:0] cnt [N];
  logic [W-1:0] outq [N][$];

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producers: counters, respecting almost_full
  for (genvar i = 0; i < N; i++) begin : gen_src
    always @(negedge wclock) begin
      write_enable[i] <= 1'b0;
      if (wresetbar && !almost_full[i] && ($urandom % 2)) begin
        write_enable[i] <= 1'b1;
        write_data[i]   <= cnt[i];
        cnt[i]          <= cnt[i] + 1;
      end
    end
    assign read_enable[i] = 1'b1;
    always @(posedge rclock) if (rresetbar && !empty[i]) outq[i].push_back(read_data[i]);
  end

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
    repeat (8) @(posedge wclock);
  endtask
  task automatic dump(input int sb, output logic [W-1:0] e[16]);
    logic [31:0] lo, hi;
    for (int i = 0; i < 16; i++) begin
      bus(1'b0, 16'h1440 + 16'(sb * 32 + 2 * i), '0, lo);
      bus(1'b0, 16'h1440 + 16'(sb * 32 + 2 * i + 1), '0, hi);
      e[i] = {hi, lo};
    end
  endtask
  task automatic check_counting(input int sb, input string what);
    checks++;
    if (outq[sb].size() <= 10) begin
      failures++; $display("FAIL %s: stream %0d (%0d words)", what, sb, outq[sb].size());
    end
    for (int k = 1; k < outq[sb].size(); k++) begin
      checks++;
      if (outq[sb][k] !== outq[sb][k-1] + 1) begin
        failures++; $display("FAIL %s: stream %0d word %0d = %h", what, sb, k, outq[sb][k]);
      end
    end
    outq[sb].delete();
  endtask

  initial begin
    logic [W-1:0] a[16], b[16], c[16], pw[4];
    logic [31:0] d;
    int breaks;
    bus_req = '0; error_in = 0;
    cnt[0] = 64'h0; cnt[1] = 64'h1_0000_0000;
    write_enable = '0; write_data = '0;
    repeat (3) @(negedge spy_clock);
    spy_resetbar = 1; wresetbar = 1; rresetbar = 1;
    wr(16'h2001, 32'hFFFFFFFF);
    wr(16'h2000, 32'h1);                 // GLOBAL_FREEZE on, nobody follows; initialise off
    repeat (300) @(posedge wclock);
    check_counting(0, "flow"); check_counting(1, "flow");

    // freeze SpyBuffer 1 only
    wr(16'h2001, 32'hFFFFFFFD);
    dump(1, a); dump(0, b);
    repeat (100) @(posedge wclock);
    dump(1, c);
    breaks = 0;
    for (int i = 0; i < 16; i++) if (a[(i + 1) % 16] !== a[i] + 1) breaks++;
    checks++;
    if (breaks != 1 || a != c) begin failures++; $display("FAIL frozen window 1 (%0d breaks)", breaks); end
    dump(0, c);
    checks++;
    if (b == c) begin failures++; $display("FAIL window 0 frozen"); end

    // playback once on SpyBuffer 0
    wr(16'h2001, 32'hFFFFFFFC);
    wr(16'h2003, 32'hFFFFFFFE);
    wr(16'h2000, 32'h7);                 // freeze, PLAYBACK_WRITE
    for (int i = 0; i < 4; i++) begin
      pw[i] = 64'hABCD_0000_0000_0000 + 64'(i);
      bus(1'b1, 16'h1440 + 16'(2 * i), pw[i][31:0], d);
      bus(1'b1, 16'h1440 + 16'(2 * i + 1), pw[i][63:32], d);
    end
    repeat (100) @(posedge wclock);
    outq[0].delete(); outq[1].delete();
    wr(16'h2000, 32'h5);                 // freeze, PLAYBACK_LOOP
    bus(1'b0, 16'h2006, '0, d);
    checks++;
    if (d[1:0] !== 2'b01) begin failures++; $display("FAIL PLAYBACK_BUSY %h", d); end
    repeat (200) @(posedge wclock);
    wr(16'h2000, 32'h1);
    repeat (100) @(posedge wclock);
    begin
      int first, n;
      first = -1; n = 0;
      foreach (outq[0][i]) if (first < 0 && outq[0][i] === pw[0]) first = i;
      if (first >= 0) for (int i = first; i < outq[0].size(); i++) begin
        if (outq[0][i] !== pw[(i - first) % 4]) break;   // loop over, counter resumes
        n++;
        checks++;
      end
      checks++;
      if (first < 0 || n < 20) begin failures++; $display("FAIL playback on SpyBuffer 0"); end
    end
    check_counting(1, "stream 1 during playback");

    // error freeze: both SpyBuffers freeze whatever the masks, irq and
    // STATUS are set; an unfreeze write clears them
    wr(16'h2001, 32'hFFFFFFFF);
    wr(16'h2000, 32'h0);
    outq[0].delete(); outq[1].delete();
    @(negedge spy_clock); error_in = 1;
    @(negedge spy_clock); error_in = 0;
    repeat (8) @(posedge wclock);
    dump(0, a); dump(1, b);
    repeat (100) @(posedge wclock);
    dump(0, c);
    bus(1'b0, 16'h2005, '0, d);
    checks++;
    if (!irq || d[0] !== 1'b1 || a != c) begin failures++; $display("FAIL error freeze SpyBuffer 0"); end
    dump(1, c);
    checks++;
    if (b != c) begin failures++; $display("FAIL error freeze SpyBuffer 1"); end
    wr(16'h2000, 32'h0);
    repeat (100) @(posedge wclock);
    dump(1, c);
    bus(1'b0, 16'h2005, '0, d);
    checks++;
    if (irq || d[0] !== 1'b0 || b == c) begin failures++; $display("FAIL unfreeze after error"); end
    check_counting(0, "stream 0 at the end"); check_counting(1, "stream 1 at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
