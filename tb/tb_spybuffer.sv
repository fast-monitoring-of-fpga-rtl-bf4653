// tb_spybuffer: end-to-end test of one SpyBuffer at its default size (128-bit
// data words, 32-bit spy port, 512-entry memory, output FIFO), with wclock,
// rclock and spy_clock all different. A second, pass-through instance
// (PASSTHROUGH = 1) checks the zero-latency path.
//
// Sequence and checks:
//  1. normal flow: 600 random words from A arrive at B unchanged and in order;
//  2. freeze: words keep flowing, and the spy memory read through the spy
//     port holds the last 512 words before the freeze at entry n mod 512,
//     32-bit lane by lane; words sent while frozen are not stored;
//  3. playback once: 10 entries loaded through the spy port in WRITE mode
//     come out at B exactly once, in order, while A's words are dropped;
//  4. playback loop: 3 loaded entries come out repeatedly;
//  5. the memory is not overwritten during playback;
//  6. unfreeze: monitoring resumes at the write pointer; initialize moves it
//     back to entry 0;
//  7. pass-through instance: read_data/empty equal write_data/!write_enable
//     in the same cycle.
module tb_spybuffer;
  import spybuffer_pkg::*;
  localparam int unsigned AW = 128, BW = 32, MA = 9, MB = 11, R = AW / BW;
  localparam int unsigned DEPTH = 2 ** MA;

  logic wclock = 0, rclock = 0, spy_clock = 0, wresetbar = 0, rresetbar = 0;
  logic [AW-1:0] write_data, read_data;
  logic write_enable, almost_full, read_enable, empty, playback_busy;
  logic freeze, initialize, spy_en, spy_write_enable;
  playback_mode_e playback;
  logic [MB-1:0] spy_addr;
  logic [BW-1:0] spy_write_data, spy_data;

  int checks = 0, failures = 0;
  logic [AW-1:0] sent[$], outq[$];

  spybuffer dut (.*);

  // pass-through instance on the same clock for both sides
  logic [31:0] pt_wdata, pt_rdata, pt_spy_data;
  logic pt_we, pt_af, pt_empty, pt_busy;
  spybuffer #(.DATA_WIDTH_A(32), .DATA_WIDTH_B(32), .SPY_MEM_WIDTH_A(4), .SPY_MEM_WIDTH_B(4),
              .PASSTHROUGH(1'b1)) dut_pt (
    .wclock(wclock), .wresetbar(wresetbar), .write_data(pt_wdata), .write_enable(pt_we),
    .almost_full(pt_af), .playback_busy(pt_busy), .rclock(wclock), .rresetbar(wresetbar),
    .read_enable(1'b1), .read_data(pt_rdata), .empty(pt_empty), .spy_clock(spy_clock),
    .freeze(1'b0), .playback(PB_NONE), .initialize(initialize), .spy_en(1'b0), .spy_addr('0),
    .spy_write_enable(1'b0), .spy_write_data('0), .spy_data(pt_spy_data));

  always #5 wclock = ~wclock;
  always #6 rclock = ~rclock;
  always #7 spy_clock = ~spy_clock;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block B: always reading
  assign read_enable = 1'b1;
  always @(posedge rclock) if (rresetbar && read_enable && !empty) outq.push_back(read_data);

  function automatic logic [AW-1:0] rnd();
    logic [AW-1:0] v;
    for (int k = 0; k < R; k++) v[k*BW +: BW] = $urandom;
    return v;
  endfunction

  task automatic send(input int n);
    int done = 0;
    while (done < n) begin
      @(negedge wclock);
      write_enable = 0;
      if (!almost_full && ($urandom % 4) != 0) begin
        write_data = rnd(); write_enable = 1;
        sent.push_back(write_data);
        done++;
      end
    end
    @(negedge wclock); write_enable = 0;
  endtask

  task automatic settle();
    repeat (60) @(posedge wclock);
  endtask

  task automatic check_flow(input string what);
    checks++;
    if (outq.size() != sent.size()) begin
      failures++;
      $display("FAIL %s: %0d words out, %0d sent", what, outq.size(), sent.size());
    end else
      foreach (sent[i]) if (outq[i] !== sent[i]) begin
        failures++; $display("FAIL %s: word %0d differs", what, i); break;
      end
    sent.delete(); outq.delete();
  endtask

  task automatic spy_read(input logic [MB-1:0] a, output logic [BW-1:0] d);
    @(negedge spy_clock); spy_en = 1; spy_write_enable = 0; spy_addr = a;
    @(posedge spy_clock); #1 d = spy_data;
    @(negedge spy_clock); spy_en = 0;
  endtask

  task automatic spy_write(input logic [MB-1:0] a, input logic [BW-1:0] d);
    @(negedge spy_clock); spy_en = 1; spy_write_enable = 1; spy_addr = a; spy_write_data = d;
    @(negedge spy_clock); spy_en = 0; spy_write_enable = 0;
  endtask

  task automatic check_entry(input int e, input logic [AW-1:0] exp, input string what);
    logic [BW-1:0] d;
    for (int k = 0; k < R; k++) begin
      spy_read(MB'(e * R + k), d);
      checks++;
      if (d !== exp[k*BW +: BW]) begin
        failures++;
        $display("FAIL %s: entry %0d lane %0d = %h, expected %h", what, e, k, d, exp[k*BW +: BW]);
      end
    end
  endtask

  task automatic set_mode(input playback_mode_e m);
    @(negedge spy_clock); playback = m;
    repeat (6) @(posedge wclock);
  endtask

  task automatic load(input logic [AW-1:0] words[$]);
    foreach (words[e]) for (int k = 0; k < R; k++) spy_write(MB'(e * R + k), words[e][k*BW +: BW]);
  endtask

  initial begin
    logic [AW-1:0] mon[$], mon0[$], once_w[$], loop_w[$];
    int n_loop;
    write_enable = 0; write_data = 0; freeze = 0; initialize = 1; playback = PB_NONE;
    spy_en = 0; spy_write_enable = 0; spy_addr = 0; spy_write_data = 0;
    pt_we = 0; pt_wdata = 0;
    repeat (3) @(posedge spy_clock);
    wresetbar = 1; rresetbar = 1;
    repeat (3) @(posedge spy_clock);
    initialize = 0;
    repeat (6) @(posedge wclock);

    // 1. normal flow
    send(600);
    mon = sent;
    settle();
    check_flow("normal flow");

    // 2. freeze and readout
    @(negedge spy_clock); freeze = 1;
    repeat (6) @(posedge wclock);
    send(50);
    settle();
    check_flow("flow while frozen");
    for (int e = 0; e < DEPTH; e++) check_entry(e, mon[(e + DEPTH < 600) ? e + DEPTH : e], "frozen snapshot");

    // 3. playback once
    for (int e = 0; e < 10; e++) once_w.push_back(rnd());
    set_mode(PB_WRITE);
    load(once_w);
    fork
      set_mode(PB_ONCE);
      send(40);                 // block A keeps sending: dropped during playback
    join
    settle();
    // words A sent before the mode change reached wclock pass; the rest are
    // dropped; then the 10 loaded entries follow, once
    begin
      int pre;
      pre = outq.size() - 10;
      checks++;
      if (pre < 0 || pre >= 40) begin
        failures++; $display("FAIL playback once: %0d words out", outq.size());
      end else begin
        for (int i = 0; i < pre; i++) if (outq[i] !== sent[i]) begin
          failures++; $display("FAIL playback once: word %0d before playback", i); break;
        end
        outq = outq[pre:$];
        sent = once_w;
        check_flow("playback once");
      end
      sent.delete(); outq.delete();
    end
    checks++;
    if (playback_busy) begin failures++; $display("FAIL busy after once"); end

    // 4. playback loop
    for (int e = 0; e < 3; e++) loop_w.push_back(rnd());
    set_mode(PB_WRITE);
    load(loop_w);
    set_mode(PB_LOOP);
    checks++;
    if (!playback_busy) begin failures++; $display("FAIL not busy in loop"); end
    repeat (40) @(posedge wclock);
    set_mode(PB_NONE);
    settle();
    n_loop = outq.size();
    checks++;
    if (n_loop < 9) begin failures++; $display("FAIL loop gave only %0d words", n_loop); end
    foreach (outq[i]) if (outq[i] !== loop_w[i % 3]) begin
      failures++; checks++; $display("FAIL loop word %0d", i); break;
    end
    outq.delete();

    // 5. memory unchanged by playback
    for (int e = 0; e < 3; e++) check_entry(e, loop_w[e], "after loop");
    for (int e = 3; e < 10; e++) check_entry(e, once_w[e], "after once");

    // 6. unfreeze: resume at pointer 600 mod 512 = 88
    mon0 = mon;
    @(negedge spy_clock); freeze = 0;
    repeat (6) @(posedge wclock);
    send(5);
    mon = sent;
    settle();
    check_flow("after unfreeze");
    @(negedge spy_clock); freeze = 1;
    repeat (6) @(posedge wclock);
    for (int e = 0; e < 5; e++) check_entry(88 + e, mon[e], "resumed monitoring");
    check_entry(93, mon0[93], "untouched entry");
    // initialize: pointer back to 0
    @(negedge spy_clock); initialize = 1; freeze = 0;
    repeat (6) @(posedge wclock);
    @(negedge spy_clock); initialize = 0;
    repeat (6) @(posedge wclock);
    send(2);
    mon = sent;
    settle();
    check_flow("after initialize");
    @(negedge spy_clock); freeze = 1;
    repeat (6) @(posedge wclock);
    for (int e = 0; e < 2; e++) check_entry(e, mon[e], "after initialize");

    // 7. pass-through instance: no added latency
    for (int n = 0; n < 200; n++) begin
      @(negedge wclock);
      pt_we = $urandom; pt_wdata = $urandom;
      #1;
      checks++;
      if (pt_empty !== !pt_we || (pt_we && pt_rdata !== pt_wdata) || pt_af !== 1'b0) begin
        failures++; $display("FAIL pass-through path");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
