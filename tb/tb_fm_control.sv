// tb_fm_control: register-level test of the FM control block with four
// SpyBuffer slots (N_SB = 4, two mask words). SpyBuffer memories are modelled
// by registered arrays behind the spy ports. Checks: reset values of SPY_CTRL
// and the masks, one-cycle acknowledge, the per-SpyBuffer freeze and playback
// outputs for every combination of global value and mask bit (mask bit 0 =
// follows), initialise output, routing of memory reads and writes to the
// right SpyBuffer window, error freeze overriding the masks with irq and its
// clearing by an unfreeze write, STATUS and PLAYBACK_BUSY read-back.
module tb_fm_control;
  import spybuffer_pkg::*;
  localparam int unsigned N = 4, MB = 5;

  logic clk = 0, rst_n = 0;
  fm_bus_req_t bus_req;
  fm_bus_rsp_t bus_rsp;
  logic error_in, irq, sb_initialize, sb_spy_write_enable;
  logic [N-1:0] sb_freeze, sb_spy_en, sb_playback_busy;
  playback_mode_e [N-1:0] sb_playback;
  logic [MB-1:0] sb_spy_addr;
  logic [31:0] sb_spy_write_data;
  logic [N-1:0][31:0] sb_spy_data;
  logic [31:0] mem [N][2**MB];
  int checks = 0, failures = 0;

  fm_control #(.N_SB(N), .SPY_MEM_WIDTH_B(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SpyBuffer memory models (one cycle read latency, like the spy port)
  always @(posedge clk)
    for (int i = 0; i < N; i++) if (sb_spy_en[i]) begin
      sb_spy_data[i] <= mem[i][sb_spy_addr];
      if (sb_spy_write_enable) mem[i][sb_spy_addr] <= sb_spy_write_data;
    end

  task automatic bus(input logic we, input logic [15:0] a, input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: wd};
    @(negedge clk);
    bus_req.req = 1'b0;
    checks++;
    if (!bus_rsp.ack) begin failures++; $display("FAIL no ack for %h", a); end
    rd = bus_rsp.rdata;
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] rd;
    bus(1'b1, a, d, rd);
  endtask

  task automatic rd_check(input logic [15:0] a, input logic [31:0] exp, input string what);
    logic [31:0] rd;
    bus(1'b0, a, '0, rd);
    checks++;
    if (rd !== exp) begin failures++; $display("FAIL %s: read %h = %h, expected %h", what, a, rd, exp); end
  endtask

  task automatic check_outputs(input logic gf, input logic [1:0] gp, input logic [N-1:0] fm,
                               input logic [N-1:0] pm, input logic err);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sb_freeze[i] !== ((gf && !fm[i]) || err) ||
          sb_playback[i] !== (pm[i] ? PB_NONE : playback_mode_e'(gp))) begin
        failures++;
        $display("FAIL SB %0d: freeze %b playback %0d (gf %b gp %0d fm %b pm %b err %b)",
                 i, sb_freeze[i], sb_playback[i], gf, gp, fm[i], pm[i], err);
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    bus_req = '0; error_in = 0; sb_playback_busy = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // reset values
    rd_check(16'h2000, 32'h9, "SPY_CTRL reset");
    rd_check(16'h2001, 32'h0, "FREEZE_MASK_0 reset");
    rd_check(16'h2002, 32'h0, "FREEZE_MASK_1 reset");
    rd_check(16'h2003, 32'hF7FFFFFF, "PLAYBACK_MASK_0 reset");
    rd_check(16'h2004, 32'hFFFFFFFF, "PLAYBACK_MASK_1 reset");
    checks++;
    if (sb_freeze !== '1 || sb_initialize !== 1'b1) begin failures++; $display("FAIL reset outputs"); end
    // all combinations
    for (int gf = 0; gf < 2; gf++)
      for (int gp = 0; gp < 4; gp++) begin
        logic [N-1:0] fm, pm;
        fm = N'($urandom); pm = N'($urandom);
        wr(16'h2001, 32'(fm));
        wr(16'h2003, 32'(pm));
        wr(16'h2000, 32'(gf) | (32'(gp) << 1));
        check_outputs(gf[0], gp[1:0], fm, pm, 1'b0);
        checks++;
        if (sb_initialize !== 1'b0) begin failures++; $display("FAIL initialize"); end
        rd_check(16'h2000, 32'(gf) | (32'(gp) << 1), "SPY_CTRL");
        rd_check(16'h2001, 32'(fm), "FREEZE_MASK_0");
      end
    // mask log example: SB 1 alone (mask 0xFFFFFFFD) follows a global freeze
    wr(16'h2001, 32'hFFFFFFFD);
    wr(16'h2000, 32'h1);
    check_outputs(1'b1, 2'd0, 4'b1101, 4'b1111, 1'b0);
    // memory windows: SB i at 0x1440 + 0x20*i
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 2**MB; a++) wr(16'h1440 + 16'(i * 32 + a), 32'(i * 1000 + a));
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 2**MB; a++) begin
        checks++;
        if (mem[i][a] !== 32'(i * 1000 + a)) begin failures++; $display("FAIL window write %0d %0d", i, a); end
        rd_check(16'h1440 + 16'(i * 32 + a), 32'(i * 1000 + a), "window read");
      end
    rd_check(16'h1440 + 16'(N * 32), 32'h0, "unmapped");
    // error freeze: all frozen despite the masks, irq up
    wr(16'h2001, 32'hFFFFFFFF);
    wr(16'h2000, 32'h1);
    @(negedge clk); error_in = 1;
    repeat (4) @(negedge clk);
    error_in = 0;
    check_outputs(1'b1, 2'd0, 4'b1111, 4'b1111, 1'b1);
    checks++;
    if (!irq) begin failures++; $display("FAIL irq"); end
    rd_check(16'h2005, 32'h1, "STATUS error");
    wr(16'h2000, 32'h0);          // unfreeze command
    check_outputs(1'b0, 2'd0, 4'b1111, 4'b1111, 1'b0);
    checks++;
    if (irq) begin failures++; $display("FAIL irq not cleared"); end
    // playback busy status
    sb_playback_busy = 4'b1010;
    repeat (4) @(negedge clk);
    rd_check(16'h2006, 32'hA, "PLAYBACK_BUSY_0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
