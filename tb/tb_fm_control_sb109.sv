// tb_fm_control_sb109: the FM control block sized for 128 SpyBuffers (four
// freeze and four playback mask words), replaying a freeze of one SpyBuffer
// the way the client software does it: all mask words are written
// 0xFFFFFFFF except FREEZE_MASK_3 = 0xFFFFDFFF (bit 13 of word 3 = SpyBuffer
// 3*32+13 = 109), then GLOBAL_FREEZE is set. Checks that exactly SpyBuffer
// 109 is frozen, that all playback outputs stay NONE, and that clearing
// GLOBAL_FREEZE releases it. Mask words sit at 0x2001..0x2004 (freeze) and
// 0x2005..0x2008 (playback) in this size.
module tb_fm_control_sb109;
  import spybuffer_pkg::*;
  localparam int unsigned N = 128, NM = 4, MB = 5;

  logic clk = 0, rst_n = 0;
  fm_bus_req_t bus_req;
  fm_bus_rsp_t bus_rsp;
  logic error_in, irq, sb_initialize, sb_spy_write_enable;
  logic [N-1:0] sb_freeze, sb_spy_en, sb_playback_busy;
  playback_mode_e [N-1:0] sb_playback;
  logic [MB-1:0] sb_spy_addr;
  logic [31:0] sb_spy_write_data;
  logic [N-1:0][31:0] sb_spy_data;
  int checks = 0, failures = 0;

  fm_control #(.N_SB(N), .N_MASK_REGS(NM), .SPY_MEM_WIDTH_B(MB),
               .PLAYBACK_MASK_DEFAULT({96'hFFFFFFFF_FFFFFFFF_FFFFFFFF, 32'hF7FFFFFF})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    bus_req = '{req: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    bus_req.req = 1'b0;
  endtask

  initial begin
    logic [N-1:0] exp;
    bus_req = '0; error_in = 0; sb_playback_busy = '0; sb_spy_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wr(16'h2000, 32'h0);                           // freeze off, no playback, initialise off
    for (int k = 0; k < 3; k++) wr(16'h2001 + 16'(k), 32'hFFFFFFFF);
    wr(16'h2004, 32'hFFFFDFFF);                    // FREEZE_MASK_3
    for (int k = 0; k < 4; k++) wr(16'h2005 + 16'(k), 32'hFFFFFFFF);
    checks++;
    if (sb_freeze !== '0) begin failures++; $display("FAIL frozen before GLOBAL_FREEZE"); end
    wr(16'h2000, 32'h1);                           // GLOBAL_FREEZE on
    @(negedge clk);
    exp = '0; exp[109] = 1'b1;
    checks++;
    if (sb_freeze !== exp) begin failures++; $display("FAIL freeze pattern %h", sb_freeze); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sb_playback[i] !== PB_NONE) begin failures++; $display("FAIL playback %0d", i); end
    end
    wr(16'h2000, 32'h0);
    @(negedge clk);
    checks++;
    if (sb_freeze !== '0) begin failures++; $display("FAIL not released"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
