// tb_spy_memory: self-checking test of the asymmetric dual-port spy memory at
// its default size (512 x 128 on port A, 2048 x 32 on port B), with the two
// ports on unrelated clocks. A reference array of 32-bit words is kept in the
// testbench. Checks: port A writes read back lane by lane on port B, port B
// writes read back as whole entries on port A, the one-cycle read latency on
// both ports, and that a disabled port neither writes nor changes its output.
module tb_spy_memory;
  localparam int unsigned AW = 128, BW = 32, MA = 9, MB = 11, R = AW / BW;

  logic clk_a = 0, clk_b = 0;
  logic en_a, we_a, en_b, we_b;
  logic [MA-1:0] addr_a;
  logic [MB-1:0] addr_b;
  logic [AW-1:0] wdata_a, rdata_a;
  logic [BW-1:0] wdata_b, rdata_b;
  logic [BW-1:0] ref_mem [2**MB];
  int checks = 0, failures = 0;

  spy_memory dut (.*);

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] rnd_a();
    logic [AW-1:0] v;
    for (int k = 0; k < R; k++) v[k*BW +: BW] = $urandom;
    return v;
  endfunction

  task automatic write_a(input logic [MA-1:0] a, input logic [AW-1:0] d);
    @(negedge clk_a); en_a = 1; we_a = 1; addr_a = a; wdata_a = d;
    @(negedge clk_a); en_a = 0; we_a = 0;
    for (int k = 0; k < R; k++) ref_mem[a*R + k] = d[k*BW +: BW];
  endtask

  task automatic read_a_check(input logic [MA-1:0] a);
    logic [AW-1:0] exp;
    for (int k = 0; k < R; k++) exp[k*BW +: BW] = ref_mem[a*R + k];
    @(negedge clk_a); en_a = 1; we_a = 0; addr_a = a;
    @(negedge clk_a); en_a = 0;
    checks++;
    if (rdata_a !== exp) begin
      failures++;
      $display("FAIL port A read %0d: got %h exp %h", a, rdata_a, exp);
    end
  endtask

  task automatic write_b(input logic [MB-1:0] a, input logic [BW-1:0] d);
    @(negedge clk_b); en_b = 1; we_b = 1; addr_b = a; wdata_b = d;
    @(negedge clk_b); en_b = 0; we_b = 0;
    ref_mem[a] = d;
  endtask

  task automatic read_b_check(input logic [MB-1:0] a);
    @(negedge clk_b); en_b = 1; we_b = 0; addr_b = a;
    @(posedge clk_b); #1;
    checks++;
    if (rdata_b !== ref_mem[a]) begin
      failures++;
      $display("FAIL port B read %0d: got %h exp %h", a, rdata_b, ref_mem[a]);
    end
    @(negedge clk_b); en_b = 0;
  endtask

  initial begin
    logic [BW-1:0] held;
    en_a = 0; we_a = 0; en_b = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // fill everything through port A
    for (int a = 0; a < 2**MA; a++) write_a(MA'(a), rnd_a());
    // read all through port B
    for (int b = 0; b < 2**MB; b++) read_b_check(MB'(b));
    // overwrite random words through port B, read back entries on port A
    for (int n = 0; n < 300; n++) write_b(MB'($urandom), $urandom);
    for (int a = 0; a < 2**MA; a++) read_a_check(MA'(a));
    // a disabled port B must hold its output and not write
    read_b_check(MB'(5));
    held = rdata_b;
    @(negedge clk_b); en_b = 0; we_b = 1; addr_b = 7; wdata_b = ~ref_mem[7];
    @(negedge clk_b); we_b = 0;
    checks++;
    if (rdata_b !== held) begin failures++; $display("FAIL rdata_b changed while disabled"); end
    read_b_check(MB'(7));
    // a write with en_a low must not land
    @(negedge clk_a); en_a = 0; we_a = 1; addr_a = 3; wdata_a = ~wdata_a;
    @(negedge clk_a); we_a = 0;
    read_a_check(MA'(3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
