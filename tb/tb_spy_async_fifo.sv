// tb_spy_async_fifo: writer and reader on unrelated clocks (10 ns and 13 ns)
// with random valid and random pops, checked against a queue model: every
// word comes out once, in order, and read_data shows the head whenever empty
// is low. A writer that respects almost_full never hits full. A second phase
// stops the reader and checks that almost_full rises with AF_MARGIN entries
// still free and that full rises at DEPTH entries.
module tb_spy_async_fifo;
  localparam int unsigned W = 64, AW = 5, DEPTH = 2 ** AW, MARGIN = 4;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en, full, almost_full, rd_en, empty;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, nread = 0, nwritten = 0;
  bit reader_on = 1, writer_on = 1;

  spy_async_fifo #(.WIDTH(W), .ADDR_WIDTH(AW), .AF_MARGIN(MARGIN)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: respects almost_full
  always @(negedge wclk) begin
    wr_en <= 0;
    if (wrst_n && writer_on && !almost_full && ($urandom % 3) != 0) begin
      wr_en <= 1;
      wdata <= {$urandom, $urandom};
    end
  end
  always @(posedge wclk) if (wrst_n && wr_en) begin
    checks++;
    if (full) begin failures++; $display("FAIL write while full"); end
    else begin q.push_back(wdata); nwritten++; end
  end

  // reader
  always @(negedge rclk) rd_en <= rrst_n && reader_on && ($urandom % 4) != 0;
  always @(posedge rclk) if (rrst_n && rd_en && !empty) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL read from empty model"); end
    else begin
      logic [W-1:0] e;
      e = q.pop_front();
      if (rdata !== e) begin failures++; $display("FAIL data %h exp %h", rdata, e); end
    end
    nread++;
  end

  initial begin
    wr_en = 0; rd_en = 0; wdata = 0;
    #30 wrst_n = 1; rrst_n = 1;
    wait (nread > 3000);
    // fill-up phase
    reader_on = 0;
    repeat (200) @(posedge wclk);
    checks++;
    if (!almost_full || q.size() != DEPTH - MARGIN) begin
      failures++;
      $display("FAIL almost_full=%b with %0d entries, expected at %0d", almost_full, q.size(), DEPTH - MARGIN);
    end
    checks++;
    if (full) begin failures++; $display("FAIL full too early"); end
    // ignore almost_full to reach full
    writer_on = 0;
    while (q.size() < DEPTH) begin
      @(negedge wclk); force wr_en = 1; wdata = {$urandom, $urandom};
      @(posedge wclk); #1;
    end
    @(negedge wclk); release wr_en; wr_en = 0;
    repeat (2) @(posedge wclk);
    checks++;
    if (!full) begin failures++; $display("FAIL full not set at DEPTH"); end
    reader_on = 1;
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
