// tb_dual_clock_fifo: pushes a counting sequence through the dual-clock FIFO
// with unrelated clocks and random valid/ready on both sides, and checks
// order, completeness, that the FIFO reports full after 2**AW words with the
// reader stopped, and that nothing appears before it was written.
module tb_dual_clock_fifo;
  localparam int W = 16, AW = 3;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #4 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic wv, wr, rv, rr;
  logic [W-1:0] wd, rd;
  dual_clock_fifo #(.W(W), .AW(AW)) dut (.wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid(wv), .wr_ready(wr), .wr_data(wd),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid(rv), .rd_ready(rr), .rd_data(rd));
  int checks = 0, failures = 0;
  int nw = 0, nr = 0, stop_rd = 1, full_seen = 0;
  localparam int TOTAL = 300;
  initial begin
    repeat (20000) @(posedge rclk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge wclk) begin
    if (wrst_n && wv && wr) nw++;
  end
  always @(negedge wclk) begin
    wv <= (nw < TOTAL) && ($urandom % 3 != 0);
    wd <= W'(nw);
  end
  always @(posedge wclk) if (wrst_n && wv && wr) wd <= W'(nw + 1);
  always @(posedge rclk) if (rrst_n && rv && rr) begin
    checks++;
    if (rd != W'(nr)) begin failures++; $display("FAIL: got %0d expected %0d", rd, nr); end
    nr++;
  end
  always @(negedge rclk) rr <= !stop_rd && ($urandom % 3 != 0);
  initial begin
    wv = 0; rr = 0; wd = 0;
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    // reader stopped: the writer must see full after 2**AW words
    repeat (60) @(posedge wclk);
    checks++; if (nw != 2**AW) begin failures++; $display("FAIL: %0d words taken before full", nw); end
    checks++; if (wr) begin failures++; $display("FAIL: wr_ready high when full"); end
    checks++; if (!rv) begin failures++; $display("FAIL: rd_valid low with data inside"); end
    stop_rd = 0;
    while (nr < TOTAL) @(posedge rclk);
    repeat (10) @(posedge rclk);
    checks++; if (rv) begin failures++; $display("FAIL: rd_valid high when empty"); end
    checks++; if (nr != TOTAL) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
