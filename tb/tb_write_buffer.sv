// tb_write_buffer: fills the buffer with evicted lines, checks it refuses a
// fifth, that each entry is offered once for writeback with its line, that
// completions free the named slot, that snoops find lines (with data) and
// drop an entry not yet sent but keep one already sent, and the presence
// check used to hold back refetches.
module tb_write_buffer;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, wb_valid, wb_ready, wb_done, snp_valid, snp_hit, chk_hit;
  addr_t in_addr, wb_addr, snp_addr, chk_addr;
  line_t in_data, wb_data, snp_data;
  logic [2:0] wb_slot, wb_done_slot;
  write_buffer dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic addr_t la(int i); return 40'h4_0000_0000 + 40'(i) * 40'h40; endfunction
  function automatic line_t ld(int i); return {16{32'hBEEF_0000 + 32'(i)}}; endfunction
  task automatic push(int i);
    @(negedge clk); in_valid = 1; in_addr = la(i) + 40'h8; in_data = ld(i);
    @(posedge clk); check(in_ready, "entry free");
    @(negedge clk); in_valid = 0;
  endtask
  task automatic snoop(addr_t a, output bit h, output line_t d);
    @(negedge clk); snp_valid = 1; snp_addr = a;
    @(negedge clk); snp_valid = 0; h = snp_hit; d = snp_data;
  endtask
  initial begin
    bit h; line_t d; addr_t sent_a [4]; logic [2:0] sent_s [4];
    in_valid = 0; wb_ready = 0; wb_done = 0; snp_valid = 0; in_addr = 0; in_data = 0; snp_addr = 0; chk_addr = 0; wb_done_slot = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); check(!wb_valid && in_ready, "empty after reset");
    for (int i = 0; i < 4; i++) push(i);
    @(negedge clk); check(!in_ready, "full after four evictions");
    chk_addr = la(2) + 40'h10; #1; check(chk_hit, "presence check hit");
    chk_addr = la(7); #1; check(!chk_hit, "presence check miss");
    // snoop an unsent entry: line returned, entry dropped
    snoop(la(1) + 40'h20, h, d);
    check(h && d == ld(1), "snoop hit returns the line");
    @(negedge clk); check(in_ready, "snooped unsent entry dropped");
    chk_addr = la(1); #1; check(!chk_hit, "dropped entry no longer present");
    // send two writebacks
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); wb_ready = 1; #1;
      check(wb_valid, "writeback offered");
      sent_a[k] = wb_addr; sent_s[k] = wb_slot;
      check(wb_data == ld((wb_addr - 40'h4_0000_0000) >> 6), "writeback data");
      @(posedge clk); @(negedge clk); wb_ready = 0;
    end
    check(sent_a[0] != sent_a[1], "each entry sent once");
    // snoop a sent entry: data returned, entry kept
    snoop(sent_a[0], h, d);
    check(h, "snoop hit on a sent entry");
    chk_addr = sent_a[0]; #1; check(chk_hit, "sent entry kept after snoop");
    // completion frees it
    @(negedge clk); wb_done = 1; wb_done_slot = sent_s[0];
    @(negedge clk); wb_done = 0;
    chk_addr = sent_a[0]; #1; check(!chk_hit, "completed entry freed");
    snoop(sent_a[0], h, d); check(!h, "snoop miss after completion");
    @(negedge clk); wb_done = 1; wb_done_slot = sent_s[1];
    @(negedge clk); wb_done = 0;
    // remaining entry is offered, completed
    @(negedge clk); wb_ready = 1; #1; check(wb_valid, "last entry offered");
    sent_s[2] = wb_slot;
    @(posedge clk); @(negedge clk); wb_ready = 0; #1; check(!wb_valid, "nothing more to send");
    wb_done = 1; wb_done_slot = sent_s[2];
    @(negedge clk); wb_done = 0;
    for (int i = 0; i < 4; i++) begin chk_addr = la(i); #1; check(!chk_hit, "buffer empty at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
