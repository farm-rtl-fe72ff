// tb_prefetch_buffer: issues four prefetches without waiting (non-blocking
// while a slot is free), checks a fifth is refused, that all four fetches
// are in flight at once, that lines delivered out of order reach the core
// side, that a demand miss joining a slot is moved out first, that a
// request matching the write buffer is held back, and that a snoop on a
// ready slot takes the line and refetches a demanded one.
module tb_prefetch_buffer;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic miss_valid, miss_ready, pf_valid, pf_ready, chk_hit, fetch_valid, fetch_ready;
  logic data_valid, data_ready, fill_valid, fill_ready, snp_valid, snp_hit;
  addr_t miss_addr, pf_addr, chk_addr, fetch_addr, fill_addr, snp_addr;
  logic [2:0] fetch_slot, data_slot;
  line_t data_line, fill_data, snp_data;
  logic [2:0] occupancy;
  prefetch_buffer dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic addr_t la(int i); return 40'h5_0000_0000 + 40'(i) * 40'h40; endfunction
  function automatic line_t ld(int i); return {16{32'hF00D_0000 + 32'(i)}}; endfunction
  addr_t     f_addr [$];
  logic [2:0] f_slot [$];
  always @(posedge clk) if (rst_n && fetch_valid && fetch_ready) begin f_addr.push_back(fetch_addr); f_slot.push_back(fetch_slot); end
  task automatic deliver(int k);   // deliver the k-th recorded fetch
    @(negedge clk); data_valid = 1; data_slot = f_slot[k]; data_line = ld((f_addr[k] - 40'h5_0000_0000) >> 6);
    @(negedge clk); data_valid = 0;
  endtask
  initial begin
    int prev;
    miss_valid = 0; pf_valid = 0; chk_hit = 0; fetch_ready = 0; data_valid = 0; fill_ready = 0; snp_valid = 0;
    miss_addr = 0; pf_addr = 0; data_slot = 0; data_line = 0; snp_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // four back-to-back prefetches, one per cycle
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); pf_valid = 1; pf_addr = la(i) + 40'h18; #1;
      check(pf_ready, "prefetch accepted without blocking");
    end
    @(negedge clk); pf_addr = la(9); #1; check(!pf_ready, "fifth prefetch refused with all slots busy");
    pf_addr = la(2); #1; check(pf_ready, "prefetch of a line already in a slot accepted");
    @(negedge clk); pf_valid = 0;
    check(occupancy == 4, "four slots occupied");
    fetch_ready = 1;
    repeat (5) @(posedge clk);
    @(negedge clk); fetch_ready = 0;
    check(f_addr.size() == 4, "four fetches in flight");
    for (int i = 0; i < f_addr.size(); i++) check(f_addr[i] == la(i), "fetch address is the line base");
    // demand miss joins the slot of line 3
    @(negedge clk); miss_valid = 1; miss_addr = la(3) + 40'h8; #1; check(miss_ready, "miss joins an existing slot");
    @(negedge clk); miss_valid = 0;
    // deliver in reverse order; nothing taken by the core yet
    for (int k = 3; k >= 0; k--) deliver(k);
    @(negedge clk); #1;
    check(fill_valid && fill_addr == la(3) && fill_data == ld(3), "demanded line offered first");
    // snoop the demanded ready line: hit, slot refetched
    @(negedge clk); snp_valid = 1; snp_addr = la(3) + 40'h30;
    @(negedge clk); snp_valid = 0; #1;
    check(snp_hit && snp_data == ld(3), "snoop hit on ready slot returns line");
    prev = f_addr.size();
    fetch_ready = 1; repeat (2) @(posedge clk); @(negedge clk); fetch_ready = 0;
    check(f_addr.size() == prev + 1 && f_addr[prev] == la(3), "snooped demanded line refetched");
    // snoop a ready prefetch-only line: hit, slot freed
    @(negedge clk); snp_valid = 1; snp_addr = la(0);
    @(negedge clk); snp_valid = 0; #1;
    check(snp_hit && snp_data == ld(0), "snoop hit on prefetched slot");
    check(occupancy == 3, "snooped prefetch slot freed");
    // snoop a slot still waiting for data: miss
    @(negedge clk); snp_valid = 1; snp_addr = la(3);
    @(negedge clk); snp_valid = 0; #1; check(!snp_hit, "snoop on pending fetch misses");
    // move the two remaining ready lines into the core
    @(negedge clk); fill_ready = 1; #1;
    check(fill_valid, "ready line offered");
    repeat (2) @(posedge clk);
    @(negedge clk); fill_ready = 0;
    check(occupancy == 1, "moved lines free their slots");
    // write buffer conflict holds a request back
    @(negedge clk); pf_valid = 1; pf_addr = la(12); chk_hit = 1; #1;
    check(chk_addr == la(12) && !pf_ready, "request held back while line is in write buffer");
    chk_hit = 0; #1; check(pf_ready, "accepted once the write buffer is clear");
    @(negedge clk); pf_valid = 0;
    // miss has priority over prefetch
    @(negedge clk); pf_valid = 1; pf_addr = la(13); miss_valid = 1; miss_addr = la(14); #1;
    check(miss_ready && !pf_ready && chk_addr == la(14), "miss served before prefetch");
    @(negedge clk); pf_valid = 0; miss_valid = 0;
    // finish refetch of line 3 and take it
    deliver(prev);
    @(negedge clk); #1; check(fill_valid && fill_addr == la(3), "refetched line offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
