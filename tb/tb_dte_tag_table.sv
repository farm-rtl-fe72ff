// tb_dte_tag_table: allocates all 32 tags (lowest free first, no tag twice),
// checks that allocation stops when all are busy, then frees and reallocates
// tags at random while comparing stored transaction info and the in-use
// count with a reference model.
module tb_dte_tag_table;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_req, alloc_gnt, lk_busy, free_en;
  tag_t alloc_tag, lk_tag, free_tag;
  tag_info_t alloc_info, lk_info;
  logic [5:0] in_use;
  dte_tag_table dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit        rbusy [NUM_TAGS];
  tag_info_t rinfo [NUM_TAGS];
  function automatic tag_info_t mkinfo(int i);
    tag_info_t t;
    t.kind = xact_kind_e'(i % 2); t.slot = 3'(i); t.addr = 40'(i) << 6 | 40'h3_0000_0000;
    return t;
  endfunction
  initial begin
    int cnt, lowest;
    alloc_req = 0; free_en = 0; lk_tag = 0; free_tag = 0; alloc_info = '0;
    for (int i = 0; i < NUM_TAGS; i++) rbusy[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NUM_TAGS; i++) begin
      @(negedge clk);
      check(alloc_gnt && alloc_tag == tag_t'(i), "lowest free tag granted");
      alloc_req = 1; alloc_info = mkinfo(i); rbusy[i] = 1; rinfo[i] = mkinfo(i);
    end
    @(negedge clk); alloc_req = 0;
    check(!alloc_gnt, "no grant with all 32 tags busy");
    check(in_use == 6'd32, "32 tags in use");
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare a random entry
      lk_tag = tag_t'($urandom); #1;
      check(lk_busy == rbusy[lk_tag], "busy flag");
      if (rbusy[lk_tag]) check(lk_info == rinfo[lk_tag], "stored info");
      cnt = 0; lowest = -1;
      for (int i = NUM_TAGS - 1; i >= 0; i--) if (!rbusy[i]) lowest = i;
      for (int i = 0; i < NUM_TAGS; i++) cnt += rbusy[i];
      check(in_use == 6'(cnt), "in-use count");
      check(alloc_gnt == (lowest >= 0), "grant when a tag is free");
      if (lowest >= 0) check(alloc_tag == tag_t'(lowest), "lowest free tag");
      free_en = 0; alloc_req = 0;
      if ($urandom % 2) begin
        automatic int f = $urandom % NUM_TAGS;
        if (rbusy[f]) begin free_en = 1; free_tag = tag_t'(f); end
      end
      if (($urandom % 2) && lowest >= 0) begin
        alloc_req = 1; alloc_info = mkinfo($urandom % 64);
      end
      @(posedge clk);
      if (free_en) rbusy[free_tag] = 0;
      if (alloc_req && lowest >= 0) begin rbusy[lowest] = 1; rinfo[lowest] = alloc_info; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
