// tb_data_requester: random fetch and writeback requests with random tag
// availability and tx back-pressure. Checks that every request leaves as
// exactly one packet (RdBlkMod for fetches, VicBlk with the line for
// writebacks) carrying the granted tag, that the tag table is told the
// right kind and slot, that writebacks go first when both wait, and that a
// stalled packet stays unchanged.
module tb_data_requester;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fetch_valid, fetch_ready, wb_valid, wb_ready, alloc_req, alloc_gnt, tx_valid, tx_ready;
  addr_t fetch_addr, wb_addr;
  line_t wb_data;
  logic [2:0] fetch_slot, wb_slot;
  tag_t alloc_tag;
  tag_info_t alloc_info;
  ht_pkt_t tx_pkt;
  data_requester dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  ht_pkt_t exp_q [$];
  int n_wb_first = 0, n_sent = 0;
  always @(negedge clk) begin
    if (!rst_n) begin fetch_valid <= 0; wb_valid <= 0; end
    else begin
      if (!fetch_valid || fetch_ready) begin
        fetch_valid <= ($urandom % 3 == 0);
        fetch_addr  <= {8'h01, $urandom} & ~40'h3f | 40'h8;
        fetch_slot  <= 3'($urandom);
      end
      if (!wb_valid || wb_ready) begin
        wb_valid <= ($urandom % 4 == 0);
        wb_addr  <= {8'h02, $urandom} & ~40'h3f;
        wb_data  <= {16{$urandom}};
        wb_slot  <= 3'($urandom);
      end
      alloc_gnt <= ($urandom % 4 != 0);
      alloc_tag <= tag_t'($urandom);
      tx_ready  <= ($urandom % 2 == 0);
    end
  end
  // reference: what each accepted request must turn into
  always @(posedge clk) if (rst_n) begin
    automatic ht_pkt_t e = '0;
    check(alloc_req == ((wb_valid && wb_ready) || (fetch_valid && fetch_ready)), "alloc_req only with an accepted request");
    if (wb_valid && fetch_valid && alloc_req) begin check(wb_ready && !fetch_ready, "writeback first"); n_wb_first++; end
    if (alloc_req) begin
      check(alloc_gnt, "request accepted only with a free tag");
      e.src = 3'd2; e.tag = alloc_tag; e.count = 4'd8;
      if (wb_valid) begin
        e.cmd = CMD_VIC_BLK; e.addr = wb_addr; e.dirty = 1; e.data = wb_data;
        check(alloc_info.kind == XK_WB && alloc_info.slot == wb_slot && alloc_info.addr == wb_addr, "tag info for writeback");
      end else begin
        e.cmd = CMD_RD_BLK_MOD; e.addr = line_base(fetch_addr);
        check(alloc_info.kind == XK_FETCH && alloc_info.slot == fetch_slot && alloc_info.addr == line_base(fetch_addr), "tag info for fetch");
      end
      exp_q.push_back(e);
    end
    if (tx_valid && tx_ready) begin
      check(exp_q.size() > 0 && tx_pkt == exp_q[0], "packet matches request");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_sent++;
    end
  end
  initial begin
    alloc_gnt = 0; alloc_tag = 0; tx_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5000) @(posedge clk);
    check(n_sent > 500, "many packets sent");
    check(n_wb_first > 0, "writeback priority exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
