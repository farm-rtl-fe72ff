// tb_data_handler: a model tag table holds a mix of outstanding fetches and
// writebacks. For each fetch the three responses (one from memory, two probe
// responses, sometimes one of them dirty) are interleaved at random with
// those of other tags. Checks that each fetch delivers the dirty copy when
// there is one and the memory copy otherwise, to its recorded slot, only
// after all three responses; that each fetch sends one SrcDone with its tag;
// that each writeback completion names its slot; and that every tag is
// freed exactly once, after its completion has left.
module tb_data_handler;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, lk_busy, free_en, fill_valid, fill_ready, wb_done, tx_valid, tx_ready;
  ht_pkt_t rx_pkt, tx_pkt;
  tag_t lk_tag, free_tag;
  tag_info_t lk_info;
  logic [2:0] fill_slot, wb_done_slot;
  line_t fill_data;
  data_handler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model tag table
  bit        busy [NUM_TAGS];
  tag_info_t info [NUM_TAGS];
  line_t     expect_line [NUM_TAGS];
  int        resp_left [NUM_TAGS];
  bit        fill_seen [NUM_TAGS], src_seen [NUM_TAGS];
  assign lk_busy = busy[lk_tag];
  assign lk_info = info[lk_tag];

  ht_pkt_t q [$];
  int n_fill = 0, n_src = 0, n_wb = 0, n_free = 0, n_dirty = 0;

  always @(negedge clk) begin
    fill_ready <= ($urandom % 3 != 0);
    tx_ready   <= ($urandom % 3 != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_ready) begin
      if (rx_pkt.cmd != CMD_TGT_DONE) resp_left[rx_pkt.tag]--;
    end
    if (fill_valid && fill_ready) begin
      automatic int t = -1;
      for (int i = 0; i < NUM_TAGS; i++)
        if (busy[i] && info[i].kind == XK_FETCH && info[i].slot == fill_slot && resp_left[i] == 0 && !fill_seen[i]) t = i;
      check(t >= 0, "fill for a completed fetch");
      if (t >= 0) begin check(fill_data == expect_line[t], "fill carries the right copy"); fill_seen[t] = 1; end
      n_fill++;
    end
    if (tx_valid && tx_ready) begin
      check(tx_pkt.cmd == CMD_SRC_DONE && busy[tx_pkt.tag] && resp_left[tx_pkt.tag] == 0, "SrcDone after all responses");
      check(tx_pkt.addr == info[tx_pkt.tag].addr, "SrcDone address");
      src_seen[tx_pkt.tag] = 1; n_src++;
    end
    if (wb_done) begin
      check(info[rx_pkt.tag].kind == XK_WB && wb_done_slot == info[rx_pkt.tag].slot, "writeback completion slot");
      n_wb++;
    end
    if (free_en) begin
      check(busy[free_tag], "free of a busy tag");
      if (info[free_tag].kind == XK_FETCH)
        check((fill_seen[free_tag] || (fill_valid && fill_ready)) && (src_seen[free_tag] || (tx_valid && tx_ready)), "fetch tag freed after fill and SrcDone");
      busy[free_tag] = 0; n_free++;
    end
  end

  initial begin
    int nt;
    rx_valid = 0; rx_pkt = '0;
    for (int i = 0; i < NUM_TAGS; i++) busy[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      q.delete();
      for (int t = 0; t < NUM_TAGS; t++) begin
        busy[t] = 1; fill_seen[t] = 0; src_seen[t] = 0;
        info[t].kind = xact_kind_e'($urandom % 3 == 0);
        info[t].slot = 3'($urandom);
        info[t].addr = {8'h0, $urandom} & ~40'h3f;
        if (info[t].kind == XK_WB) begin
          automatic ht_pkt_t p = '0;
          p.cmd = CMD_TGT_DONE; p.tag = tag_t'(t); q.push_back(p);
          resp_left[t] = 0;
        end else begin
          automatic ht_pkt_t m = '0, p1 = '0, p2 = '0;
          automatic line_t mline = {16{$urandom}}, dline = {16{$urandom}};
          m.cmd = CMD_RD_RESP; m.tag = tag_t'(t); m.data = mline;
          p1.cmd = CMD_PROBE_RESP; p1.tag = tag_t'(t);
          p2.cmd = CMD_PROBE_RESP; p2.tag = tag_t'(t);
          if ($urandom % 2) begin p1.dirty = 1; p1.data = dline; expect_line[t] = dline; n_dirty++; end
          else expect_line[t] = mline;
          q.push_back(m); q.push_back(p1); q.push_back(p2);
          resp_left[t] = 3;
        end
      end
      q.shuffle();
      while (q.size() > 0) begin
        @(negedge clk);
        rx_valid = ($urandom % 4 != 0);
        rx_pkt = q[0];
        @(posedge clk);
        if (rx_valid && rx_ready) void'(q.pop_front());
        @(negedge clk); rx_valid = 0;
      end
      nt = 0;
      while (nt < 200) begin
        automatic bit any = 0;
        for (int i = 0; i < NUM_TAGS; i++) any |= busy[i];
        if (!any) break;
        @(posedge clk); nt++;
      end
      for (int i = 0; i < NUM_TAGS; i++) check(!busy[i], "every tag freed");
      for (int i = 0; i < NUM_TAGS; i++) if (info[i].kind == XK_FETCH) check(fill_seen[i] && src_seen[i], "fetch completed");
    end
    check(n_free == 20 * NUM_TAGS, "each tag freed once per round");
    check(n_dirty > 0 && n_wb > 0, "dirty and writeback cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
