// tb_farm_top: end-to-end test of the FPGA side of FARM at its default
// parameters (4 KB 2-way cache, 32 tags, 16 MMRs).
//
// The testbench stands in for the cHT core and the rest of the system: two
// CPU caches and a home memory controller, modelled at packet level in the
// cht_clk domain. Memory holds a fixed pattern per line unless written back;
// a line can be marked dirty in a CPU cache, and then that CPU's probe
// response carries the newer data. For every exclusive read from the FPGA
// the model sends one read response and two probe responses in random
// order. The user application is modelled on app_clk (a different period,
// so the dual-clock FIFOs really cross domains).
//
// Covered, each counted and required at least once: MMR write and read,
// streamed words with and without back-pressure, cache miss, hit,
// hit-under-miss, stall at the second miss, dirty probe data chosen over
// memory, snoop hit and snoop miss, user prefetch, eviction with writeback
// and re-read of the written-back value, several tags in flight, responses
// arriving out of order. The stream rate (one word per app_clk with the
// port ready) is checked.
module tb_farm_top;
  import farm_pkg::*;

  localparam addr_t BASE = 40'h10_0000_0000;

  logic cht_clk = 0, app_clk = 0;
  logic cht_rst_n = 0, app_rst_n = 0;
  always #5 cht_clk = ~cht_clk;
  always #6.5 app_clk = ~app_clk;

  logic    cht_rx_valid, cht_rx_ready, cht_tx_valid, cht_tx_ready;
  ht_pkt_t cht_rx_pkt, cht_tx_pkt;
  logic    mmr_usr_we;
  logic [3:0] mmr_usr_idx;
  word_t   mmr_usr_wdata;
  word_t   mmr_regs [16];
  logic [15:0] mmr_cpu_wr_strobe;
  logic    str_valid, str_ready;
  addr_t   str_addr;
  word_t   str_data;
  logic    req_valid, req_ready, req_we, rsp_valid, pf_valid, pf_ready;
  addr_t   req_addr, pf_addr;
  word_t   req_wdata, rsp_rdata;
  logic [3:0] req_id, rsp_id;
  logic [5:0] tags_in_use;

  farm_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- system model (cht_clk domain) ----------------
  line_t   mem       [addr_t];
  line_t   cpu_dirty [addr_t];
  ht_pkt_t rxq [$];
  ht_pkt_t cpu_rx [$];
  bit      tag_busy [NUM_TAGS];
  int      in_flight = 0, max_in_flight = 0, src_done_cnt = 0, vic_cnt = 0, ooo_cnt = 0;

  function automatic line_t pattern(addr_t a);
    line_t l;
    for (int i = 0; i < LINE_WORDS; i++) l[i*WORD_W +: WORD_W] = {a[31:0] ^ 32'h5a5a_0000, 32'(i) * 32'h0101_0101};
    return l;
  endfunction
  function automatic line_t mem_rd(addr_t a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction
  function automatic ht_pkt_t mk(ht_cmd_e c, tag_t t, addr_t a);
    ht_pkt_t p = '0;
    p.cmd = c; p.tag = t; p.addr = a; p.src = 3'd0;
    return p;
  endfunction

  always_comb cht_tx_ready = 1'b1;

  always @(posedge cht_clk) begin
    if (!cht_rst_n) cht_rx_valid <= 1'b0;
    else if (!cht_rx_valid || cht_rx_ready) begin
      if (rxq.size() > 0 && ($urandom % 4 != 0)) begin
        cht_rx_pkt   <= rxq.pop_front();
        cht_rx_valid <= 1'b1;
      end else cht_rx_valid <= 1'b0;
    end
  end

  always @(posedge cht_clk) begin
    if (cht_rst_n && cht_tx_valid && cht_tx_ready) begin
      automatic ht_pkt_t p = cht_tx_pkt;
      case (p.cmd)
        CMD_RD_BLK_MOD: begin
          automatic ht_pkt_t r [3];
          check(!tag_busy[p.tag], "RdBlkMod uses a tag already in flight");
          check(p.addr[5:0] == 0, "RdBlkMod is line aligned");
          tag_busy[p.tag] = 1; in_flight++;
          if (in_flight > max_in_flight) max_in_flight = in_flight;
          r[0] = mk(CMD_RD_RESP, p.tag, p.addr);    r[0].src = p.src; r[0].data = mem_rd(p.addr);
          r[1] = mk(CMD_PROBE_RESP, p.tag, p.addr); r[1].src = p.src;
          r[2] = mk(CMD_PROBE_RESP, p.tag, p.addr); r[2].src = p.src;
          if (cpu_dirty.exists(p.addr)) begin
            r[1].dirty = 1; r[1].data = cpu_dirty[p.addr]; cpu_dirty.delete(p.addr);
          end
          for (int i = 2; i > 0; i--) begin
            automatic int j = $urandom % (i + 1);
            automatic ht_pkt_t t = r[i]; r[i] = r[j]; r[j] = t;
          end
          if (r[2].cmd != CMD_RD_RESP) ooo_cnt++;
          for (int i = 0; i < 3; i++) rxq.push_back(r[i]);
        end
        CMD_VIC_BLK: begin
          check(!tag_busy[p.tag], "VicBlk uses a tag already in flight");
          mem[p.addr] = p.data; vic_cnt++;
          rxq.push_back(mk(CMD_TGT_DONE, p.tag, p.addr));
        end
        CMD_SRC_DONE: begin
          check(tag_busy[p.tag], "SrcDone for a tag in flight");
          tag_busy[p.tag] = 0; in_flight--; src_done_cnt++;
        end
        default: cpu_rx.push_back(p);
      endcase
    end
  end

  task automatic cpu_send(ht_pkt_t p);
    @(negedge cht_clk); rxq.push_back(p);
  endtask
  task automatic cpu_wait(output ht_pkt_t p);
    int n = 0;
    while (cpu_rx.size() == 0 && n < 2000) begin @(posedge cht_clk); n++; end
    if (cpu_rx.size() == 0) begin check(0, "no response to CPU"); p = '0; end
    else p = cpu_rx.pop_front();
  endtask

  // ---------------- user application (app_clk domain) ----------------
  word_t rsp_data [16];
  bit    rsp_got  [16];
  int    rsp_order [$];
  always @(posedge app_clk) if (app_rst_n && rsp_valid) begin
    rsp_data[rsp_id] = rsp_rdata; rsp_got[rsp_id] = 1; rsp_order.push_back(int'(rsp_id));
  end

  addr_t str_a [$];
  word_t str_d [$];
  int    str_cycles [$];
  int    app_cycle = 0;
  bit    str_random = 0;
  int    str_bp = 0;
  always @(posedge app_clk) begin
    app_cycle++;
    if (str_valid && str_ready) begin str_a.push_back(str_addr); str_d.push_back(str_data); str_cycles.push_back(app_cycle); end
    if (str_valid && !str_ready) str_bp++;
  end
  always @(negedge app_clk) str_ready <= str_random ? ($urandom % 2 == 0) : 1'b1;

  int stall_cycles = 0;
  task automatic cache_req(bit we, addr_t a, word_t d, logic [3:0] id);
    @(negedge app_clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d; req_id = id; rsp_got[id] = 0;
    @(posedge app_clk);
    while (!req_ready) begin stall_cycles++; @(posedge app_clk); end
    @(negedge app_clk); req_valid = 0;
  endtask
  task automatic wait_rsp(logic [3:0] id, output word_t d);
    int n = 0;
    while (!rsp_got[id] && n < 3000) begin @(posedge app_clk); n++; end
    check(rsp_got[id], $sformatf("cache response id %0d arrives", id));
    d = rsp_data[id];
  endtask
  function automatic word_t pword(addr_t a);   // pattern word at a byte address
    line_t l = mem_rd(line_base(a));
    return l[a[5:3]*WORD_W +: WORD_W];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_mmr_wr = 0, n_mmr_rd = 0, n_miss = 0, n_hit = 0, n_hum = 0, n_stall = 0;
  int n_dirty = 0, n_snp_hit = 0, n_snp_miss = 0, n_pf = 0, n_evict = 0;

  initial begin
    repeat (60000) @(posedge app_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ht_pkt_t p, r;
    word_t d, d1, d2;
    int t0, sc;
    addr_t A, B, C, D, G0, G1, G2, X;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_id = '0;
    pf_valid = 0; pf_addr = '0;
    mmr_usr_we = 0; mmr_usr_idx = '0; mmr_usr_wdata = '0;
    for (int i = 0; i < 16; i++) begin rsp_got[i] = 0; rsp_data[i] = '0; end
    for (int i = 0; i < NUM_TAGS; i++) tag_busy[i] = 0;
    repeat (5) @(posedge app_clk);
    cht_rst_n = 1; app_rst_n = 1;
    repeat (5) @(posedge app_clk);

    // ---- MMR write (non-posted) and read ----
    p = mk(CMD_WR_SIZED, 5'd7, BASE + 40'd24); p.count = 1; p.data[63:0] = 64'hCAFE_0000_1234_5678;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_TGT_DONE && r.tag == 5'd7, "MMR write acknowledged with TgtDone and same tag");
    check(mmr_regs[3] == 64'hCAFE_0000_1234_5678, "MMR reg 3 holds the CPU write");
    n_mmr_wr++;
    @(negedge app_clk); mmr_usr_we = 1; mmr_usr_idx = 4'd5; mmr_usr_wdata = 64'h0BAD_F00D_0000_0042;
    @(negedge app_clk); mmr_usr_we = 0;
    p = mk(CMD_RD_SIZED, 5'd9, BASE + 40'd40); p.count = 1;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_RD_RESP && r.tag == 5'd9 && r.data[63:0] == 64'h0BAD_F00D_0000_0042, "MMR read returns user status");
    n_mmr_rd++;

    // ---- stream write, full rate ----
    p = mk(CMD_WR_SIZED, 5'd1, BASE + 40'h1_0000); p.count = 8; p.posted = 1;
    for (int i = 0; i < 8; i++) p.data[i*64 +: 64] = 64'h1000 + 64'(i);
    cpu_send(p);
    t0 = 0; while (str_a.size() < 8 && t0 < 500) begin @(posedge app_clk); t0++; end
    check(str_a.size() == 8, "8 stream words delivered");
    for (int i = 0; i < 8 && i < str_a.size(); i++)
      check(str_a[i] == BASE + 40'h1_0000 + 40'(8*i) && str_d[i] == 64'h1000 + 64'(i), "stream word and address");
    if (str_cycles.size() == 8) check(str_cycles[7] - str_cycles[0] == 7, "stream runs at one word per clock");
    // ---- stream write, with back-pressure ----
    str_a.delete(); str_d.delete(); str_cycles.delete(); str_random = 1;
    p = mk(CMD_WR_SIZED, 5'd2, BASE + 40'h1_0040); p.count = 5; p.posted = 0;
    for (int i = 0; i < 8; i++) p.data[i*64 +: 64] = 64'h2000 + 64'(i);
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_TGT_DONE && r.tag == 5'd2, "non-posted stream write acknowledged");
    check(str_a.size() == 5, "5 stream words delivered under back-pressure");
    for (int i = 0; i < 5 && i < str_a.size(); i++)
      check(str_a[i] == BASE + 40'h1_0040 + 40'(8*i) && str_d[i] == 64'h2000 + 64'(i), "stream word under back-pressure");
    str_random = 0;

    // ---- cache miss, then hits ----
    A = 40'h00_2000_0040;
    cache_req(0, A + 8, '0, 4'd0); wait_rsp(4'd0, d);
    check(d == pword(A + 8), "miss returns memory data"); n_miss++;
    cache_req(0, A + 16, '0, 4'd1); wait_rsp(4'd1, d);
    check(d == pword(A + 16), "hit returns line data"); n_hit++;
    cache_req(1, A + 24, 64'hDEAD_BEEF_0000_0001, 4'd2); wait_rsp(4'd2, d);
    cache_req(0, A + 24, '0, 4'd3); wait_rsp(4'd3, d);
    check(d == 64'hDEAD_BEEF_0000_0001, "write hit then read back"); n_hit++;

    // ---- hit under miss ----
    B = 40'h00_2000_1080;
    rsp_order.delete();
    cache_req(0, B, '0, 4'd4);
    cache_req(0, A, '0, 4'd5);
    wait_rsp(4'd5, d1); wait_rsp(4'd4, d2);
    check(d1 == pword(A) && d2 == pword(B), "hit-under-miss data");
    check(rsp_order.size() == 2 && rsp_order[0] == 5 && rsp_order[1] == 4, "hit overtakes the outstanding miss");
    if (rsp_order.size() == 2 && rsp_order[0] == 5) n_hum++;

    // ---- second miss stalls; dirty data from a CPU cache wins ----
    C = 40'h00_2000_2100; D = 40'h00_2000_3140;
    cpu_dirty[line_base(D)] = pattern(40'h77_0000_0000);
    sc = stall_cycles;
    cache_req(1, C, 64'h1111_2222_3333_4444, 4'd6);
    cache_req(0, D + 8, '0, 4'd7);
    check(stall_cycles > sc, "second miss stalls the cache interface");
    if (stall_cycles > sc) n_stall++;
    wait_rsp(4'd6, d); wait_rsp(4'd7, d);
    begin automatic line_t l = pattern(40'h77_0000_0000); check(d == l[64 +: 64], "dirty probe data chosen over memory"); if (d == l[64 +: 64]) n_dirty++; end
    n_miss += 2;
    cache_req(0, C, '0, 4'd8); wait_rsp(4'd8, d);
    check(d == 64'h1111_2222_3333_4444, "write miss merged into fetched line");

    // ---- snoops ----
    p = mk(CMD_PROBE, 5'd12, line_base(A)); p.src = 3'd1;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_PROBE_RESP && r.tag == 5'd12 && r.src == 3'd1 && r.dirty, "snoop hit on modified line");
    begin automatic line_t l = pattern(line_base(A)); l[3*64 +: 64] = 64'hDEAD_BEEF_0000_0001;
      check(r.data == l, "snoop returns the modified line"); end
    if (r.dirty) n_snp_hit++;
    p = mk(CMD_PROBE, 5'd13, 40'h00_3000_0000); p.src = 3'd0;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_PROBE_RESP && r.tag == 5'd13 && !r.dirty, "snoop miss answered clean");
    if (!r.dirty) n_snp_miss++;
    cache_req(0, A + 24, '0, 4'd9); wait_rsp(4'd9, d);
    check(d == pword(A + 24), "line given up on snoop is fetched again"); n_miss++;

    // ---- prefetch ----
    for (int i = 0; i < 4; i++) begin
      X = 40'h00_2100_0000 + 40'(64 * i);
      @(negedge app_clk); pf_valid = 1; pf_addr = X;
      @(posedge app_clk); while (!pf_ready) @(posedge app_clk);
      n_pf++;
    end
    @(negedge app_clk); pf_valid = 0;
    repeat (200) @(posedge app_clk);
    for (int i = 0; i < 4; i++) begin
      X = 40'h00_2100_0000 + 40'(64 * i) + 40'(8 * i);
      sc = n_miss;
      cache_req(0, X, '0, 4'(10 + i)); wait_rsp(4'(10 + i), d);
      check(d == pword(X), "prefetched line data");
    end
    check(max_in_flight >= 2, "several tags in flight at once");

    // ---- eviction, writeback and re-read ----
    G0 = 40'h00_2200_0380; G1 = G0 + 40'h800; G2 = G0 + 40'h1000;
    cache_req(1, G0 + 32, 64'hABCD_0123_4567_89EF, 4'd14); wait_rsp(4'd14, d);
    cache_req(0, G1, '0, 4'd15); wait_rsp(4'd15, d);
    t0 = vic_cnt;
    cache_req(0, G2, '0, 4'd0); wait_rsp(4'd0, d);
    check(d == pword(G2), "third line of a set fetched");
    sc = 0; while (vic_cnt == t0 && sc < 2000) begin @(posedge cht_clk); sc++; end
    check(vic_cnt > t0, "eviction produced a VicBlk");
    if (vic_cnt > t0) n_evict++;
    begin automatic line_t l = mem_rd(line_base(G0)); check(l[4*64 +: 64] == 64'hABCD_0123_4567_89EF, "written-back line in memory"); end
    repeat (50) @(posedge app_clk);
    cache_req(0, G0 + 32, '0, 4'd1); wait_rsp(4'd1, d);
    check(d == 64'hABCD_0123_4567_89EF, "re-read after writeback sees the written value");

    repeat (200) @(posedge app_clk);
    check(in_flight == 0, "all FPGA transactions completed");
    check(tags_in_use == 0, "all tags freed");

    // ---- every mechanism happened ----
    $display("mechanisms: mmr_wr=%0d mmr_rd=%0d stream_bp=%0d miss=%0d hit=%0d hit_under_miss=%0d stall=%0d dirty=%0d snp_hit=%0d snp_miss=%0d pf=%0d evict=%0d max_tags=%0d ooo=%0d srcdone=%0d",
             n_mmr_wr, n_mmr_rd, str_bp, n_miss, n_hit, n_hum, n_stall, n_dirty, n_snp_hit, n_snp_miss, n_pf, n_evict, max_in_flight, ooo_cnt, src_done_cnt);
    check(n_mmr_wr > 0, "mechanism: MMR write");
    check(n_mmr_rd > 0, "mechanism: MMR read");
    check(str_bp > 0, "mechanism: stream back-pressure");
    check(n_miss > 0 && n_hit > 0, "mechanism: miss and hit");
    check(n_hum > 0, "mechanism: hit-under-miss");
    check(n_stall > 0, "mechanism: stall at second miss");
    check(n_dirty > 0, "mechanism: dirty probe response selected");
    check(n_snp_hit > 0 && n_snp_miss > 0, "mechanism: snoop hit and miss");
    check(n_pf > 0, "mechanism: prefetch");
    check(n_evict > 0, "mechanism: eviction writeback");
    check(max_in_flight >= 2, "mechanism: multiple tags in flight");
    check(ooo_cnt > 0, "mechanism: responses out of order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
