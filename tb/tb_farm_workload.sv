// tb_farm_workload: the communication microbenchmark run against the whole
// FPGA side (farm_top at its default parameters).
//
// The benchmark moves M bytes from software to the accelerator per
// communication, with each mechanism, and then synchronises:
//   * MMR: the CPU writes M/8 registers with non-posted sized writes, one at
//     a time, since every MMR write is synchronous;
//   * STREAM: the CPU's write-combining buffer sends M/64 posted full-line
//     writes into the stream window. The synchronisation is a poll: the user
//     logic publishes the number of words it has received in MMR 1, and the
//     CPU reads MMR 1 until it reaches M/8;
//   * DMA (coherent pull): the CPU leaves the data in its own cache and
//     memory, writes the source address and length to MMRs 10 and 11, and
//     starts the transfer with MMR 12. The user logic pulls every line
//     through the coherent cache, prefetching up to six lines ahead of its
//     word reads. It then writes a checksum to MMR 14 and a done flag to
//     MMR 13, which the CPU polls.
//   * coherent polling: the CPU polls a flag with reads that miss and probe
//     the FPGA; the user logic raises the flag with a cache write, and the
//     next poll takes the line, with the flag, out of the FPGA's cache.
// M takes the values 64, 1024 and 16384 bytes. The stream and DMA rates at
// the user side are printed in bytes per app_clk. One check is that the
// stream keeps one 64-bit word per clock across back-to-back line writes.
// Another is that the DMA keeps several fetches in flight.
//
// The rest of the system is a packet-level model in the cht_clk domain. It
// has two CPU caches and a home memory. Every exclusive read gets one memory
// answer and two probe answers in random order. Every third line of a DMA
// source is dirty in a CPU cache, so its probe answer carries the only
// valid copy. Both clocks run at 100 MHz with a phase offset, as in the
// platform's base configuration.
module tb_farm_workload;
  import farm_pkg::*;

  localparam addr_t BASE = 40'h10_0000_0000;
  localparam addr_t STRM = BASE + 40'h1_0000;

  logic cht_clk = 0, app_clk = 0;
  logic cht_rst_n = 0, app_rst_n = 0;
  always #5 cht_clk = ~cht_clk;
  initial begin #2; forever #5 app_clk = ~app_clk; end

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
  int      in_flight = 0, max_in_flight = 0;

  function automatic line_t pattern(addr_t a);
    line_t l;
    for (int i = 0; i < LINE_WORDS; i++) l[i*WORD_W +: WORD_W] = {a[31:0] ^ 32'h3c3c_0000, 32'(i) * 32'h0102_0304};
    return l;
  endfunction
  function automatic word_t sword(addr_t a);   // value streamed to byte address a
    return {24'h5EA000, a};
  endfunction
  function automatic ht_pkt_t mk(ht_cmd_e c, tag_t t, addr_t a);
    ht_pkt_t p = '0;
    p.cmd = c; p.tag = t; p.addr = a;
    return p;
  endfunction

  always_comb cht_tx_ready = 1'b1;

  always @(posedge cht_clk) begin
    if (!cht_rst_n) cht_rx_valid <= 1'b0;
    else if (!cht_rx_valid || cht_rx_ready) begin
      if (rxq.size() > 0) begin
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
          in_flight++;
          if (in_flight > max_in_flight) max_in_flight = in_flight;
          r[0] = mk(CMD_RD_RESP, p.tag, p.addr);    r[0].src = p.src;
          r[0].data = mem.exists(p.addr) ? mem[p.addr] : pattern(p.addr);
          r[1] = mk(CMD_PROBE_RESP, p.tag, p.addr); r[1].src = p.src;
          r[2] = mk(CMD_PROBE_RESP, p.tag, p.addr); r[2].src = p.src;
          if (cpu_dirty.exists(p.addr)) begin
            r[1].dirty = 1; r[1].data = cpu_dirty[p.addr]; cpu_dirty.delete(p.addr);
          end
          for (int i = 2; i > 0; i--) begin
            automatic int j = $urandom % (i + 1);
            automatic ht_pkt_t t = r[i]; r[i] = r[j]; r[j] = t;
          end
          for (int i = 0; i < 3; i++) rxq.push_back(r[i]);
        end
        CMD_VIC_BLK:  begin mem[p.addr] = p.data; rxq.push_back(mk(CMD_TGT_DONE, p.tag, p.addr)); end
        CMD_SRC_DONE: in_flight--;
        default:      cpu_rx.push_back(p);
      endcase
    end
  end

  int cpu_tag = 0;
  task automatic cpu_send(ht_pkt_t p);
    @(negedge cht_clk); rxq.push_back(p);
  endtask
  task automatic cpu_wait(output ht_pkt_t p);
    int n = 0;
    while (cpu_rx.size() == 0 && n < 20000) begin @(posedge cht_clk); n++; end
    if (cpu_rx.size() == 0) begin check(0, "no response to CPU"); p = '0; end
    else p = cpu_rx.pop_front();
  endtask
  task automatic mmr_write(int idx, word_t v);   // synchronous (non-posted)
    ht_pkt_t p = mk(CMD_WR_SIZED, tag_t'(cpu_tag++), BASE + addr_t'(8 * idx)), r;
    p.count = 1; p.data[WORD_W-1:0] = v;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_TGT_DONE && r.tag == p.tag, "MMR write completes");
  endtask
  task automatic mmr_read(int idx, output word_t v);
    ht_pkt_t p = mk(CMD_RD_SIZED, tag_t'(cpu_tag++), BASE + addr_t'(8 * idx)), r;
    p.count = 1;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_RD_RESP && r.tag == p.tag, $sformatf("MMR read answered (got cmd %0d tag %0d, sent tag %0d)", r.cmd, r.tag, p.tag));
    v = r.data[WORD_W-1:0];
  endtask
  task automatic mmr_poll(int idx, word_t want, output int polls);
    word_t v;
    polls = 0;
    do begin mmr_read(idx, v); polls++; end while (v != want && polls < 2000);
    check(v == want, $sformatf("poll of MMR %0d reaches %0h", idx, want));
  endtask

  // ---------------- user application (app_clk domain) ----------------
  int    app_cycle = 0;
  always @(posedge app_clk) app_cycle++;

  // register writes from the user logic, one per clock
  typedef struct packed { logic [3:0] idx; word_t v; } uw_t;
  uw_t usr_wq [$];
  always @(posedge app_clk) begin
    if (!app_rst_n || usr_wq.size() == 0) mmr_usr_we <= 1'b0;
    else begin
      automatic uw_t w = usr_wq.pop_front();
      mmr_usr_we <= 1'b1; mmr_usr_idx <= w.idx; mmr_usr_wdata <= w.v;
    end
  end

  // stream consumer: checks every word and publishes the word count in MMR 1
  int    str_words = 0, str_bad = 0, str_first = 0, str_last = 0;
  addr_t str_next;
  always_comb str_ready = 1'b1;
  always @(posedge app_clk) if (app_rst_n && str_valid && str_ready) begin
    if (str_addr != str_next || str_data != sword(str_addr)) str_bad++;
    if (str_words == 0) str_first = app_cycle;
    str_last = app_cycle;
    str_next = str_addr + 40'd8;
    str_words++;
    if (str_words % LINE_WORDS == 0) usr_wq.push_back('{4'd1, word_t'(str_words)});
  end

  // MMR write strobes seen by the user logic
  int strobes = 0;
  always @(posedge app_clk) if (app_rst_n) strobes += $countones(mmr_cpu_wr_strobe);

  // coherent cache port
  word_t rsp_d; bit rsp_got; logic [3:0] rsp_i;
  always @(posedge app_clk) if (app_rst_n && rsp_valid) begin rsp_d = rsp_rdata; rsp_i = rsp_id; rsp_got = 1; end
  task automatic cache_access(bit we, addr_t a, word_t wd, logic [3:0] id, output word_t d);
    int n = 0;
    @(negedge app_clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = wd; req_id = id; rsp_got = 0;
    @(posedge app_clk);
    while (!req_ready) @(posedge app_clk);
    @(negedge app_clk); req_valid = 0;
    while (!rsp_got && n < 3000) begin @(posedge app_clk); n++; end
    check(rsp_got && rsp_i == id, "cache access answered");
    d = rsp_d;
  endtask
  task automatic cache_read(addr_t a, logic [3:0] id, output word_t d);
    cache_access(0, a, '0, id, d);
  endtask

  // DMA engine of the user logic, started through MMR 12
  int    dma_lines = 0, pf_next = 0, rd_line = 0, dma_cycles = 0;
  word_t dma_sum;
  word_t expect_w [addr_t];
  int    dma_bad = 0;
  task automatic run_dma();
    addr_t src   = mmr_regs[10][ADDR_W-1:0];
    int    bytes = int'(mmr_regs[11]);
    int    t0    = app_cycle;
    dma_lines = bytes / LINE_BYTES; pf_next = 0; rd_line = 0; dma_sum = '0;
    fork
      begin : prefetcher
        while (pf_next < dma_lines) begin
          @(negedge app_clk);
          if (pf_next < rd_line + 6) begin
            pf_valid = 1; pf_addr = src + addr_t'(LINE_BYTES * pf_next);
            @(posedge app_clk);
            if (pf_ready) pf_next++;
            @(negedge app_clk); pf_valid = 0;
          end
        end
      end
      begin : reader
        for (rd_line = 0; rd_line < dma_lines; rd_line++)
          for (int w = 0; w < LINE_WORDS; w++) begin
            automatic addr_t a = src + addr_t'(LINE_BYTES * rd_line + 8 * w);
            word_t d;
            cache_read(a, 4'(w), d);
            if (!expect_w.exists(a) || d != expect_w[a]) dma_bad++;
            dma_sum += d;
          end
      end
    join
    dma_cycles = app_cycle - t0;
    usr_wq.push_back('{4'd14, dma_sum});
    usr_wq.push_back('{4'd13, word_t'(1)});
  endtask
  initial begin
    pf_valid = 0; pf_addr = '0; req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_id = '0;
    forever begin
      @(posedge app_clk);
      if (app_rst_n && mmr_cpu_wr_strobe[12]) run_dma();
    end
  end

  // ---------------- the benchmark ----------------
  int sizes [3] = '{64, 1024, 16384};
  int n_stream_runs = 0, n_dma_runs = 0, n_mmr_runs = 0, n_coh_runs = 0;

  // one CPU read miss to addr: probe the FPGA; a dirty answer supplies the
  // line, which then lives in the CPU/memory side, else memory answers
  task automatic coh_poll(addr_t a, output word_t v, output bit from_fpga);
    ht_pkt_t p = mk(CMD_PROBE, tag_t'(cpu_tag++), line_base(a)), r;
    line_t l;
    p.src = 3'd1;
    cpu_send(p); cpu_wait(r);
    check(r.cmd == CMD_PROBE_RESP && r.tag == p.tag && r.src == 3'd1, "probe answered");
    from_fpga = r.dirty;
    if (r.dirty) mem[line_base(a)] = r.data;
    l = mem.exists(line_base(a)) ? mem[line_base(a)] : pattern(line_base(a));
    v = l[a[5:3]*WORD_W +: WORD_W];
  endtask

  initial begin
    repeat (400000) @(posedge app_clk);
    check(0, "watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int polls;
    word_t v;
    str_next = STRM;
    repeat (5) @(posedge cht_clk);
    cht_rst_n = 1; app_rst_n = 1;
    repeat (10) @(posedge cht_clk);

    // MMR: M/8 synchronous register writes per communication
    begin
      automatic int s0 = strobes;
      for (int k = 0; k < 64 / 8; k++) mmr_write(2 + k, 64'hC0DE_0000_0000_0000 | 64'(k));
      repeat (10) @(posedge app_clk);
      for (int k = 0; k < 8; k++) check(mmr_regs[2 + k] == (64'hC0DE_0000_0000_0000 | 64'(k)), "MMR value seen by the user logic");
      check(strobes - s0 == 8, "one write strobe per MMR write");
      for (int k = 0; k < 8; k++) begin
        mmr_read(2 + k, v);
        check(v == (64'hC0DE_0000_0000_0000 | 64'(k)), "MMR value read back by the CPU");
      end
      n_mmr_runs++;
    end

    // STREAM: M/64 posted line writes, then poll the word count
    foreach (sizes[s]) begin
      automatic int m = sizes[s];
      automatic int w0 = str_words;
      automatic addr_t a0 = str_next;
      @(negedge cht_clk);
      for (int l = 0; l < m / LINE_BYTES; l++) begin
        automatic ht_pkt_t p = mk(CMD_WR_SIZED, tag_t'(cpu_tag++), a0 + addr_t'(LINE_BYTES * l));
        p.count = CNT_W'(LINE_WORDS); p.posted = 1;
        for (int i = 0; i < LINE_WORDS; i++) p.data[i*WORD_W +: WORD_W] = sword(p.addr + addr_t'(8 * i));
        rxq.push_back(p);
      end
      mmr_poll(1, word_t'(w0 + m / 8), polls);
      check(str_words - w0 == m / 8, $sformatf("stream M=%0d: all words delivered", m));
      check(str_bad == 0, $sformatf("stream M=%0d: words in order with their addresses", m));
      if (m >= 1024)
        check(str_last - str_first == (str_words - 1), $sformatf("stream M=%0d: one word per clock across line writes", m));
      $display("stream   M=%6d bytes: %0d app_clk cycles at the user port, %0.2f B/cycle, %0d polls",
               m, str_last - str_first + 1, real'(m) / real'(str_last - str_first + 1), polls);
      str_words = 0;
      n_stream_runs++;
    end

    // DMA: the FPGA pulls M bytes from the CPU's cache and memory
    foreach (sizes[s]) begin
      automatic int m = sizes[s];
      automatic addr_t src = 40'h00_4000_0000 + addr_t'(s) * 40'h10_0000;
      automatic word_t sum = '0;
      for (int l = 0; l < m / LINE_BYTES; l++) begin
        automatic addr_t la = src + addr_t'(LINE_BYTES * l);
        automatic line_t ln = pattern(la);
        if (l % 3 == 1) begin ln = ~ln; cpu_dirty[la] = ln; end
        for (int i = 0; i < LINE_WORDS; i++) begin
          expect_w[la + addr_t'(8 * i)] = ln[i*WORD_W +: WORD_W];
          sum += ln[i*WORD_W +: WORD_W];
        end
      end
      max_in_flight = 0; dma_bad = 0;
      mmr_write(13, '0);
      mmr_write(10, word_t'(src));
      mmr_write(11, word_t'(m));
      mmr_write(12, word_t'(1));
      mmr_poll(13, word_t'(1), polls);
      mmr_read(14, v);
      check(v == sum, $sformatf("DMA M=%0d: checksum reported by the user logic", m));
      check(dma_bad == 0, $sformatf("DMA M=%0d: every word pulled has the valid copy", m));
      check(cpu_dirty.size() == 0, $sformatf("DMA M=%0d: every dirty CPU line was read from its cache", m));
      if (m >= 1024) check(max_in_flight >= 2, $sformatf("DMA M=%0d: fetches overlap", m));
      $display("dma      M=%6d bytes: %0d app_clk cycles, %0.2f B/cycle, up to %0d fetches in flight, %0d polls",
               m, dma_cycles, real'(m) / real'(dma_cycles), max_in_flight, polls);
      n_dma_runs++;
    end

    // coherent polling: the CPU polls a flag line; every poll is a read miss
    // that probes the FPGA. The user logic raises the flag with an ordinary
    // cache write, and the next poll takes the line out of the FPGA's cache.
    begin
      automatic addr_t flag = 40'h00_5000_0040;
      automatic int    hits = 0, misses = 0, cpolls = 0;
      automatic bit    seen = 0;
      word_t d;
      for (int k = 0; k < 4; k++) begin
        coh_poll(flag, v, seen);
        check(!seen && v != 64'hF1A6, "flag not yet raised: probe misses, memory answers");
      end
      cache_access(1, flag, 64'hF1A6, 4'd9, d);
      do begin coh_poll(flag, v, seen); cpolls++; if (seen) hits++; else misses++; end
      while (v != 64'hF1A6 && cpolls < 100);
      check(v == 64'hF1A6 && hits == 1, "raised flag is read out of the FPGA's cache by a probe");
      coh_poll(flag, v, seen);
      check(!seen && v == 64'hF1A6, "after the handover the line has left the FPGA");
      cache_read(flag, 4'd10, d);
      check(d == 64'hF1A6, "the FPGA fetches the flag line back with its value");
      $display("coherent polling: flag seen after %0d poll(s) following the write", cpolls);
      n_coh_runs++;
    end

    check(n_mmr_runs == 1 && n_stream_runs == 3 && n_dma_runs == 3 && n_coh_runs == 1, "every benchmark run completed");
    repeat (50) @(posedge cht_clk);
    check(in_flight == 0, "no fetch left open");
    check(tags_in_use == 0, "every tag returned to the pool");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
