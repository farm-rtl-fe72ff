// tb_cache_core: random reads and writes over 16 lines that share 4 sets
// (so lines are evicted all the time), with a model of the fill buffer and
// write buffer around the core and random snoops that take lines away.
// The model memory receives evicted and snooped lines and supplies fills,
// sometimes fills the core never asked for (prefetches). Every read must
// return the last value written to its address. Also checked: a hit is
// answered in the next cycle, hits are served while a miss is outstanding
// (hit-under-miss), the port stalls at the second miss, snoops hit and miss,
// and a line given up on a snoop is not found by a later snoop until refilled.
module tb_cache_core;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_we, rsp_valid, miss_valid, miss_ready, fill_valid, fill_ready;
  logic ev_valid, ev_ready, snp_valid, snp_hit, lk_hit;
  addr_t req_addr, miss_addr, fill_addr, ev_addr, snp_addr, lk_addr;
  word_t req_wdata, rsp_rdata;
  logic [3:0] req_id, rsp_id;
  line_t fill_data, ev_data, snp_data;
  cache_core dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam addr_t BASE = 40'h6_0000_0000;
  function automatic addr_t line_of(int set, int t); return BASE + 40'(set * 64) + 40'(t) * 40'h800; endfunction

  word_t golden [addr_t];
  line_t mem    [addr_t];
  function automatic line_t mem_rd(addr_t l);
    line_t d;
    if (mem.exists(l)) return mem[l];
    for (int i = 0; i < 8; i++) d[i*64 +: 64] = {l[31:0], 32'(i)};
    return d;
  endfunction
  function automatic word_t gold(addr_t a);
    if (golden.exists(a)) return golden[a];
    return {line_base(a)[31:0], 32'(a[5:3])};
  endfunction

  // outstanding requests by id
  word_t exp_d [16];
  bit    exp_rd [16], busy_id [16];
  int    acc_cycle [16];   // acceptance time (ns)
  int    cyc = 0, n_hit1 = 0, n_hum = 0, n_stall = 0, n_snp_hit = 0, n_snp_miss = 0, n_evict = 0, n_pf = 0, n_rsp = 0;

  // fill-buffer model
  addr_t fq_addr [$];
  int    fq_time [$];
  bit    pend_miss;
  always @(negedge clk) begin
    miss_ready <= 1'b1;
    ev_ready   <= ($urandom % 4 != 0);
  end
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (miss_valid && miss_ready) begin fq_addr.push_back(miss_addr); fq_time.push_back(cyc + 3 + $urandom % 15); end
      if (ev_valid && ev_ready) begin mem[ev_addr] = ev_data; n_evict++; end
      if (fill_valid && fill_ready) begin void'(fq_addr.pop_front()); void'(fq_time.pop_front()); end
      if (fq_addr.size() == 0 && $urandom % 40 == 0) begin   // unsolicited prefetch fill
        fq_addr.push_back(line_of($urandom % 4, $urandom % 4)); fq_time.push_back(cyc + 2); n_pf++;
      end
    end
  end
  always_comb begin
    fill_valid = rst_n && fq_addr.size() > 0 && cyc >= fq_time[0];
    fill_addr  = fq_addr.size() > 0 ? fq_addr[0] : '0;
    fill_data  = mem_rd(fill_addr);
  end

  // snoops
  bit    snp_q;
  addr_t snp_a_q;
  always @(negedge clk) begin
    snp_valid <= rst_n && ($urandom % 25 == 0);
    snp_addr  <= line_of($urandom % 4, $urandom % 4) + 40'(8 * ($urandom % 8));
  end
  bit taken [addr_t];   // lines given up on a snoop and not filled again since
  always @(posedge clk) begin
    if (rst_n && fill_valid && fill_ready && taken.exists(fill_addr)) taken.delete(fill_addr);
    if (snp_q) begin
      if (snp_hit) begin
        check(!taken.exists(line_base(snp_a_q)), "a snooped line is no longer held");
        mem[line_base(snp_a_q)] = snp_data; n_snp_hit++; taken[line_base(snp_a_q)] = 1;
      end else n_snp_miss++;
    end
    snp_q <= rst_n && snp_valid; snp_a_q <= snp_addr;
  end

  // responses
  always @(posedge clk) if (rst_n && rsp_valid) begin
    check(busy_id[rsp_id], "response for an outstanding id");
    if (exp_rd[rsp_id]) check(rsp_rdata == exp_d[rsp_id], $sformatf("read data id %0d", rsp_id));
    if ($time - acc_cycle[rsp_id] == 10) n_hit1++;
    busy_id[rsp_id] = 0; n_rsp++;
  end

  initial begin
    int id = 0, nreq = 0;
    addr_t a;
    bit outstanding_miss;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_id = 0; lk_addr = 0;
    for (int i = 0; i < 16; i++) busy_id[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (nreq < 3000) begin
      @(negedge clk);
      if (busy_id[id]) continue;
      a = line_of($urandom % 4, $urandom % 4) + 40'(8 * ($urandom % 8));
      req_valid = 1; req_we = ($urandom % 2); req_addr = a; req_wdata = {$urandom, $urandom}; req_id = 4'(id);
      lk_addr = a;
      @(posedge clk);
      while (!req_ready) begin n_stall++; @(posedge clk); end
      // accepted at this edge: record the expected value now
      outstanding_miss = 0;
      for (int i = 0; i < 16; i++) if (busy_id[i] && i != id) outstanding_miss = 1;
      if (outstanding_miss && dut.req_hit) n_hum++;
      busy_id[id] = 1; acc_cycle[id] = int'($time); exp_rd[id] = !req_we;
      if (req_we) golden[a] = req_wdata; else exp_d[id] = gold(a);
      @(negedge clk); req_valid = 0;
      id = (id + 1) % 16; nreq++;
    end
    repeat (300) @(posedge clk);
    for (int i = 0; i < 16; i++) check(!busy_id[i], "all requests answered");
    $display("hits_next_cycle=%0d hit_under_miss=%0d stall_cycles=%0d snoop_hit=%0d snoop_miss=%0d evictions=%0d prefetch_fills=%0d",
             n_hit1, n_hum, n_stall, n_snp_hit, n_snp_miss, n_evict, n_pf);
    check(n_rsp == 3000, "one response per request");
    check(n_hit1 > 100, "hits answered in the next cycle");
    check(n_hum > 0, "hit-under-miss happened");
    check(n_stall > 0, "stall at second miss happened");
    check(n_snp_hit > 0 && n_snp_miss > 0, "snoop hits and misses");
    check(n_evict > 0, "evictions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
