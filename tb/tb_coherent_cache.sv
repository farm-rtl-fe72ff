// tb_coherent_cache: the whole coherent cache against a model of the DTE
// and the rest of the system. Random word reads and writes and random user
// prefetches run over 24 lines sharing 4 sets; the model answers fetches
// after random delays and out of order, completes writebacks late, and
// sends random snoops, some aimed at a line the moment it lands in the
// prefetch buffer. Memory in the model takes every written-back and snooped
// line. Every read must return the last value written. Checked as well:
// snoops answered one cycle later, hits in each of the three sub-blocks,
// several fetches in flight, evictions and prefetches.
module tb_coherent_cache;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_we, rsp_valid, pf_valid, pf_ready;
  addr_t req_addr, pf_addr, fetch_addr, wb_addr, snp_addr;
  word_t req_wdata, rsp_rdata;
  logic [3:0] req_id, rsp_id;
  logic fetch_valid, fetch_ready, fdata_valid, fdata_ready, wb_valid, wb_ready, wb_done;
  logic snp_valid, snp_rsp_valid, snp_hit;
  logic [2:0] fetch_slot, fdata_slot, wb_slot, wb_done_slot;
  line_t fdata_line, wb_data, snp_data;
  coherent_cache dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  localparam addr_t BASE = 40'h7_0000_0000;
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

  // ---- DTE model ----
  addr_t fa [$]; logic [2:0] fs [$]; int ft [$];
  logic [2:0] wq [$]; int wt [$];
  int cyc = 0, max_fetch = 0, n_fetch = 0, n_wb = 0;
  int n_c = 0, n_w = 0, n_p = 0, n_miss = 0, n_pf = 0;
  bit aim; addr_t aim_addr;
  always @(negedge clk) begin
    fetch_ready <= ($urandom % 3 != 0);
    wb_ready    <= ($urandom % 3 != 0);
  end
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (fetch_valid && fetch_ready) begin
        fa.push_back(fetch_addr); fs.push_back(fetch_slot); ft.push_back(cyc + 5 + $urandom % 30); n_fetch++;
        if (fa.size() > max_fetch) max_fetch = fa.size();
      end
      if (wb_valid && wb_ready) begin mem[wb_addr] = wb_data; wq.push_back(wb_slot); wt.push_back(cyc + 10 + $urandom % 40); n_wb++; end
    end
  end
  // deliver one due fetch (any order) and one due writeback completion per cycle
  always @(negedge clk) begin
    fdata_valid <= 0; wb_done <= 0; aim <= 0;
    if (rst_n) begin
      for (int i = 0; i < fa.size(); i++) if (cyc >= ft[i] && ($urandom % 2)) begin
        fdata_valid <= 1; fdata_slot <= fs[i]; fdata_line <= mem_rd(fa[i]);
        aim <= ($urandom % 4 == 0); aim_addr <= fa[i];
        fa.delete(i); fs.delete(i); ft.delete(i);
        break;
      end
      if (wq.size() > 0 && cyc >= wt[0]) begin wb_done <= 1; wb_done_slot <= wq.pop_front(); void'(wt.pop_front()); end
    end
  end
  // snoops: random, or aimed at a line just delivered
  bit snp_pending; addr_t snp_a_q; int snp_t;
  always @(negedge clk) begin
    snp_valid <= 0;
    if (rst_n && !snp_pending) begin
      if (aim) begin snp_valid <= 1; snp_addr <= aim_addr; end
      else if ($urandom % 20 == 0) begin snp_valid <= 1; snp_addr <= line_of($urandom % 4, $urandom % 6) + 40'(8 * ($urandom % 8)); end
    end
  end
  always @(posedge clk) begin
    if (snp_pending) begin
      check(snp_rsp_valid, "snoop answered one cycle later");
      if (snp_hit) begin
        mem[line_base(snp_a_q)] = snp_data;
        if (dut.c_hit) n_c++; if (dut.w_hit) n_w++; if (dut.p_hit) n_p++;
      end else n_miss++;
    end
    snp_pending <= rst_n && snp_valid; snp_a_q <= snp_addr;
  end

  // ---- user ----
  word_t exp_d [16]; bit exp_rd [16], busy_id [16]; int n_rsp = 0;
  always @(posedge clk) if (rst_n && rsp_valid) begin
    check(busy_id[rsp_id], "response for an outstanding id");
    if (exp_rd[rsp_id]) check(rsp_rdata == exp_d[rsp_id], "read returns the last written value");
    busy_id[rsp_id] = 0; n_rsp++;
  end
  always @(negedge clk) begin
    pf_valid <= rst_n && ($urandom % 8 == 0);
    pf_addr  <= line_of($urandom % 4, $urandom % 6);
  end
  always @(posedge clk) if (rst_n && pf_valid && pf_ready) n_pf++;

  initial begin
    int id = 0, nreq = 0; addr_t a;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_id = 0;
    for (int i = 0; i < 16; i++) busy_id[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (nreq < 3000) begin
      @(negedge clk);
      if (busy_id[id]) continue;
      a = line_of($urandom % 4, $urandom % 6) + 40'(8 * ($urandom % 8));
      req_valid = 1; req_we = ($urandom % 2); req_addr = a; req_wdata = {$urandom, $urandom}; req_id = 4'(id);
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      busy_id[id] = 1; exp_rd[id] = !req_we;
      if (req_we) golden[a] = req_wdata; else exp_d[id] = gold(a);
      @(negedge clk); req_valid = 0;
      id = (id + 1) % 16; nreq++;
    end
    repeat (500) @(posedge clk);
    for (int i = 0; i < 16; i++) check(!busy_id[i], "all requests answered");
    $display("fetches=%0d max_in_flight=%0d writebacks=%0d prefetches=%0d snoop hits core/wb/pf=%0d/%0d/%0d misses=%0d",
             n_fetch, max_fetch, n_wb, n_pf, n_c, n_w, n_p, n_miss);
    check(n_rsp == 3000, "one response per request");
    check(n_c > 0 && n_w > 0 && n_p > 0 && n_miss > 0, "snoops hit in core, write buffer and prefetch buffer, and miss");
    check(max_fetch >= 2, "several fetches in flight");
    check(n_wb > 0 && n_pf > 0, "writebacks and prefetches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
