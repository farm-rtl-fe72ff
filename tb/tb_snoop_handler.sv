// tb_snoop_handler: sends probes with random requester, tag and address; a
// model cache answers one cycle after each snoop, hitting at random with a
// line derived from the address. Checks one snoop per probe with the probe's
// address, probe responses with the probe's tag and requester, dirty and
// data only on a hit, the latency from acceptance to response, and holding
// under tx back-pressure.
module tb_snoop_handler;
  import farm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, snp_valid, snp_rsp_valid, snp_hit, tx_valid, tx_ready;
  ht_pkt_t rx_pkt, tx_pkt;
  addr_t snp_addr;
  line_t snp_data;
  snoop_handler dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // model cache
  bit hit_next;
  always @(posedge clk) begin
    snp_rsp_valid <= rst_n && snp_valid;
    hit_next       = ($urandom % 2 == 0);
    snp_hit       <= snp_valid && hit_next;
    snp_data      <= {8{snp_addr, 24'hC0FFEE}};
  end
  always @(negedge clk) tx_ready <= ($urandom % 3 != 0);
  int n_hit = 0, n_miss = 0, n_snoops = 0;
  always @(posedge clk) if (rst_n && snp_valid) n_snoops++;
  initial begin
    ht_pkt_t p;
    int t0, lat;
    bit hit;
    rx_valid = 0; rx_pkt = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      p = '0; p.cmd = CMD_PROBE; p.tag = tag_t'($urandom); p.src = 3'($urandom % 2); p.addr = {8'h0, $urandom} & ~40'h3f;
      @(negedge clk); rx_valid = 1; rx_pkt = p;
      @(posedge clk); while (!rx_ready) @(posedge clk);
      t0 = $time;
      @(negedge clk); rx_valid = 0;
      @(posedge clk);
      check(snp_valid && snp_addr == p.addr, "snoop issued with the probe address");
      @(posedge clk); hit = snp_hit;
      while (!(tx_valid && tx_ready)) @(posedge clk);
      lat = ($time - t0) / 10;
      check(tx_pkt.cmd == CMD_PROBE_RESP && tx_pkt.tag == p.tag && tx_pkt.src == p.src && tx_pkt.addr == p.addr, "probe response header");
      check(tx_pkt.dirty == hit, "dirty flag follows the cache hit");
      check(hit ? tx_pkt.data == {8{p.addr, 24'hC0FFEE}} : tx_pkt.data == '0, "data only on hit");
      check(lat >= 2, "response after the cache answer");
      if (hit) n_hit++; else n_miss++;
    end
    check(n_snoops == 300, "one snoop per probe");
    check(n_hit > 0 && n_miss > 0, "hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
