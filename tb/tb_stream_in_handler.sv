// tb_stream_in_handler: sends MMR writes/reads and stream writes of random
// length, posted and non-posted, with random back-pressure on the stream
// port, and checks MMR port activity, response packets (command, tag,
// requester, data), every streamed word and address, and that a stream
// write of n words with the port always ready takes n consecutive cycles,
// also across back-to-back posted line writes.
module tb_stream_in_handler;
  import farm_pkg::*;
  localparam addr_t BASE = 40'h10_0000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, tx_valid, tx_ready, mmr_we, str_valid, str_ready;
  ht_pkt_t rx_pkt, tx_pkt;
  logic [3:0] mmr_idx;
  word_t mmr_wdata, mmr_rdata, str_data;
  addr_t str_addr;
  word_t regs [16];
  stream_in_handler dut (.*);
  assign mmr_rdata = regs[mmr_idx];
  always @(posedge clk) if (mmr_we) regs[mmr_idx] <= mmr_wdata;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  addr_t sa [$]; word_t sd [$]; int sc [$]; int cyc = 0; bit bp = 0;
  always @(posedge clk) begin
    cyc++;
    if (str_valid && str_ready) begin sa.push_back(str_addr); sd.push_back(str_data); sc.push_back(cyc); end
  end
  always @(negedge clk) str_ready <= bp ? ($urandom % 2 == 1) : 1'b1;
  ht_pkt_t txq [$];
  always @(posedge clk) if (tx_valid && tx_ready) txq.push_back(tx_pkt);
  always @(negedge clk) tx_ready <= ($urandom % 3 != 0);

  task automatic send(ht_pkt_t p);
    @(negedge clk); rx_valid = 1; rx_pkt = p;
    @(posedge clk); while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask
  task automatic get(output ht_pkt_t p);
    int n = 0;
    while (txq.size() == 0 && n < 200) begin @(posedge clk); n++; end
    check(txq.size() > 0, "response arrives");
    p = (txq.size() > 0) ? txq.pop_front() : '0;
  endtask

  initial begin
    ht_pkt_t p, r;
    int n;
    rx_valid = 0; rx_pkt = '0;
    for (int i = 0; i < 16; i++) regs[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // MMR writes then reads back
    for (int i = 0; i < 16; i++) begin
      p = '0; p.cmd = CMD_WR_SIZED; p.tag = 5'(i); p.src = 3'(i % 2); p.addr = BASE + 40'(8 * i); p.count = 1;
      p.data[63:0] = 64'hA5A5_0000_0000_0000 | 64'(i * 3);
      send(p); get(r);
      check(r.cmd == CMD_TGT_DONE && r.tag == 5'(i) && r.src == 3'(i % 2), "MMR write TgtDone");
      check(regs[i] == (64'hA5A5_0000_0000_0000 | 64'(i * 3)), "MMR register written");
    end
    for (int i = 15; i >= 0; i--) begin
      p = '0; p.cmd = CMD_RD_SIZED; p.tag = 5'(20 + i % 8); p.addr = BASE + 40'(8 * i); p.count = 1;
      send(p); get(r);
      check(r.cmd == CMD_RD_RESP && r.tag == 5'(20 + i % 8) && r.data[63:0] == (64'hA5A5_0000_0000_0000 | 64'(i * 3)), "MMR read data");
    end
    check(sa.size() == 0, "MMR traffic does not reach the stream port");
    // stream read returns zero
    p = '0; p.cmd = CMD_RD_SIZED; p.tag = 5'd3; p.addr = BASE + 40'h8000; p.count = 1;
    send(p); get(r);
    check(r.cmd == CMD_RD_RESP && r.data == '0, "stream-window read returns zero");
    // stream writes
    for (int k = 0; k < 40; k++) begin
      bp = (k >= 20);
      n = 1 + $urandom % 8;
      sa.delete(); sd.delete(); sc.delete();
      p = '0; p.cmd = CMD_WR_SIZED; p.tag = 5'(k); p.addr = BASE + 40'h1_0000 + 40'(64 * k); p.count = 4'(n);
      p.posted = (k % 2 == 0);
      for (int i = 0; i < 8; i++) p.data[i*64 +: 64] = {32'(k), 32'(i)};
      send(p);
      if (!p.posted) begin get(r); check(r.cmd == CMD_TGT_DONE && r.tag == 5'(k), "stream write TgtDone"); end
      else begin automatic int w = 0; while (sa.size() < n && w < 100) begin @(posedge clk); w++; end end
      repeat (2) @(posedge clk);
      check(sa.size() == n, "stream word count");
      for (int i = 0; i < n && i < sa.size(); i++)
        check(sa[i] == p.addr + 40'(8 * i) && sd[i] == {32'(k), 32'(i)}, "stream word/address");
      if (!bp && sc.size() == n) check(sc[n-1] - sc[0] == n - 1, "one stream word per clock");
    end
    // back-to-back posted line writes: the port stays busy every cycle
    bp = 0;
    sa.delete(); sd.delete(); sc.delete();
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      p = '0; p.cmd = CMD_WR_SIZED; p.tag = 5'(k); p.addr = BASE + 40'h2_0000 + 40'(64 * k); p.count = 4'd8;
      p.posted = 1;
      for (int i = 0; i < 8; i++) p.data[i*64 +: 64] = {32'(100 + k), 32'(i)};
      rx_valid = 1; rx_pkt = p;
      @(posedge clk); while (!rx_ready) @(posedge clk);
      @(negedge clk);
    end
    rx_valid = 0;
    begin automatic int w = 0; while (sa.size() < 48 && w < 100) begin @(posedge clk); w++; end end
    check(sa.size() == 48, "back-to-back stream word count");
    for (int i = 0; i < 48 && i < sa.size(); i++)
      check(sa[i] == BASE + 40'h2_0000 + 40'(8 * i) && sd[i] == {32'(100 + i / 8), 32'(i % 8)}, "back-to-back stream word/address");
    if (sc.size() == 48) check(sc[47] - sc[0] == 47, "back-to-back line writes stream one word per clock");
    check(txq.size() == 0, "no stray responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
