// tb_dte: the Data Transfer Engine with models of the MMR file, the user
// stream sink and the coherent cache. It runs each kind of traffic through
// the receive steering and the transmit arbiter: MMR write and read, a
// stream write, many cache fetches answered out of order (with and without
// a dirty probe response), writebacks, and probes that hit and miss. With
// the transmit port held, it checks that a pending probe response leaves
// before other pending packets. Tags must be unique while in flight and all
// must be free at the end.
module tb_dte;
  import farm_pkg::*;
  localparam addr_t BASE = 40'h10_0000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, tx_valid, tx_ready, mmr_we, str_valid, str_ready;
  ht_pkt_t rx_pkt, tx_pkt;
  logic [3:0] mmr_idx;
  word_t mmr_wdata, mmr_rdata, str_data;
  addr_t str_addr, fetch_addr, wb_addr, snp_addr;
  logic fetch_valid, fetch_ready, fdata_valid, fdata_ready, wb_valid, wb_ready, wb_done;
  logic snp_valid, snp_rsp_valid, snp_hit;
  logic [2:0] fetch_slot, fdata_slot, wb_slot, wb_done_slot;
  line_t fdata_line, wb_data, snp_data;
  logic [5:0] tags_in_use;
  dte dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // MMR and stream models
  word_t regs [16];
  assign mmr_rdata = regs[mmr_idx];
  always @(posedge clk) if (mmr_we) regs[mmr_idx] <= mmr_wdata;
  addr_t sa [$]; word_t sd [$];
  assign str_ready = 1'b1;
  always @(posedge clk) if (rst_n && str_valid) begin sa.push_back(str_addr); sd.push_back(str_data); end
  // cache snoop model: hits lines whose address bit 6 is set
  always @(posedge clk) begin
    snp_rsp_valid <= rst_n && snp_valid;
    snp_hit  <= snp_addr[6];
    snp_data <= {8{snp_addr, 24'h5E0001}};
  end
  assign fdata_ready = 1'b1;
  // rx driver
  ht_pkt_t rxq [$];
  always @(posedge clk) begin
    if (!rst_n) rx_valid <= 0;
    else if (!rx_valid || rx_ready) begin
      if (rxq.size() > 0) begin rx_pkt <= rxq.pop_front(); rx_valid <= 1; end else rx_valid <= 0;
    end
  end
  // tx monitor and system model
  ht_pkt_t txq [$];
  bit tag_busy [NUM_TAGS];
  line_t   fetch_expect [8];
  int n_src_done = 0, n_fill = 0, n_wbdone = 0, n_vic = 0, n_rdblk = 0;
  bit hold_tx = 0;
  assign tx_ready = !hold_tx;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    automatic ht_pkt_t p = tx_pkt;
    case (p.cmd)
      CMD_RD_BLK_MOD: begin
        automatic ht_pkt_t r [3];
        automatic line_t ml = {8{p.addr, 24'h00AAAA}}, dl = {8{p.addr, 24'h00DDDD}};
        check(!tag_busy[p.tag], "fresh tag"); tag_busy[p.tag] = 1; n_rdblk++;
        for (int i = 0; i < 3; i++) begin r[i] = '0; r[i].tag = p.tag; r[i].src = p.src; r[i].addr = p.addr; end
        r[0].cmd = CMD_RD_RESP; r[0].data = ml;
        r[1].cmd = CMD_PROBE_RESP; r[2].cmd = CMD_PROBE_RESP;
        if (p.addr[7]) begin r[2].dirty = 1; r[2].data = dl; end
        for (int i = 0; i < 3; i++) rxq.push_back(r[(i + p.tag) % 3]);
      end
      CMD_VIC_BLK: begin
        automatic ht_pkt_t r = '0;
        check(!tag_busy[p.tag], "fresh tag for VicBlk"); n_vic++;
        check(p.data == {16{p.addr[31:0]}}, "VicBlk carries the line");
        r.cmd = CMD_TGT_DONE; r.tag = p.tag; r.src = p.src; rxq.push_back(r);
      end
      CMD_SRC_DONE: begin check(tag_busy[p.tag], "SrcDone for busy tag"); tag_busy[p.tag] = 0; n_src_done++; end
      default: txq.push_back(p);
    endcase
  end
  always @(posedge clk) if (rst_n && fdata_valid) begin
    check(fdata_line == fetch_expect[fdata_slot], "fetched line: dirty copy if any, else memory");
    n_fill++;
  end
  always @(posedge clk) if (rst_n && wb_done) n_wbdone++;

  task automatic get(output ht_pkt_t p);
    int n = 0;
    while (txq.size() == 0 && n < 300) begin @(posedge clk); n++; end
    check(txq.size() > 0, "response to CPU");
    p = txq.size() > 0 ? txq.pop_front() : '0;
  endtask

  initial begin
    ht_pkt_t p, r;
    addr_t a;
    fetch_valid = 0; wb_valid = 0; fetch_addr = 0; fetch_slot = 0; wb_addr = 0; wb_data = 0; wb_slot = 0;
    for (int i = 0; i < 16; i++) regs[i] = '0;
    for (int i = 0; i < NUM_TAGS; i++) tag_busy[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // MMR write / read
    p = '0; p.cmd = CMD_WR_SIZED; p.tag = 5'd4; p.src = 3'd1; p.addr = BASE + 40'd16; p.count = 1; p.data[63:0] = 64'h1234;
    rxq.push_back(p); get(r);
    check(r.cmd == CMD_TGT_DONE && r.tag == 5'd4 && r.src == 3'd1 && regs[2] == 64'h1234, "MMR write");
    p.cmd = CMD_RD_SIZED; p.tag = 5'd5;
    rxq.push_back(p); get(r);
    check(r.cmd == CMD_RD_RESP && r.tag == 5'd5 && r.data[63:0] == 64'h1234, "MMR read");
    // stream write
    p = '0; p.cmd = CMD_WR_SIZED; p.posted = 1; p.addr = BASE + 40'h2_0000; p.count = 3; p.data = {8{64'hABC}};
    rxq.push_back(p); repeat (20) @(posedge clk);
    check(sa.size() == 3 && sa[2] == BASE + 40'h2_0010, $sformatf("stream words reach the user port (%0d)", sa.size()));
    // fetches on all 8 slots, then writebacks
    for (int k = 0; k < 40; k++) begin
      a = 40'h1_0000_0000 + 40'(k) * 40'h40;
      @(negedge clk); fetch_valid = 1; fetch_addr = a; fetch_slot = 3'(k % 8);
      fetch_expect[k % 8] = a[7] ? {8{a, 24'h00DDDD}} : {8{a, 24'h00AAAA}};
      @(posedge clk); while (!fetch_ready) @(posedge clk);
      @(negedge clk); fetch_valid = 0;
      if (k % 8 == 7) repeat (60) @(posedge clk);
    end
    for (int k = 0; k < 10; k++) begin
      a = 40'h2_0000_0000 + 40'(k) * 40'h40;
      @(negedge clk); wb_valid = 1; wb_addr = a; wb_data = {16{a[31:0]}}; wb_slot = 3'(k % 4);
      @(posedge clk); while (!wb_ready) @(posedge clk);
      @(negedge clk); wb_valid = 0;
    end
    repeat (100) @(posedge clk);
    check(n_rdblk == 40 && n_fill == 40 && n_src_done == 40, "every fetch completed with SrcDone");
    check(n_vic == 10 && n_wbdone == 10, "every writeback completed");
    // probes: hit (bit 6 set) and miss
    for (int k = 0; k < 4; k++) begin
      p = '0; p.cmd = CMD_PROBE; p.tag = 5'(10 + k); p.src = 3'(k % 2); p.addr = 40'h3_0000_0000 + 40'(k) * 40'h40;
      rxq.push_back(p); get(r);
      check(r.cmd == CMD_PROBE_RESP && r.tag == p.tag && r.src == p.src && r.dirty == p.addr[6], "probe response");
      if (r.dirty) check(r.data == {8{p.addr, 24'h5E0001}}, "probe response data");
    end
    // priority: hold tx, create an MMR response and a probe response, release
    hold_tx = 1;
    p = '0; p.cmd = CMD_RD_SIZED; p.tag = 5'd20; p.addr = BASE + 40'd16; p.count = 1; rxq.push_back(p);
    p = '0; p.cmd = CMD_PROBE;    p.tag = 5'd21; p.addr = 40'h3_0000_0040; rxq.push_back(p);
    repeat (20) @(posedge clk);
    @(negedge clk); hold_tx = 0;
    get(r); check(r.cmd == CMD_PROBE_RESP && r.tag == 5'd21, "probe response leaves first");
    get(r); check(r.cmd == CMD_RD_RESP && r.tag == 5'd20, "then the MMR response");
    check(tags_in_use == 0, "all tags free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
