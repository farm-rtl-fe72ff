// cache_core: the set-associative core of FARM's configurable coherent cache.
//
// The user application reads and writes 64-bit words through an in-order
// request port. A hit is answered in the next cycle. A miss is parked in a
// single miss register and sent to the prefetch/fill buffer; further hits are
// served meanwhile (hit-under-miss), and the port stalls at the second miss,
// as the document describes. Responses carry the request id because a hit
// can overtake the parked miss. Lines are either modified or invalid: every
// fill was fetched exclusively, so every valid line is owned and is written
// back when evicted.
//
// Fills come from the prefetch buffer. The victim is an invalid way if there
// is one, else the least recently used way (for more than two ways, the way
// after the most recently used one); a valid victim goes to the write
// buffer, and the fill waits while the write buffer is full. A fill for a
// line already present is dropped. When the fill is the parked miss, the
// miss is completed with it. Snoops have the highest priority: a snoop cycle
// blocks fills and requests, and the snoop answer (hit and line) is
// registered one cycle later; a hit invalidates the line. Fills take
// precedence over user requests.
//
// The size, associativity and line size are parameters, as in the document;
// the defaults are the 4 KB, 2-way configuration it reports. The line size
// is fixed by farm_pkg (64 bytes). The request id width, the victim choice
// and the priorities are this design's choices.
module cache_core
  import farm_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned WAYS        = 2,
  parameter int unsigned ID_W        = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // user cache interface
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  addr_t           req_addr,
  input  word_t           req_wdata,
  input  logic [ID_W-1:0] req_id,
  output logic            rsp_valid,
  output logic [ID_W-1:0] rsp_id,
  output word_t           rsp_rdata,
  // presence lookup (used to filter prefetches)
  input  addr_t           lk_addr,
  output logic            lk_hit,
  // miss request to the prefetch/fill buffer
  output logic            miss_valid,
  input  logic            miss_ready,
  output addr_t           miss_addr,
  // line fills from the prefetch/fill buffer
  input  logic            fill_valid,
  output logic            fill_ready,
  input  addr_t           fill_addr,
  input  line_t           fill_data,
  // evictions to the write buffer
  output logic            ev_valid,
  input  logic            ev_ready,
  output addr_t           ev_addr,
  output line_t           ev_data,
  // snoop port
  input  logic            snp_valid,
  input  addr_t           snp_addr,
  output logic            snp_hit,
  output line_t           snp_data
);
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_BITS = ADDR_W - OFFS_W - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WSEL_W = $clog2(LINE_WORDS);

  typedef logic [TAG_BITS-1:0] ctag_t;
  typedef logic [IDX_W-1:0]    cidx_t;

  logic  valid [SETS][WAYS];
  ctag_t tags  [SETS][WAYS];
  line_t lines [SETS][WAYS];
  logic [WAY_W-1:0] mru [SETS];

  function automatic cidx_t idx_of(addr_t a);  return a[OFFS_W +: IDX_W];            endfunction
  function automatic ctag_t tag_of(addr_t a);  return a[ADDR_W-1 -: TAG_BITS];       endfunction
  function automatic logic [WSEL_W-1:0] wsel_of(addr_t a); return a[3 +: WSEL_W];     endfunction

  // lookup of one address in its set
  function automatic logic [WAYS:0] lookup(addr_t a);   // {hit, one-hot way}
    logic [WAYS:0] r;
    r = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[idx_of(a)][w] && tags[idx_of(a)][w] == tag_of(a)) begin
        r[w]    = 1'b1;
        r[WAYS] = 1'b1;
      end
    return r;
  endfunction

  function automatic logic [WAY_W-1:0] enc(logic [WAYS-1:0] oh);
    logic [WAY_W-1:0] r;
    r = '0;
    for (int w = 0; w < WAYS; w++) if (oh[w]) r = WAY_W'(w);
    return r;
  endfunction

  // parked miss
  logic            pend_valid, pend_sent, pend_we;
  addr_t           pend_addr;
  word_t           pend_wdata;
  logic [ID_W-1:0] pend_id;

  logic [WAYS:0]    req_lk, snp_lk, fill_lk, lk_lk;
  logic             req_hit, fill_present, fill_is_pend;
  logic [WAY_W-1:0] req_way, snp_way, vway;
  logic             vict_valid, fill_go, req_go, have_inv;
  cidx_t            fset;
  line_t            fill_line;

  assign req_lk  = lookup(req_addr);
  assign snp_lk  = lookup(snp_addr);
  assign fill_lk = lookup(fill_addr);
  assign lk_lk   = lookup(lk_addr);
  assign lk_hit  = lk_lk[WAYS];
  assign req_hit = req_lk[WAYS];
  assign req_way = enc(req_lk[WAYS-1:0]);
  assign snp_way = enc(snp_lk[WAYS-1:0]);
  assign fill_present = fill_lk[WAYS];
  assign fset    = idx_of(fill_addr);

  // victim: first invalid way, else the way after the most recently used
  always_comb begin
    have_inv = 1'b0;
    vway     = WAY_W'((32'(mru[fset]) + 1) % WAYS);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[fset][w]) begin
        have_inv = 1'b1;
        vway     = WAY_W'(w);
      end
  end
  assign vict_valid   = !have_inv;
  assign fill_is_pend = pend_valid && pend_sent && line_base(fill_addr) == line_base(pend_addr);

  assign ev_valid   = fill_valid && !snp_valid && !fill_present && vict_valid;
  assign ev_addr    = {tags[fset][vway], fset, {OFFS_W{1'b0}}};
  assign ev_data    = lines[fset][vway];
  assign fill_ready = !snp_valid && (fill_present || !vict_valid || ev_ready);
  assign fill_go    = fill_valid && fill_ready;

  assign req_ready  = !snp_valid && !fill_valid && (req_hit || !pend_valid);
  assign req_go     = req_valid && req_ready;

  assign miss_valid = pend_valid && !pend_sent;
  assign miss_addr  = line_base(pend_addr);

  // the filled line with the parked write merged in
  always_comb begin
    fill_line = fill_data;
    if (fill_is_pend && pend_we) fill_line[wsel_of(pend_addr)*WORD_W +: WORD_W] = pend_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
        mru[s] <= '0;
      end
      pend_valid <= 1'b0;
      pend_sent  <= 1'b0;
      rsp_valid  <= 1'b0;
      snp_hit    <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      snp_hit   <= 1'b0;
      if (snp_valid && snp_lk[WAYS]) begin
        snp_hit <= 1'b1;
        valid[idx_of(snp_addr)][snp_way] <= 1'b0;
      end
      if (miss_valid && miss_ready) pend_sent <= 1'b1;
      if (fill_go && !fill_present) begin
        valid[fset][vway] <= 1'b1;
        mru[fset]         <= vway;
        if (fill_is_pend) begin
          pend_valid <= 1'b0;
          rsp_valid  <= 1'b1;
        end
      end
      if (req_go) begin
        if (req_hit) begin
          rsp_valid <= 1'b1;
          mru[idx_of(req_addr)] <= req_way;
        end else begin
          pend_valid <= 1'b1;
          pend_sent  <= 1'b0;
        end
      end
    end
  end

  // data path registers and arrays (no reset needed)
  always_ff @(posedge clk) begin
    if (snp_valid) snp_data <= lines[idx_of(snp_addr)][snp_way];
    if (fill_go && !fill_present) begin
      tags[fset][vway]  <= tag_of(fill_addr);
      lines[fset][vway] <= fill_line;
      if (fill_is_pend) begin
        rsp_id    <= pend_id;
        rsp_rdata <= fill_data[wsel_of(pend_addr)*WORD_W +: WORD_W];
      end
    end
    if (req_go) begin
      if (req_hit) begin
        rsp_id    <= req_id;
        rsp_rdata <= lines[idx_of(req_addr)][req_way][wsel_of(req_addr)*WORD_W +: WORD_W];
        if (req_we) lines[idx_of(req_addr)][req_way][wsel_of(req_addr)*WORD_W +: WORD_W] <= req_wdata;
      end else begin
        pend_we    <= req_we;
        pend_addr  <= req_addr;
        pend_wdata <= req_wdata;
        pend_id    <= req_id;
      end
    end
  end

  // a line is never present twice in one set
  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> $onehot0(req_lk[WAYS-1:0]));
  // fills never coincide with accepted user requests
  assert property (@(posedge clk) disable iff (!rst_n) !(fill_go && req_go));
endmodule
