// prefetch_buffer: the coherent cache's extended fill buffer.
//
// Every line the cache fetches passes through one of N slots here: demand
// misses from the cache core and prefetches the user application asks for.
// Several fetches can be in flight at once, and a prefetch request is
// accepted without blocking while a slot is free, as the document
// describes; that lets the application issue a set of precomputed addresses
// ahead of use. A slot goes FREE -> ISSUE (waiting for the data requester)
// -> WAIT (fetch sent) -> READY (line arrived) -> FREE (line moved into the
// cache core). A request for a line already in a slot joins that slot; a
// demand miss marks it as demanded, and demanded lines are moved into the
// core first.
//
// A READY slot holds an exclusively fetched line, so snoops search it: a
// hit takes the line, and the slot is refetched if it was demanded, freed if
// not. A slot still waiting for data answers a snoop with a miss. New
// fetches of a line still in the write buffer are held back (chk_hit) until
// its writeback is done. Demand misses are served before prefetches. The
// slot count (4), the state encoding and the priorities are this design's
// choices. Snoop answers are registered, one cycle after snp_valid.
module prefetch_buffer
  import farm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // demand miss from the cache core
  input  logic              miss_valid,
  output logic              miss_ready,
  input  addr_t             miss_addr,
  // user prefetch requests
  input  logic              pf_valid,
  output logic              pf_ready,
  input  addr_t             pf_addr,
  // write-buffer presence check of the line being requested
  output addr_t             chk_addr,
  input  logic              chk_hit,
  // fetch requests to the data requester
  output logic              fetch_valid,
  input  logic              fetch_ready,
  output addr_t             fetch_addr,
  output logic [SLOT_W-1:0] fetch_slot,
  // fetched lines from the data handler
  input  logic              data_valid,
  output logic              data_ready,
  input  logic [SLOT_W-1:0] data_slot,
  input  line_t             data_line,
  // lines to the cache core
  output logic              fill_valid,
  input  logic              fill_ready,
  output addr_t             fill_addr,
  output line_t             fill_data,
  // snoop port
  input  logic              snp_valid,
  input  addr_t             snp_addr,
  output logic              snp_hit,
  output line_t             snp_data,
  // number of occupied slots
  output logic [$clog2(N+1)-1:0] occupancy
);
  typedef enum logic [1:0] {PF_FREE, PF_ISSUE, PF_WAIT, PF_READY} pf_state_e;

  pf_state_e st     [N];
  logic      demand [N];
  addr_t     addr   [N];
  line_t     data   [N];

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;   // slot index width inside
  logic [IW-1:0]     free_i, iss_i, out_i, match_i, snp_i, dat_i;
  logic              have_free, have_iss, have_out, match, snp_m, out_dem;
  logic              use_miss, acc;

  assign use_miss = miss_valid;
  assign chk_addr = line_base(use_miss ? miss_addr : pf_addr);

  always_comb begin
    have_free = 1'b0; free_i  = '0;
    have_iss  = 1'b0; iss_i   = '0;
    have_out  = 1'b0; out_i   = '0; out_dem = 1'b0;
    match     = 1'b0; match_i = '0;
    snp_m     = 1'b0; snp_i   = '0;
    occupancy = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (st[i] == PF_FREE)  begin have_free = 1'b1; free_i = IW'(i); end
      if (st[i] == PF_ISSUE) begin have_iss  = 1'b1; iss_i  = IW'(i); end
      if (st[i] != PF_FREE && addr[i] == chk_addr) begin match = 1'b1; match_i = IW'(i); end
      if (st[i] == PF_READY && addr[i] == line_base(snp_addr)) begin snp_m = 1'b1; snp_i = IW'(i); end
      if (st[i] != PF_FREE) occupancy += 1'b1;
    end
    // oldest-numbered ready slot, demanded ones first
    for (int i = N - 1; i >= 0; i--)
      if (st[i] == PF_READY && (demand[i] || !out_dem)) begin
        have_out = 1'b1; out_i = IW'(i); out_dem = demand[i];
      end
  end

  assign acc        = !chk_hit && (match || have_free);
  assign miss_ready = use_miss && acc;
  assign pf_ready   = !use_miss && acc;

  assign fetch_valid = have_iss;
  assign fetch_slot  = SLOT_W'(iss_i);
  assign dat_i       = IW'(data_slot);
  assign fetch_addr  = addr[iss_i];

  assign data_ready  = 1'b1;

  assign fill_valid  = have_out;
  assign fill_addr   = addr[out_i];
  assign fill_data   = data[out_i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin st[i] <= PF_FREE; demand[i] <= 1'b0; end
      snp_hit <= 1'b0;
    end else begin
      snp_hit <= snp_valid && snp_m;
      if (fetch_valid && fetch_ready) st[iss_i] <= PF_WAIT;
      if (data_valid) st[dat_i] <= PF_READY;
      if (fill_valid && fill_ready) begin
        st[out_i]     <= PF_FREE;
        demand[out_i] <= 1'b0;
      end
      if (snp_valid && snp_m) begin
        st[snp_i] <= demand[snp_i] ? PF_ISSUE : PF_FREE;
      end
      if ((miss_valid && miss_ready) || (pf_valid && pf_ready)) begin
        if (match) begin
          if (use_miss) demand[match_i] <= 1'b1;
        end else begin
          st[free_i]     <= PF_ISSUE;
          demand[free_i] <= use_miss;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (snp_valid) snp_data <= data[snp_i];
    if (data_valid) data[dat_i] <= data_line;
    if (((miss_valid && miss_ready) || (pf_valid && pf_ready)) && !match)
      addr[free_i] <= chk_addr;
  end

  assert property (@(posedge clk) disable iff (!rst_n) data_valid |-> st[dat_i] == PF_WAIT);
  // the core takes no fill in a snoop cycle, so a snooped slot never leaves twice
  assert property (@(posedge clk) disable iff (!rst_n) !(snp_valid && snp_m && fill_valid && fill_ready && snp_i == out_i));
endmodule
