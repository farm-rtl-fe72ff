// coherent_cache: FARM's configurable coherent cache.
//
// Three sub-blocks, as in the document: the set-associative cache core, the
// write buffer for evicted lines and the prefetch buffer (an extended fill
// buffer). Toward the DTE there are three data paths, all at line
// granularity: fetch (requests out, lines back), writeback (evicted lines
// out, completions back) and snoop. A snoop is searched in all three
// sub-blocks in the same cycle, and its answer comes one cycle later; since
// every line is held exclusively, at most one of them can hit. Toward the
// user application there is the word-wide cache interface of the core and
// the prefetch request port. A prefetch of a line the core already holds is
// accepted and dropped. The cache works on physical addresses.
module coherent_cache
  import farm_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned WAYS        = 2,
  parameter int unsigned PF_ENTRIES  = 4,
  parameter int unsigned WB_ENTRIES  = 4,
  parameter int unsigned ID_W        = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // user cache interface
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  addr_t             req_addr,
  input  word_t             req_wdata,
  input  logic [ID_W-1:0]   req_id,
  output logic              rsp_valid,
  output logic [ID_W-1:0]   rsp_id,
  output word_t             rsp_rdata,
  // user prefetch interface
  input  logic              pf_valid,
  output logic              pf_ready,
  input  addr_t             pf_addr,
  // fetch path to/from the DTE
  output logic              fetch_valid,
  input  logic              fetch_ready,
  output addr_t             fetch_addr,
  output logic [SLOT_W-1:0] fetch_slot,
  input  logic              fdata_valid,
  output logic              fdata_ready,
  input  logic [SLOT_W-1:0] fdata_slot,
  input  line_t             fdata_line,
  // writeback path
  output logic              wb_valid,
  input  logic              wb_ready,
  output addr_t             wb_addr,
  output line_t             wb_data,
  output logic [SLOT_W-1:0] wb_slot,
  input  logic              wb_done,
  input  logic [SLOT_W-1:0] wb_done_slot,
  // snoop path
  input  logic              snp_valid,
  input  addr_t             snp_addr,
  output logic              snp_rsp_valid,
  output logic              snp_hit,
  output line_t             snp_data
);
  logic  miss_valid, miss_ready;
  addr_t miss_addr;
  logic  fill_valid, fill_ready;
  addr_t fill_addr;
  line_t fill_data;
  logic  ev_valid, ev_ready;
  addr_t ev_addr;
  line_t ev_data;
  addr_t chk_addr;
  logic  chk_hit;
  logic  core_lk_hit;
  logic  pfb_pf_valid, pfb_pf_ready;
  logic  c_hit, w_hit, p_hit;
  line_t c_data, w_data, p_data;
  logic [$clog2(PF_ENTRIES+1)-1:0] pf_occ;

  // prefetches of lines already in the core are accepted and dropped
  assign pfb_pf_valid = pf_valid && !core_lk_hit;
  assign pf_ready     = core_lk_hit || pfb_pf_ready;

  cache_core #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .ID_W(ID_W)) u_core (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_id,
    .rsp_valid, .rsp_id, .rsp_rdata,
    .lk_addr(pf_addr), .lk_hit(core_lk_hit),
    .miss_valid, .miss_ready, .miss_addr,
    .fill_valid, .fill_ready, .fill_addr, .fill_data,
    .ev_valid, .ev_ready, .ev_addr, .ev_data,
    .snp_valid, .snp_addr, .snp_hit(c_hit), .snp_data(c_data)
  );

  write_buffer #(.N(WB_ENTRIES)) u_wb (
    .clk, .rst_n,
    .in_valid(ev_valid), .in_ready(ev_ready), .in_addr(ev_addr), .in_data(ev_data),
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .wb_slot,
    .wb_done, .wb_done_slot,
    .snp_valid, .snp_addr, .snp_hit(w_hit), .snp_data(w_data),
    .chk_addr, .chk_hit
  );

  prefetch_buffer #(.N(PF_ENTRIES)) u_pf (
    .clk, .rst_n,
    .miss_valid, .miss_ready, .miss_addr,
    .pf_valid(pfb_pf_valid), .pf_ready(pfb_pf_ready), .pf_addr,
    .chk_addr, .chk_hit,
    .fetch_valid, .fetch_ready, .fetch_addr, .fetch_slot,
    .data_valid(fdata_valid), .data_ready(fdata_ready), .data_slot(fdata_slot), .data_line(fdata_line),
    .fill_valid, .fill_ready, .fill_addr, .fill_data,
    .snp_valid, .snp_addr, .snp_hit(p_hit), .snp_data(p_data),
    .occupancy(pf_occ)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) snp_rsp_valid <= 1'b0;
    else        snp_rsp_valid <= snp_valid;
  end

  assign snp_hit  = c_hit || w_hit || p_hit;
  assign snp_data = c_hit ? c_data : w_hit ? w_data : p_data;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({c_hit, w_hit, p_hit}));
endmodule
