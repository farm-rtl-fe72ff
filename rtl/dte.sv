// dte: the Data Transfer Engine, FARM's transport layer behind the cHT core.
//
// The cHT core delivers and accepts whole packets; the DTE gives them their
// protocol meaning. Received packets are steered by command: sized reads and
// writes to the FPGA's address range go to the stream-in traffic handler
// (MMR file and data stream interface), probes go to the snoop handler, and
// read responses, probe responses and target completions for the FPGA's own
// requests go to the data handler. The data requester issues the cache's
// fetches and writebacks. Tags of the FPGA's requests are managed by the tag
// table, so out-of-order responses are matched by tag.
//
// Four sources share the transmit port under fixed priority: probe
// responses first (snoop latency decides the system's miss latency), then
// SrcDone from the data handler, then MMR responses, then new requests.
// Each source holds its packet until it is taken, so no packet is lost; the
// priority order below the snoop handler is this design's choice.
module dte
  import farm_pkg::*;
#(
  parameter node_t       NODE_ID   = 3'd2,
  parameter int unsigned NUM_RESP  = 3,
  parameter addr_t       FARM_BASE = 40'h10_0000_0000,
  parameter int unsigned MMR_SPAN  = 4096,
  parameter int unsigned NUM_REGS  = 16,
  localparam int unsigned IW = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // packets from / to the cHT core
  input  logic              rx_valid,
  output logic              rx_ready,
  input  ht_pkt_t           rx_pkt,
  output logic              tx_valid,
  input  logic              tx_ready,
  output ht_pkt_t           tx_pkt,
  // MMR file
  output logic              mmr_we,
  output logic [IW-1:0]     mmr_idx,
  output word_t             mmr_wdata,
  input  word_t             mmr_rdata,
  // data stream interface
  output logic              str_valid,
  input  logic              str_ready,
  output addr_t             str_addr,
  output word_t             str_data,
  // coherent cache: fetch path
  input  logic              fetch_valid,
  output logic              fetch_ready,
  input  addr_t             fetch_addr,
  input  logic [SLOT_W-1:0] fetch_slot,
  output logic              fdata_valid,
  input  logic              fdata_ready,
  output logic [SLOT_W-1:0] fdata_slot,
  output line_t             fdata_line,
  // coherent cache: writeback path
  input  logic              wb_valid,
  output logic              wb_ready,
  input  addr_t             wb_addr,
  input  line_t             wb_data,
  input  logic [SLOT_W-1:0] wb_slot,
  output logic              wb_done,
  output logic [SLOT_W-1:0] wb_done_slot,
  // coherent cache: snoop path
  output logic              snp_valid,
  output addr_t             snp_addr,
  input  logic              snp_rsp_valid,
  input  logic              snp_hit,
  input  line_t             snp_data,
  // tags in use (status)
  output logic [$clog2(NUM_TAGS+1)-1:0] tags_in_use
);
  // ---------------- receive steering ----------------
  logic sih_rx_valid, sih_rx_ready, snp_rx_valid, snp_rx_ready, dh_rx_valid, dh_rx_ready;
  logic to_sih, to_snp, to_dh;

  assign to_sih = rx_pkt.cmd inside {CMD_WR_SIZED, CMD_RD_SIZED};
  assign to_snp = rx_pkt.cmd == CMD_PROBE;
  assign to_dh  = rx_pkt.cmd inside {CMD_RD_RESP, CMD_PROBE_RESP, CMD_TGT_DONE};
  assign sih_rx_valid = rx_valid && to_sih;
  assign snp_rx_valid = rx_valid && to_snp;
  assign dh_rx_valid  = rx_valid && to_dh;
  // unknown commands are consumed and dropped
  assign rx_ready = to_sih ? sih_rx_ready : to_snp ? snp_rx_ready : to_dh ? dh_rx_ready : 1'b1;

  // ---------------- tag table ----------------
  logic      alloc_req, alloc_gnt, lk_busy, free_en;
  tag_t      alloc_tag, lk_tag, free_tag;
  tag_info_t alloc_info, lk_info;

  dte_tag_table u_tags (
    .clk, .rst_n,
    .alloc_req, .alloc_gnt, .alloc_tag, .alloc_info,
    .lk_tag, .lk_busy, .lk_info,
    .free_en, .free_tag,
    .in_use(tags_in_use)
  );

  // ---------------- handlers ----------------
  logic    sih_tx_valid, sih_tx_ready, snp_tx_valid, snp_tx_ready;
  logic    dh_tx_valid, dh_tx_ready, dr_tx_valid, dr_tx_ready;
  ht_pkt_t sih_tx_pkt, snp_tx_pkt, dh_tx_pkt, dr_tx_pkt;

  stream_in_handler #(.FARM_BASE(FARM_BASE), .MMR_SPAN(MMR_SPAN), .NUM_REGS(NUM_REGS)) u_sih (
    .clk, .rst_n,
    .rx_valid(sih_rx_valid), .rx_ready(sih_rx_ready), .rx_pkt,
    .tx_valid(sih_tx_valid), .tx_ready(sih_tx_ready), .tx_pkt(sih_tx_pkt),
    .mmr_we, .mmr_idx, .mmr_wdata, .mmr_rdata,
    .str_valid, .str_ready, .str_addr, .str_data
  );

  snoop_handler u_snp (
    .clk, .rst_n,
    .rx_valid(snp_rx_valid), .rx_ready(snp_rx_ready), .rx_pkt,
    .snp_valid, .snp_addr, .snp_rsp_valid, .snp_hit, .snp_data,
    .tx_valid(snp_tx_valid), .tx_ready(snp_tx_ready), .tx_pkt(snp_tx_pkt)
  );

  data_handler #(.NUM_RESP(NUM_RESP), .NODE_ID(NODE_ID)) u_dh (
    .clk, .rst_n,
    .rx_valid(dh_rx_valid), .rx_ready(dh_rx_ready), .rx_pkt,
    .lk_tag, .lk_busy, .lk_info, .free_en, .free_tag,
    .fill_valid(fdata_valid), .fill_ready(fdata_ready), .fill_slot(fdata_slot), .fill_data(fdata_line),
    .wb_done, .wb_done_slot,
    .tx_valid(dh_tx_valid), .tx_ready(dh_tx_ready), .tx_pkt(dh_tx_pkt)
  );

  data_requester #(.NODE_ID(NODE_ID)) u_dr (
    .clk, .rst_n,
    .fetch_valid, .fetch_ready, .fetch_addr, .fetch_slot,
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .wb_slot,
    .alloc_req, .alloc_gnt, .alloc_tag, .alloc_info,
    .tx_valid(dr_tx_valid), .tx_ready(dr_tx_ready), .tx_pkt(dr_tx_pkt)
  );

  // ---------------- transmit arbitration ----------------
  always_comb begin
    snp_tx_ready = 1'b0;
    dh_tx_ready  = 1'b0;
    sih_tx_ready = 1'b0;
    dr_tx_ready  = 1'b0;
    tx_valid     = 1'b1;
    tx_pkt       = dr_tx_pkt;
    if (snp_tx_valid) begin
      tx_pkt = snp_tx_pkt; snp_tx_ready = tx_ready;
    end else if (dh_tx_valid) begin
      tx_pkt = dh_tx_pkt;  dh_tx_ready  = tx_ready;
    end else if (sih_tx_valid) begin
      tx_pkt = sih_tx_pkt; sih_tx_ready = tx_ready;
    end else begin
      tx_valid = dr_tx_valid; dr_tx_ready = tx_ready;
    end
  end
endmodule
