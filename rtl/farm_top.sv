// farm_top: the FPGA side of FARM, everything above the cHT link core.
//
// FARM attaches an FPGA to two CPUs as a coherent node: the FPGA owns a
// window of physical memory, answers the CPUs' snoops and has its own
// cache. This top joins the parts behind the cHT core:
//
//   cHT core domain (cht_clk)  --dual-clock FIFO-->  DTE  <--> coherent cache
//                              <--dual-clock FIFO--       <--> MMR file
//                                                         ---> stream port
//
// The cHT core itself (link layer, CRC, LVDS) is third-party IP and is not
// part of this RTL: its packet ports are the cht_* ports here, one packet
// per transfer in the format of farm_pkg::ht_pkt_t. Everything else runs on
// app_clk, the clock of the user application; the document's base
// configuration runs both clocks at 100 MHz, but they may be unrelated.
//
// To the user application the top offers the three FARM interfaces:
//   * MMR file: all registers in parallel (mmr_regs), a write port and a
//     strobe per register written by the CPU;
//   * data stream interface: one 64-bit word and its 40-bit address per
//     cycle for every word the CPU streams into the FPGA's window;
//   * coherent cache: word reads/writes with ids (hit-under-miss) and a
//     non-blocking line prefetch port.
// Each domain has its own active-low reset, synchronous to its clock; both
// must be asserted together.
module farm_top
  import farm_pkg::*;
#(
  parameter node_t       NODE_ID     = 3'd2,
  parameter int unsigned NUM_RESP    = 3,
  parameter addr_t       FARM_BASE   = 40'h10_0000_0000,
  parameter int unsigned MMR_SPAN    = 4096,
  parameter int unsigned NUM_REGS    = 16,
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned WAYS        = 2,
  parameter int unsigned PF_ENTRIES  = 4,
  parameter int unsigned WB_ENTRIES  = 4,
  parameter int unsigned ID_W        = 4,
  parameter int unsigned FIFO_AW     = 3,
  localparam int unsigned IW = $clog2(NUM_REGS)
) (
  // cHT core side
  input  logic                 cht_clk,
  input  logic                 cht_rst_n,
  input  logic                 cht_rx_valid,
  output logic                 cht_rx_ready,
  input  ht_pkt_t              cht_rx_pkt,
  output logic                 cht_tx_valid,
  input  logic                 cht_tx_ready,
  output ht_pkt_t              cht_tx_pkt,
  // application clock domain
  input  logic                 app_clk,
  input  logic                 app_rst_n,
  // MMR interface
  input  logic                 mmr_usr_we,
  input  logic [IW-1:0]        mmr_usr_idx,
  input  word_t                mmr_usr_wdata,
  output word_t                mmr_regs [NUM_REGS],
  output logic [NUM_REGS-1:0]  mmr_cpu_wr_strobe,
  // data stream interface
  output logic                 str_valid,
  input  logic                 str_ready,
  output addr_t                str_addr,
  output word_t                str_data,
  // cache interface
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  addr_t                req_addr,
  input  word_t                req_wdata,
  input  logic [ID_W-1:0]      req_id,
  output logic                 rsp_valid,
  output logic [ID_W-1:0]      rsp_id,
  output word_t                rsp_rdata,
  input  logic                 pf_valid,
  output logic                 pf_ready,
  input  addr_t                pf_addr,
  // status
  output logic [$clog2(NUM_TAGS+1)-1:0] tags_in_use
);
  // ---------------- clock-domain crossing ----------------
  logic    rx_valid, rx_ready, tx_valid, tx_ready;
  ht_pkt_t rx_pkt, tx_pkt;

  dual_clock_fifo #(.W($bits(ht_pkt_t)), .AW(FIFO_AW)) u_rx_fifo (
    .wr_clk(cht_clk), .wr_rst_n(cht_rst_n),
    .wr_valid(cht_rx_valid), .wr_ready(cht_rx_ready), .wr_data(cht_rx_pkt),
    .rd_clk(app_clk), .rd_rst_n(app_rst_n),
    .rd_valid(rx_valid), .rd_ready(rx_ready), .rd_data(rx_pkt)
  );

  dual_clock_fifo #(.W($bits(ht_pkt_t)), .AW(FIFO_AW)) u_tx_fifo (
    .wr_clk(app_clk), .wr_rst_n(app_rst_n),
    .wr_valid(tx_valid), .wr_ready(tx_ready), .wr_data(tx_pkt),
    .rd_clk(cht_clk), .rd_rst_n(cht_rst_n),
    .rd_valid(cht_tx_valid), .rd_ready(cht_tx_ready), .rd_data(cht_tx_pkt)
  );

  // ---------------- DTE ----------------
  logic              mmr_we;
  logic [IW-1:0]     mmr_idx;
  word_t             mmr_wdata, mmr_rdata;
  logic              fetch_valid, fetch_ready, fdata_valid, fdata_ready;
  addr_t             fetch_addr;
  logic [SLOT_W-1:0] fetch_slot, fdata_slot, wb_slot, wb_done_slot;
  line_t             fdata_line, wb_data, snp_data;
  logic              wb_valid, wb_ready, wb_done;
  addr_t             wb_addr, snp_addr;
  logic              snp_valid, snp_rsp_valid, snp_hit;

  dte #(.NODE_ID(NODE_ID), .NUM_RESP(NUM_RESP), .FARM_BASE(FARM_BASE),
        .MMR_SPAN(MMR_SPAN), .NUM_REGS(NUM_REGS)) u_dte (
    .clk(app_clk), .rst_n(app_rst_n),
    .rx_valid, .rx_ready, .rx_pkt, .tx_valid, .tx_ready, .tx_pkt,
    .mmr_we, .mmr_idx, .mmr_wdata, .mmr_rdata,
    .str_valid, .str_ready, .str_addr, .str_data,
    .fetch_valid, .fetch_ready, .fetch_addr, .fetch_slot,
    .fdata_valid, .fdata_ready, .fdata_slot, .fdata_line,
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .wb_slot, .wb_done, .wb_done_slot,
    .snp_valid, .snp_addr, .snp_rsp_valid, .snp_hit, .snp_data,
    .tags_in_use
  );

  // ---------------- MMR file ----------------
  mmr_file #(.NUM_REGS(NUM_REGS)) u_mmr (
    .clk(app_clk), .rst_n(app_rst_n),
    .cpu_we(mmr_we), .cpu_idx(mmr_idx), .cpu_wdata(mmr_wdata), .cpu_rdata(mmr_rdata),
    .usr_we(mmr_usr_we), .usr_idx(mmr_usr_idx), .usr_wdata(mmr_usr_wdata),
    .regs(mmr_regs), .cpu_wr_strobe(mmr_cpu_wr_strobe)
  );

  // ---------------- coherent cache ----------------
  coherent_cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .PF_ENTRIES(PF_ENTRIES),
                   .WB_ENTRIES(WB_ENTRIES), .ID_W(ID_W)) u_cache (
    .clk(app_clk), .rst_n(app_rst_n),
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_id,
    .rsp_valid, .rsp_id, .rsp_rdata,
    .pf_valid, .pf_ready, .pf_addr,
    .fetch_valid, .fetch_ready, .fetch_addr, .fetch_slot,
    .fdata_valid, .fdata_ready, .fdata_slot, .fdata_line,
    .wb_valid, .wb_ready, .wb_addr, .wb_data, .wb_slot, .wb_done, .wb_done_slot,
    .snp_valid, .snp_addr, .snp_rsp_valid, .snp_hit, .snp_data
  );
endmodule
