// data_requester: the DTE block that issues the FPGA's own requests.
//
// The coherent cache asks for lines (from its prefetch/fill buffer) and hands
// over dirty lines it evicts (from its write buffer). For a fetch the
// requester sends an exclusive block read (RdBlkMod), since the cache keeps
// lines only modified or invalid; for an eviction it sends a victim block
// (VicBlk) carrying the line. Each request takes a tag from the tag table,
// which records the buffer slot to be told of the completion.
//
// One request is prepared per cycle when a tag is free and the packet
// register is empty; the packet stays on tx until accepted. Writebacks are
// served before fetches, so that the write buffer drains and evictions do
// not hold up fills; that priority is this design's choice.
module data_requester
  import farm_pkg::*;
#(
  parameter node_t NODE_ID = 3'd2
) (
  input  logic              clk,
  input  logic              rst_n,
  // line fetches from the prefetch buffer
  input  logic              fetch_valid,
  output logic              fetch_ready,
  input  addr_t             fetch_addr,
  input  logic [SLOT_W-1:0] fetch_slot,
  // evictions from the write buffer
  input  logic              wb_valid,
  output logic              wb_ready,
  input  addr_t             wb_addr,
  input  line_t             wb_data,
  input  logic [SLOT_W-1:0] wb_slot,
  // tag table
  output logic              alloc_req,
  input  logic              alloc_gnt,
  input  tag_t              alloc_tag,
  output tag_info_t         alloc_info,
  // to the cHT core
  output logic              tx_valid,
  input  logic              tx_ready,
  output ht_pkt_t           tx_pkt
);
  logic can_issue;
  assign can_issue   = alloc_gnt && (!tx_valid || tx_ready);
  assign wb_ready    = can_issue;
  assign fetch_ready = can_issue && !wb_valid;
  assign alloc_req   = (wb_valid && wb_ready) || (fetch_valid && fetch_ready);

  always_comb begin
    alloc_info = '0;
    if (wb_valid) begin
      alloc_info.kind = XK_WB;
      alloc_info.slot = wb_slot;
      alloc_info.addr = line_base(wb_addr);
    end else begin
      alloc_info.kind = XK_FETCH;
      alloc_info.slot = fetch_slot;
      alloc_info.addr = line_base(fetch_addr);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_valid <= 1'b0;
      tx_pkt   <= '0;
    end else begin
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (alloc_req) begin
        tx_valid     <= 1'b1;
        tx_pkt       <= '0;
        tx_pkt.src   <= NODE_ID;
        tx_pkt.tag   <= alloc_tag;
        tx_pkt.addr  <= alloc_info.addr;
        tx_pkt.count <= CNT_W'(LINE_WORDS);
        if (wb_valid) begin
          tx_pkt.cmd   <= CMD_VIC_BLK;
          tx_pkt.dirty <= 1'b1;
          tx_pkt.data  <= wb_data;
        end else begin
          tx_pkt.cmd   <= CMD_RD_BLK_MOD;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tx_valid && !tx_ready |=> tx_valid && $stable(tx_pkt));
endmodule
