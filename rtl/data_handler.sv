// data_handler: the DTE block that completes the FPGA's own transactions.
//
// With a broadcast protocol and no directory, an exclusive read by the FPGA
// is answered by every other cache (a probe response each) and by the home
// memory controller (a read response). The handler counts these per tag and
// keeps the right copy of the line: a dirty probe response (a cache held
// the line modified) overrides the memory data, whatever order they arrive
// in. When all NUM_RESP answers are in, it hands the line to the prefetch
// buffer slot recorded for the tag, sends SrcDone, and frees the tag. A
// TgtDone for a victim writeback frees the tag and tells the write buffer
// that its slot is written back.
//
// NUM_RESP defaults to 3: two CPU caches plus one home memory controller for
// the two-CPU system; the document says responses are counted but does not
// give the number. Per-tag state (count, dirty flag, line) is held in
// tag-indexed arrays. One response is accepted per cycle while idle; a
// completed fetch waits in a register until both fill_ready and tx_ready
// have been seen.
module data_handler
  import farm_pkg::*;
#(
  parameter int unsigned NUM_RESP = 3,
  parameter node_t       NODE_ID  = 3'd2
) (
  input  logic              clk,
  input  logic              rst_n,
  // responses from the cHT core
  input  logic              rx_valid,
  output logic              rx_ready,
  input  ht_pkt_t           rx_pkt,
  // tag table
  output tag_t              lk_tag,
  input  logic              lk_busy,
  input  tag_info_t         lk_info,
  output logic              free_en,
  output tag_t              free_tag,
  // line delivery to the prefetch buffer
  output logic              fill_valid,
  input  logic              fill_ready,
  output logic [SLOT_W-1:0] fill_slot,
  output line_t             fill_data,
  // writeback completion to the write buffer
  output logic              wb_done,
  output logic [SLOT_W-1:0] wb_done_slot,
  // SrcDone to the cHT core
  output logic              tx_valid,
  input  logic              tx_ready,
  output ht_pkt_t           tx_pkt
);
  localparam int unsigned RW = $clog2(NUM_RESP + 1);

  logic [RW-1:0] cnt   [NUM_TAGS];
  logic          dirty [NUM_TAGS];
  line_t         data  [NUM_TAGS];

  logic   busy_out;            // completed fetch waiting to leave
  logic   fill_pend, tx_pend;
  tag_t   done_tag;

  logic   acc, is_fetch_resp, is_wb_done, last;
  line_t  new_data;
  logic   new_dirty;

  assign rx_ready = !busy_out;
  assign acc      = rx_valid && rx_ready;
  assign lk_tag   = rx_pkt.tag;
  assign is_fetch_resp = acc && lk_info.kind == XK_FETCH &&
                         rx_pkt.cmd inside {CMD_RD_RESP, CMD_PROBE_RESP};
  assign is_wb_done    = acc && lk_info.kind == XK_WB && rx_pkt.cmd == CMD_TGT_DONE;
  assign last          = is_fetch_resp && (cnt[rx_pkt.tag] + 1'b1 == RW'(NUM_RESP));

  // copy selection: a dirty probe response wins over memory data
  always_comb begin
    new_data  = data[rx_pkt.tag];
    new_dirty = dirty[rx_pkt.tag];
    if (rx_pkt.cmd == CMD_PROBE_RESP && rx_pkt.dirty) begin
      new_data  = rx_pkt.data;
      new_dirty = 1'b1;
    end else if (rx_pkt.cmd == CMD_RD_RESP && !dirty[rx_pkt.tag]) begin
      new_data  = rx_pkt.data;
    end
  end

  assign wb_done      = is_wb_done;
  assign wb_done_slot = lk_info.slot;
  assign fill_valid   = fill_pend;
  assign tx_valid     = tx_pend;
  assign free_en      = is_wb_done || (busy_out && (!fill_pend || fill_ready) && (!tx_pend || tx_ready));
  assign free_tag     = is_wb_done ? rx_pkt.tag : done_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TAGS; i++) begin
        cnt[i]   <= '0;
        dirty[i] <= 1'b0;
      end
      busy_out  <= 1'b0;
      fill_pend <= 1'b0;
      tx_pend   <= 1'b0;
      done_tag  <= '0;
      fill_slot <= '0;
      fill_data <= '0;
      tx_pkt    <= '0;
    end else begin
      if (fill_pend && fill_ready) fill_pend <= 1'b0;
      if (tx_pend && tx_ready)     tx_pend   <= 1'b0;
      if (busy_out && (!fill_pend || fill_ready) && (!tx_pend || tx_ready)) busy_out <= 1'b0;
      if (is_fetch_resp) begin
        if (last) begin
          cnt[rx_pkt.tag]   <= '0;
          dirty[rx_pkt.tag] <= 1'b0;
          busy_out  <= 1'b1;
          fill_pend <= 1'b1;
          tx_pend   <= 1'b1;
          done_tag  <= rx_pkt.tag;
          fill_slot <= lk_info.slot;
          fill_data <= new_data;
          tx_pkt        <= '0;
          tx_pkt.cmd    <= CMD_SRC_DONE;
          tx_pkt.src    <= NODE_ID;
          tx_pkt.tag    <= rx_pkt.tag;
          tx_pkt.addr   <= lk_info.addr;
        end else begin
          cnt[rx_pkt.tag]   <= cnt[rx_pkt.tag] + 1'b1;
          dirty[rx_pkt.tag] <= new_dirty;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (is_fetch_resp && !last) data[rx_pkt.tag] <= new_data;

  // every response must belong to a tag the FPGA has in flight
  assert property (@(posedge clk) disable iff (!rst_n) rx_valid && rx_ready |-> lk_busy);
endmodule
