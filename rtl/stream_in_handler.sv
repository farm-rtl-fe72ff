// stream_in_handler: the DTE's stream-in traffic handler.
//
// The FPGA owns a window of physical address space above the CPUs' DRAM and
// acts as the memory controller for it. The CPU reaches it with sized
// (non-cacheable) reads and writes. This handler splits that window in two:
// the first MMR_SPAN bytes hold the MMR file, the rest is the streaming
// window. A stream write of up to one line is passed to the user application
// as one 64-bit data word plus its 40-bit address per clock, the width the
// document gives. MMR reads return the register in a RdResponse; non-posted
// writes are acknowledged with a TgtDone. Reads of the stream window return
// zero. The window base and the MMR span are this design's choices.
//
// One packet is handled at a time. rx_ready is high when idle, and also in
// the cycle that passes the last word of a posted stream write, so that
// back-to-back line writes keep the user port busy every cycle: a stream
// write of n words occupies the port for n cycles when str_ready stays high.
// An MMR access produces its response packet in the cycle after it is
// accepted.
module stream_in_handler
  import farm_pkg::*;
#(
  parameter addr_t       FARM_BASE = 40'h10_0000_0000,
  parameter int unsigned MMR_SPAN  = 4096,
  parameter int unsigned NUM_REGS  = 16,
  localparam int unsigned IW = $clog2(NUM_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // sized requests from the CPU
  input  logic          rx_valid,
  output logic          rx_ready,
  input  ht_pkt_t       rx_pkt,
  // responses to the CPU
  output logic          tx_valid,
  input  logic          tx_ready,
  output ht_pkt_t       tx_pkt,
  // MMR file
  output logic          mmr_we,
  output logic [IW-1:0] mmr_idx,
  output word_t         mmr_wdata,
  input  word_t         mmr_rdata,
  // data stream interface to the user application
  output logic          str_valid,
  input  logic          str_ready,
  output addr_t         str_addr,
  output word_t         str_data
);
  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_RESP} state_e;
  state_e           state;
  ht_pkt_t          cur;
  logic [CNT_W-1:0] widx;
  addr_t            offs;
  logic             is_mmr;
  logic             last_beat;

  assign offs   = rx_pkt.addr - FARM_BASE;
  assign is_mmr = offs < addr_t'(MMR_SPAN);

  assign last_beat = (state == S_STREAM) && str_ready && (widx + 1'b1 == cur.count);
  assign rx_ready  = (state == S_IDLE) || (last_beat && cur.posted);
  assign mmr_idx   = IW'(offs >> 3);
  assign mmr_we    = rx_valid && rx_ready && is_mmr && rx_pkt.cmd == CMD_WR_SIZED;
  assign mmr_wdata = rx_pkt.data[WORD_W-1:0];

  assign str_valid = (state == S_STREAM);
  assign str_addr  = cur.addr + addr_t'({widx, 3'b000});
  assign str_data  = cur.data[widx[CNT_W-2:0]*WORD_W +: WORD_W];

  assign tx_valid  = (state == S_RESP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      widx   <= '0;
      cur    <= '0;
      tx_pkt <= '0;
    end else begin
      if (rx_valid && rx_ready) begin
        cur         <= rx_pkt;
        widx        <= '0;
        tx_pkt      <= '0;
        tx_pkt.src  <= rx_pkt.src;
        tx_pkt.tag  <= rx_pkt.tag;
        tx_pkt.addr <= rx_pkt.addr;
        if (rx_pkt.cmd == CMD_RD_SIZED) begin
          tx_pkt.cmd   <= CMD_RD_RESP;
          tx_pkt.count <= CNT_W'(1);
          tx_pkt.data  <= is_mmr ? line_t'(mmr_rdata) : '0;
          state        <= S_RESP;
        end else if (is_mmr) begin
          tx_pkt.cmd <= CMD_TGT_DONE;
          state      <= rx_pkt.posted ? S_IDLE : S_RESP;
        end else begin
          tx_pkt.cmd <= CMD_TGT_DONE;
          state      <= (rx_pkt.count == 0) ? (rx_pkt.posted ? S_IDLE : S_RESP) : S_STREAM;
        end
      end else begin
        unique case (state)
          S_IDLE:   ;
          S_STREAM: if (str_ready) begin
            widx <= widx + 1'b1;
            if (last_beat) state <= cur.posted ? S_IDLE : S_RESP;
          end
          S_RESP:   if (tx_ready) state <= S_IDLE;
          default:  state <= S_IDLE;
        endcase
      end
    end
  end

  // Only sized commands are routed here.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rx_valid |-> (rx_pkt.cmd inside {CMD_WR_SIZED, CMD_RD_SIZED}));
  assert property (@(posedge clk) disable iff (!rst_n)
                   rx_valid && rx_pkt.cmd == CMD_WR_SIZED |-> rx_pkt.count <= CNT_W'(LINE_WORDS));
endmodule
