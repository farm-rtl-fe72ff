// snoop_handler: the DTE block that answers probes (snoops) from the CPUs.
//
// Every coherent read or write-for-ownership in the system is broadcast as a
// probe, and the FPGA, being a coherent node with a cache, must answer each.
// The handler passes the probed address to the coherent cache, which looks
// in its core, write buffer and prefetch buffer at once and answers one
// cycle later. The handler then sends the probe response to the requester:
// with the line and dirty=1 if the FPGA held it (the cache gives it up, since
// it keeps lines only modified or invalid), without data otherwise.
//
// Timing: a probe accepted in cycle t is looked up in t+1, answered by the
// cache in t+2, and its response is on tx from t+2 until accepted. One probe
// is handled at a time.
module snoop_handler
  import farm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // probes from the cHT core
  input  logic    rx_valid,
  output logic    rx_ready,
  input  ht_pkt_t rx_pkt,
  // snoop port of the coherent cache
  output logic    snp_valid,
  output addr_t   snp_addr,
  input  logic    snp_rsp_valid,
  input  logic    snp_hit,
  input  line_t   snp_data,
  // probe responses to the cHT core
  output logic    tx_valid,
  input  logic    tx_ready,
  output ht_pkt_t tx_pkt
);
  typedef enum logic [1:0] {S_IDLE, S_SNOOP, S_WAIT, S_RESP} state_e;
  state_e  state;
  ht_pkt_t probe;

  assign rx_ready  = (state == S_IDLE);
  assign snp_valid = (state == S_SNOOP);
  assign snp_addr  = probe.addr;
  assign tx_valid  = (state == S_RESP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      probe  <= '0;
      tx_pkt <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (rx_valid) begin probe <= rx_pkt; state <= S_SNOOP; end
        S_SNOOP: state <= S_WAIT;
        S_WAIT:  if (snp_rsp_valid) begin
          tx_pkt       <= '0;
          tx_pkt.cmd   <= CMD_PROBE_RESP;
          tx_pkt.src   <= probe.src;
          tx_pkt.tag   <= probe.tag;
          tx_pkt.addr  <= probe.addr;
          tx_pkt.dirty <= snp_hit;
          tx_pkt.count <= snp_hit ? CNT_W'(LINE_WORDS) : '0;
          tx_pkt.data  <= snp_hit ? snp_data : '0;
          state        <= S_RESP;
        end
        S_RESP:  if (tx_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rx_valid |-> rx_pkt.cmd == CMD_PROBE);
endmodule
