// write_buffer: holds lines evicted from the coherent cache until they are
// written back.
//
// An evicted line is always dirty (lines are modified or invalid), so it
// must reach memory as a victim-block writeback, and until the DTE reports
// that writeback done the FPGA still owns it: snoops search this buffer
// alongside the cache core, and the prefetch buffer holds back any new fetch
// of a line still in it. A snoop that hits an entry takes the line; an
// entry not yet sent is then dropped (ownership has moved to the snooper),
// an entry already sent stays until its completion arrives.
//
// N entries (4 by default; the document gives no depth). A new eviction is
// taken whenever an entry is free. The lowest-numbered waiting entry is
// offered to the data requester. wb_done frees the slot it names. The snoop
// answer is registered one cycle after snp_valid; chk_hit is combinational.
module write_buffer
  import farm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // evictions from the cache core
  input  logic              in_valid,
  output logic              in_ready,
  input  addr_t             in_addr,
  input  line_t             in_data,
  // writebacks to the data requester
  output logic              wb_valid,
  input  logic              wb_ready,
  output addr_t             wb_addr,
  output line_t             wb_data,
  output logic [SLOT_W-1:0] wb_slot,
  // completion from the data handler
  input  logic              wb_done,
  input  logic [SLOT_W-1:0] wb_done_slot,
  // snoop port
  input  logic              snp_valid,
  input  addr_t             snp_addr,
  output logic              snp_hit,
  output line_t             snp_data,
  // presence check for new fetches
  input  addr_t             chk_addr,
  output logic              chk_hit
);
  logic  vld  [N];
  logic  sent [N];
  addr_t addr [N];
  line_t data [N];

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;   // slot index width inside
  logic [IW-1:0] free_i, send_i, snp_i, done_i;
  logic              have_free, have_send, snp_m;

  always_comb begin
    have_free = 1'b0; free_i = '0;
    have_send = 1'b0; send_i = '0;
    snp_m     = 1'b0; snp_i  = '0;
    chk_hit   = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!vld[i]) begin have_free = 1'b1; free_i = IW'(i); end
      if (vld[i] && !sent[i]) begin have_send = 1'b1; send_i = IW'(i); end
      if (vld[i] && addr[i] == line_base(snp_addr)) begin snp_m = 1'b1; snp_i = IW'(i); end
      if (vld[i] && addr[i] == line_base(chk_addr)) chk_hit = 1'b1;
    end
  end

  assign in_ready = have_free;
  assign wb_valid = have_send;
  assign wb_slot  = SLOT_W'(send_i);
  assign done_i   = IW'(wb_done_slot);
  assign wb_addr  = addr[send_i];
  assign wb_data  = data[send_i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin vld[i] <= 1'b0; sent[i] <= 1'b0; end
      snp_hit <= 1'b0;
    end else begin
      snp_hit <= snp_valid && snp_m;
      if (wb_valid && wb_ready) sent[send_i] <= 1'b1;
      if (wb_done) vld[done_i] <= 1'b0;
      if (snp_valid && snp_m && !sent[snp_i] && !(wb_valid && wb_ready && send_i == snp_i))
        vld[snp_i] <= 1'b0;
      if (in_valid && in_ready) begin
        vld[free_i]  <= 1'b1;
        sent[free_i] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (snp_valid) snp_data <= data[snp_i];
    if (in_valid && in_ready) begin
      addr[free_i] <= line_base(in_addr);
      data[free_i] <= in_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wb_done |-> vld[done_i] && sent[done_i]);
endmodule
