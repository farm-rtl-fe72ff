// dte_tag_table: tag management of the Data Transfer Engine.
//
// Coherent HyperTransport allows 32 transactions in flight, told apart by
// their tags, and responses may come back in any order. Every request the
// FPGA issues (an exclusive line fetch or a victim writeback) takes a free
// tag here; the table keeps, per tag, what the transaction is, which buffer
// slot it serves and its line address, so that the data handler can match
// out-of-order responses by tag alone.
//
// alloc_gnt is high while a tag is free and alloc_tag is the lowest free tag;
// asserting alloc_req in such a cycle claims it and stores alloc_info. The
// lookup port is combinational. free_en releases a tag at the clock edge.
// Freeing a tag that is not in use is an error (asserted).
module dte_tag_table
  import farm_pkg::*;
#(
  parameter int unsigned N = NUM_TAGS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       alloc_req,
  output logic       alloc_gnt,
  output tag_t       alloc_tag,
  input  tag_info_t  alloc_info,
  input  tag_t       lk_tag,
  output logic       lk_busy,
  output tag_info_t  lk_info,
  input  logic       free_en,
  input  tag_t       free_tag,
  output logic [$clog2(N+1)-1:0] in_use
);
  logic [N-1:0] busy;
  tag_info_t    info [N];

  always_comb begin
    alloc_gnt = 1'b0;
    alloc_tag = '0;
    for (int i = N - 1; i >= 0; i--)
      if (!busy[i]) begin
        alloc_gnt = 1'b1;
        alloc_tag = tag_t'(i);
      end
  end

  assign lk_busy = busy[lk_tag];
  assign lk_info = info[lk_tag];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      if (free_en) busy[free_tag] <= 1'b0;
      if (alloc_req && alloc_gnt) busy[alloc_tag] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (alloc_req && alloc_gnt) info[alloc_tag] <= alloc_info;

  always_comb begin
    in_use = '0;
    for (int i = 0; i < N; i++) in_use += busy[i];
  end

  assert property (@(posedge clk) disable iff (!rst_n) free_en |-> busy[free_tag]);
endmodule
