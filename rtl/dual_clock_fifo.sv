// dual_clock_fifo: asynchronous FIFO between two clock domains.
//
// FARM splits the FPGA into separate clock domains with dual-clock buffers;
// this module is such a buffer. It is used between the cHT core domain and
// the application domain (DTE, cache, MMR and user logic), one instance per
// direction. The document names the buffers only; the structure here is
// the usual one: a 2**AW-entry memory, binary read/write pointers with Gray-
// coded copies, and two-flop synchronisers for the Gray pointers crossing
// domains.
//
// Interface: write side wr_valid/wr_ready/wr_data on wr_clk, read side
// rd_valid/rd_ready/rd_data on rd_clk (first-word fall-through). A word
// written becomes visible to the reader three rd_clk edges later at the
// earliest. Each reset is active low and synchronous to its own clock; both
// sides must be reset together.
module dual_clock_fifo #(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 3     // depth = 2**AW
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  input  logic         rd_clk,
  input  logic         rd_rst_n,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wr_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (wr_valid && wr_ready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wr_clk)
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;

  // read domain
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
