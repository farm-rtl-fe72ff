// mmr_file: FARM's small memory-mapped register file.
//
// The CPU reaches these registers with uncached sized reads and writes that
// the DTE's stream-in traffic handler turns into the cpu_* port; the user
// application reads all registers in parallel and writes them through the
// usr_* port, so the file serves both for configuration (CPU -> FPGA) and for
// status that the CPU polls (FPGA -> CPU). The document gives the purpose
// ("status checking and other small-scale communication"); the register
// count, the 64-bit width and the two-port organisation are this design's.
//
// Timing: writes take effect at the clock edge; cpu_rdata is combinational
// from cpu_idx. When both ports write the same register in one cycle the CPU
// write wins. cpu_wr_strobe pulses for one cycle after each CPU write, so the
// user logic can react to a new command. Reset clears every register.
module mmr_file
  import farm_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16,
  localparam int unsigned IW = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side (from the stream-in traffic handler)
  input  logic              cpu_we,
  input  logic [IW-1:0]     cpu_idx,
  input  word_t             cpu_wdata,
  output word_t             cpu_rdata,
  // user application side
  input  logic              usr_we,
  input  logic [IW-1:0]     usr_idx,
  input  word_t             usr_wdata,
  output word_t             regs [NUM_REGS],
  output logic [NUM_REGS-1:0] cpu_wr_strobe
);
  assign cpu_rdata = regs[cpu_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
      cpu_wr_strobe <= '0;
    end else begin
      cpu_wr_strobe <= '0;
      if (usr_we) regs[usr_idx] <= usr_wdata;
      if (cpu_we) begin
        regs[cpu_idx] <= cpu_wdata;
        cpu_wr_strobe[cpu_idx] <= 1'b1;
      end
    end
  end
endmodule
