// tb_mmr_file: random CPU and user writes against a reference array,
// including same-register collisions (CPU must win), checking the CPU read
// port, the parallel register outputs and the one-cycle CPU write strobe.
module tb_mmr_file;
  import farm_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_we, usr_we;
  logic [3:0] cpu_idx, usr_idx;
  word_t cpu_wdata, usr_wdata, cpu_rdata;
  word_t regs [N];
  logic [N-1:0] strobe;
  mmr_file #(.NUM_REGS(N)) dut (.clk, .rst_n, .cpu_we, .cpu_idx, .cpu_wdata, .cpu_rdata,
    .usr_we, .usr_idx, .usr_wdata, .regs, .cpu_wr_strobe(strobe));
  int checks = 0, failures = 0;
  word_t ref_r [N];
  logic [N-1:0] ref_s;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cpu_we = 0; usr_we = 0; cpu_idx = 0; usr_idx = 0; cpu_wdata = 0; usr_wdata = 0;
    for (int i = 0; i < N; i++) ref_r[i] = '0;
    ref_s = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // compare state after the previous edge
      for (int i = 0; i < N; i++) begin checks++; if (regs[i] != ref_r[i]) begin failures++; $display("FAIL reg %0d", i); end end
      checks++; if (strobe != ref_s) begin failures++; $display("FAIL strobe %h vs %h", strobe, ref_s); end
      cpu_we = ($urandom % 2); usr_we = ($urandom % 2);
      cpu_idx = 4'($urandom); usr_idx = (t % 5 == 0) ? cpu_idx : 4'($urandom);
      cpu_wdata = {$urandom, $urandom}; usr_wdata = {$urandom, $urandom};
      #1;
      checks++; if (cpu_rdata != ref_r[cpu_idx]) begin failures++; $display("FAIL cpu read"); end
      ref_s = '0;
      if (usr_we) ref_r[usr_idx] = usr_wdata;
      if (cpu_we) begin ref_r[cpu_idx] = cpu_wdata; ref_s[cpu_idx] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
