// Testbench of ni_config_regs: reset values, writes and read-back of MODE
// and DVFS, the read-only STATUS bits, and that writes to STATUS or to
// unknown addresses change nothing.
module tb_ni_config_regs;
  import amr_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic wr_en, st_cache_ready, st_mem_to_cache, mode_cache;
  logic [3:0] addr;
  logic [31:0] wdata, rdata;
  logic [7:0] dvfs_level;
  ni_config_regs dut (.*);

  task automatic chk(input logic [3:0] a, input logic [31:0] e, input string what);
    addr = a; #1;
    checks++;
    if (rdata !== e) begin failures++; $display("%s: read %h expected %h", what, rdata, e); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic m; logic [7:0] d;
    wr_en = 0; addr = 0; wdata = 0; st_cache_ready = 0; st_mem_to_cache = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    chk(CFG_MODE, 0, "mode after reset"); chk(CFG_DVFS, 0, "dvfs after reset");
    m = 0; d = 0;
    for (int t = 0; t < 60; t++) begin
      automatic logic [3:0] a = 4'($urandom_range(4));
      automatic logic [31:0] v = $urandom;
      @(negedge clk); wr_en = 1; addr = a; wdata = v;
      @(negedge clk); wr_en = 0;
      if (a == CFG_MODE) m = v[0];
      if (a == CFG_DVFS) d = v[7:0];
      chk(CFG_MODE, {31'd0, m}, "mode"); chk(CFG_DVFS, {24'd0, d}, "dvfs");
      checks++; if (mode_cache !== m || dvfs_level !== d) failures++;
      st_cache_ready = $urandom_range(1); st_mem_to_cache = $urandom_range(1);
      chk(CFG_STATUS, {30'd0, st_mem_to_cache, st_cache_ready}, "status");
      chk(4'd9, 0, "unknown");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
