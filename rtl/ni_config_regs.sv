// Configuration registers of an accelerator tile's network interface.
//
// Written and read over the NoC by the GP-CPUs. Register map (this design's
// choice; the document only says the NI always has configuration registers,
// for instance for voltage and frequency scaling commands):
//   CFG_MODE   (0) bit 0: 1 = the memory serves as an L3 slice,
//                         0 = the accelerator uses it. Reset: 0.
//   CFG_DVFS   (1) bits 7:0: voltage/frequency level handed to the tile's
//                         power management (held only). Reset: 0.
//   CFG_STATUS (2) read only: bit 0 cache slice ready, bit 1 memory still
//                         held by the cache manager (a flush may be running).
// A write (wr_en, addr, wdata) takes effect at the next clock edge; a read
// (addr) returns rdata in the same cycle. Unknown addresses read as zero.
module ni_config_regs
  import amr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [3:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        st_cache_ready,
  input  logic        st_mem_to_cache,
  output logic        mode_cache,
  output logic [7:0]  dvfs_level
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_cache <= 1'b0;
      dvfs_level <= '0;
    end else if (wr_en) begin
      unique case (addr)
        CFG_MODE: mode_cache <= wdata[0];
        CFG_DVFS: dvfs_level <= wdata[7:0];
        default:  ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      CFG_MODE:   rdata = {31'd0, mode_cache};
      CFG_DVFS:   rdata = {24'd0, dvfs_level};
      CFG_STATUS: rdata = {30'd0, st_mem_to_cache, st_cache_ready};
      default:    rdata = '0;
    endcase
  end
endmodule
