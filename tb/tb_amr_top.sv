// End-to-end testbench of amr_top at reduced size (16 KB per tile, so 32
// sets of 16 ways per slice) with the behavioural DRAM node (180 cycles).
//   1. accelerator mode: tile 0 (two banks) uses its memory, tile 0 sends a
//      message to tile 3, tile 1 writes and reads DRAM through its
//      shared-memory unit; an L3 request is NAKed;
//   2. the CPU turns all four tiles into L3 slices;
//   3. random L2 misses and write-backs over 4x the L3 capacity: data
//      checked against a flat memory model, lines interleaved over the four
//      slices by address bits [10:9] at this size;
//   4. tile 2 is switched back: its flush makes DRAM hold every line of
//      slice 2, and requests to slice 2 are NAKed again.
// Every mechanism (hits, misses, dirty evictions, flush, NAK, mode switches,
// messages, shared memory, both ReO banks, all slices) is counted and must
// have happened.
module tb_amr_top;
  import amr_pkg::*;
  localparam int TMB = 16384, NA = 4, MAXB = 2, BAW = 8, SLSB = 5 + 5;
  localparam node_t ACC [NA] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2}, '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic l2_req_valid, l2_req_ready, l2_rsp_valid, l2_rsp_nak;
  mem_req_t l2_req; logic [255:0] l2_rsp_data;
  logic cfg_req_valid, cfg_req_ready, cfg_req_we, cfg_rsp_valid;
  node_t cfg_req_tile; logic [3:0] cfg_req_addr; logic [31:0] cfg_req_wdata, cfg_rsp_rdata;
  logic dram_rx_valid, dram_rx_ready, dram_tx_valid, dram_tx_ready;
  noc_pkt_t dram_rx_pkt, dram_tx_pkt;
  logic mem_to_acc[NA], cache_ready[NA]; logic [7:0] dvfs_level[NA];
  logic acc_m_en[NA][MAXB], acc_m_we[NA][MAXB]; logic [BAW-1:0] acc_m_addr[NA][MAXB];
  logic [63:0] acc_m_be[NA][MAXB]; logic [511:0] acc_m_wdata[NA][MAXB], acc_m_rdata[NA][MAXB];
  logic acc_mo_valid[NA], acc_mo_ready[NA], acc_mi_valid[NA], acc_mi_ready[NA];
  node_t acc_mo_dst[NA], acc_mi_src[NA]; logic [255:0] acc_mo_data[NA], acc_mi_data[NA];
  logic acc_sh_req_valid[NA], acc_sh_req_ready[NA], acc_sh_req_we[NA], acc_sh_rsp_valid[NA];
  logic [31:0] acc_sh_req_addr[NA]; logic [255:0] acc_sh_req_wdata[NA], acc_sh_rsp_data[NA];

  // the L2 is outside in this build: its CPU-side ports stay idle
  logic cpu_req_valid = 1'b0, cpu_req_we = 1'b0, cpu_req_ready, cpu_rsp_valid;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0] cpu_req_be = '0;
  logic [255:0] cpu_rsp_data;
  amr_top #(.TILE_MEM_BYTES(TMB)) dut (.*);
  dram_model #(.LATENCY(180)) u_dram (.clk, .rst_n, .rx_valid(dram_rx_valid), .rx_ready(dram_rx_ready),
    .rx_pkt(dram_rx_pkt), .tx_valid(dram_tx_valid), .tx_ready(dram_tx_ready), .tx_pkt(dram_tx_pkt));

  function automatic logic [255:0] init_line(input logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction

  task automatic l2(input logic we, input logic [31:0] a, input logic [255:0] d,
                    output logic [255:0] q, output logic nak, output int lat);
    @(negedge clk); l2_req_valid = 1; l2_req = '{we: we, addr: a, data: d};
    @(posedge clk); while (!l2_req_ready) @(posedge clk);
    #1 l2_req_valid = 0; lat = 1;
    while (!l2_rsp_valid) begin @(posedge clk); #1; lat++; end
    q = l2_rsp_data; nak = l2_rsp_nak;
    @(posedge clk); #1;
  endtask

  task automatic cfg(input int k, input logic we, input logic [3:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); cfg_req_valid = 1; cfg_req_tile = ACC[k]; cfg_req_we = we; cfg_req_addr = a; cfg_req_wdata = d;
    @(posedge clk); while (!cfg_req_ready) @(posedge clk);
    #1 cfg_req_valid = 0;
    while (!cfg_rsp_valid) begin @(posedge clk); #1; end
    q = cfg_rsp_rdata;
    @(posedge clk); #1;
  endtask

  // mechanism counters
  int n_hit, n_miss, n_nak, n_flush_wr, n_dirty_wb, n_msg, n_sh, n_bank [MAXB], n_slice [NA], n_mode;
  int min_hit_lat [NA];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] q; logic nak; int lat; logic [31:0] cq;
    logic [255:0] gold [logic [31:0]];
    int wr_before;
    l2_req_valid = 0; l2_req = '0; cfg_req_valid = 0; cfg_req_tile = '0; cfg_req_we = 0; cfg_req_addr = 0; cfg_req_wdata = 0;
    for (int k = 0; k < NA; k++) begin
      for (int b = 0; b < MAXB; b++) begin acc_m_en[k][b] = 0; acc_m_we[k][b] = 0; acc_m_addr[k][b] = 0; acc_m_be[k][b] = 0; acc_m_wdata[k][b] = 0; end
      acc_mo_valid[k] = 0; acc_mo_dst[k] = '0; acc_mo_data[k] = 0; acc_mi_ready[k] = 0;
      acc_sh_req_valid[k] = 0; acc_sh_req_we[k] = 0; acc_sh_req_addr[k] = 0; acc_sh_req_wdata[k] = 0;
      n_slice[k] = 0; min_hit_lat[k] = 1000;
    end
    n_hit = 0; n_miss = 0; n_nak = 0; n_flush_wr = 0; n_dirty_wb = 0; n_msg = 0; n_sh = 0; n_mode = 0;
    n_bank[0] = 0; n_bank[1] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- 1. accelerator mode ------------------------------------------------
    for (int b = 0; b < MAXB; b++) begin
      @(negedge clk); acc_m_en[0][b] = 1; acc_m_we[0][b] = 1; acc_m_addr[0][b] = 8'd5; acc_m_be[0][b] = '1;
      acc_m_wdata[0][b] = {16{32'hbeef_0000 + 32'(b)}};
      @(negedge clk); acc_m_we[0][b] = 0;
      @(negedge clk); acc_m_en[0][b] = 0;
      checks++;
      if (acc_m_rdata[0][b] !== {16{32'hbeef_0000 + 32'(b)}}) begin failures++; $display("ReO bank %0d", b); end
      else n_bank[b]++;
    end
    // message tile 0 -> tile 3
    @(negedge clk); acc_mo_valid[0] = 1; acc_mo_dst[0] = ACC[3]; acc_mo_data[0] = {8{32'h600d_f00d}};
    @(posedge clk); while (!acc_mo_ready[0]) @(posedge clk); #1 acc_mo_valid[0] = 0;
    begin
      int n = 0;
      while (!acc_mi_valid[3] && n < 100) begin @(posedge clk); #1; n++; end
      checks++;
      if (!acc_mi_valid[3] || acc_mi_src[3] != ACC[0] || acc_mi_data[3] != {8{32'h600d_f00d}}) begin failures++; $display("message lost"); end
      else n_msg++;
      $display("message took %0d cycles", n);
      @(negedge clk); acc_mi_ready[3] = 1; @(negedge clk); acc_mi_ready[3] = 0;
    end
    // shared memory from tile 1
    for (int rw = 1; rw >= 0; rw--) begin
      @(negedge clk); acc_sh_req_valid[1] = 1; acc_sh_req_we[1] = 1'(rw); acc_sh_req_addr[1] = 32'h0080_0000;
      acc_sh_req_wdata[1] = {8{32'h5157_0001}};
      @(posedge clk); while (!acc_sh_req_ready[1]) @(posedge clk); #1 acc_sh_req_valid[1] = 0;
      while (!acc_sh_rsp_valid[1]) begin @(posedge clk); #1; end
      if (rw == 0) begin
        checks++; if (acc_sh_rsp_data[1] != {8{32'h5157_0001}}) begin failures++; $display("shared memory read"); end
        else n_sh++;
      end
      @(posedge clk); #1;
    end
    // L3 request before any slice exists
    l2(0, 32'h0, '0, q, nak, lat);
    checks++; if (!nak) begin failures++; $display("no NAK before cache mode"); end else n_nak++;

    // ---- 2. all tiles become L3 slices --------------------------------------
    for (int k = 0; k < NA; k++) begin cfg(k, 1, CFG_MODE, 1, cq); n_mode++; end
    for (int k = 0; k < NA; k++) while (!cache_ready[k]) @(negedge clk);
    checks++; for (int k = 0; k < NA; k++) if (mem_to_acc[k]) begin failures++; $display("tile %0d still with accelerator", k); end

    // ---- 3. random L2 traffic -------------------------------------------------
    for (int t = 0; t < 3000; t++) begin
      automatic logic [31:0] a = {$urandom_range(4 * NA * TMB / 32 - 1), 5'd0};
      automatic logic we = ($urandom_range(2) == 0);
      automatic logic [255:0] d = {8{$urandom}};
      automatic int s = int'(a[SLSB +: 2]);
      automatic int w0 = u_dram.n_wr;
      l2(we, a, d, q, nak, lat);
      checks++;
      if (nak || lat < 15) begin failures++; $display("request %h: nak %b latency %0d", a, nak, lat); end
      n_slice[s]++;
      if (lat < 100) begin n_hit++; if (lat < min_hit_lat[s]) min_hit_lat[s] = lat; end else n_miss++;
      if (u_dram.n_wr != w0) n_dirty_wb++;
      if (we) gold[a] = d;
      else begin
        checks++;
        if (q !== (gold.exists(a) ? gold[a] : init_line(a))) begin failures++; $display("read %h wrong", a); end
      end
    end

    // ---- 4. tile 2 goes back to the accelerator ------------------------------
    wr_before = u_dram.n_wr;
    cfg(2, 1, CFG_MODE, 0, cq); n_mode++;
    while (!mem_to_acc[2]) @(negedge clk);
    repeat (50) @(negedge clk);
    n_flush_wr = u_dram.n_wr - wr_before;
    foreach (gold[a]) if (int'(a[SLSB +: 2]) == 2) begin
      checks++;
      if (u_dram.peek(a) !== gold[a]) begin failures++; $display("line %h of slice 2 not in DRAM after flush", a); end
    end
    l2(0, 32'(2) << SLSB, '0, q, nak, lat);
    checks++; if (!nak) begin failures++; $display("slice 2 still answers"); end else n_nak++;
    l2(0, 32'(1) << SLSB, '0, q, nak, lat);
    checks++; if (nak) begin failures++; $display("slice 1 stopped answering"); end

    $display("hits %0d misses %0d dirty evictions %0d flush writes %0d NAKs %0d mode switches %0d",
             n_hit, n_miss, n_dirty_wb, n_flush_wr, n_nak, n_mode);
    $display("requests per slice %0d %0d %0d %0d; fastest hit per slice %0d %0d %0d %0d cycles",
             n_slice[0], n_slice[1], n_slice[2], n_slice[3], min_hit_lat[0], min_hit_lat[1], min_hit_lat[2], min_hit_lat[3]);
    checks++; if (n_hit == 0) begin failures++; $display("no L3 hit"); end
    checks++; if (n_miss == 0) begin failures++; $display("no L3 miss"); end
    checks++; if (n_dirty_wb == 0) begin failures++; $display("no dirty eviction"); end
    checks++; if (n_flush_wr == 0) begin failures++; $display("flush wrote nothing"); end
    checks++; if (n_nak < 2) begin failures++; $display("NAKs missing"); end
    checks++; if (n_msg == 0 || n_sh == 0) begin failures++; $display("NI services unused"); end
    checks++; if (n_bank[0] == 0 || n_bank[1] == 0) begin failures++; $display("a ReO bank unused"); end
    for (int k = 0; k < NA; k++) begin checks++; if (n_slice[k] == 0) begin failures++; $display("slice %0d unused", k); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
