// Full-size run of amr_top with every parameter at its default: four
// 512 KB tiles as 16-way L3 slices of 1024 sets each (2 MB of L3), DRAM
// behind the behavioural node (180 cycles). All four tiles are switched to
// cache mode, lines are written and read back in every slice (misses,
// hits, a dirty eviction from a full set), the hit latency is checked against
// the 15-cycle slice latency, and tile 0 is switched back, which flushes
// its dirty lines to DRAM.
module tb_amr_top_full;
  import amr_pkg::*;
  localparam int NA = 4, MAXB = 2, BAW = 13;
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
  amr_top dut (.*);
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

  task automatic cfg(input int k, input logic [31:0] d);
    @(negedge clk); cfg_req_valid = 1; cfg_req_tile = ACC[k]; cfg_req_we = 1; cfg_req_addr = CFG_MODE; cfg_req_wdata = d;
    @(posedge clk); while (!cfg_req_ready) @(posedge clk);
    #1 cfg_req_valid = 0;
    while (!cfg_rsp_valid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] q; logic nak; int lat, n_hit, n_miss, wr0;
    logic [255:0] gold [logic [31:0]];
    logic [31:0] addrs [$];
    l2_req_valid = 0; l2_req = '0; cfg_req_valid = 0; cfg_req_tile = '0; cfg_req_we = 0; cfg_req_addr = 0; cfg_req_wdata = 0;
    for (int k = 0; k < NA; k++) begin
      for (int b = 0; b < MAXB; b++) begin acc_m_en[k][b] = 0; acc_m_we[k][b] = 0; acc_m_addr[k][b] = 0; acc_m_be[k][b] = 0; acc_m_wdata[k][b] = 0; end
      acc_mo_valid[k] = 0; acc_mo_dst[k] = '0; acc_mo_data[k] = 0; acc_mi_ready[k] = 1;
      acc_sh_req_valid[k] = 0; acc_sh_req_we[k] = 0; acc_sh_req_addr[k] = 0; acc_sh_req_wdata[k] = 0;
    end
    n_hit = 0; n_miss = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    for (int k = 0; k < NA; k++) cfg(k, 1);
    for (int k = 0; k < NA; k++) while (!cache_ready[k]) @(negedge clk);

    // 17 lines that all map to set 3 of slice 0 (one more than the ways),
    // plus lines spread over the four slices
    for (int i = 0; i < 17; i++) addrs.push_back({15'(i), 2'd0, 10'd3, 5'd0});
    for (int i = 0; i < 40; i++) addrs.push_back({$urandom_range(32'h0fff_ffff), 5'd0});
    foreach (addrs[i]) begin
      automatic logic [255:0] d = {8{$urandom}};
      l2(1, addrs[i], d, q, nak, lat);
      checks++; if (nak) failures++;
      gold[addrs[i]] = d;
    end
    // read everything back, newest first: only the first line of set 3 was
    // evicted (miss), the rest hit
    for (int i = addrs.size() - 1; i >= 0; i--) begin
      l2(0, addrs[i], '0, q, nak, lat);
      checks++;
      if (nak || q !== gold[addrs[i]]) begin failures++; $display("read %h wrong", addrs[i]); end
      if (lat < 100) n_hit++; else n_miss++;
      if (i == 0) begin
        checks++; if (lat < 180) begin failures++; $display("evicted line answered in %0d cycles", lat); end
      end
      if (i == 1) begin
        checks++; if (lat < 15 || lat > 40) begin failures++; $display("hit latency %0d", lat); end
        $display("hit to slice 0 answered in %0d cycles", lat);
      end
    end
    $display("hits %0d misses %0d DRAM writes before flush %0d", n_hit, n_miss, u_dram.n_wr);
    checks++; if (u_dram.n_wr == 0) begin failures++; $display("no dirty eviction"); end

    // tile 0 back to the accelerator: flush its 1024 sets
    wr0 = u_dram.n_wr;
    cfg(0, 0);
    while (!mem_to_acc[0]) @(negedge clk);
    repeat (200) @(negedge clk);
    $display("flush of slice 0 wrote %0d lines", u_dram.n_wr - wr0);
    foreach (gold[a]) if (a[16:15] == 2'd0) begin
      checks++; if (u_dram.peek(a) !== gold[a]) begin failures++; $display("line %h missing in DRAM", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
