// Workload testbench comparing the two L3 configurations of amr_top that
// the document evaluates: the L3 spread over all four tiles (L3_SLICES = 4,
// "2 MB L3" at full size) and over tile 0 alone (L3_SLICES = 1, "512 KB L3").
// Both run at reduced size (8 KB per tile) on the same synthetic workload:
// three passes over a 24 KB working set (reads with some write-backs),
// which fits in four slices but not in one. Data is checked against a flat
// memory model in both. The four-slice L3 must miss less, and after the
// first pass it must not miss at all. Miss counts and average latencies of
// both are printed.
module tb_amr_l3_configs;
  import amr_pkg::*;
  localparam int TMB = 8192, NA = 4, MAXB = 2, BAW = 7, WSET = 24576;
  localparam node_t ACC [NA] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2}, '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // [0]: four slices, [1]: one slice
  logic l2_req_valid[2], l2_req_ready[2], l2_rsp_valid[2], l2_rsp_nak[2];
  mem_req_t l2_req[2]; logic [255:0] l2_rsp_data[2];
  logic cfg_req_valid[2], cfg_req_ready[2], cfg_rsp_valid[2];
  node_t cfg_req_tile[2]; logic [31:0] cfg_rsp_rdata[2];
  logic cache_ready[2][NA];

  for (genvar g = 0; g < 2; g++) begin : g_sys
    logic dram_rx_valid, dram_rx_ready, dram_tx_valid, dram_tx_ready;
    noc_pkt_t dram_rx_pkt, dram_tx_pkt;
    logic mem_to_acc[NA]; logic [7:0] dvfs_level[NA];
    logic acc_m_en[NA][MAXB], acc_m_we[NA][MAXB]; logic [BAW-1:0] acc_m_addr[NA][MAXB];
    logic [63:0] acc_m_be[NA][MAXB]; logic [511:0] acc_m_wdata[NA][MAXB], acc_m_rdata[NA][MAXB];
    logic acc_mo_valid[NA], acc_mo_ready[NA], acc_mi_valid[NA], acc_mi_ready[NA];
    node_t acc_mo_dst[NA], acc_mi_src[NA]; logic [255:0] acc_mo_data[NA], acc_mi_data[NA];
    logic acc_sh_req_valid[NA], acc_sh_req_ready[NA], acc_sh_req_we[NA], acc_sh_rsp_valid[NA];
    logic [31:0] acc_sh_req_addr[NA]; logic [255:0] acc_sh_req_wdata[NA], acc_sh_rsp_data[NA];
    for (genvar k = 0; k < NA; k++) begin : g_k
      for (genvar b = 0; b < MAXB; b++) begin : g_b
        assign acc_m_en[k][b] = 1'b0; assign acc_m_we[k][b] = 1'b0; assign acc_m_addr[k][b] = '0;
        assign acc_m_be[k][b] = '0; assign acc_m_wdata[k][b] = '0;
      end
      assign acc_mo_valid[k] = 1'b0; assign acc_mo_dst[k] = '0; assign acc_mo_data[k] = '0; assign acc_mi_ready[k] = 1'b1;
      assign acc_sh_req_valid[k] = 1'b0; assign acc_sh_req_we[k] = 1'b0; assign acc_sh_req_addr[k] = '0;
      assign acc_sh_req_wdata[k] = '0;
    end
    amr_top #(.TILE_MEM_BYTES(TMB), .L3_SLICES(g == 0 ? 4 : 1)) dut (
      .clk, .rst_n,
      .cpu_req_valid(1'b0), .cpu_req_ready(), .cpu_req_we(1'b0), .cpu_req_addr('0),
      .cpu_req_wdata('0), .cpu_req_be('0), .cpu_rsp_valid(), .cpu_rsp_data(),
      .l2_req_valid(l2_req_valid[g]), .l2_req_ready(l2_req_ready[g]), .l2_req(l2_req[g]),
      .l2_rsp_valid(l2_rsp_valid[g]), .l2_rsp_nak(l2_rsp_nak[g]), .l2_rsp_data(l2_rsp_data[g]),
      .cfg_req_valid(cfg_req_valid[g]), .cfg_req_ready(cfg_req_ready[g]), .cfg_req_tile(cfg_req_tile[g]),
      .cfg_req_we(1'b1), .cfg_req_addr(CFG_MODE), .cfg_req_wdata(32'd1),
      .cfg_rsp_valid(cfg_rsp_valid[g]), .cfg_rsp_rdata(cfg_rsp_rdata[g]),
      .dram_rx_valid, .dram_rx_ready, .dram_rx_pkt, .dram_tx_valid, .dram_tx_ready, .dram_tx_pkt,
      .mem_to_acc, .cache_ready(cache_ready[g]), .dvfs_level,
      .acc_m_en, .acc_m_we, .acc_m_addr, .acc_m_be, .acc_m_wdata, .acc_m_rdata,
      .acc_mo_valid, .acc_mo_ready, .acc_mo_dst, .acc_mo_data, .acc_mi_valid, .acc_mi_ready, .acc_mi_src, .acc_mi_data,
      .acc_sh_req_valid, .acc_sh_req_ready, .acc_sh_req_we, .acc_sh_req_addr, .acc_sh_req_wdata,
      .acc_sh_rsp_valid, .acc_sh_rsp_data);
    dram_model #(.LATENCY(180)) u_dram (.clk, .rst_n, .rx_valid(dram_rx_valid), .rx_ready(dram_rx_ready),
      .rx_pkt(dram_rx_pkt), .tx_valid(dram_tx_valid), .tx_ready(dram_tx_ready), .tx_pkt(dram_tx_pkt));
  end

  function automatic logic [255:0] init_line(input logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction

  task automatic l2(input int g, input logic we, input logic [31:0] a, input logic [255:0] d,
                    output logic [255:0] q, output logic nak, output int lat);
    @(negedge clk); l2_req_valid[g] = 1; l2_req[g] = '{we: we, addr: a, data: d};
    @(posedge clk); while (!l2_req_ready[g]) @(posedge clk);
    #1 l2_req_valid[g] = 0; lat = 1;
    while (!l2_rsp_valid[g]) begin @(posedge clk); #1; lat++; end
    q = l2_rsp_data[g]; nak = l2_rsp_nak[g];
    @(posedge clk); #1;
  endtask

  task automatic to_cache(input int g, input int k);
    @(negedge clk); cfg_req_valid[g] = 1; cfg_req_tile[g] = ACC[k];
    @(posedge clk); while (!cfg_req_ready[g]) @(posedge clk);
    #1 cfg_req_valid[g] = 0;
    while (!cfg_rsp_valid[g]) begin @(posedge clk); #1; end
    while (!cache_ready[g][k]) @(negedge clk);
  endtask

  int misses [2][3];
  longint cycles [2];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int g = 0; g < 2; g++) begin
      l2_req_valid[g] = 0; l2_req[g] = '0; cfg_req_valid[g] = 0; cfg_req_tile[g] = '0; cycles[g] = 0;
      for (int p = 0; p < 3; p++) misses[g][p] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < NA; k++) to_cache(0, k);
    to_cache(1, 0);

    for (int g = 0; g < 2; g++) begin
      automatic logic [255:0] gold [logic [31:0]];
      for (int p = 0; p < 3; p++) begin
        for (int i = 0; i < WSET / 32; i++) begin
          automatic logic [31:0] a = 32'h0010_0000 + 32'(i * 32);
          automatic logic we = (i % 5 == 0);
          automatic logic [255:0] d = {8{32'(p * 100000 + i)}}, q;
          automatic logic nak;
          automatic int lat;
          l2(g, we, a, d, q, nak, lat);
          cycles[g] += lat;
          checks++;
          if (nak) begin failures++; $display("config %0d: NAK for %h", g, a); end
          if (lat > 100) misses[g][p]++;
          if (we) gold[a] = d;
          else begin
            checks++;
            if (q !== (gold.exists(a) ? gold[a] : init_line(a))) begin failures++; $display("config %0d: read %h wrong", g, a); end
          end
        end
      end
    end
    for (int g = 0; g < 2; g++)
      $display("%s L3: misses per pass %0d %0d %0d of %0d accesses, mean latency %0d cycles",
               g == 0 ? "4-slice" : "1-slice", misses[g][0], misses[g][1], misses[g][2], WSET / 32,
               cycles[g] / (3 * WSET / 32));
    checks++; if (misses[0][1] + misses[0][2] != 0) begin failures++; $display("4-slice L3 missed on a warm pass"); end
    checks++; if (misses[1][1] + misses[1][2] == 0) begin failures++; $display("1-slice L3 held a working set 3x its size"); end
    checks++; if (cycles[0] >= cycles[1]) begin failures++; $display("4-slice L3 not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
