// Workload testbench of the whole system with the CPU tile's shared L2
// inside amr_top (HAS_L2 = 1), in three of the document's configurations:
//   [0] base: no tile lent, every L2 miss goes to DRAM (the slices refuse
//       and the CPU port retries at DRAM);
//   [1] L2 + one-slice L3 (L3_SLICES = 1, tile 0 in cache mode);
//   [2] L2 + four-slice L3 (L3_SLICES = 4, all tiles in cache mode).
// Sizes are scaled down by 64 with the document's ratios kept: a 2 KB
// 4-way L2 and 8 KB tiles (the L2 is a quarter of one tile). The workload
// makes three passes over a 24 KB working set as the L1s would: a line read
// per line and a byte-masked word store on every fifth line. Every read is
// checked against a byte-exact reference. In [2] the working set fits in the
// L3, so the second and third passes must not read DRAM at all; [2] must
// be faster than [0]. DRAM reads per pass and mean latencies are printed.
// Finally [2] hands all four tiles back to their accelerators (each slice
// flushes its dirty lines) and the working set is read and stored again:
// every line must now come from the L2 or DRAM with its latest data, and
// the L2's own write-backs must reach DRAM through the CPU port's retry.
module tb_amr_l2_configs;
  import amr_pkg::*;
  localparam int TMB = 8192, L2B = 2048, NA = 4, MAXB = 2, BAW = 7, WSET = 24576, NG = 3;
  localparam node_t ACC [NA] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2}, '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid[NG], cpu_req_ready[NG], cpu_req_we[NG], cpu_rsp_valid[NG];
  logic [31:0] cpu_req_addr[NG], cpu_req_wdata[NG];
  logic [3:0] cpu_req_be[NG];
  logic [255:0] cpu_rsp_data[NG];
  logic cfg_req_valid[NG], cfg_req_ready[NG], cfg_rsp_valid[NG];
  node_t cfg_req_tile[NG]; logic [31:0] cfg_rsp_rdata[NG], cfg_wd[NG];
  logic cache_ready[NG][NA];
  int dram_rd[NG];

  for (genvar g = 0; g < NG; g++) begin : g_sys
    logic dram_rx_valid, dram_rx_ready, dram_tx_valid, dram_tx_ready;
    noc_pkt_t dram_rx_pkt, dram_tx_pkt;
    logic mem_to_acc[NA]; logic [7:0] dvfs_level[NA];
    logic acc_m_en[NA][MAXB], acc_m_we[NA][MAXB]; logic [BAW-1:0] acc_m_addr[NA][MAXB];
    logic [63:0] acc_m_be[NA][MAXB]; logic [511:0] acc_m_wdata[NA][MAXB], acc_m_rdata[NA][MAXB];
    logic acc_mo_valid[NA], acc_mo_ready[NA], acc_mi_valid[NA], acc_mi_ready[NA];
    node_t acc_mo_dst[NA], acc_mi_src[NA]; logic [255:0] acc_mo_data[NA], acc_mi_data[NA];
    logic acc_sh_req_valid[NA], acc_sh_req_ready[NA], acc_sh_req_we[NA], acc_sh_rsp_valid[NA];
    logic [31:0] acc_sh_req_addr[NA]; logic [255:0] acc_sh_req_wdata[NA], acc_sh_rsp_data[NA];
    logic l2_req_ready, l2_rsp_valid, l2_rsp_nak; logic [255:0] l2_rsp_data;
    for (genvar k = 0; k < NA; k++) begin : g_k
      for (genvar b = 0; b < MAXB; b++) begin : g_b
        assign acc_m_en[k][b] = 1'b0; assign acc_m_we[k][b] = 1'b0; assign acc_m_addr[k][b] = '0;
        assign acc_m_be[k][b] = '0; assign acc_m_wdata[k][b] = '0;
      end
      assign acc_mo_valid[k] = 1'b0; assign acc_mo_dst[k] = '0; assign acc_mo_data[k] = '0; assign acc_mi_ready[k] = 1'b1;
      assign acc_sh_req_valid[k] = 1'b0; assign acc_sh_req_we[k] = 1'b0; assign acc_sh_req_addr[k] = '0;
      assign acc_sh_req_wdata[k] = '0;
    end
    amr_top #(.TILE_MEM_BYTES(TMB), .L3_SLICES(g == 1 ? 1 : 4), .HAS_L2(1'b1), .L2_BYTES(L2B)) dut (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[g]), .cpu_req_ready(cpu_req_ready[g]), .cpu_req_we(cpu_req_we[g]),
      .cpu_req_addr(cpu_req_addr[g]), .cpu_req_wdata(cpu_req_wdata[g]), .cpu_req_be(cpu_req_be[g]),
      .cpu_rsp_valid(cpu_rsp_valid[g]), .cpu_rsp_data(cpu_rsp_data[g]),
      .l2_req_valid(1'b0), .l2_req_ready, .l2_req('0), .l2_rsp_valid, .l2_rsp_nak, .l2_rsp_data,
      .cfg_req_valid(cfg_req_valid[g]), .cfg_req_ready(cfg_req_ready[g]), .cfg_req_tile(cfg_req_tile[g]),
      .cfg_req_we(1'b1), .cfg_req_addr(CFG_MODE), .cfg_req_wdata(cfg_wd[g]),
      .cfg_rsp_valid(cfg_rsp_valid[g]), .cfg_rsp_rdata(cfg_rsp_rdata[g]),
      .dram_rx_valid, .dram_rx_ready, .dram_rx_pkt, .dram_tx_valid, .dram_tx_ready, .dram_tx_pkt,
      .mem_to_acc, .cache_ready(cache_ready[g]), .dvfs_level,
      .acc_m_en, .acc_m_we, .acc_m_addr, .acc_m_be, .acc_m_wdata, .acc_m_rdata,
      .acc_mo_valid, .acc_mo_ready, .acc_mo_dst, .acc_mo_data, .acc_mi_valid, .acc_mi_ready, .acc_mi_src, .acc_mi_data,
      .acc_sh_req_valid, .acc_sh_req_ready, .acc_sh_req_we, .acc_sh_req_addr, .acc_sh_req_wdata,
      .acc_sh_rsp_valid, .acc_sh_rsp_data);
    dram_model #(.LATENCY(180)) u_dram (.clk, .rst_n, .rx_valid(dram_rx_valid), .rx_ready(dram_rx_ready),
      .rx_pkt(dram_rx_pkt), .tx_valid(dram_tx_valid), .tx_ready(dram_tx_ready), .tx_pkt(dram_tx_pkt));
    assign dram_rd[g] = u_dram.n_rd;

    // with the L2 inside, the external L2 ports must stay silent
    always @(posedge clk) if (rst_n && (l2_req_ready || l2_rsp_valid)) begin
      failures++; $display("config %0d: external L2 port active", g);
    end
  end

  function automatic logic [255:0] init_line(input logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction

  task automatic cpu(input int g, input logic we, input logic [31:0] a, input logic [31:0] d,
                     input logic [3:0] be, output logic [255:0] q, output int lat);
    @(negedge clk); cpu_req_valid[g] = 1; cpu_req_we[g] = we; cpu_req_addr[g] = a;
    cpu_req_wdata[g] = d; cpu_req_be[g] = be;
    @(posedge clk); while (!cpu_req_ready[g]) @(posedge clk);
    #1 cpu_req_valid[g] = 0; lat = 1;
    while (!cpu_rsp_valid[g]) begin @(posedge clk); #1; lat++; end
    q = cpu_rsp_data[g];
  endtask

  task automatic to_acc(input int g, input int k);
    @(negedge clk); cfg_req_valid[g] = 1; cfg_req_tile[g] = ACC[k]; cfg_wd[g] = 0;
    @(posedge clk); while (!cfg_req_ready[g]) @(posedge clk);
    #1 cfg_req_valid[g] = 0;
    while (!cfg_rsp_valid[g]) begin @(posedge clk); #1; end
  endtask

  task automatic to_cache(input int g, input int k);
    @(negedge clk); cfg_req_valid[g] = 1; cfg_req_tile[g] = ACC[k]; cfg_wd[g] = 1;
    @(posedge clk); while (!cfg_req_ready[g]) @(posedge clk);
    #1 cfg_req_valid[g] = 0;
    while (!cfg_rsp_valid[g]) begin @(posedge clk); #1; end
    while (!cache_ready[g][k]) @(negedge clk);
  endtask

  int     drd [NG][3];
  int     drd_after;
  longint cycles [NG];
  string  name [NG] = '{"base (no L3)", "L2 + 1-slice L3", "L2 + 4-slice L3"};

  initial begin
    repeat (6000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int g = 0; g < NG; g++) begin
      cpu_req_valid[g] = 0; cpu_req_we[g] = 0; cpu_req_addr[g] = 0; cpu_req_wdata[g] = 0;
      cpu_req_be[g] = 0; cfg_req_valid[g] = 0; cfg_wd[g] = 1; cfg_req_tile[g] = '0; cycles[g] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    to_cache(1, 0);
    for (int k = 0; k < NA; k++) to_cache(2, k);
    repeat (100) @(posedge clk);   // the L2 clears its tags after reset

    for (int g = 0; g < NG; g++) begin
      automatic logic [255:0] gold [logic [31:0]];
      for (int p = 0; p < (g == 2 ? 4 : 3); p++) begin
        automatic int rd0 = dram_rd[g];
        if (p == 3) for (int k = 0; k < NA; k++) to_acc(g, k);
        for (int i = 0; i < WSET / 32; i++) begin
          automatic logic [31:0] a = 32'h0010_0000 + 32'(i * 32);
          automatic logic [255:0] q, exp;
          automatic int lat;
          if (!gold.exists(a)) gold[a] = init_line(a);
          cpu(g, 1'b0, a, '0, '0, q, lat);
          if (p < 3) cycles[g] += lat;
          checks++;
          if (q !== gold[a]) begin
            failures++;
            if (failures < 10) $display("config %0d: read %h wrong", g, a);
          end
          if (i % 5 == 0) begin
            automatic int w = (i / 5 + p) % 8;
            automatic logic [31:0] d = 32'(p * 100000 + i);
            automatic logic [3:0] be = 4'(1 + (i + p) % 15);
            cpu(g, 1'b1, a + 32'(w * 4), d, be, q, lat);
            if (p < 3) cycles[g] += lat;
            exp = gold[a];
            for (int b = 0; b < 4; b++) if (be[b]) exp[w*32 + b*8 +: 8] = d[b*8 +: 8];
            gold[a] = exp;
          end
        end
        if (p < 3) drd[g][p] = dram_rd[g] - rd0;
        else drd_after = dram_rd[g] - rd0;
      end
    end
    for (int g = 0; g < NG; g++)
      $display("%-16s: DRAM line reads per pass %0d %0d %0d, mean latency %0d cycles", name[g],
               drd[g][0], drd[g][1], drd[g][2], cycles[g] / (3 * (WSET / 32 + WSET / 160)));
    $display("after the slices were handed back: %0d DRAM line reads in a pass", drd_after);
    checks++; if (drd_after < WSET / 32 - L2B / 32) begin failures++; $display("lines still served after the flush"); end
    checks++; if (drd[0][1] == 0 || drd[0][2] == 0) begin failures++; $display("base: working set 12x the L2 held"); end
    checks++; if (drd[2][1] + drd[2][2] != 0) begin failures++; $display("4-slice L3 read DRAM on a warm pass"); end
    checks++; if (cycles[2] >= cycles[0]) begin failures++; $display("4-slice L3 not faster than base"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
