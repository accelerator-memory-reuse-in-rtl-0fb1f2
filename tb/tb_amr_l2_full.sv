// Full-size run of the system with the CPU tile's L2 inside amr_top: every
// parameter at its default except HAS_L2 = 1, so a 128 KB 4-way L2 in front
// of four 512 KB, 16-way L3 slices. The L1-side traffic (line reads, and a
// byte-masked word store on every fifth line) walks a 256 KB working set:
//   pass 1: twice the L2, so lines come from DRAM and fill both levels;
//   pass 2: the same lines again; the L2 holds only half of them, the rest
//           must come from the L3 without a single DRAM read;
//   pass 3: the last 64 KB, still in the L2: every read hits in 2 cycles.
// Every read is checked against a byte-exact reference.
module tb_amr_l2_full;
  import amr_pkg::*;
  localparam int NA = 4, MAXB = 2, BAW = 13, WSET = 262144, NG = 1;
  localparam node_t ACC [NA] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2}, '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid[NG], cpu_req_ready[NG], cpu_req_we[NG], cpu_rsp_valid[NG];
  logic [31:0] cpu_req_addr[NG], cpu_req_wdata[NG];
  logic [3:0] cpu_req_be[NG];
  logic [255:0] cpu_rsp_data[NG];
  logic cfg_req_valid[NG], cfg_req_ready[NG], cfg_rsp_valid[NG];
  node_t cfg_req_tile[NG]; logic [31:0] cfg_rsp_rdata[NG];
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
    amr_top #(.HAS_L2(1'b1)) dut (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[g]), .cpu_req_ready(cpu_req_ready[g]), .cpu_req_we(cpu_req_we[g]),
      .cpu_req_addr(cpu_req_addr[g]), .cpu_req_wdata(cpu_req_wdata[g]), .cpu_req_be(cpu_req_be[g]),
      .cpu_rsp_valid(cpu_rsp_valid[g]), .cpu_rsp_data(cpu_rsp_data[g]),
      .l2_req_valid(1'b0), .l2_req_ready, .l2_req('0), .l2_rsp_valid, .l2_rsp_nak, .l2_rsp_data,
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

  task automatic to_cache(input int g, input int k);
    @(negedge clk); cfg_req_valid[g] = 1; cfg_req_tile[g] = ACC[k];
    @(posedge clk); while (!cfg_req_ready[g]) @(posedge clk);
    #1 cfg_req_valid[g] = 0;
    while (!cfg_rsp_valid[g]) begin @(posedge clk); #1; end
    while (!cache_ready[g][k]) @(negedge clk);
  endtask

  int drd [3];
  int hits3 = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic logic [255:0] gold [logic [31:0]];
    cpu_req_valid[0] = 0; cpu_req_we[0] = 0; cpu_req_addr[0] = 0; cpu_req_wdata[0] = 0;
    cpu_req_be[0] = 0; cfg_req_valid[0] = 0; cfg_req_tile[0] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < NA; k++) to_cache(0, k);
    repeat (1100) @(posedge clk);   // the L2 clears its 1024 sets after reset

    for (int p = 0; p < 3; p++) begin
      automatic int rd0 = dram_rd[0];
      automatic int first = (p == 2) ? (WSET - 65536) / 32 : 0;
      for (int i = first; i < WSET / 32; i++) begin
        automatic logic [31:0] a = 32'h0100_0000 + 32'(i * 32);
        automatic logic [255:0] q, exp;
        automatic int lat;
        if (!gold.exists(a)) gold[a] = init_line(a);
        cpu(0, 1'b0, a, '0, '0, q, lat);
        checks++;
        if (q !== gold[a]) begin
          failures++;
          if (failures < 10) $display("pass %0d: read %h wrong", p, a);
        end
        if (p == 2) begin
          checks++;
          if (lat == 2) hits3++;
          else begin failures++; if (failures < 10) $display("pass 3: %h missed the L2 (%0d cycles)", a, lat); end
        end
        if (i % 5 == 0 && p < 2) begin
          automatic int w = (i / 5 + p) % 8;
          automatic logic [31:0] d = 32'(p * 1000000 + i);
          automatic logic [3:0] be = 4'(1 + (i + p) % 15);
          cpu(0, 1'b1, a + 32'(w * 4), d, be, q, lat);
          exp = gold[a];
          for (int b = 0; b < 4; b++) if (be[b]) exp[w*32 + b*8 +: 8] = d[b*8 +: 8];
          gold[a] = exp;
        end
      end
      drd[p] = dram_rd[0] - rd0;
    end
    $display("DRAM line reads per pass: %0d %0d %0d; pass 3 L2 hits %0d of %0d",
             drd[0], drd[1], drd[2], hits3, 65536 / 32);
    checks++; if (drd[0] != WSET / 32) begin failures++; $display("pass 1 should read every line once from DRAM"); end
    checks++; if (drd[1] + drd[2] != 0) begin failures++; $display("L3 did not hold the working set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
