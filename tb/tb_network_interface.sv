// Testbench of network_interface, with and without the shared-memory unit.
// Checks each service end to end at the packet level: cache requests to the
// cache manager and its answers (data and NAK) back to the requester, its
// DRAM fills/write-backs and their answers, message passing both ways,
// shared-memory reads and writes, configuration writes and reads; that a
// stalled cache manager does not block its DRAM answers; and the inbound
// message queue depth (4 with the unit, 8 without it).
module tb_network_interface;
  import amr_pkg::*;
  localparam node_t ME   = '{y: 1'b0, x: 2'd1};
  localparam node_t DRAM = '{y: 1'b1, x: 2'd0};
  localparam node_t CPU  = '{y: 1'b0, x: 2'd0};
  localparam node_t OTH  = '{y: 1'b1, x: 2'd2};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // two instances: [0] with the shared-memory unit, [1] without
  logic in_valid[2], in_ready[2], out_valid[2], out_ready[2];
  noc_pkt_t in_pkt[2], out_pkt[2];
  logic cm_req_valid[2], cm_req_ready[2], cm_rsp_valid[2], cm_rsp_ready[2];
  cm_req_t cm_req[2]; cm_rsp_t cm_rsp[2];
  logic cm_dram_req_valid[2], cm_dram_req_ready[2], cm_dram_rsp_valid[2], cm_dram_rsp_ready[2];
  mem_req_t cm_dram_req[2]; logic [255:0] cm_dram_rsp_data[2];
  logic mode_cache[2]; logic [7:0] dvfs_level[2];
  logic acc_mo_valid[2], acc_mo_ready[2], acc_mi_valid[2], acc_mi_ready[2];
  node_t acc_mo_dst[2], acc_mi_src[2]; logic [255:0] acc_mo_data[2], acc_mi_data[2];
  logic acc_sh_req_valid[2], acc_sh_req_ready[2], acc_sh_req_we[2], acc_sh_rsp_valid[2];
  logic [31:0] acc_sh_req_addr[2]; logic [255:0] acc_sh_req_wdata[2], acc_sh_rsp_data[2];

  for (genvar g = 0; g < 2; g++) begin : g_ni
    network_interface #(.MY(ME), .DRAM_NODE(DRAM), .HAS_SHMEM(g == 0)) dut (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_pkt(in_pkt[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_pkt(out_pkt[g]),
      .cm_req_valid(cm_req_valid[g]), .cm_req_ready(cm_req_ready[g]), .cm_req(cm_req[g]),
      .cm_rsp_valid(cm_rsp_valid[g]), .cm_rsp_ready(cm_rsp_ready[g]), .cm_rsp(cm_rsp[g]),
      .cm_dram_req_valid(cm_dram_req_valid[g]), .cm_dram_req_ready(cm_dram_req_ready[g]),
      .cm_dram_req(cm_dram_req[g]), .cm_dram_rsp_valid(cm_dram_rsp_valid[g]),
      .cm_dram_rsp_ready(cm_dram_rsp_ready[g]), .cm_dram_rsp_data(cm_dram_rsp_data[g]),
      .st_cache_ready(1'b1), .st_mem_to_cache(1'b0), .mode_cache(mode_cache[g]), .dvfs_level(dvfs_level[g]),
      .acc_mo_valid(acc_mo_valid[g]), .acc_mo_ready(acc_mo_ready[g]), .acc_mo_dst(acc_mo_dst[g]),
      .acc_mo_data(acc_mo_data[g]), .acc_mi_valid(acc_mi_valid[g]), .acc_mi_ready(acc_mi_ready[g]),
      .acc_mi_src(acc_mi_src[g]), .acc_mi_data(acc_mi_data[g]),
      .acc_sh_req_valid(acc_sh_req_valid[g]), .acc_sh_req_ready(acc_sh_req_ready[g]),
      .acc_sh_req_we(acc_sh_req_we[g]), .acc_sh_req_addr(acc_sh_req_addr[g]),
      .acc_sh_req_wdata(acc_sh_req_wdata[g]), .acc_sh_rsp_valid(acc_sh_rsp_valid[g]),
      .acc_sh_rsp_data(acc_sh_rsp_data[g]));
  end

  // outgoing packets are collected
  noc_pkt_t outq [2][$];
  always @(posedge clk) if (rst_n) for (int g = 0; g < 2; g++) if (out_valid[g] && out_ready[g]) outq[g].push_back(out_pkt[g]);

  function automatic noc_pkt_t mk(input pkt_type_e t, input node_t s, input logic i, input logic [31:0] a, input logic [255:0] d);
    noc_pkt_t p;
    p.ptype = t; p.src = s; p.dst = ME; p.id = i; p.addr = a; p.data = d;
    return p;
  endfunction

  task automatic send(input int g, input noc_pkt_t p);
    @(negedge clk); in_valid[g] = 1; in_pkt[g] = p;
    @(posedge clk); while (!in_ready[g]) @(posedge clk);
    #1 in_valid[g] = 0;
  endtask

  task automatic expect_out(input int g, input pkt_type_e t, input node_t d, input logic i,
                            input logic [31:0] a, input logic [255:0] dat, input bit chk_data, input string what);
    int n = 0;
    while (outq[g].size() == 0 && n < 50) begin @(posedge clk); n++; end
    checks++;
    if (outq[g].size() == 0) begin failures++; $display("%s: nothing sent", what); end
    else begin
      automatic noc_pkt_t p = outq[g].pop_front();
      if (p.ptype != t || p.dst != d || p.src != ME || p.id != i || p.addr != a || (chk_data && p.data != dat)) begin
        failures++; $display("%s: wrong packet t=%0d dst=%0d src=%0d id=%0d addr=%h", what, p.ptype, p.dst, p.src, p.id, p.addr);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [255:0] d1 = {8{32'hcafe_0001}}, d2 = {8{32'h1234_5678}};
    for (int g = 0; g < 2; g++) begin
      in_valid[g] = 0; in_pkt[g] = '0; out_ready[g] = 1; cm_req_ready[g] = 0; cm_rsp_valid[g] = 0;
      cm_rsp[g] = '0; cm_dram_req_valid[g] = 0; cm_dram_req[g] = '0; cm_dram_rsp_ready[g] = 0;
      acc_mo_valid[g] = 0; acc_mo_dst[g] = '0; acc_mo_data[g] = '0; acc_mi_ready[g] = 0;
      acc_sh_req_valid[g] = 0; acc_sh_req_we[g] = 0; acc_sh_req_addr[g] = 0; acc_sh_req_wdata[g] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1;

    // cache request in, with the cache manager stalled
    send(0, mk(PKT_CACHE_WR, CPU, ID_CACHE, 32'h0001_8020, d1));
    repeat (2) @(posedge clk);
    checks++;
    if (!cm_req_valid[0] || cm_req[0].op != CM_WR || cm_req[0].addr != 32'h0001_8020 || cm_req[0].src != CPU || cm_req[0].data != d1) begin
      failures++; $display("cache request not forwarded");
    end
    // a DRAM answer must still get through
    send(0, mk(PKT_MEM_RSP, DRAM, ID_CACHE, 32'h40, d2));
    @(negedge clk); cm_dram_rsp_ready[0] = 1;
    checks++; if (!cm_dram_rsp_valid[0] || cm_dram_rsp_data[0] != d2) begin failures++; $display("DRAM answer blocked"); end
    @(negedge clk); cm_dram_rsp_ready[0] = 0; cm_req_ready[0] = 1;
    @(negedge clk); cm_req_ready[0] = 0;
    checks++; if (cm_req_valid[0]) begin failures++; $display("cache request not consumed"); end

    // cache manager answers
    @(negedge clk); cm_rsp_valid[0] = 1; cm_rsp[0] = '{nak: 1'b0, op: CM_RD, dst: CPU, addr: 32'h0001_8020, data: d2};
    @(posedge clk); while (!cm_rsp_ready[0]) @(posedge clk); #1 cm_rsp_valid[0] = 0;
    expect_out(0, PKT_CACHE_RSP, CPU, ID_CACHE, 32'h0001_8020, d2, 1, "cache answer");
    @(negedge clk); cm_rsp_valid[0] = 1; cm_rsp[0].nak = 1;
    @(posedge clk); while (!cm_rsp_ready[0]) @(posedge clk); #1 cm_rsp_valid[0] = 0;
    expect_out(0, PKT_CACHE_NAK, CPU, ID_CACHE, 32'h0001_8020, d2, 0, "cache NAK");

    // cache manager to DRAM
    @(negedge clk); cm_dram_req_valid[0] = 1; cm_dram_req[0] = '{we: 1'b1, addr: 32'h0000_1240, data: d1};
    @(posedge clk); while (!cm_dram_req_ready[0]) @(posedge clk); #1 cm_dram_req_valid[0] = 0;
    expect_out(0, PKT_MEM_WR, DRAM, ID_CACHE, 32'h0000_1240, d1, 1, "write-back");
    @(negedge clk); cm_dram_req_valid[0] = 1; cm_dram_req[0].we = 0;
    @(posedge clk); while (!cm_dram_req_ready[0]) @(posedge clk); #1 cm_dram_req_valid[0] = 0;
    expect_out(0, PKT_MEM_RD, DRAM, ID_CACHE, 32'h0000_1240, d1, 0, "fill");

    // messages out and in
    @(negedge clk); acc_mo_valid[0] = 1; acc_mo_dst[0] = OTH; acc_mo_data[0] = d2;
    @(posedge clk); while (!acc_mo_ready[0]) @(posedge clk); #1 acc_mo_valid[0] = 0;
    expect_out(0, PKT_MSG, OTH, 1'b0, 32'h0, d2, 1, "message out");
    send(0, mk(PKT_MSG, OTH, 1'b0, 0, d1));
    @(negedge clk);
    checks++; if (!acc_mi_valid[0] || acc_mi_src[0] != OTH || acc_mi_data[0] != d1) begin failures++; $display("message in"); end
    acc_mi_ready[0] = 1; @(negedge clk); acc_mi_ready[0] = 0;

    // shared memory read and write
    @(negedge clk); acc_sh_req_valid[0] = 1; acc_sh_req_we[0] = 0; acc_sh_req_addr[0] = 32'h0009_0064;
    @(posedge clk); while (!acc_sh_req_ready[0]) @(posedge clk); #1 acc_sh_req_valid[0] = 0;
    expect_out(0, PKT_MEM_RD, DRAM, ID_SHMEM, 32'h0009_0060, '0, 0, "shared read");
    checks++; if (acc_sh_req_ready[0]) begin failures++; $display("second shared request accepted early"); end
    send(0, mk(PKT_MEM_RSP, DRAM, ID_SHMEM, 32'h0009_0060, d2));
    begin
      int n = 0;
      while (!acc_sh_rsp_valid[0] && n < 20) begin @(posedge clk); #1; n++; end
      checks++; if (!acc_sh_rsp_valid[0] || acc_sh_rsp_data[0] != d2) begin failures++; $display("shared answer"); end
    end
    @(negedge clk); acc_sh_req_valid[0] = 1; acc_sh_req_we[0] = 1; acc_sh_req_addr[0] = 32'h0009_0080; acc_sh_req_wdata[0] = d1;
    @(posedge clk); while (!acc_sh_req_ready[0]) @(posedge clk); #1 acc_sh_req_valid[0] = 0;
    expect_out(0, PKT_MEM_WR, DRAM, ID_SHMEM, 32'h0009_0080, d1, 1, "shared write");
    send(0, mk(PKT_MEM_RSP, DRAM, ID_SHMEM, 32'h0009_0080, '0));

    // configuration
    send(0, mk(PKT_CFG_WR, CPU, 1'b0, 32'(CFG_MODE), 256'd1));
    expect_out(0, PKT_CFG_RSP, CPU, 1'b0, 32'(CFG_MODE), 256'd0, 1, "mode write ack (old value)");
    checks++; if (!mode_cache[0]) begin failures++; $display("mode not set"); end
    send(0, mk(PKT_CFG_WR, CPU, 1'b0, 32'(CFG_DVFS), 256'h3c));
    expect_out(0, PKT_CFG_RSP, CPU, 1'b0, 32'(CFG_DVFS), 256'h0, 1, "dvfs write ack (old value)");
    send(0, mk(PKT_CFG_RD, CPU, 1'b0, 32'(CFG_DVFS), 256'h0));
    expect_out(0, PKT_CFG_RSP, CPU, 1'b0, 32'(CFG_DVFS), 256'h3c, 1, "dvfs read");
    send(0, mk(PKT_CFG_RD, CPU, 1'b0, 32'(CFG_STATUS), 256'h0));
    expect_out(0, PKT_CFG_RSP, CPU, 1'b0, 32'(CFG_STATUS), 256'h1, 1, "status read");
    checks++; if (dvfs_level[0] != 8'h3c) failures++;

    // inbound message queue depth: 4 with the shared-memory unit, 8 without
    for (int g = 0; g < 2; g++) begin
      automatic int acc = 0;
      for (int k = 0; k < 12; k++) begin
        @(negedge clk); in_valid[g] = 1; in_pkt[g] = mk(PKT_MSG, OTH, 1'b0, 32'(k), d1);
        @(posedge clk); if (in_ready[g]) acc++;
      end
      #1 in_valid[g] = 0;
      checks++;
      if (acc != (g == 0 ? 4 : 8)) begin failures++; $display("NI %0d queued %0d messages", g, acc); end
      // drain in order
      for (int k = 0; k < acc; k++) begin
        @(negedge clk); checks++;
        if (!acc_mi_valid[g] || acc_mi_data[g] != d1) failures++;
        acc_mi_ready[g] = 1; @(negedge clk); acc_mi_ready[g] = 0;
      end
    end
    // without the unit, shared-memory requests are refused
    checks++; if (acc_sh_req_ready[1]) begin failures++; $display("unit present in NI without it"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
