// Testbench of acc_tile with two memory banks (as on the ReO tile), a small
// memory (8 KB, 4 ways) and the behavioural DRAM node behind its NoC port:
//   * accelerator mode: the accelerator writes and reads both banks;
//   * the CPU switches the tile to cache mode with a configuration write;
//     the accelerator loses the memory;
//   * random L3 reads and write-backs against a flat memory model, each
//     answered no earlier than 15 cycles after it was sent;
//   * the CPU switches back: the flush leaves DRAM up to date, the
//     accelerator gets the memory back and cache requests are NAKed.
module tb_acc_tile;
  import amr_pkg::*;
  localparam node_t ME = '{y: 1'b0, x: 2'd1}, CPU = '{y: 1'b0, x: 2'd0}, DRAM = '{y: 1'b1, x: 2'd0};
  localparam int MEMB = 8192, NB = 2, BAW = 6;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  noc_pkt_t in_pkt, out_pkt;
  logic mem_to_acc, cache_ready;
  logic acc_m_en[NB], acc_m_we[NB]; logic [BAW-1:0] acc_m_addr[NB]; logic [63:0] acc_m_be[NB];
  logic [511:0] acc_m_wdata[NB], acc_m_rdata[NB];
  logic acc_mo_valid, acc_mo_ready, acc_mi_valid, acc_mi_ready;
  node_t acc_mo_dst, acc_mi_src; logic [255:0] acc_mo_data, acc_mi_data;
  logic acc_sh_req_valid, acc_sh_req_ready, acc_sh_req_we, acc_sh_rsp_valid;
  logic [31:0] acc_sh_req_addr; logic [255:0] acc_sh_req_wdata, acc_sh_rsp_data;
  logic [7:0] dvfs_level;

  acc_tile #(.MY(ME), .DRAM_NODE(DRAM), .MEM_BYTES(MEMB), .MEM_W_BYTES(64), .NUM_BANKS(NB), .WAYS(4)) dut (.*);

  // DRAM node and CPU share the tile's input; packets to the CPU are collected.
  logic dr_rx_valid, dr_tx_valid, dr_tx_ready, dr_rx_ready;
  noc_pkt_t dr_tx_pkt;
  dram_model #(.LATENCY(30), .MY(DRAM)) u_dram (.clk, .rst_n, .rx_valid(dr_rx_valid), .rx_ready(dr_rx_ready),
    .rx_pkt(out_pkt), .tx_valid(dr_tx_valid), .tx_ready(dr_tx_ready), .tx_pkt(dr_tx_pkt));
  assign dr_rx_valid = out_valid && out_pkt.dst == DRAM;
  assign out_ready = 1'b1;
  logic cpu_valid; noc_pkt_t cpu_pkt;
  assign in_valid = dr_tx_valid || cpu_valid;
  assign in_pkt   = dr_tx_valid ? dr_tx_pkt : cpu_pkt;
  assign dr_tx_ready = in_ready;
  wire cpu_taken = cpu_valid && !dr_tx_valid && in_ready;

  noc_pkt_t to_cpu [$];
  always @(posedge clk) if (rst_n && out_valid && out_pkt.dst == CPU) to_cpu.push_back(out_pkt);

  task automatic cpu_send(input pkt_type_e t, input logic [31:0] a, input logic [255:0] d, output noc_pkt_t r, output int lat);
    @(negedge clk); cpu_valid = 1; cpu_pkt = '0; cpu_pkt.ptype = t; cpu_pkt.src = CPU; cpu_pkt.dst = ME;
    cpu_pkt.addr = a; cpu_pkt.data = d;
    @(posedge clk); while (!cpu_taken) @(posedge clk);
    #1 cpu_valid = 0; lat = 0;
    while (to_cpu.size() == 0 && lat < 5000) begin @(posedge clk); #1; lat++; end
    r = to_cpu.pop_front();
  endtask

  function automatic logic [255:0] init_line(input logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    noc_pkt_t r;
    int lat, n_hit, n_miss;
    logic [255:0] gold [logic [31:0]];
    cpu_valid = 0; cpu_pkt = '0;
    for (int b = 0; b < NB; b++) begin acc_m_en[b] = 0; acc_m_we[b] = 0; acc_m_addr[b] = 0; acc_m_be[b] = 0; acc_m_wdata[b] = 0; end
    acc_mo_valid = 0; acc_mo_dst = '0; acc_mo_data = 0; acc_mi_ready = 1;
    acc_sh_req_valid = 0; acc_sh_req_we = 0; acc_sh_req_addr = 0; acc_sh_req_wdata = 0;
    n_hit = 0; n_miss = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);

    // accelerator mode: own the memory
    checks++; if (!mem_to_acc) begin failures++; $display("accelerator does not own memory after reset"); end
    for (int w = 0; w < 8; w++) for (int b = 0; b < NB; b++) begin
      @(negedge clk); acc_m_en[b] = 1; acc_m_we[b] = 1; acc_m_addr[b] = BAW'(w); acc_m_be[b] = '1;
      acc_m_wdata[b] = {16{32'(w * 16 + b)}};
      @(negedge clk); acc_m_en[b] = 0; acc_m_we[b] = 0;
    end
    for (int w = 0; w < 8; w++) for (int b = 0; b < NB; b++) begin
      @(negedge clk); acc_m_en[b] = 1; acc_m_addr[b] = BAW'(w);
      @(negedge clk); acc_m_en[b] = 0;
      checks++; if (acc_m_rdata[b] !== {16{32'(w * 16 + b)}}) begin failures++; $display("accelerator read bank %0d word %0d", b, w); end
    end

    // NAK before cache mode
    cpu_send(PKT_CACHE_RD, 32'h20, '0, r, lat);
    checks++; if (r.ptype != PKT_CACHE_NAK) begin failures++; $display("no NAK in accelerator mode"); end

    // switch to cache mode
    cpu_send(PKT_CFG_WR, 32'(CFG_MODE), 256'd1, r, lat);
    checks++; if (r.ptype != PKT_CFG_RSP || mem_to_acc) begin failures++; $display("mode switch"); end
    while (!cache_ready) @(negedge clk);

    for (int t = 0; t < 600; t++) begin
      automatic logic [31:0] a = {$urandom_range(4 * MEMB / 32 - 1), 5'd0};
      automatic logic we = ($urandom_range(2) == 0);
      automatic logic [255:0] d = {8{$urandom}};
      cpu_send(we ? PKT_CACHE_WR : PKT_CACHE_RD, a, d, r, lat);
      checks++;
      if (r.ptype != PKT_CACHE_RSP || r.addr != a || lat < 15) begin failures++; $display("answer to %h: type %0d lat %0d", a, r.ptype, lat); end
      if (lat < 30) n_hit++; else n_miss++;
      if (we) gold[a] = d;
      else begin
        checks++;
        if (r.data !== (gold.exists(a) ? gold[a] : init_line(a))) begin failures++; $display("read %h wrong", a); end
      end
    end
    $display("fast answers %0d, slow answers %0d, DRAM reads %0d writes %0d", n_hit, n_miss, u_dram.n_rd, u_dram.n_wr);
    checks++; if (n_hit == 0 || n_miss == 0) begin failures++; $display("no hits or no misses"); end

    // an accelerator access in cache mode must not reach the memory
    @(negedge clk); acc_m_en[0] = 1; acc_m_we[0] = 1; acc_m_addr[0] = 0; acc_m_be[0] = '1; acc_m_wdata[0] = '1;
    @(negedge clk); acc_m_en[0] = 0; acc_m_we[0] = 0;

    // back to accelerator mode: flush
    cpu_send(PKT_CFG_WR, 32'(CFG_MODE), 256'd0, r, lat);
    while (!mem_to_acc) @(negedge clk);
    repeat (40) @(negedge clk);
    foreach (gold[a]) begin
      checks++;
      if (u_dram.peek(a) !== gold[a]) begin failures++; $display("DRAM %h stale after flush", a); end
    end
    cpu_send(PKT_CFG_RD, 32'(CFG_STATUS), '0, r, lat);
    checks++; if (r.data[1:0] != 2'b00) begin failures++; $display("status after flush %b", r.data[1:0]); end
    cpu_send(PKT_CACHE_RD, 32'h20, '0, r, lat);
    checks++; if (r.ptype != PKT_CACHE_NAK) begin failures++; $display("no NAK after flush"); end
    // the accelerator's write during cache mode was ignored: word 0 of bank 0 holds a cache line,
    // not all ones
    @(negedge clk); acc_m_en[0] = 1; acc_m_addr[0] = 0;
    @(negedge clk); acc_m_en[0] = 0;
    checks++; if (acc_m_rdata[0] === '1) begin failures++; $display("accelerator wrote in cache mode"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
