// Testbench of cache_manager (tag array + control + adapter) with its
// memory and a DRAM responder (20-cycle latency).
//   * accelerator mode: requests are NAKed and the memory is not taken;
//   * switch to cache mode: all sets are invalidated before cache_ready;
//   * random line reads and write-backs over 8x the slice capacity: every
//     read must return the latest data (checked against a flat model of
//     memory), every answer takes at least 15 cycles, an access repeated at
//     once must hit in exactly 15 cycles; misses, dirty evictions and hits
//     are counted and must all occur;
//   * switch back: the flush must leave DRAM equal to the model, then NAKs;
//   * re-enable: the slice starts empty (the first access misses).
module tb_cache_manager;
  import amr_pkg::*;
  localparam int MEMB = 8192, WAYS = 4, LAT = 15, DLAT = 20;
  localparam int SETS = MEMB / 32 / WAYS;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cache_en, cache_ready, mem_to_cache;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  cm_req_t req; cm_rsp_t rsp;
  logic dram_req_valid, dram_req_ready, dram_rsp_valid, dram_rsp_ready;
  mem_req_t dram_req; logic [255:0] dram_rsp_data;
  logic m_en[1], m_we[1]; logic [6:0] m_addr[1]; logic [63:0] m_be[1]; logic [511:0] m_wdata[1], m_rdata[1];

  cache_manager #(.MEM_BYTES(MEMB), .MEM_W_BYTES(64), .NUM_BANKS(1), .WAYS(WAYS), .HIT_LATENCY(LAT)) dut (
    .clk, .rst_n, .cache_en, .cache_ready, .mem_to_cache,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp_ready, .dram_rsp_data,
    .m_en, .m_we, .m_addr, .m_be, .m_wdata, .m_rdata);
  acc_mem #(.DEPTH(128), .W_BYTES(64)) u_mem (.clk, .en(m_en[0]), .we(m_we[0]), .addr(m_addr[0]),
    .be(m_be[0]), .wdata(m_wdata[0]), .rdata(m_rdata[0]));

  // ---- DRAM responder ----
  logic [255:0] dmem [logic [31:0]];
  logic [255:0] dq_data [$];
  longint       dq_due  [$];
  longint       cyc = 0;
  int           n_drd = 0, n_dwr = 0;
  function automatic logic [255:0] init_line(input logic [31:0] a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction
  assign dram_req_ready = 1'b1;
  assign dram_rsp_valid = dq_data.size() > 0 && dq_due[0] <= cyc;
  assign dram_rsp_data  = dq_data.size() > 0 ? dq_data[0] : '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dram_rsp_valid && dram_rsp_ready) begin void'(dq_data.pop_front()); void'(dq_due.pop_front()); end
    if (dram_req_valid) begin
      if (dram_req.we) begin dmem[dram_req.addr] = dram_req.data; dq_data.push_back('0); n_dwr++; end
      else begin dq_data.push_back(dmem.exists(dram_req.addr) ? dmem[dram_req.addr] : init_line(dram_req.addr)); n_drd++; end
      dq_due.push_back(cyc + DLAT);
    end
  end

  // ---- CPU-side model ----
  logic [255:0] gold [logic [31:0]];

  function automatic logic [255:0] rnd_line();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic access(input cm_op_e op, input logic [31:0] a, input logic [255:0] d,
                        output cm_rsp_t r, output int lat);
    @(negedge clk);
    req_valid = 1; req.op = op; req.addr = a; req.data = d; req.src = '{y: 1'b0, x: 2'd0};
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1;
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    r = rsp;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cm_rsp_t r;
    int lat, n_hit = 0, n_miss = 0, wb_before, init_cycles;
    cache_en = 0; req_valid = 0; rsp_ready = 1; req = '0;
    repeat (3) @(posedge clk); rst_n = 1;

    // accelerator mode: NAK
    access(CM_RD, 32'h40, '0, r, lat);
    checks++; if (!r.nak || mem_to_cache) begin failures++; $display("no NAK in accelerator mode"); end

    // to cache mode
    @(negedge clk); cache_en = 1; init_cycles = 0;
    while (!cache_ready) begin @(negedge clk); init_cycles++; end
    checks++; if (init_cycles < SETS) begin failures++; $display("init took %0d cycles", init_cycles); end

    for (int t = 0; t < 3000; t++) begin
      automatic logic [31:0] a = {$urandom_range(8*MEMB/32 - 1), 5'b0};
      automatic cm_op_e op = $urandom_range(2) == 0 ? CM_WR : CM_RD;
      automatic logic [255:0] d = rnd_line();
      automatic int rep = $urandom_range(3) == 0;
      for (int k = 0; k <= rep; k++) begin
        access(op, a, d, r, lat);
        checks++;
        if (r.nak || lat < LAT) begin failures++; $display("bad answer: nak %b lat %0d", r.nak, lat); end
        if (k == 1) begin
          checks++;
          if (lat != LAT) begin failures++; $display("repeated access to %h took %0d cycles", a, lat); end
        end
        if (lat == LAT) n_hit++; else n_miss++;
        if (op == CM_WR) gold[a] = d;
        else begin
          automatic logic [255:0] e = gold.exists(a) ? gold[a] : init_line(a);
          checks++;
          if (r.data !== e) begin failures++; $display("read %h: wrong data", a); end
        end
      end
    end
    wb_before = n_dwr;
    $display("hits %0d misses %0d dram reads %0d dram writes %0d", n_hit, n_miss, n_drd, n_dwr);
    checks++; if (n_hit == 0 || n_miss == 0 || n_dwr == 0) begin failures++; $display("a mechanism never happened"); end

    // back to accelerator mode: flush
    @(negedge clk); cache_en = 0;
    while (mem_to_cache) @(negedge clk);
    repeat (DLAT + 2) @(negedge clk);
    $display("flush wrote %0d lines", n_dwr - wb_before);
    checks++; if (n_dwr == wb_before) begin failures++; $display("flush wrote nothing"); end
    foreach (gold[a]) begin
      checks++;
      if (!dmem.exists(a) || dmem[a] !== gold[a]) begin failures++; $display("DRAM %h stale after flush", a); end
    end
    access(CM_RD, 32'h40, '0, r, lat);
    checks++; if (!r.nak) begin failures++; $display("no NAK after flush"); end

    // cache mode again: empty slice
    @(negedge clk); cache_en = 1;
    while (!cache_ready) @(negedge clk);
    access(CM_RD, 32'h40, '0, r, lat);
    checks++; if (lat <= LAT) begin failures++; $display("slice not empty after re-enable"); end
    checks++; if (r.data !== (gold.exists(32'h40) ? gold[32'h40] : init_line(32'h40))) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
