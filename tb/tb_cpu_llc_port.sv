// Testbench of cpu_llc_port: random L2 misses and write-backs must go to the
// slice given by address bits [16:15] (independently computed here), with
// the line address and data; answers and NAKs come back to the L2 side; a
// configuration access goes to its tile and takes precedence over a line
// request; only one transaction is in flight; all four slices are used
// about equally. A second instance built with NAK_TO_DRAM = 1 must not
// report a NAK but resend the request to the DRAM node and answer with the
// DRAM's reply.
module tb_cpu_llc_port;
  import amr_pkg::*;
  localparam node_t ME = '{y: 1'b0, x: 2'd0};
  localparam node_t SN [4] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2}, '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic l2_req_valid, l2_req_ready, l2_rsp_valid, l2_rsp_nak;
  mem_req_t l2_req; logic [255:0] l2_rsp_data;
  logic cfg_req_valid, cfg_req_ready, cfg_req_we, cfg_rsp_valid;
  node_t cfg_req_tile; logic [3:0] cfg_req_addr; logic [31:0] cfg_req_wdata, cfg_rsp_rdata;
  logic out_valid, out_ready, in_valid, in_ready;
  noc_pkt_t out_pkt, in_pkt;

  cpu_llc_port #(.MY(ME), .NUM_SLICES(4), .SLICE_LSB(15), .SLICE_NODES({SN[3], SN[2], SN[1], SN[0]})) dut (.*);

  // second instance: refused requests are retried at DRAM
  localparam node_t DN = '{y: 1'b1, x: 2'd0};
  logic l2_req_valid2 = 0, l2_req_ready2, l2_rsp_valid2, l2_rsp_nak2;
  mem_req_t l2_req2 = '0; logic [255:0] l2_rsp_data2;
  logic cfg_req_ready2, cfg_rsp_valid2; logic [31:0] cfg_rsp_rdata2;
  logic out_valid2, in_valid2 = 0, in_ready2;
  noc_pkt_t out_pkt2, in_pkt2 = '0;
  cpu_llc_port #(.MY(ME), .NUM_SLICES(4), .SLICE_LSB(15), .SLICE_NODES({SN[3], SN[2], SN[1], SN[0]}),
                 .NAK_TO_DRAM(1'b1), .DRAM_NODE(DN)) dut2 (
    .clk, .rst_n,
    .l2_req_valid(l2_req_valid2), .l2_req_ready(l2_req_ready2), .l2_req(l2_req2),
    .l2_rsp_valid(l2_rsp_valid2), .l2_rsp_nak(l2_rsp_nak2), .l2_rsp_data(l2_rsp_data2),
    .cfg_req_valid(1'b0), .cfg_req_ready(cfg_req_ready2), .cfg_req_tile('0), .cfg_req_we(1'b0),
    .cfg_req_addr('0), .cfg_req_wdata('0), .cfg_rsp_valid(cfg_rsp_valid2), .cfg_rsp_rdata(cfg_rsp_rdata2),
    .out_valid(out_valid2), .out_ready(1'b1), .out_pkt(out_pkt2),
    .in_valid(in_valid2), .in_ready(in_ready2), .in_pkt(in_pkt2));

  // the answer to instance 2's request in flight: NAK or data from `from`
  task automatic answer2(input pkt_type_e t, input node_t from, input logic [255:0] d);
    @(negedge clk); in_valid2 = 1; in_pkt2 = '0; in_pkt2.ptype = t; in_pkt2.src = from;
    in_pkt2.dst = ME; in_pkt2.data = d; in_pkt2.id = ID_CACHE;
    #1;
  endtask

  int per_slice [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_pkt(output noc_pkt_t p);
    int n = 0;
    while (!out_valid && n < 20) begin @(posedge clk); #1; n++; end
    p = out_pkt;
    checks++; if (!out_valid) begin failures++; $display("no packet sent"); end
    @(posedge clk); #1;
  endtask

  task automatic answer(input pkt_type_e t, input node_t s, input logic [255:0] d);
    @(negedge clk); in_valid = 1; in_pkt = '0; in_pkt.ptype = t; in_pkt.src = s; in_pkt.dst = ME; in_pkt.data = d;
    #1;
  endtask

  initial begin
    noc_pkt_t p;
    l2_req_valid = 0; l2_req = '0; cfg_req_valid = 0; cfg_req_tile = '0; cfg_req_we = 0; cfg_req_addr = 0;
    cfg_req_wdata = 0; out_ready = 1; in_valid = 0; in_pkt = '0;
    for (int i = 0; i < 4; i++) per_slice[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;

    for (int t = 0; t < 400; t++) begin
      automatic logic [31:0] a = $urandom;
      automatic logic we = $urandom_range(1);
      automatic logic [255:0] d = {8{$urandom}};
      automatic int s = int'(a[16:15]);
      automatic logic nak = ($urandom_range(9) == 0);
      @(negedge clk); l2_req_valid = 1; l2_req = '{we: we, addr: a, data: d};
      @(posedge clk); #1; l2_req_valid = 0;
      wait_pkt(p);
      checks++;
      if (p.dst != SN[s] || p.src != ME || p.ptype != (we ? PKT_CACHE_WR : PKT_CACHE_RD) ||
          p.addr != {a[31:5], 5'd0} || (we && p.data != d)) begin
        failures++; $display("request for %h sent wrongly", a);
      end
      per_slice[s]++;
      checks++; if (l2_req_ready) begin failures++; $display("second request accepted while waiting"); end
      answer(nak ? PKT_CACHE_NAK : PKT_CACHE_RSP, SN[s], ~d);
      checks++;
      if (!l2_rsp_valid || l2_rsp_nak != nak || l2_rsp_data != ~d) begin failures++; $display("answer lost"); end
      @(negedge clk); in_valid = 0;
    end
    for (int i = 0; i < 4; i++) begin
      checks++; if (per_slice[i] < 60) begin failures++; $display("slice %0d got %0d requests", i, per_slice[i]); end
    end

    // configuration has precedence over a line request
    @(negedge clk); l2_req_valid = 1; l2_req = '{we: 1'b0, addr: 32'h100, data: '0};
    cfg_req_valid = 1; cfg_req_tile = SN[2]; cfg_req_we = 1; cfg_req_addr = CFG_MODE; cfg_req_wdata = 1;
    @(posedge clk); #1; cfg_req_valid = 0;
    wait_pkt(p);
    checks++; if (p.ptype != PKT_CFG_WR || p.dst != SN[2] || p.addr != 32'(CFG_MODE) || p.data[31:0] != 1) begin
      failures++; $display("configuration write sent wrongly");
    end
    answer(PKT_CFG_RSP, SN[2], 256'h7);
    checks++; if (!cfg_rsp_valid || cfg_rsp_rdata != 7 || l2_rsp_valid) begin failures++; $display("configuration answer"); end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1; l2_req_valid = 0;
    wait_pkt(p);
    checks++; if (p.ptype != PKT_CACHE_RD || p.dst != SN[0]) begin failures++; $display("held line request"); end
    answer(PKT_CACHE_RSP, SN[0], '0);
    @(negedge clk); in_valid = 0;
    // NAK_TO_DRAM: a refused request is resent to DRAM, the NAK never shows
    for (int t = 0; t < 100; t++) begin
      automatic logic [31:0] a = $urandom;
      automatic logic we = $urandom_range(1);
      automatic logic [255:0] d = {8{$urandom}};
      automatic int s = int'(a[16:15]);
      automatic logic nak = $urandom_range(1);
      automatic int n = 0;
      @(negedge clk); l2_req_valid2 = 1; l2_req2 = '{we: we, addr: a, data: d};
      @(posedge clk); #1; l2_req_valid2 = 0;
      while (!out_valid2 && n < 20) begin @(posedge clk); #1; n++; end
      checks++; if (out_pkt2.dst != SN[s]) begin failures++; $display("retry port: wrong slice"); end
      @(posedge clk); #1;
      answer2(nak ? PKT_CACHE_NAK : PKT_CACHE_RSP, SN[s], ~d);
      checks++; if (nak ? l2_rsp_valid2 : (!l2_rsp_valid2 || l2_rsp_data2 != ~d)) begin
        failures++; $display("retry port: answer %s", nak ? "NAK reported" : "lost");
      end
      @(negedge clk); in_valid2 = 0;
      if (nak) begin
        n = 0;
        while (!out_valid2 && n < 20) begin @(posedge clk); #1; n++; end
        checks++;
        if (!out_valid2 || out_pkt2.dst != DN || out_pkt2.ptype != (we ? PKT_MEM_WR : PKT_MEM_RD) ||
            out_pkt2.addr != {a[31:5], 5'd0} || (we && out_pkt2.data != d)) begin
          failures++; $display("retry port: DRAM request for %h wrong", a);
        end
        @(posedge clk); #1;
        answer2(PKT_MEM_RSP, DN, d ^ 256'h1);
        checks++; if (!l2_rsp_valid2 || l2_rsp_nak2 || l2_rsp_data2 != (d ^ 256'h1)) begin
          failures++; $display("retry port: DRAM answer lost");
        end
        @(negedge clk); in_valid2 = 0;
      end
    end
    $display("per slice: %0d %0d %0d %0d", per_slice[0], per_slice[1], per_slice[2], per_slice[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
