// Testbench of noc_router at mesh position (1,0): random single-flit
// packets on all five inputs with random back-pressure on the outputs.
// Every packet must leave by the output that dimension-ordered routing
// (x first, then y) gives, exactly once, in order per input/output pair;
// output contention (round-robin arbitration) must occur; one hop takes one
// cycle on an idle router.
module tb_noc_router;
  import amr_pkg::*;
  localparam node_t MY = '{y: 1'b0, x: 2'd1};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic     in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  noc_pkt_t in_pkt [NPORTS], out_pkt [NPORTS];

  noc_router #(.MY(MY), .FIFO_DEPTH(2)) dut (.*);

  function automatic int exp_port(input node_t d);
    if (d.x != MY.x) return (d.x > MY.x) ? P_E : P_W;
    if (d.y != MY.y) return (d.y > MY.y) ? P_S : P_N;
    return P_L;
  endfunction

  noc_pkt_t sb [NPORTS][NPORTS][$];
  int sent = 0, recv = 0, contention = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // outputs: random ready, check on every transfer
  always @(negedge clk) if (rst_n) for (int o = 0; o < NPORTS; o++) out_ready[o] = ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n) begin
    int want [NPORTS];
    for (int o = 0; o < NPORTS; o++) want[o] = 0;
    for (int i = 0; i < NPORTS; i++) if (dut.hv[i]) want[exp_port(dut.hp[i].dst)]++;
    for (int o = 0; o < NPORTS; o++) if (want[o] > 1) contention++;
    for (int o = 0; o < NPORTS; o++) if (out_valid[o] && out_ready[o]) begin
      automatic int i = int'(out_pkt[o].addr[2:0]);
      checks++; recv++;
      if (exp_port(out_pkt[o].dst) != o || sb[i][o].size() == 0 || sb[i][o][0] !== out_pkt[o]) begin
        failures++; $display("wrong packet at output %0d", o);
      end else void'(sb[i][o].pop_front());
    end
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin in_valid[i] = 0; in_pkt[i] = '0; out_ready[i] = 1; end
    repeat (2) @(posedge clk); rst_n = 1;
    // one-hop latency on an idle router
    @(negedge clk); in_valid[P_W] = 1; in_pkt[P_W] = '0; in_pkt[P_W].dst = '{y: 1'b0, x: 2'd2};
    in_pkt[P_W].addr = 32'(P_W);
    sb[P_W][P_E].push_back(in_pkt[P_W]); sent++;
    @(posedge clk); #1; in_valid[P_W] = 0;
    checks++; if (!(out_valid[P_E])) begin failures++; $display("hop took more than one cycle"); end
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_valid[i] || in_ready[i]) begin : pick
          // new packet or idle
          in_valid[i] = 0;
          if ($urandom_range(2) != 0) begin
            automatic node_t d;
            do begin d.x = 2'($urandom_range(3)); d.y = 1'($urandom_range(1)); end
            while (i != P_L && exp_port(d) == i);   // no packet turns back
            in_pkt[i] = '0;
            in_pkt[i].dst = d;
            in_pkt[i].ptype = PKT_MSG;
            in_pkt[i].addr = {t[23:0], 5'd0, 3'(i)};
            in_pkt[i].data = {8{$urandom}};
            in_valid[i] = 1;
          end
        end
      end
      @(posedge clk);
      for (int i = 0; i < NPORTS; i++) if (in_valid[i] && in_ready[i]) begin
        sb[i][exp_port(in_pkt[i].dst)].push_back(in_pkt[i]); sent++;
      end
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) if (in_valid[i] && sb[i][exp_port(in_pkt[i].dst)].size() > 0 &&
          sb[i][exp_port(in_pkt[i].dst)][$] === in_pkt[i]) in_valid[i] = 0;
    end
    for (int i = 0; i < NPORTS; i++) in_valid[i] = 0;
    repeat (50) @(posedge clk);
    checks++; if (recv != sent) begin failures++; $display("sent %0d received %0d", sent, recv); end
    checks++; if (contention == 0) begin failures++; $display("no output contention seen"); end
    $display("packets %0d, contention cycles %0d", recv, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
