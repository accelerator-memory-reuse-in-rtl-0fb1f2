// Mesh network-on-chip router (the "R" nodes joining all tiles).
//
// Five ports: North, East, South, West and Local. Every packet is one wide
// flit (amr_pkg::noc_pkt_t). Each input has a small FIFO; the head flit is
// routed dimension-ordered (first along x, then along y; y grows towards
// South), which is deadlock-free on a mesh. Each output grants one input per
// cycle in round-robin order among the inputs whose head wants it, and the
// flit moves when the next hop's input is ready. A flit therefore takes one
// cycle per router. The document only names the router; topology, routing,
// buffering and flow control are this design's choices.
//
// Links: in_valid/in_ready/in_pkt and out_valid/out_ready/out_pkt per port,
// indexed by amr_pkg::P_N..P_L. MY is the router's own coordinate.
module noc_router
  import amr_pkg::*;
#(
  parameter node_t       MY         = '0,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid  [NPORTS],
  output logic     in_ready  [NPORTS],
  input  noc_pkt_t in_pkt    [NPORTS],
  output logic     out_valid [NPORTS],
  input  logic     out_ready [NPORTS],
  output noc_pkt_t out_pkt   [NPORTS]
);
  logic     hv   [NPORTS];   // head valid
  noc_pkt_t hp   [NPORTS];   // head packet
  logic     hpop [NPORTS];
  logic [2:0] want [NPORTS]; // output wanted by each input head

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    sync_fifo #(.T(noc_pkt_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in_data (in_pkt[i]),
      .out_valid(hv[i]),       .out_ready(hpop[i]),     .out_data(hp[i])
    );
  end

  function automatic logic [2:0] route(input node_t d);
    if (d.x > MY.x)      return 3'(P_E);
    else if (d.x < MY.x) return 3'(P_W);
    else if (d.y > MY.y) return 3'(P_S);
    else if (d.y < MY.y) return 3'(P_N);
    else                 return 3'(P_L);
  endfunction

  always_comb begin
    for (int i = 0; i < NPORTS; i++) want[i] = route(hp[i].dst);
  end

  // Round-robin arbitration per output.
  logic [2:0] prio  [NPORTS];   // input with highest priority at each output
  logic [2:0] grant [NPORTS];
  logic       gvalid[NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      gvalid[o] = 1'b0;
      grant[o]  = '0;
      for (int k = 0; k < NPORTS; k++) begin
        automatic int unsigned c = (int'(prio[o]) + k) % NPORTS;
        if (!gvalid[o] && hv[c] && want[c] == 3'(o)) begin
          gvalid[o] = 1'b1;
          grant[o]  = 3'(c);
        end
      end
      out_valid[o] = gvalid[o];
      out_pkt[o]   = hp[grant[o]];
    end
  end

  // Pop the granted heads whose next hop takes them.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) hpop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++)
      if (gvalid[o] && out_ready[o]) hpop[grant[o]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) prio[o] <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        if (gvalid[o] && out_ready[o])
          prio[o] <= (grant[o] == 3'(NPORTS - 1)) ? '0 : grant[o] + 3'd1;
    end
  end

  // A flit must never be sent back out of the port it came in on.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    if (i != P_L) begin : g_nl
      a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n) hv[i] |-> want[i] != 3'(i));
    end
  end
endmodule
