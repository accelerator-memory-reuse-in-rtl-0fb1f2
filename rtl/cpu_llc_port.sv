// NoC port of the GP-CPU tile towards the L3 slices.
//
// L2 misses and L2 write-backs (l2_req_*: a 32-byte line read or write)
// are sent to the L3 slice that owns the line. Lines are interleaved over the
// NUM_SLICES slices by address: the slice number is the lowest tag bits,
// address bits [SLICE_LSB +: log2(NUM_SLICES)], just above the set index
// (5 offset + 10 index bits, so bits [16:15] for four slices); SLICE_NODES
// gives each slice's node. With a power-of-two number of slices this is a
// plain bit selection, as the document intends. The answer comes back on
// l2_rsp_* (data for a read; l2_rsp_nak set if the slice was not in cache
// mode). The port also carries the CPU's configuration accesses to any tile
// (cfg_*), which is how the software switches a tile between accelerator
// and cache-slice mode.
//
// With NAK_TO_DRAM = 1 a refused line request is not reported: the port
// sends it again to the DRAM controller (DRAM_NODE) as a memory read or
// write and answers with the DRAM's reply. This lets the CPU tile's L2 run
// when only some or none of the tiles are L3 slices (the document's
// configurations without an L3); a line cannot be stale in DRAM here,
// because a slice refuses requests only once its flush is complete.
//
// One transaction (a line request or a configuration access) is in flight
// at a time; the ready signals are low until its answer has come back. This
// blocking behaviour and the DRAM fallback are this design's choices.
module cpu_llc_port
  import amr_pkg::*;
#(
  parameter node_t       MY          = '0,
  parameter int unsigned NUM_SLICES  = 4,
  parameter int unsigned SLICE_LSB   = 15,
  parameter node_t [NUM_SLICES-1:0] SLICE_NODES = '0,
  parameter bit          NAK_TO_DRAM = 1'b0,
  parameter node_t       DRAM_NODE   = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // L2 miss side
  input  logic              l2_req_valid,
  output logic              l2_req_ready,
  input  mem_req_t          l2_req,
  output logic              l2_rsp_valid,
  output logic              l2_rsp_nak,
  output logic [LINE_W-1:0] l2_rsp_data,
  // configuration access to a tile
  input  logic              cfg_req_valid,
  output logic              cfg_req_ready,
  input  node_t             cfg_req_tile,
  input  logic              cfg_req_we,
  input  logic [3:0]        cfg_req_addr,
  input  logic [31:0]       cfg_req_wdata,
  output logic              cfg_rsp_valid,
  output logic [31:0]       cfg_rsp_rdata,
  // router local port
  output logic              out_valid,
  input  logic              out_ready,
  output noc_pkt_t          out_pkt,
  input  logic              in_valid,
  output logic              in_ready,
  input  noc_pkt_t          in_pkt
);
  localparam int unsigned SLW = (NUM_SLICES > 1) ? $clog2(NUM_SLICES) : 1;

  typedef enum logic [1:0] {P_IDLE, P_SEND, P_WAIT} port_state_e;
  port_state_e state;
  noc_pkt_t    pkt;
  logic        is_cfg;

  function automatic node_t slice_of(input logic [ADDR_W-1:0] a);
    if (NUM_SLICES > 1) return SLICE_NODES[a[SLICE_LSB +: SLW]];
    else                return SLICE_NODES[0];
  endfunction

  assign cfg_req_ready = (state == P_IDLE);
  assign l2_req_ready  = (state == P_IDLE) && !cfg_req_valid;
  assign out_valid     = (state == P_SEND);
  assign out_pkt       = pkt;
  assign in_ready      = 1'b1;

  // A NAK to a line request is retried at DRAM when NAK_TO_DRAM is set.
  wire retry  = NAK_TO_DRAM && (state == P_WAIT) && in_valid && !is_cfg &&
                (in_pkt.ptype == PKT_CACHE_NAK);
  wire answer = (state == P_WAIT) && in_valid && !retry;
  assign l2_rsp_valid  = answer && !is_cfg;
  assign l2_rsp_nak    = (in_pkt.ptype == PKT_CACHE_NAK);
  assign l2_rsp_data   = in_pkt.data;
  assign cfg_rsp_valid = answer && is_cfg;
  assign cfg_rsp_rdata = in_pkt.data[31:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= P_IDLE;
      is_cfg <= 1'b0;
    end else begin
      unique case (state)
        P_IDLE: if (cfg_req_valid) begin
                  pkt.ptype <= cfg_req_we ? PKT_CFG_WR : PKT_CFG_RD;
                  pkt.src   <= MY;
                  pkt.dst   <= cfg_req_tile;
                  pkt.id    <= 1'b0;
                  pkt.addr  <= {28'd0, cfg_req_addr};
                  pkt.data  <= {{(LINE_W-32){1'b0}}, cfg_req_wdata};
                  is_cfg    <= 1'b1;
                  state     <= P_SEND;
                end else if (l2_req_valid) begin
                  pkt.ptype <= l2_req.we ? PKT_CACHE_WR : PKT_CACHE_RD;
                  pkt.src   <= MY;
                  pkt.dst   <= slice_of(l2_req.addr);
                  pkt.id    <= ID_CACHE;
                  pkt.addr  <= {l2_req.addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
                  pkt.data  <= l2_req.data;
                  is_cfg    <= 1'b0;
                  state     <= P_SEND;
                end
        P_SEND: if (out_ready) state <= P_WAIT;
        P_WAIT: if (retry) begin
                  pkt.ptype <= (pkt.ptype == PKT_CACHE_WR) ? PKT_MEM_WR : PKT_MEM_RD;
                  pkt.dst   <= DRAM_NODE;
                  state     <= P_SEND;
                end else if (in_valid) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  // Only answers to the transaction in flight may arrive.
  a_expected: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> state == P_WAIT);
endmodule
