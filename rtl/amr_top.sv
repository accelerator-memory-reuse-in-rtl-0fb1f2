// Accelerator memory reuse system: four accelerator tiles whose memories can
// be lent to the GP-CPUs as an address-interleaved L3 cache.
//
// Six NoC nodes on a 3x2 mesh of noc_router instances (x to the right, y
// downwards):
//     (0,0) GP-CPU tile port  (1,0) acc tile 0  (2,0) acc tile 1
//     (0,1) DRAM controller   (1,1) acc tile 2  (2,1) acc tile 3
// The tiles stand for the four stages of the document's MPEG encoder
// (ReO, ME-fwd, ME-bwd, Enc+Dec), each with 512 KB of memory; tile 0 (ReO)
// has two 64-byte-wide banks, the others one. Slice i of the L3 is tile i,
// selected by address bits [16:15]. L3_SLICES (4, 2 or 1) sets how many
// tiles the L3 is interleaved over: 4 gives the document's main "2 MB L3"
// configuration, 1 its "512 KB L3" alternative (only tile 0 is a slice).
//
// The GP-CPU tile's shared L2 (l2_cache, 128 KB, 4 ways) is included when
// HAS_L2 = 1: the CPUs' L1s then use the cpu_* ports, and a line that no
// slice serves (its tile is an accelerator) is read from DRAM instead, so
// the document's configuration without an L3 runs too. With HAS_L2 = 0
// (default) the L2 is outside and uses the l2_* ports directly; a request
// to a tile that is not a slice is then answered with a NAK.
//
// Outside this module: the GP-CPUs with their L1 caches (cpu_* or, with an
// external L2, l2_*; cfg_* for configuration), the DRAM controller (dram_* is its router local
// port: dram_rx_* carries requests to it, dram_tx_* its answers) and each
// tile's accelerator logic (acc_* ports, indexed by tile and bank; bank 1
// exists only on tile 0, and its address there is 12 bits wide).
//
// Switching tile k to cache mode: the CPU writes 1 to register CFG_MODE of
// tile k through cfg_*; the tile invalidates its tags and answers L3 requests
// once cache_ready[k] is high. Writing 0 flushes the dirty lines to DRAM and
// returns the memory to the accelerator (mem_to_acc[k]).
module amr_top
  import amr_pkg::*;
#(
  parameter int unsigned TILE_MEM_BYTES = 524288,
  parameter int unsigned MEM_W_BYTES    = 64,
  parameter int unsigned REO_BANKS      = 2,
  parameter int unsigned WAYS           = 16,
  parameter int unsigned HIT_LATENCY    = 15,
  parameter int unsigned L3_SLICES      = 4,
  parameter bit          HAS_L2         = 1'b0,
  parameter int unsigned L2_BYTES       = 131072,
  parameter int unsigned L2_WAYS        = 4,
  localparam int unsigned NUM_ACC       = 4,
  localparam int unsigned MAXB          = 2,
  localparam int unsigned BAW           = $clog2(TILE_MEM_BYTES / MEM_W_BYTES),
  localparam int unsigned MW            = MEM_W_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // GP-CPU tile with HAS_L2 = 1: L1 line reads and write-through stores
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [31:0]       cpu_req_wdata,
  input  logic [3:0]        cpu_req_be,
  output logic              cpu_rsp_valid,
  output logic [LINE_W-1:0] cpu_rsp_data,
  // GP-CPU tile with HAS_L2 = 0: L2 misses / write-backs
  input  logic              l2_req_valid,
  output logic              l2_req_ready,
  input  mem_req_t          l2_req,
  output logic              l2_rsp_valid,
  output logic              l2_rsp_nak,
  output logic [LINE_W-1:0] l2_rsp_data,
  // configuration accesses from the GP-CPUs
  input  logic              cfg_req_valid,
  output logic              cfg_req_ready,
  input  node_t             cfg_req_tile,
  input  logic              cfg_req_we,
  input  logic [3:0]        cfg_req_addr,
  input  logic [31:0]       cfg_req_wdata,
  output logic              cfg_rsp_valid,
  output logic [31:0]       cfg_rsp_rdata,
  // DRAM controller node
  output logic              dram_rx_valid,
  input  logic              dram_rx_ready,
  output noc_pkt_t          dram_rx_pkt,
  input  logic              dram_tx_valid,
  output logic              dram_tx_ready,
  input  noc_pkt_t          dram_tx_pkt,
  // accelerator logic of each tile
  output logic                   mem_to_acc  [NUM_ACC],
  output logic                   cache_ready [NUM_ACC],
  output logic [7:0]             dvfs_level  [NUM_ACC],
  input  logic                   acc_m_en    [NUM_ACC][MAXB],
  input  logic                   acc_m_we    [NUM_ACC][MAXB],
  input  logic [BAW-1:0]         acc_m_addr  [NUM_ACC][MAXB],
  input  logic [MEM_W_BYTES-1:0] acc_m_be    [NUM_ACC][MAXB],
  input  logic [MW-1:0]          acc_m_wdata [NUM_ACC][MAXB],
  output logic [MW-1:0]          acc_m_rdata [NUM_ACC][MAXB],
  input  logic                   acc_mo_valid [NUM_ACC],
  output logic                   acc_mo_ready [NUM_ACC],
  input  node_t                  acc_mo_dst   [NUM_ACC],
  input  logic [LINE_W-1:0]      acc_mo_data  [NUM_ACC],
  output logic                   acc_mi_valid [NUM_ACC],
  input  logic                   acc_mi_ready [NUM_ACC],
  output node_t                  acc_mi_src   [NUM_ACC],
  output logic [LINE_W-1:0]      acc_mi_data  [NUM_ACC],
  input  logic                   acc_sh_req_valid [NUM_ACC],
  output logic                   acc_sh_req_ready [NUM_ACC],
  input  logic                   acc_sh_req_we    [NUM_ACC],
  input  logic [ADDR_W-1:0]      acc_sh_req_addr  [NUM_ACC],
  input  logic [LINE_W-1:0]      acc_sh_req_wdata [NUM_ACC],
  output logic                   acc_sh_rsp_valid [NUM_ACC],
  output logic [LINE_W-1:0]      acc_sh_rsp_data  [NUM_ACC]
);
  localparam int unsigned MX = 3, MY_N = 2, NN = MX * MY_N;
  localparam node_t CPU_NODE  = '{y: 1'b0, x: 2'd0};
  localparam node_t DRAM_NODE = '{y: 1'b1, x: 2'd0};
  localparam node_t ACC_NODE [NUM_ACC] = '{'{y: 1'b0, x: 2'd1}, '{y: 1'b0, x: 2'd2},
                                          '{y: 1'b1, x: 2'd1}, '{y: 1'b1, x: 2'd2}};

  // Router port signals, indexed by node n = y*MX + x.
  logic     ri_valid [NN][NPORTS];
  logic     ri_ready [NN][NPORTS];
  noc_pkt_t ri_pkt   [NN][NPORTS];
  logic     ro_valid [NN][NPORTS];
  logic     ro_ready [NN][NPORTS];
  noc_pkt_t ro_pkt   [NN][NPORTS];

  for (genvar y = 0; y < MY_N; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      localparam int n = y * MX + x;
      noc_router #(.MY('{y: 1'(y), x: 2'(x)})) u_r (
        .clk, .rst_n,
        .in_valid(ri_valid[n]), .in_ready(ri_ready[n]), .in_pkt(ri_pkt[n]),
        .out_valid(ro_valid[n]), .out_ready(ro_ready[n]), .out_pkt(ro_pkt[n])
      );
      // East / West links
      if (x < MX - 1) begin : g_ew
        assign ri_valid[n+1][P_W] = ro_valid[n][P_E];
        assign ri_pkt[n+1][P_W]   = ro_pkt[n][P_E];
        assign ro_ready[n][P_E]   = ri_ready[n+1][P_W];
        assign ri_valid[n][P_E]   = ro_valid[n+1][P_W];
        assign ri_pkt[n][P_E]     = ro_pkt[n+1][P_W];
        assign ro_ready[n+1][P_W] = ri_ready[n][P_E];
      end else begin : g_eedge
        assign ri_valid[n][P_E] = 1'b0;
        assign ri_pkt[n][P_E]   = '0;
        assign ro_ready[n][P_E] = 1'b1;
      end
      if (x == 0) begin : g_wedge
        assign ri_valid[n][P_W] = 1'b0;
        assign ri_pkt[n][P_W]   = '0;
        assign ro_ready[n][P_W] = 1'b1;
      end
      // North / South links
      if (y < MY_N - 1) begin : g_ns
        assign ri_valid[n+MX][P_N] = ro_valid[n][P_S];
        assign ri_pkt[n+MX][P_N]   = ro_pkt[n][P_S];
        assign ro_ready[n][P_S]    = ri_ready[n+MX][P_N];
        assign ri_valid[n][P_S]    = ro_valid[n+MX][P_N];
        assign ri_pkt[n][P_S]      = ro_pkt[n+MX][P_N];
        assign ro_ready[n+MX][P_N] = ri_ready[n][P_S];
      end else begin : g_sedge
        assign ri_valid[n][P_S] = 1'b0;
        assign ri_pkt[n][P_S]   = '0;
        assign ro_ready[n][P_S] = 1'b1;
      end
      if (y == 0) begin : g_nedge
        assign ri_valid[n][P_N] = 1'b0;
        assign ri_pkt[n][P_N]   = '0;
        assign ro_ready[n][P_N] = 1'b1;
      end
    end
  end

  // GP-CPU tile: the shared L2 (HAS_L2 = 1) or the external L2's ports, then
  // the port towards the L3 slices.
  localparam int CN = 0, DN = MX;
  logic              p_req_valid, p_req_ready, p_rsp_valid, p_rsp_nak;
  mem_req_t          p_req;
  logic [LINE_W-1:0] p_rsp_data;

  if (HAS_L2) begin : g_l2
    l2_cache #(.L2_BYTES(L2_BYTES), .WAYS(L2_WAYS)) u_l2 (
      .clk, .rst_n,
      .cpu_req_valid, .cpu_req_ready, .cpu_req_we, .cpu_req_addr, .cpu_req_wdata,
      .cpu_req_be, .cpu_rsp_valid, .cpu_rsp_data,
      .mem_req_valid(p_req_valid), .mem_req_ready(p_req_ready), .mem_req(p_req),
      .mem_rsp_valid(p_rsp_valid), .mem_rsp_nak(p_rsp_nak), .mem_rsp_data(p_rsp_data)
    );
    assign l2_req_ready = 1'b0;
    assign l2_rsp_valid = 1'b0;
    assign l2_rsp_nak   = 1'b0;
    assign l2_rsp_data  = '0;
  end else begin : g_no_l2
    assign p_req_valid   = l2_req_valid;
    assign l2_req_ready  = p_req_ready;
    assign p_req         = l2_req;
    assign l2_rsp_valid  = p_rsp_valid;
    assign l2_rsp_nak    = p_rsp_nak;
    assign l2_rsp_data   = p_rsp_data;
    assign cpu_req_ready = 1'b0;
    assign cpu_rsp_valid = 1'b0;
    assign cpu_rsp_data  = '0;
  end

  localparam int unsigned SLICE_LSB = OFF_W + $clog2(TILE_MEM_BYTES / LINE_BYTES / WAYS);
  if (L3_SLICES == 4) begin : g_l3_4
    cpu_llc_port #(.MY(CPU_NODE), .NUM_SLICES(4), .SLICE_LSB(SLICE_LSB),
                   .NAK_TO_DRAM(HAS_L2), .DRAM_NODE(DRAM_NODE),
                   .SLICE_NODES({ACC_NODE[3], ACC_NODE[2], ACC_NODE[1], ACC_NODE[0]})) u_cpu (
      .clk, .rst_n,
      .l2_req_valid(p_req_valid), .l2_req_ready(p_req_ready), .l2_req(p_req),
      .l2_rsp_valid(p_rsp_valid), .l2_rsp_nak(p_rsp_nak), .l2_rsp_data(p_rsp_data),
      .cfg_req_valid, .cfg_req_ready, .cfg_req_tile, .cfg_req_we, .cfg_req_addr, .cfg_req_wdata,
      .cfg_rsp_valid, .cfg_rsp_rdata,
      .out_valid(ri_valid[CN][P_L]), .out_ready(ri_ready[CN][P_L]), .out_pkt(ri_pkt[CN][P_L]),
      .in_valid(ro_valid[CN][P_L]), .in_ready(ro_ready[CN][P_L]), .in_pkt(ro_pkt[CN][P_L])
    );

  end else if (L3_SLICES == 2) begin : g_l3_2
    cpu_llc_port #(.MY(CPU_NODE), .NUM_SLICES(2), .SLICE_LSB(SLICE_LSB),
                   .NAK_TO_DRAM(HAS_L2), .DRAM_NODE(DRAM_NODE),
                   .SLICE_NODES({ACC_NODE[1], ACC_NODE[0]})) u_cpu (
      .clk, .rst_n,
      .l2_req_valid(p_req_valid), .l2_req_ready(p_req_ready), .l2_req(p_req),
      .l2_rsp_valid(p_rsp_valid), .l2_rsp_nak(p_rsp_nak), .l2_rsp_data(p_rsp_data),
      .cfg_req_valid, .cfg_req_ready, .cfg_req_tile, .cfg_req_we, .cfg_req_addr, .cfg_req_wdata,
      .cfg_rsp_valid, .cfg_rsp_rdata,
      .out_valid(ri_valid[CN][P_L]), .out_ready(ri_ready[CN][P_L]), .out_pkt(ri_pkt[CN][P_L]),
      .in_valid(ro_valid[CN][P_L]), .in_ready(ro_ready[CN][P_L]), .in_pkt(ro_pkt[CN][P_L])
    );

  end else begin : g_l3_1
    cpu_llc_port #(.MY(CPU_NODE), .NUM_SLICES(1), .SLICE_LSB(SLICE_LSB),
                   .NAK_TO_DRAM(HAS_L2), .DRAM_NODE(DRAM_NODE),
                   .SLICE_NODES(ACC_NODE[0])) u_cpu (
      .clk, .rst_n,
      .l2_req_valid(p_req_valid), .l2_req_ready(p_req_ready), .l2_req(p_req),
      .l2_rsp_valid(p_rsp_valid), .l2_rsp_nak(p_rsp_nak), .l2_rsp_data(p_rsp_data),
      .cfg_req_valid, .cfg_req_ready, .cfg_req_tile, .cfg_req_we, .cfg_req_addr, .cfg_req_wdata,
      .cfg_rsp_valid, .cfg_rsp_rdata,
      .out_valid(ri_valid[CN][P_L]), .out_ready(ri_ready[CN][P_L]), .out_pkt(ri_pkt[CN][P_L]),
      .in_valid(ro_valid[CN][P_L]), .in_ready(ro_ready[CN][P_L]), .in_pkt(ro_pkt[CN][P_L])
    );

  end

  // DRAM controller node
  assign dram_rx_valid       = ro_valid[DN][P_L];
  assign dram_rx_pkt         = ro_pkt[DN][P_L];
  assign ro_ready[DN][P_L]   = dram_rx_ready;
  assign ri_valid[DN][P_L]   = dram_tx_valid;
  assign ri_pkt[DN][P_L]     = dram_tx_pkt;
  assign dram_tx_ready       = ri_ready[DN][P_L];

  // Accelerator tiles
  for (genvar k = 0; k < NUM_ACC; k++) begin : g_acc
    localparam int unsigned NB   = (k == 0) ? REO_BANKS : 1;
    localparam int unsigned TBAW = $clog2(TILE_MEM_BYTES / MEM_W_BYTES / NB);
    localparam int          n    = int'(ACC_NODE[k].y) * MX + int'(ACC_NODE[k].x);

    logic                   m_en    [NB];
    logic                   m_we    [NB];
    logic [TBAW-1:0]        m_addr  [NB];
    logic [MEM_W_BYTES-1:0] m_be    [NB];
    logic [MW-1:0]          m_wdata [NB];
    logic [MW-1:0]          m_rdata [NB];

    for (genvar b = 0; b < MAXB; b++) begin : g_b
      if (b < NB) begin : g_used
        assign m_en[b]    = acc_m_en[k][b];
        assign m_we[b]    = acc_m_we[k][b];
        assign m_addr[b]  = TBAW'(acc_m_addr[k][b]);
        assign m_be[b]    = acc_m_be[k][b];
        assign m_wdata[b] = acc_m_wdata[k][b];
        assign acc_m_rdata[k][b] = m_rdata[b];
      end else begin : g_unused
        assign acc_m_rdata[k][b] = '0;
      end
    end

    acc_tile #(.MY(ACC_NODE[k]), .DRAM_NODE(DRAM_NODE), .MEM_BYTES(TILE_MEM_BYTES),
               .MEM_W_BYTES(MEM_W_BYTES), .NUM_BANKS(NB), .WAYS(WAYS),
               .HIT_LATENCY(HIT_LATENCY)) u_tile (
      .clk, .rst_n,
      .in_valid(ro_valid[n][P_L]), .in_ready(ro_ready[n][P_L]), .in_pkt(ro_pkt[n][P_L]),
      .out_valid(ri_valid[n][P_L]), .out_ready(ri_ready[n][P_L]), .out_pkt(ri_pkt[n][P_L]),
      .mem_to_acc(mem_to_acc[k]),
      .acc_m_en(m_en), .acc_m_we(m_we), .acc_m_addr(m_addr), .acc_m_be(m_be),
      .acc_m_wdata(m_wdata), .acc_m_rdata(m_rdata),
      .acc_mo_valid(acc_mo_valid[k]), .acc_mo_ready(acc_mo_ready[k]), .acc_mo_dst(acc_mo_dst[k]),
      .acc_mo_data(acc_mo_data[k]), .acc_mi_valid(acc_mi_valid[k]), .acc_mi_ready(acc_mi_ready[k]),
      .acc_mi_src(acc_mi_src[k]), .acc_mi_data(acc_mi_data[k]),
      .acc_sh_req_valid(acc_sh_req_valid[k]), .acc_sh_req_ready(acc_sh_req_ready[k]),
      .acc_sh_req_we(acc_sh_req_we[k]), .acc_sh_req_addr(acc_sh_req_addr[k]),
      .acc_sh_req_wdata(acc_sh_req_wdata[k]), .acc_sh_rsp_valid(acc_sh_rsp_valid[k]),
      .acc_sh_rsp_data(acc_sh_rsp_data[k]), .dvfs_level(dvfs_level[k]), .cache_ready(cache_ready[k])
    );
  end
endmodule
