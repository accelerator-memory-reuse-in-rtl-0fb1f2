// Accelerator tile.
//
// One NoC node holding an accelerator's memory, its cache manager and its
// network interface. The accelerator logic itself (an MPEG encoder stage in
// the document's prototype) is outside this module: it connects through the
// acc_* ports. The tile's mode register (written over the NoC) decides who
// uses the memory banks:
//   accelerator mode: the accelerator drives acc_m_* and reads acc_m_rdata;
//   cache mode:       the cache manager drives the banks through its adapter
//                     and the tile is one L3 slice; acc_m_* is ignored.
// mem_to_acc tells the accelerator logic when it owns the memory: it is
// withdrawn as soon as cache mode is asked for and given back only after the
// flush that ends cache mode (see cm_control). The per-bank memory size is
// MEM_BYTES/NUM_BANKS with MEM_W_BYTES-wide words (the MPEG tiles: 512 KB,
// 64-byte words; the ReO tile has two banks).
module acc_tile
  import amr_pkg::*;
#(
  parameter node_t       MY          = '0,
  parameter node_t       DRAM_NODE   = '0,
  parameter int unsigned MEM_BYTES   = 524288,
  parameter int unsigned MEM_W_BYTES = 64,
  parameter int unsigned NUM_BANKS   = 1,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned HIT_LATENCY = 15,
  parameter bit          HAS_SHMEM   = 1'b1,
  localparam int unsigned BDEPTH     = MEM_BYTES / MEM_W_BYTES / NUM_BANKS,
  localparam int unsigned BAW        = $clog2(BDEPTH),
  localparam int unsigned MW         = MEM_W_BYTES * 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // router local port
  input  logic                   in_valid,
  output logic                   in_ready,
  input  noc_pkt_t               in_pkt,
  output logic                   out_valid,
  input  logic                   out_ready,
  output noc_pkt_t               out_pkt,
  // accelerator logic: memory banks
  output logic                   mem_to_acc,
  input  logic                   acc_m_en    [NUM_BANKS],
  input  logic                   acc_m_we    [NUM_BANKS],
  input  logic [BAW-1:0]         acc_m_addr  [NUM_BANKS],
  input  logic [MEM_W_BYTES-1:0] acc_m_be    [NUM_BANKS],
  input  logic [MW-1:0]          acc_m_wdata [NUM_BANKS],
  output logic [MW-1:0]          acc_m_rdata [NUM_BANKS],
  // accelerator logic: NI services
  input  logic                   acc_mo_valid,
  output logic                   acc_mo_ready,
  input  node_t                  acc_mo_dst,
  input  logic [LINE_W-1:0]      acc_mo_data,
  output logic                   acc_mi_valid,
  input  logic                   acc_mi_ready,
  output node_t                  acc_mi_src,
  output logic [LINE_W-1:0]      acc_mi_data,
  input  logic                   acc_sh_req_valid,
  output logic                   acc_sh_req_ready,
  input  logic                   acc_sh_req_we,
  input  logic [ADDR_W-1:0]      acc_sh_req_addr,
  input  logic [LINE_W-1:0]      acc_sh_req_wdata,
  output logic                   acc_sh_rsp_valid,
  output logic [LINE_W-1:0]      acc_sh_rsp_data,
  output logic [7:0]             dvfs_level,
  output logic                   cache_ready
);
  logic     cm_req_valid, cm_req_ready, cm_rsp_valid, cm_rsp_ready;
  cm_req_t  cm_req;
  cm_rsp_t  cm_rsp;
  logic     cm_dram_req_valid, cm_dram_req_ready, cm_dram_rsp_valid, cm_dram_rsp_ready;
  mem_req_t cm_dram_req;
  logic [LINE_W-1:0] cm_dram_rsp_data;
  logic     mode_cache, mem_to_cache;

  logic                   c_en    [NUM_BANKS];
  logic                   c_we    [NUM_BANKS];
  logic [BAW-1:0]         c_addr  [NUM_BANKS];
  logic [MEM_W_BYTES-1:0] c_be    [NUM_BANKS];
  logic [MW-1:0]          c_wdata [NUM_BANKS];
  logic [MW-1:0]          rdata   [NUM_BANKS];

  network_interface #(.MY(MY), .DRAM_NODE(DRAM_NODE), .HAS_SHMEM(HAS_SHMEM)) u_ni (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready, .out_pkt,
    .cm_req_valid, .cm_req_ready, .cm_req, .cm_rsp_valid, .cm_rsp_ready, .cm_rsp,
    .cm_dram_req_valid, .cm_dram_req_ready, .cm_dram_req,
    .cm_dram_rsp_valid, .cm_dram_rsp_ready, .cm_dram_rsp_data,
    .st_cache_ready(cache_ready), .st_mem_to_cache(mem_to_cache), .mode_cache, .dvfs_level,
    .acc_mo_valid, .acc_mo_ready, .acc_mo_dst, .acc_mo_data,
    .acc_mi_valid, .acc_mi_ready, .acc_mi_src, .acc_mi_data,
    .acc_sh_req_valid, .acc_sh_req_ready, .acc_sh_req_we, .acc_sh_req_addr, .acc_sh_req_wdata,
    .acc_sh_rsp_valid, .acc_sh_rsp_data
  );

  cache_manager #(.MEM_BYTES(MEM_BYTES), .MEM_W_BYTES(MEM_W_BYTES), .NUM_BANKS(NUM_BANKS),
                  .WAYS(WAYS), .HIT_LATENCY(HIT_LATENCY)) u_cm (
    .clk, .rst_n, .cache_en(mode_cache), .cache_ready, .mem_to_cache,
    .req_valid(cm_req_valid), .req_ready(cm_req_ready), .req(cm_req),
    .rsp_valid(cm_rsp_valid), .rsp_ready(cm_rsp_ready), .rsp(cm_rsp),
    .dram_req_valid(cm_dram_req_valid), .dram_req_ready(cm_dram_req_ready), .dram_req(cm_dram_req),
    .dram_rsp_valid(cm_dram_rsp_valid), .dram_rsp_ready(cm_dram_rsp_ready), .dram_rsp_data(cm_dram_rsp_data),
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_be(c_be), .m_wdata(c_wdata), .m_rdata(rdata)
  );

  assign mem_to_acc = !mem_to_cache && !mode_cache;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic           en, we;
    logic [BAW-1:0] addr;
    logic [MEM_W_BYTES-1:0] be;
    logic [MW-1:0]  wdata;
    always_comb begin
      if (mem_to_cache) begin
        en = c_en[b]; we = c_we[b]; addr = c_addr[b]; be = c_be[b]; wdata = c_wdata[b];
      end else begin
        en = acc_m_en[b] && mem_to_acc; we = acc_m_we[b]; addr = acc_m_addr[b];
        be = acc_m_be[b]; wdata = acc_m_wdata[b];
      end
    end
    acc_mem #(.DEPTH(BDEPTH), .W_BYTES(MEM_W_BYTES)) u_mem (
      .clk, .en, .we, .addr, .be, .wdata, .rdata(rdata[b])
    );
    assign acc_m_rdata[b] = rdata[b];
  end
endmodule
