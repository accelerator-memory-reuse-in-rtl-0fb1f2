// Cache manager of an accelerator tile.
//
// Joins the three parts the document breaks the cache manager into: the tag
// array (cm_tag_array), the control (cm_control) and the adapter
// (cm_adapter), the only part that depends on the accelerator's memory
// organisation. Together they let the tile's memory act as one NUCA slice of
// the L3: line requests come in from the network interface, fills and
// write-backs go out to the DRAM controller through it, and the memory banks
// are driven through the adapter's m_* ports. A line with set s in way w is
// kept at line slot s*WAYS + w of the tile memory (this design's choice).
//
// Timing: answers at least HIT_LATENCY cycles after a request is accepted;
// see cm_control for the modes and the flush.
module cache_manager
  import amr_pkg::*;
#(
  parameter int unsigned MEM_BYTES   = 524288,
  parameter int unsigned MEM_W_BYTES = 64,
  parameter int unsigned NUM_BANKS   = 1,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned HIT_LATENCY = 15,
  localparam int unsigned SETS       = MEM_BYTES / LINE_BYTES / WAYS,
  localparam int unsigned BAW        = $clog2(MEM_BYTES / MEM_W_BYTES / NUM_BANKS),
  localparam int unsigned MW         = MEM_W_BYTES * 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cache_en,
  output logic             cache_ready,
  output logic             mem_to_cache,
  input  logic             req_valid,
  output logic             req_ready,
  input  cm_req_t          req,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output cm_rsp_t          rsp,
  output logic             dram_req_valid,
  input  logic             dram_req_ready,
  output mem_req_t         dram_req,
  input  logic             dram_rsp_valid,
  output logic             dram_rsp_ready,
  input  logic [LINE_W-1:0] dram_rsp_data,
  output logic                   m_en    [NUM_BANKS],
  output logic                   m_we    [NUM_BANKS],
  output logic [BAW-1:0]         m_addr  [NUM_BANKS],
  output logic [MEM_W_BYTES-1:0] m_be    [NUM_BANKS],
  output logic [MW-1:0]          m_wdata [NUM_BANKS],
  input  logic [MW-1:0]          m_rdata [NUM_BANKS]
);
  localparam int unsigned SW     = $clog2(SETS);
  localparam int unsigned WW     = $clog2(WAYS);
  localparam int unsigned TAG_W  = ADDR_W - SW - OFF_W;
  localparam int unsigned SLOT_W = SW + WW;

  logic             ta_rd_en, ta_hit, ta_victim_valid, ta_victim_dirty;
  logic [SW-1:0]    ta_rd_set, ta_clr_set;
  logic [TAG_W-1:0] ta_rd_tag, ta_victim_tag, ta_upd_tag;
  logic [WW-1:0]    ta_hit_way, ta_victim_way, ta_upd_way;
  logic             ta_way_valid [WAYS];
  logic             ta_way_dirty [WAYS];
  logic [TAG_W-1:0] ta_way_tag   [WAYS];
  logic             ta_upd_en, ta_upd_valid, ta_upd_dirty, ta_upd_touch, ta_clr_en;
  logic             ad_req_valid, ad_req_ready, ad_req_we, ad_rsp_valid;
  logic [SLOT_W-1:0] ad_req_slot;
  logic [LINE_W-1:0] ad_req_wdata, ad_rsp_rdata;

  cm_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_en(ta_rd_en), .rd_set(ta_rd_set), .rd_tag(ta_rd_tag),
    .hit(ta_hit), .hit_way(ta_hit_way), .victim_way(ta_victim_way),
    .victim_valid(ta_victim_valid), .victim_dirty(ta_victim_dirty), .victim_tag(ta_victim_tag),
    .way_valid(ta_way_valid), .way_dirty(ta_way_dirty), .way_tag(ta_way_tag),
    .upd_en(ta_upd_en), .upd_way(ta_upd_way), .upd_valid(ta_upd_valid), .upd_dirty(ta_upd_dirty),
    .upd_tag(ta_upd_tag), .upd_touch(ta_upd_touch), .clr_en(ta_clr_en), .clr_set(ta_clr_set)
  );

  cm_control #(.SETS(SETS), .WAYS(WAYS), .HIT_LATENCY(HIT_LATENCY)) u_ctrl (
    .clk, .rst_n, .cache_en, .cache_ready, .mem_to_cache,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .dram_req_valid, .dram_req_ready, .dram_req, .dram_rsp_valid, .dram_rsp_ready, .dram_rsp_data,
    .ta_rd_en, .ta_rd_set, .ta_rd_tag, .ta_hit, .ta_hit_way, .ta_victim_way, .ta_victim_valid,
    .ta_victim_dirty, .ta_victim_tag, .ta_way_valid, .ta_way_dirty, .ta_way_tag,
    .ta_upd_en, .ta_upd_way, .ta_upd_valid, .ta_upd_dirty, .ta_upd_tag, .ta_upd_touch,
    .ta_clr_en, .ta_clr_set,
    .ad_req_valid, .ad_req_ready, .ad_req_we, .ad_req_slot, .ad_req_wdata, .ad_rsp_valid, .ad_rsp_rdata
  );

  cm_adapter #(.LINE_BYTES(LINE_BYTES), .MEM_W_BYTES(MEM_W_BYTES), .NUM_BANKS(NUM_BANKS),
               .MEM_BYTES(MEM_BYTES)) u_adapter (
    .clk, .rst_n,
    .req_valid(ad_req_valid), .req_ready(ad_req_ready), .req_we(ad_req_we), .req_slot(ad_req_slot),
    .req_wdata(ad_req_wdata), .rsp_valid(ad_rsp_valid), .rsp_rdata(ad_rsp_rdata),
    .m_en, .m_we, .m_addr, .m_be, .m_wdata, .m_rdata
  );
endmodule
