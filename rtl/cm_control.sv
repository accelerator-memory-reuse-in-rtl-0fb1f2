// Control logic of the cache manager: makes a tile's memory an L3 cache slice.
//
// Modes. While cache_en is low the memory belongs to the accelerator
// (mem_to_cache = 0) and every cache request is answered with a NAK. When
// cache_en rises the control invalidates all sets (one per cycle, since the
// memory holds accelerator data, not cache lines) and then raises
// cache_ready. When cache_en falls it finishes the current request, then
// flushes: every dirty line is written back to DRAM (each write acknowledged)
// and every set is invalidated; only then is the memory handed back.
//
// Requests (req_*, one at a time) are line reads and whole-line writes (the
// L2's write-backs). A lookup in the tag array decides:
//   hit  read : line read from memory through the adapter; way made MRU.
//   hit  write: line written, way marked dirty and made MRU.
//   miss      : the LRU (or an invalid) way is the victim; a dirty victim is
//               read and written back to DRAM first. A read then fetches the
//               line from DRAM (dram_req, answered on dram_rsp), stores it and
//               returns it; a write stores its line as dirty without a fill.
// An answer (rsp_*) is never given before HIT_LATENCY cycles after the
// request was accepted: the document sets the slices to complete a request
// in 15 cycles. A miss adds the DRAM round trips on top.
//
// The document gives the function (tags, lookups, LRU, 15-cycle requests,
// flush before returning to accelerator mode with a write-back slice); the
// state machine, the NAK and the no-fill write allocation are this design's.
module cm_control
  import amr_pkg::*;
#(
  parameter int unsigned SETS        = 1024,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned HIT_LATENCY = 15,
  localparam int unsigned SW         = $clog2(SETS),
  localparam int unsigned WW         = $clog2(WAYS),
  localparam int unsigned TAG_W      = ADDR_W - SW - OFF_W,
  localparam int unsigned SLOT_W     = SW + WW
) (
  input  logic             clk,
  input  logic             rst_n,
  // mode
  input  logic             cache_en,
  output logic             cache_ready,
  output logic             mem_to_cache,
  // requests from the network interface
  input  logic             req_valid,
  output logic             req_ready,
  input  cm_req_t          req,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output cm_rsp_t          rsp,
  // DRAM traffic through the network interface
  output logic             dram_req_valid,
  input  logic             dram_req_ready,
  output mem_req_t         dram_req,
  input  logic             dram_rsp_valid,
  output logic             dram_rsp_ready,
  input  logic [LINE_W-1:0] dram_rsp_data,
  // tag array
  output logic             ta_rd_en,
  output logic [SW-1:0]    ta_rd_set,
  output logic [TAG_W-1:0] ta_rd_tag,
  input  logic             ta_hit,
  input  logic [WW-1:0]    ta_hit_way,
  input  logic [WW-1:0]    ta_victim_way,
  input  logic             ta_victim_valid,
  input  logic             ta_victim_dirty,
  input  logic [TAG_W-1:0] ta_victim_tag,
  input  logic             ta_way_valid [WAYS],
  input  logic             ta_way_dirty [WAYS],
  input  logic [TAG_W-1:0] ta_way_tag   [WAYS],
  output logic             ta_upd_en,
  output logic [WW-1:0]    ta_upd_way,
  output logic             ta_upd_valid,
  output logic             ta_upd_dirty,
  output logic [TAG_W-1:0] ta_upd_tag,
  output logic             ta_upd_touch,
  output logic             ta_clr_en,
  output logic [SW-1:0]    ta_clr_set,
  // adapter
  output logic             ad_req_valid,
  input  logic             ad_req_ready,
  output logic             ad_req_we,
  output logic [SLOT_W-1:0] ad_req_slot,
  output logic [LINE_W-1:0] ad_req_wdata,
  input  logic             ad_rsp_valid,
  input  logic [LINE_W-1:0] ad_rsp_rdata
);
  typedef enum logic [4:0] {
    S_ACCEL, S_INIT, S_IDLE, S_TAGCHK, S_WB_RD, S_WB_SEND, S_WB_ACK,
    S_MISS, S_FILL_SEND, S_FILL_WAIT, S_DATA, S_RESP, S_NAK,
    S_FL_RD, S_FL_SCAN, S_FL_DATA, S_FL_SEND, S_FL_ACK, S_FL_CLR
  } state_e;

  state_e           state;
  cm_req_t          cur;
  logic [SW-1:0]    set_i;      // init / flush set counter
  logic [WW-1:0]    way_i;      // flush way counter, also the chosen way
  logic [LINE_W-1:0] line;      // data being moved
  logic [TAG_W-1:0] vtag;       // victim / flushed tag
  logic [15:0]      lat;        // cycles since the request was accepted

  wire [SW-1:0]    cur_set = cur.addr[OFF_W +: SW];
  wire [TAG_W-1:0] cur_tag = cur.addr[ADDR_W-1 -: TAG_W];

  function automatic logic [SLOT_W-1:0] slot(input logic [SW-1:0] s, input logic [WW-1:0] w);
    return {s, w};
  endfunction

  assign mem_to_cache = (state != S_ACCEL);
  assign cache_ready  = (state == S_IDLE) && cache_en;
  assign req_ready    = (state == S_ACCEL) || ((state == S_IDLE) && cache_en);

  always_comb begin
    ta_rd_en = 1'b0; ta_rd_set = req.addr[OFF_W +: SW]; ta_rd_tag = req.addr[ADDR_W-1 -: TAG_W];
    ta_upd_en = 1'b0; ta_upd_way = way_i; ta_upd_valid = 1'b1; ta_upd_dirty = 1'b0;
    ta_upd_tag = cur_tag; ta_upd_touch = 1'b1;
    ta_clr_en = 1'b0; ta_clr_set = set_i;
    ad_req_valid = 1'b0; ad_req_we = 1'b0; ad_req_slot = slot(cur_set, way_i); ad_req_wdata = line;
    dram_req_valid = 1'b0; dram_req = '{we: 1'b0, addr: cur.addr, data: line};
    dram_rsp_ready = (state == S_WB_ACK) || (state == S_FILL_WAIT) || (state == S_FL_ACK);
    rsp_valid = 1'b0;
    rsp = '{nak: 1'b0, op: cur.op, dst: cur.src, addr: cur.addr, data: line};

    unique case (state)
      S_INIT:   ta_clr_en = 1'b1;
      S_IDLE:   ta_rd_en  = req_valid && cache_en;
      S_TAGCHK: if (ta_hit) begin
                  ad_req_valid = 1'b1;
                  ad_req_we    = (cur.op == CM_WR);
                  ad_req_slot  = slot(cur_set, ta_hit_way);
                  ad_req_wdata = cur.data;
                  ta_upd_en    = ad_req_ready;
                  ta_upd_way   = ta_hit_way;
                  ta_upd_dirty = (cur.op == CM_WR) || ta_way_dirty[ta_hit_way];
                  ta_upd_tag   = cur_tag;
                end else if (ta_victim_valid && ta_victim_dirty) begin
                  ad_req_valid = 1'b1;
                  ad_req_slot  = slot(cur_set, ta_victim_way);
                end
      S_WB_SEND: begin
                  dram_req_valid = 1'b1;
                  dram_req = '{we: 1'b1, addr: {vtag, cur_set, {OFF_W{1'b0}}}, data: line};
                end
      S_MISS:   if (cur.op == CM_WR) begin
                  ad_req_valid = 1'b1; ad_req_we = 1'b1; ad_req_wdata = cur.data;
                  ta_upd_en = ad_req_ready; ta_upd_dirty = 1'b1;
                end
      S_FILL_SEND: begin
                  dram_req_valid = 1'b1;
                  dram_req = '{we: 1'b0, addr: {cur.addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}}, data: line};
                end
      S_FILL_WAIT: if (dram_rsp_valid) begin
                  ad_req_valid = 1'b1; ad_req_we = 1'b1; ad_req_wdata = dram_rsp_data;
                  ta_upd_en = 1'b1; ta_upd_dirty = 1'b0;
                end
      S_RESP, S_NAK: begin
                  rsp_valid = (lat >= 16'(HIT_LATENCY)) || (state == S_NAK);
                  rsp.nak   = (state == S_NAK);
                end
      S_FL_RD:  begin ta_rd_en = 1'b1; ta_rd_set = set_i; end
      S_FL_SCAN: if (ta_way_valid[way_i] && ta_way_dirty[way_i]) begin
                  ad_req_valid = 1'b1; ad_req_slot = slot(set_i, way_i);
                end
      S_FL_SEND: begin
                  dram_req_valid = 1'b1;
                  dram_req = '{we: 1'b1, addr: {vtag, set_i, {OFF_W{1'b0}}}, data: line};
                end
      S_FL_CLR: ta_clr_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_ACCEL;
      set_i <= '0;
      way_i <= '0;
      lat   <= '0;
    end else begin
      if (lat != '1) lat <= lat + 1'b1;
      unique case (state)
        S_ACCEL: if (cache_en) begin
                   state <= S_INIT; set_i <= '0;
                 end else if (req_valid) begin
                   cur <= req; state <= S_NAK;
                 end
        S_INIT: begin
                   set_i <= set_i + 1'b1;
                   if (set_i == SW'(SETS - 1)) state <= S_IDLE;
                 end
        S_IDLE: if (!cache_en) begin
                   state <= S_FL_RD; set_i <= '0;
                 end else if (req_valid) begin
                   cur <= req; lat <= 16'd1; state <= S_TAGCHK;
                 end
        S_TAGCHK: if (ta_hit) begin
                   if (ad_req_ready) state <= S_DATA;
                 end else begin
                   way_i <= ta_victim_way;
                   vtag  <= ta_victim_tag;
                   if (ta_victim_valid && ta_victim_dirty) begin
                     if (ad_req_ready) state <= S_WB_RD;
                   end else state <= S_MISS;
                 end
        S_WB_RD: if (ad_rsp_valid) begin line <= ad_rsp_rdata; state <= S_WB_SEND; end
        S_WB_SEND: if (dram_req_ready) state <= S_WB_ACK;
        S_WB_ACK: if (dram_rsp_valid) state <= S_MISS;
        S_MISS: if (cur.op == CM_WR) begin
                   if (ad_req_ready) state <= S_DATA;
                 end else state <= S_FILL_SEND;
        S_FILL_SEND: if (dram_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (dram_rsp_valid) begin line <= dram_rsp_data; state <= S_RESP; end
        S_DATA: if (ad_rsp_valid) begin
                   if (cur.op == CM_RD) line <= ad_rsp_rdata;
                   state <= S_RESP;
                 end
        S_RESP: if (rsp_valid && rsp_ready) state <= S_IDLE;
        S_NAK:  if (rsp_ready) state <= S_ACCEL;
        S_FL_RD: begin way_i <= '0; state <= S_FL_SCAN; end
        S_FL_SCAN: if (ta_way_valid[way_i] && ta_way_dirty[way_i]) begin
                   vtag <= ta_way_tag[way_i];
                   if (ad_req_ready) state <= S_FL_DATA;
                 end else if (way_i == WW'(WAYS - 1)) state <= S_FL_CLR;
                 else way_i <= way_i + 1'b1;
        S_FL_DATA: if (ad_rsp_valid) begin line <= ad_rsp_rdata; state <= S_FL_SEND; end
        S_FL_SEND: if (dram_req_ready) state <= S_FL_ACK;
        S_FL_ACK: if (dram_rsp_valid) begin
                   if (way_i == WW'(WAYS - 1)) state <= S_FL_CLR;
                   else begin way_i <= way_i + 1'b1; state <= S_FL_SCAN; end
                 end
        S_FL_CLR: begin
                   set_i <= set_i + 1'b1;
                   state <= (set_i == SW'(SETS - 1)) ? S_ACCEL : S_FL_RD;
                 end
        default: state <= S_ACCEL;
      endcase
    end
  end

  // An answer never comes earlier than the slice latency.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              (rsp_valid && !rsp.nak) |-> lat >= 16'(HIT_LATENCY));
endmodule
