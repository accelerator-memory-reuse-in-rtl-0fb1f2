// Shared L2 cache of the GP-CPU tile.
//
// The CPUs' L1 caches are write-through, so the L2 sees two kinds of
// request on its CPU side (cpu_req_*): line reads (an L1 miss; the whole
// 32-byte line is returned on cpu_rsp_data) and 32-bit word writes with
// byte enables (every store; acknowledged by cpu_rsp_valid). The L2 is
// write-back and write-allocate: a write that misses first fetches the line,
// then merges the word into it. Behind it (mem_req_*, mem_rsp_*) line reads
// go to the L3 / memory port and dirty victims leave as whole-line writes;
// mem_req_* matches the l2_* side of cpu_llc_port.
//
// After reset every set is invalidated, one per cycle (SETS cycles), before
// the first request is accepted.
//
// Organisation: SETS = L2_BYTES / 32 / WAYS sets, LRU replacement, tags and
// ages kept in a cm_tag_array, lines in an acc_mem 32 bytes wide at slot
// {set, way}. One request at a time:
//   cycle 0 request accepted, tag lookup;
//   cycle 1 hit/miss known; on a hit the data array is read or written;
//   cycle 2 a hit is answered (cpu_rsp_valid, read data on cpu_rsp_data).
// So a hit takes 2 cycles. A miss writes back a dirty victim (waiting for
// its acknowledgement), reads the line, stores it (merged with the write
// data for a store) and then answers. The CPU side has no back-pressure on
// answers. A NAK from the memory side is not expected (cpu_llc_port retries
// refused requests at DRAM) and is checked by an assertion.
//
// The size, associativity, 2-cycle access, write-back, write-allocate and LRU
// policy follow the document's baseline system; the request format, the
// state machine and the one-request-at-a-time operation are this design's.
module l2_cache
  import amr_pkg::*;
#(
  parameter int unsigned L2_BYTES = 131072,
  parameter int unsigned WAYS     = 4,
  localparam int unsigned SETS    = L2_BYTES / LINE_BYTES / WAYS,
  localparam int unsigned SW      = $clog2(SETS),
  localparam int unsigned WW      = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W   = ADDR_W - OFF_W - SW
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side (L1 misses and write-through stores)
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic              cpu_req_we,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  input  logic [31:0]       cpu_req_wdata,
  input  logic [3:0]        cpu_req_be,
  output logic              cpu_rsp_valid,
  output logic [LINE_W-1:0] cpu_rsp_data,
  // memory side (towards the L3 slices / DRAM)
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_rsp_valid,
  input  logic              mem_rsp_nak,
  input  logic [LINE_W-1:0] mem_rsp_data
);
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_TAG, S_HIT, S_WB_RD, S_WB_SEND, S_WB_ACK,
    S_FILL_SEND, S_FILL_WAIT, S_FILL_WR, S_RESP
  } l2_state_e;
  l2_state_e state;

  // request held while it is served
  logic              r_we;
  logic [ADDR_W-1:0] r_addr;
  logic [31:0]       r_wdata;
  logic [3:0]        r_be;
  logic [WW-1:0]     r_way;
  logic [TAG_W-1:0]  r_vtag;
  logic [LINE_W-1:0] line;
  logic [SW-1:0]     init_set;

  wire [SW-1:0]    r_set = r_addr[OFF_W +: SW];
  wire [TAG_W-1:0] r_tag = r_addr[ADDR_W-1 -: TAG_W];
  wire [2:0]       r_wrd = r_addr[4:2];

  // tag array
  logic             ta_hit, ta_vvalid, ta_vdirty;
  logic [WW-1:0]    ta_hit_way, ta_victim;
  logic [TAG_W-1:0] ta_vtag;
  logic             ta_wvalid [WAYS];
  logic             ta_wdirty [WAYS];
  logic [TAG_W-1:0] ta_wtag   [WAYS];
  logic             ta_rd_en, ta_upd_en, ta_upd_dirty;
  logic [WW-1:0]    ta_upd_way;

  cm_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_en(ta_rd_en), .rd_set(cpu_req_addr[OFF_W +: SW]),
    .rd_tag(cpu_req_addr[ADDR_W-1 -: TAG_W]),
    .hit(ta_hit), .hit_way(ta_hit_way), .victim_way(ta_victim),
    .victim_valid(ta_vvalid), .victim_dirty(ta_vdirty), .victim_tag(ta_vtag),
    .way_valid(ta_wvalid), .way_dirty(ta_wdirty), .way_tag(ta_wtag),
    .upd_en(ta_upd_en), .upd_way(ta_upd_way), .upd_valid(1'b1),
    .upd_dirty(ta_upd_dirty), .upd_tag(r_tag), .upd_touch(1'b1),
    .clr_en(state == S_INIT), .clr_set(init_set)
  );

  // data array: one line per slot {set, way}
  logic                   m_en, m_we;
  logic [SW+WW-1:0]       m_addr;
  logic [LINE_BYTES-1:0]  m_be;
  logic [LINE_W-1:0]      m_wdata, m_rdata;

  acc_mem #(.DEPTH(SETS * WAYS), .W_BYTES(LINE_BYTES)) u_data (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .be(m_be),
    .wdata(m_wdata), .rdata(m_rdata)
  );

  // the stored word placed in a line, with its byte enables
  function automatic logic [LINE_W-1:0] merge(input logic [LINE_W-1:0] l,
                                              input logic [2:0] w,
                                              input logic [31:0] d,
                                              input logic [3:0] be);
    logic [LINE_W-1:0] r = l;
    for (int b = 0; b < 4; b++)
      if (be[b]) r[int'(w) * 32 + b * 8 +: 8] = d[b * 8 +: 8];
    return r;
  endfunction

  assign cpu_req_ready = (state == S_IDLE);
  assign ta_rd_en      = cpu_req_valid && cpu_req_ready;

  always_comb begin
    m_en = 1'b0; m_we = 1'b0; m_addr = {r_set, r_way}; m_be = '0; m_wdata = '0;
    ta_upd_en = 1'b0; ta_upd_way = r_way; ta_upd_dirty = 1'b0;
    unique case (state)
      S_TAG: begin
        m_addr = {r_set, ta_hit ? ta_hit_way : ta_victim};
        if (ta_hit) begin
          // hit: read the line, or write the stored word into it
          m_en    = 1'b1;
          m_we    = r_we;
          m_be    = LINE_BYTES'(r_be) << (int'(r_wrd) * 4);
          m_wdata = merge('0, r_wrd, r_wdata, r_be);
          ta_upd_en    = 1'b1;
          ta_upd_way   = ta_hit_way;
          ta_upd_dirty = r_we || ta_wdirty[ta_hit_way];
        end else if (ta_vvalid && ta_vdirty) begin
          m_en = 1'b1;                      // read the dirty victim
        end
      end
      S_FILL_WR: begin
        m_en = 1'b1; m_we = 1'b1; m_be = '1; m_wdata = line;
        ta_upd_en = 1'b1; ta_upd_dirty = r_we;
      end
      default: ;
    endcase
  end

  assign mem_req_valid = (state == S_WB_SEND) || (state == S_FILL_SEND);
  assign mem_req.we    = (state == S_WB_SEND);
  assign mem_req.addr  = (state == S_WB_SEND) ? {r_vtag, r_set, {OFF_W{1'b0}}}
                                              : {r_tag, r_set, {OFF_W{1'b0}}};
  assign mem_req.data  = line;

  assign cpu_rsp_valid = (state == S_HIT) || (state == S_RESP);
  assign cpu_rsp_data  = (state == S_HIT) ? m_rdata : line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_INIT;
      init_set <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
                  init_set <= init_set + 1'b1;
                  if (init_set == SW'(SETS - 1)) state <= S_IDLE;
                end
        S_IDLE: if (ta_rd_en) begin
                  r_we    <= cpu_req_we;
                  r_addr  <= cpu_req_addr;
                  r_wdata <= cpu_req_wdata;
                  r_be    <= cpu_req_be;
                  state   <= S_TAG;
                end
        S_TAG:  if (ta_hit) state <= S_HIT;
                else begin
                  r_way  <= ta_victim;
                  r_vtag <= ta_vtag;
                  state  <= (ta_vvalid && ta_vdirty) ? S_WB_RD : S_FILL_SEND;
                end
        S_HIT:  state <= S_IDLE;
        S_WB_RD: begin line <= m_rdata; state <= S_WB_SEND; end
        S_WB_SEND: if (mem_req_ready) state <= S_WB_ACK;
        S_WB_ACK:  if (mem_rsp_valid) state <= S_FILL_SEND;
        S_FILL_SEND: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_rsp_valid) begin
                       line  <= r_we ? merge(mem_rsp_data, r_wrd, r_wdata, r_be) : mem_rsp_data;
                       state <= S_FILL_WR;
                     end
        S_FILL_WR: state <= S_RESP;
        S_RESP:    state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  a_no_nak: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> !mem_rsp_nak);
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   mem_rsp_valid |-> (state == S_WB_ACK || state == S_FILL_WAIT));
endmodule
