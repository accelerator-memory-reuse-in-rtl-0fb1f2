// Network interface (NI) of an accelerator tile.
//
// Connects the tile to its router's local port and offers the services the
// document lists for every accelerator:
//   * message passing: an outbound queue (acc_mo_*, a 256-bit message and a
//     destination node) and an inbound queue (acc_mi_*, message and sender);
//   * non-coherent shared memory: the ni_shmem_unit (present only when
//     HAS_SHMEM = 1; without it the message queues get MSGQ_DEPTH_NOSH
//     entries instead of MSGQ_DEPTH, as the document suggests for
//     accelerators that only pass messages);
//   * configuration registers (ni_config_regs), read and written with
//     PKT_CFG_RD / PKT_CFG_WR, each answered with a PKT_CFG_RSP that
//     carries the register value before the access;
//   * forwarding of cache traffic: PKT_CACHE_RD/WR requests to the cache
//     manager and its answers back to the requester (PKT_CACHE_RSP or
//     PKT_CACHE_NAK), its fills and write-backs to the DRAM controller
//     (PKT_MEM_RD/WR with id ID_CACHE) and their answers back to it.
// Every incoming packet is sorted into a queue of its own service, so a
// busy service cannot hold up the answers another one waits for. Outgoing
// packets from the five sources are sent in round-robin order, one per
// cycle. Queue sizes, sorting and arbitration are this design's choices.
module network_interface
  import amr_pkg::*;
#(
  parameter node_t       MY              = '0,
  parameter node_t       DRAM_NODE       = '0,
  parameter bit          HAS_SHMEM       = 1'b1,
  parameter int unsigned MSGQ_DEPTH      = 4,
  parameter int unsigned MSGQ_DEPTH_NOSH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // router local port
  input  logic              in_valid,
  output logic              in_ready,
  input  noc_pkt_t          in_pkt,
  output logic              out_valid,
  input  logic              out_ready,
  output noc_pkt_t          out_pkt,
  // cache manager
  output logic              cm_req_valid,
  input  logic              cm_req_ready,
  output cm_req_t           cm_req,
  input  logic              cm_rsp_valid,
  output logic              cm_rsp_ready,
  input  cm_rsp_t           cm_rsp,
  input  logic              cm_dram_req_valid,
  output logic              cm_dram_req_ready,
  input  mem_req_t          cm_dram_req,
  output logic              cm_dram_rsp_valid,
  input  logic              cm_dram_rsp_ready,
  output logic [LINE_W-1:0] cm_dram_rsp_data,
  input  logic              st_cache_ready,
  input  logic              st_mem_to_cache,
  output logic              mode_cache,
  output logic [7:0]        dvfs_level,
  // accelerator side: message passing
  input  logic              acc_mo_valid,
  output logic              acc_mo_ready,
  input  node_t             acc_mo_dst,
  input  logic [LINE_W-1:0] acc_mo_data,
  output logic              acc_mi_valid,
  input  logic              acc_mi_ready,
  output node_t             acc_mi_src,
  output logic [LINE_W-1:0] acc_mi_data,
  // accelerator side: shared memory
  input  logic              acc_sh_req_valid,
  output logic              acc_sh_req_ready,
  input  logic              acc_sh_req_we,
  input  logic [ADDR_W-1:0] acc_sh_req_addr,
  input  logic [LINE_W-1:0] acc_sh_req_wdata,
  output logic              acc_sh_rsp_valid,
  output logic [LINE_W-1:0] acc_sh_rsp_data
);
  localparam int unsigned QD = HAS_SHMEM ? MSGQ_DEPTH : MSGQ_DEPTH_NOSH;
  localparam int unsigned NSRC = 5;
  localparam int unsigned SRC_CM = 0, SRC_DRAM = 1, SRC_SH = 2, SRC_MSG = 3, SRC_CFG = 4;

  // ---------------------------------------------------------------- inbound
  typedef enum logic [2:0] {Q_CREQ, Q_FILL, Q_SH, Q_MSG, Q_CFG} q_e;
  q_e   q_sel;
  logic q_in_valid [5];
  logic q_in_ready [5];
  logic q_out_valid[5];
  logic q_out_ready[5];
  noc_pkt_t q_out  [5];

  always_comb begin
    unique case (in_pkt.ptype)
      PKT_CACHE_RD, PKT_CACHE_WR: q_sel = Q_CREQ;
      PKT_MEM_RSP:                q_sel = (in_pkt.id == ID_SHMEM) ? Q_SH : Q_FILL;
      PKT_MSG:                    q_sel = Q_MSG;
      default:                    q_sel = Q_CFG;   // PKT_CFG_RD / PKT_CFG_WR
    endcase
    for (int q = 0; q < 5; q++) q_in_valid[q] = in_valid && (q_sel == q_e'(q));
  end
  assign in_ready = q_in_ready[q_sel];

  for (genvar q = 0; q < 5; q++) begin : g_q
    localparam int unsigned D = (q == Q_MSG) ? QD : 2;
    sync_fifo #(.T(noc_pkt_t), .DEPTH(D)) u_q (
      .clk, .rst_n,
      .in_valid(q_in_valid[q]), .in_ready(q_in_ready[q]), .in_data(in_pkt),
      .out_valid(q_out_valid[q]), .out_ready(q_out_ready[q]), .out_data(q_out[q])
    );
  end

  // cache requests to the cache manager
  assign cm_req_valid       = q_out_valid[Q_CREQ];
  assign q_out_ready[Q_CREQ] = cm_req_ready;
  always_comb begin
    cm_req.op   = (q_out[Q_CREQ].ptype == PKT_CACHE_WR) ? CM_WR : CM_RD;
    cm_req.src  = q_out[Q_CREQ].src;
    cm_req.addr = q_out[Q_CREQ].addr;
    cm_req.data = q_out[Q_CREQ].data;
  end

  // DRAM answers to the cache manager
  assign cm_dram_rsp_valid   = q_out_valid[Q_FILL];
  assign cm_dram_rsp_data    = q_out[Q_FILL].data;
  assign q_out_ready[Q_FILL] = cm_dram_rsp_ready;

  // inbound messages
  assign acc_mi_valid       = q_out_valid[Q_MSG];
  assign acc_mi_src         = q_out[Q_MSG].src;
  assign acc_mi_data        = q_out[Q_MSG].data;
  assign q_out_ready[Q_MSG] = acc_mi_ready;

  // --------------------------------------------------------------- outbound
  logic     s_valid [NSRC];
  logic     s_ready [NSRC];
  noc_pkt_t s_pkt   [NSRC];

  // cache manager answers
  assign s_valid[SRC_CM] = cm_rsp_valid;
  assign cm_rsp_ready    = s_ready[SRC_CM];
  always_comb begin
    s_pkt[SRC_CM].ptype = cm_rsp.nak ? PKT_CACHE_NAK : PKT_CACHE_RSP;
    s_pkt[SRC_CM].src   = MY;
    s_pkt[SRC_CM].dst   = cm_rsp.dst;
    s_pkt[SRC_CM].id    = ID_CACHE;
    s_pkt[SRC_CM].addr  = cm_rsp.addr;
    s_pkt[SRC_CM].data  = cm_rsp.data;
  end

  // cache manager fills and write-backs
  assign s_valid[SRC_DRAM] = cm_dram_req_valid;
  assign cm_dram_req_ready = s_ready[SRC_DRAM];
  always_comb begin
    s_pkt[SRC_DRAM].ptype = cm_dram_req.we ? PKT_MEM_WR : PKT_MEM_RD;
    s_pkt[SRC_DRAM].src   = MY;
    s_pkt[SRC_DRAM].dst   = DRAM_NODE;
    s_pkt[SRC_DRAM].id    = ID_CACHE;
    s_pkt[SRC_DRAM].addr  = cm_dram_req.addr;
    s_pkt[SRC_DRAM].data  = cm_dram_req.data;
  end

  // shared-memory unit (optional)
  if (HAS_SHMEM) begin : g_sh
    ni_shmem_unit #(.MY(MY), .DRAM_NODE(DRAM_NODE)) u_sh (
      .clk, .rst_n,
      .sh_req_valid(acc_sh_req_valid), .sh_req_ready(acc_sh_req_ready), .sh_req_we(acc_sh_req_we),
      .sh_req_addr(acc_sh_req_addr), .sh_req_wdata(acc_sh_req_wdata),
      .sh_rsp_valid(acc_sh_rsp_valid), .sh_rsp_data(acc_sh_rsp_data),
      .pkt_out_valid(s_valid[SRC_SH]), .pkt_out_ready(s_ready[SRC_SH]), .pkt_out(s_pkt[SRC_SH]),
      .pkt_in_valid(q_out_valid[Q_SH]), .pkt_in_ready(q_out_ready[Q_SH]), .pkt_in(q_out[Q_SH])
    );
  end else begin : g_nosh
    assign acc_sh_req_ready = 1'b0;
    assign acc_sh_rsp_valid = 1'b0;
    assign acc_sh_rsp_data  = '0;
    assign s_valid[SRC_SH]  = 1'b0;
    assign s_pkt[SRC_SH]    = '0;
    assign q_out_ready[Q_SH] = 1'b1;   // stray answers are dropped
  end

  // outbound messages
  typedef struct packed {
    node_t             dst;
    logic [LINE_W-1:0] data;
  } msg_t;
  logic mo_valid;
  msg_t mo;
  sync_fifo #(.T(msg_t), .DEPTH(QD)) u_mo (
    .clk, .rst_n,
    .in_valid(acc_mo_valid), .in_ready(acc_mo_ready), .in_data('{dst: acc_mo_dst, data: acc_mo_data}),
    .out_valid(mo_valid), .out_ready(s_ready[SRC_MSG]), .out_data(mo)
  );
  assign s_valid[SRC_MSG] = mo_valid;
  always_comb begin
    s_pkt[SRC_MSG].ptype = PKT_MSG;
    s_pkt[SRC_MSG].src   = MY;
    s_pkt[SRC_MSG].dst   = mo.dst;
    s_pkt[SRC_MSG].id    = 1'b0;
    s_pkt[SRC_MSG].addr  = '0;
    s_pkt[SRC_MSG].data  = mo.data;
  end

  // configuration accesses: performed when their answer can leave
  logic [31:0] cfg_rdata;
  wire         cfg_do = q_out_valid[Q_CFG] && s_ready[SRC_CFG];
  ni_config_regs u_cfg (
    .clk, .rst_n,
    .wr_en(cfg_do && q_out[Q_CFG].ptype == PKT_CFG_WR),
    .addr(q_out[Q_CFG].addr[3:0]), .wdata(q_out[Q_CFG].data[31:0]), .rdata(cfg_rdata),
    .st_cache_ready, .st_mem_to_cache, .mode_cache, .dvfs_level
  );
  assign s_valid[SRC_CFG]   = q_out_valid[Q_CFG];
  assign q_out_ready[Q_CFG] = s_ready[SRC_CFG];
  always_comb begin
    s_pkt[SRC_CFG].ptype = PKT_CFG_RSP;
    s_pkt[SRC_CFG].src   = MY;
    s_pkt[SRC_CFG].dst   = q_out[Q_CFG].src;
    s_pkt[SRC_CFG].id    = 1'b0;
    s_pkt[SRC_CFG].addr  = q_out[Q_CFG].addr;
    s_pkt[SRC_CFG].data  = {{(LINE_W-32){1'b0}}, cfg_rdata};
  end

  // round-robin choice of the outgoing packet
  logic [2:0] rr, pick;
  logic       any;
  always_comb begin
    any = 1'b0; pick = '0;
    for (int k = 0; k < NSRC; k++) begin
      automatic logic [2:0] c = 3'((int'(rr) + k) % NSRC);
      if (!any && s_valid[c]) begin any = 1'b1; pick = c; end
    end
    for (int s = 0; s < NSRC; s++) s_ready[s] = any && out_ready && (pick == 3'(s));
    out_valid = any;
    out_pkt   = s_pkt[pick];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr <= '0;
    else if (any && out_ready) rr <= (pick == 3'(NSRC - 1)) ? '0 : pick + 3'd1;
  end
endmodule
