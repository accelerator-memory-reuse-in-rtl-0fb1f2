// Shared types and constants of the accelerator-memory-reuse system.
//
// The system is a mesh network-on-chip whose nodes are a GP-CPU tile, a DRAM
// controller and accelerator tiles. Every NoC packet is a single wide flit
// that carries a whole 32-byte cache line, so no packet is ever split.
// Addresses are 32 bits (ARMv6). A cache line is 32 bytes; an L3 slice of
// 512 KB with 16 ways has 1024 sets, so the address splits into a 5-bit
// offset, a 10-bit set index and a 17-bit tag; the two lowest tag bits pick
// the slice (address interleaving). Line size, associativity and slice size
// follow the document; the packet format and the node numbering are this
// design's own choices.
package amr_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BYTES = 32;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);

  // Node identifier: mesh coordinates.
  typedef struct packed {
    logic       y;
    logic [1:0] x;
  } node_t;

  typedef enum logic [3:0] {
    PKT_CACHE_RD  = 4'd0,  // CPU -> slice: read a line
    PKT_CACHE_WR  = 4'd1,  // CPU -> slice: write back a whole line
    PKT_CACHE_RSP = 4'd2,  // slice -> CPU: data or write acknowledge
    PKT_CACHE_NAK = 4'd3,  // slice -> CPU: slice is not in cache mode
    PKT_MEM_RD    = 4'd4,  // -> DRAM controller: read a line
    PKT_MEM_WR    = 4'd5,  // -> DRAM controller: write a line
    PKT_MEM_RSP   = 4'd6,  // DRAM controller -> requester
    PKT_CFG_WR    = 4'd7,  // configuration register write
    PKT_CFG_RD    = 4'd8,  // configuration register read
    PKT_CFG_RSP   = 4'd9,  // configuration register read data / write ack
    PKT_MSG       = 4'd10  // message-passing payload
  } pkt_type_e;

  // id field of memory packets: which unit of a tile asked.
  localparam logic ID_CACHE = 1'b0;
  localparam logic ID_SHMEM = 1'b1;

  typedef struct packed {
    pkt_type_e          ptype;
    node_t              src;
    node_t              dst;
    logic               id;
    logic [ADDR_W-1:0]  addr;
    logic [LINE_W-1:0]  data;
  } noc_pkt_t;

  // Router port numbering.
  localparam int unsigned P_N = 0, P_E = 1, P_S = 2, P_W = 3, P_L = 4;
  localparam int unsigned NPORTS = 5;

  // Cache manager request / answer (line granularity).
  typedef enum logic [1:0] {CM_RD = 2'd0, CM_WR = 2'd1} cm_op_e;

  typedef struct packed {
    cm_op_e             op;
    node_t              src;    // who asked: the answer goes back there
    logic [ADDR_W-1:0]  addr;   // line address (offset bits ignored)
    logic [LINE_W-1:0]  data;
  } cm_req_t;

  typedef struct packed {
    logic               nak;    // not in cache mode
    cm_op_e             op;
    node_t              dst;
    logic [ADDR_W-1:0]  addr;
    logic [LINE_W-1:0]  data;
  } cm_rsp_t;

  typedef struct packed {
    logic               we;
    logic [ADDR_W-1:0]  addr;
    logic [LINE_W-1:0]  data;
  } mem_req_t;

  // Configuration register map of a tile's network interface.
  localparam logic [3:0] CFG_MODE   = 4'd0; // bit0: 1 = cache slice, 0 = accelerator
  localparam logic [3:0] CFG_DVFS   = 4'd1; // DVFS level for the tile
  localparam logic [3:0] CFG_STATUS = 4'd2; // {.., accel_owns_mem, cache_ready}

  function automatic node_t mk_node(input int unsigned x, input int unsigned y);
    node_t n;
    n.x = 2'(x);
    n.y = 1'(y);
    return n;
  endfunction

endpackage
