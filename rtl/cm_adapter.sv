// Cache-line adapter of the cache manager.
//
// The cache control works on 32-byte lines; the accelerator's memory blocks
// have their own width and number. The adapter turns one line read or write
// into accesses on the blocks. If a block word is narrower than a line, a
// line takes LINE_BYTES/MEM_W_BYTES sequential beats (the document's example:
// 4-byte words give 8 accesses). If a word is wider, a line is a part of one
// word and is written with byte enables and read by selecting that part
// (the MPEG tiles' 64-byte words: one access). With NUM_BANKS > 1 (the
// two-block ReO tile) consecutive words alternate between the banks, so the
// adapter also multiplexes the banks; this mapping is this design's choice.
//
// Interface: req_valid/req_ready with req_we, req_slot (line slot inside the
// tile memory) and req_wdata. The request's first beat goes to memory in
// the cycle it is accepted; one beat per cycle follows. rsp_valid pulses once
// per request: for a write after the last beat is issued, for a read when the
// last beat's data has come back (memory read latency is one cycle), with
// the line in rsp_rdata. With 64-byte words a request is answered on the
// cycle after it is accepted.
module cm_adapter #(
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned MEM_W_BYTES = 64,
  parameter int unsigned NUM_BANKS   = 1,
  parameter int unsigned MEM_BYTES   = 524288,
  localparam int unsigned SLOTS      = MEM_BYTES / LINE_BYTES,
  localparam int unsigned SLOT_W     = $clog2(SLOTS),
  localparam int unsigned BANK_DEPTH = MEM_BYTES / MEM_W_BYTES / NUM_BANKS,
  localparam int unsigned BAW        = $clog2(BANK_DEPTH),
  localparam int unsigned MW         = MEM_W_BYTES * 8,
  localparam int unsigned LW         = LINE_BYTES * 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic                   req_we,
  input  logic [SLOT_W-1:0]      req_slot,
  input  logic [LW-1:0]          req_wdata,
  output logic                   rsp_valid,
  output logic [LW-1:0]          rsp_rdata,
  output logic                   m_en    [NUM_BANKS],
  output logic                   m_we    [NUM_BANKS],
  output logic [BAW-1:0]         m_addr  [NUM_BANKS],
  output logic [MEM_W_BYTES-1:0] m_be    [NUM_BANKS],
  output logic [MW-1:0]          m_wdata [NUM_BANKS],
  input  logic [MW-1:0]          m_rdata [NUM_BANKS]
);
  localparam int unsigned BEATS = (MEM_W_BYTES < LINE_BYTES) ? LINE_BYTES / MEM_W_BYTES : 1;
  localparam int unsigned LPW   = (MEM_W_BYTES > LINE_BYTES) ? MEM_W_BYTES / LINE_BYTES : 1;
  localparam int unsigned BTW   = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned PW    = (LPW > 1) ? $clog2(LPW) : 1;
  localparam int unsigned WORDS = MEM_BYTES / MEM_W_BYTES;
  localparam int unsigned WW    = $clog2(WORDS);
  localparam int unsigned BKW   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned CHUNK = (MW < LW) ? MW : LW;   // bits moved per beat

  logic              busy;
  logic              cur_we;
  logic [SLOT_W-1:0] cur_slot;
  logic [LW-1:0]     cur_wdata;
  logic [BTW-1:0]    beat;         // next beat to issue while busy

  // Previous cycle's issue, for capturing read data.
  logic              p_valid, p_we, p_last;
  logic [BTW-1:0]    p_beat;
  logic [BKW-1:0]    p_bank;
  logic [PW-1:0]     p_part;
  logic [LW-1:0]     rbuf;

  // Beat to issue this cycle.
  logic              i_valid, i_we, i_last;
  logic [SLOT_W-1:0] i_slot;
  logic [LW-1:0]     i_wdata;
  logic [BTW-1:0]    i_beat;
  logic [WW-1:0]     i_word;
  logic [BKW-1:0]    i_bank;
  logic [PW-1:0]     i_part;

  assign req_ready = !busy;

  always_comb begin
    if (busy) begin
      i_valid = 1'b1; i_we = cur_we; i_slot = cur_slot; i_wdata = cur_wdata; i_beat = beat;
    end else begin
      i_valid = req_valid; i_we = req_we; i_slot = req_slot; i_wdata = req_wdata; i_beat = '0;
    end
    i_last = (BEATS == 1) || (i_beat == BTW'(BEATS - 1));
    if (BEATS > 1) i_word = WW'(i_slot) * WW'(BEATS) + WW'(i_beat);
    else           i_word = WW'(i_slot / LPW);
    i_part = PW'(i_slot % LPW);
    i_bank = BKW'(i_word % NUM_BANKS);

    for (int b = 0; b < NUM_BANKS; b++) begin
      m_en[b]    = i_valid && (BKW'(b) == i_bank);
      m_we[b]    = i_we;
      m_addr[b]  = BAW'(i_word / NUM_BANKS);
      m_be[b]    = '0;
      m_wdata[b] = '0;
      if (BEATS > 1) begin
        m_be[b]    = '1;
        m_wdata[b] = MW'(i_wdata >> (int'(i_beat) * CHUNK));
      end else begin
        for (int p = 0; p < LPW; p++) begin
          m_wdata[b][p*LW +: LW] = i_wdata;
          if (PW'(p) == i_part) m_be[b][p*LINE_BYTES +: LINE_BYTES] = '1;
        end
      end
    end
  end

  // Read data of the beat issued last cycle.
  logic [CHUNK-1:0] cap;
  always_comb begin
    if (BEATS > 1) cap = CHUNK'(m_rdata[p_bank]);
    else           cap = CHUNK'(m_rdata[p_bank] >> (int'(p_part) * LW));
  end

  always_comb begin
    rsp_rdata = rbuf;
    rsp_rdata[int'(p_beat) * CHUNK +: CHUNK] = cap;
  end
  assign rsp_valid = p_valid && p_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      beat    <= '0;
      p_valid <= 1'b0;
    end else begin
      p_valid <= i_valid;
      if (i_valid) begin
        busy <= !i_last;
        beat <= i_last ? '0 : i_beat + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy && req_valid) begin
      cur_we    <= req_we;
      cur_slot  <= req_slot;
      cur_wdata <= req_wdata;
    end
    p_we   <= i_we;
    p_last <= i_last;
    p_beat <= i_beat;
    p_bank <= i_bank;
    p_part <= i_part;
    if (p_valid && !p_we) rbuf[int'(p_beat) * CHUNK +: CHUNK] <= cap;
  end

  initial begin
    assert (LINE_BYTES % MEM_W_BYTES == 0 || MEM_W_BYTES % LINE_BYTES == 0)
      else $error("line and memory word sizes must be multiples of each other");
  end
endmodule
