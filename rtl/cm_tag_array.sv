// Tag array of the cache manager.
//
// Holds, for every set of the slice, each way's tag, valid and dirty bits and
// a true-LRU age (0 = most recently used, WAYS-1 = least recently used). The
// ages of a set are always a permutation of 0..WAYS-1.
//
// Lookup: rd_en with rd_set and rd_tag. One cycle later the set's row is held
// in a register and hit/hit_way, the replacement victim (the first invalid
// way, else the oldest) and every way's state are presented.
// Update: upd_en writes way upd_way of the set last looked up (valid, dirty,
// tag) and, with upd_touch, makes it the most recently used way. The held row
// follows the update, so several updates may follow one lookup.
// Clear: clr_en invalidates every way of clr_set and resets its ages.
// The document asks for a tag store with set lookup and LRU replacement
// (16 ways for a 512 KB slice); the encoding and timing are this design's.
module cm_tag_array #(
  parameter int unsigned SETS  = 1024,
  parameter int unsigned WAYS  = 16,
  parameter int unsigned TAG_W = 17,
  localparam int unsigned SW   = $clog2(SETS),
  localparam int unsigned WW   = $clog2(WAYS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [SW-1:0]    rd_set,
  input  logic [TAG_W-1:0] rd_tag,
  output logic             hit,
  output logic [WW-1:0]    hit_way,
  output logic [WW-1:0]    victim_way,
  output logic             victim_valid,
  output logic             victim_dirty,
  output logic [TAG_W-1:0] victim_tag,
  output logic             way_valid [WAYS],
  output logic             way_dirty [WAYS],
  output logic [TAG_W-1:0] way_tag   [WAYS],
  input  logic             upd_en,
  input  logic [WW-1:0]    upd_way,
  input  logic             upd_valid,
  input  logic             upd_dirty,
  input  logic [TAG_W-1:0] upd_tag,
  input  logic             upd_touch,
  input  logic             clr_en,
  input  logic [SW-1:0]    clr_set
);
  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
    logic [WW-1:0]    age;
  } entry_t;
  typedef entry_t [WAYS-1:0] row_t;

  row_t             mem [SETS];
  row_t             row;        // row of the last lookup, kept up to date
  logic [SW-1:0]    row_set;
  logic [TAG_W-1:0] row_tag;

  function automatic row_t clear_row();
    row_t r;
    for (int w = 0; w < WAYS; w++) begin
      r[w].valid = 1'b0;
      r[w].dirty = 1'b0;
      r[w].tag   = '0;
      r[w].age   = WW'(w);
    end
    return r;
  endfunction

  // Lookup result.
  always_comb begin
    logic found_inv;
    hit = 1'b0; hit_way = '0;
    victim_way = '0; found_inv = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      way_valid[w] = row[w].valid;
      way_dirty[w] = row[w].dirty;
      way_tag[w]   = row[w].tag;
      if (row[w].valid && row[w].tag == row_tag && !hit) begin
        hit = 1'b1; hit_way = WW'(w);
      end
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!row[w].valid) begin
        victim_way = WW'(w); found_inv = 1'b1;
      end
    end
    if (!found_inv)
      for (int w = 0; w < WAYS; w++)
        if (row[w].age == WW'(WAYS - 1)) victim_way = WW'(w);
    victim_valid = row[victim_way].valid;
    victim_dirty = row[victim_way].dirty;
    victim_tag   = row[victim_way].tag;
  end

  // Row after an update.
  row_t nrow;
  always_comb begin
    nrow = row;
    nrow[upd_way].valid = upd_valid;
    nrow[upd_way].dirty = upd_dirty;
    nrow[upd_way].tag   = upd_tag;
    if (upd_touch) begin
      for (int w = 0; w < WAYS; w++)
        if (row[w].age < row[upd_way].age) nrow[w].age = row[w].age + 1'b1;
      nrow[upd_way].age = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (clr_en) mem[clr_set] <= clear_row();
    else if (upd_en) mem[row_set] <= nrow;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row     <= clear_row();
      row_set <= '0;
      row_tag <= '0;
    end else if (rd_en) begin
      row     <= mem[rd_set];
      row_set <= rd_set;
      row_tag <= rd_tag;
    end else if (upd_en) begin
      row     <= nrow;
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && upd_en));
endmodule
