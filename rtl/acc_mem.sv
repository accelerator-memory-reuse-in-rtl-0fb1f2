// Accelerator local memory block.
//
// A single-port synchronous SRAM, W_BYTES wide with one write enable per
// byte, written as an array. One access per cycle: when en is high the word
// at addr is read (rdata valid on the next cycle) and, if we is high, the
// bytes selected by be are written. The defaults give the 512 KB,
// 64-byte-wide block of each MPEG tile in the document; port set, byte
// enables and one-cycle read latency are this design's choices. The array is
// not reset: the accelerator or the cache manager writes before reading.
module acc_mem #(
  parameter int unsigned DEPTH   = 8192,
  parameter int unsigned W_BYTES = 64,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic [W_BYTES-1:0]   be,
  input  logic [W_BYTES*8-1:0] wdata,
  output logic [W_BYTES*8-1:0] rdata
);
  logic [W_BYTES*8-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < W_BYTES; b++)
          if (be[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
      end
      rdata <= mem[addr];
    end
  end
endmodule
