// Behavioural model of the DRAM controller node, for testbenches only.
//
// Takes PKT_MEM_RD / PKT_MEM_WR packets from the NoC and answers each with a
// PKT_MEM_RSP to the sender (same id) LATENCY cycles later, in order. A
// read returns the stored line, or init_line(addr) for a line never written.
// Writes are acknowledged the same way. n_rd / n_wr count the requests.
module dram_model
  import amr_pkg::*;
#(
  parameter int    LATENCY = 180,
  parameter node_t MY      = '{y: 1'b1, x: 2'd0}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rx_valid,
  output logic     rx_ready,
  input  noc_pkt_t rx_pkt,
  output logic     tx_valid,
  input  logic     tx_ready,
  output noc_pkt_t tx_pkt
);
  logic [LINE_W-1:0] mem [logic [ADDR_W-1:0]];
  noc_pkt_t          q_pkt [$];
  longint            q_due [$];
  longint            cyc;
  int                n_rd, n_wr;

  function automatic logic [LINE_W-1:0] init_line(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = (a ^ 32'h5a5a_0000) + 32'(i);
    return l;
  endfunction

  function automatic logic [LINE_W-1:0] peek(input logic [ADDR_W-1:0] a);
    if (mem.exists(a)) return mem[a];
    return init_line(a);
  endfunction

  assign rx_ready = 1'b1;
  assign tx_valid = (q_pkt.size() > 0) && (q_due[0] <= cyc);
  assign tx_pkt   = (q_pkt.size() > 0) ? q_pkt[0] : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; n_rd <= 0; n_wr <= 0;
      q_pkt.delete(); q_due.delete();
    end else begin
      cyc <= cyc + 1;
      if (tx_valid && tx_ready) begin
        void'(q_pkt.pop_front());
        void'(q_due.pop_front());
      end
      if (rx_valid) begin
        automatic noc_pkt_t r = rx_pkt;
        automatic noc_pkt_t a;
        a.ptype = PKT_MEM_RSP;
        a.src   = MY;
        a.dst   = r.src;
        a.id    = r.id;
        a.addr  = r.addr;
        if (r.ptype == PKT_MEM_WR) begin
          mem[r.addr] = r.data;
          a.data = '0;
          n_wr <= n_wr + 1;
        end else begin
          a.data = peek(r.addr);
          n_rd <= n_rd + 1;
        end
        q_pkt.push_back(a);
        q_due.push_back(cyc + LATENCY);
      end
    end
  end
endmodule
