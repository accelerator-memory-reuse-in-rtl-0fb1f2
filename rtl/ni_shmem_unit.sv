// Shared-memory access unit of an accelerator tile's network interface.
//
// Gives the accelerator non-coherent access to main memory: a request
// (sh_req_*, a 32-byte line read or write at a line address) becomes a
// PKT_MEM_RD or PKT_MEM_WR packet to the DRAM controller node, tagged with
// id ID_SHMEM so the answer comes back to this unit. The answer (PKT_MEM_RSP,
// read data or write acknowledge) is returned on sh_rsp_* for one cycle. One
// request is outstanding at a time; sh_req_ready is low until its answer has
// arrived. Line-sized accesses and the single outstanding request are this
// design's choices; the document only names the unit.
module ni_shmem_unit
  import amr_pkg::*;
#(
  parameter node_t MY        = '0,
  parameter node_t DRAM_NODE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sh_req_valid,
  output logic              sh_req_ready,
  input  logic              sh_req_we,
  input  logic [ADDR_W-1:0] sh_req_addr,
  input  logic [LINE_W-1:0] sh_req_wdata,
  output logic              sh_rsp_valid,
  output logic [LINE_W-1:0] sh_rsp_data,
  output logic              pkt_out_valid,
  input  logic              pkt_out_ready,
  output noc_pkt_t          pkt_out,
  input  logic              pkt_in_valid,
  output logic              pkt_in_ready,
  input  noc_pkt_t          pkt_in
);
  typedef enum logic [1:0] {SH_IDLE, SH_SEND, SH_WAIT} sh_state_e;
  sh_state_e state;
  noc_pkt_t  pkt;

  assign sh_req_ready  = (state == SH_IDLE);
  assign pkt_out_valid = (state == SH_SEND);
  assign pkt_out       = pkt;
  assign pkt_in_ready  = (state == SH_WAIT);
  assign sh_rsp_valid  = (state == SH_WAIT) && pkt_in_valid;
  assign sh_rsp_data   = pkt_in.data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SH_IDLE;
    end else begin
      unique case (state)
        SH_IDLE: if (sh_req_valid) begin
                   pkt.ptype <= sh_req_we ? PKT_MEM_WR : PKT_MEM_RD;
                   pkt.src   <= MY;
                   pkt.dst   <= DRAM_NODE;
                   pkt.id    <= ID_SHMEM;
                   pkt.addr  <= {sh_req_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
                   pkt.data  <= sh_req_wdata;
                   state     <= SH_SEND;
                 end
        SH_SEND: if (pkt_out_ready) state <= SH_WAIT;
        SH_WAIT: if (pkt_in_valid) state <= SH_IDLE;
        default: state <= SH_IDLE;
      endcase
    end
  end
endmodule
