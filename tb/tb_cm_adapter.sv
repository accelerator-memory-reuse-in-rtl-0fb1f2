// Testbench of cm_adapter in three memory organisations:
//   A: 64-byte words, one bank  (MPEG tiles)   - a line is half a word
//   B: 64-byte words, two banks (ReO tile)     - words alternate banks
//   C: 4-byte words, one bank   (document's example) - 8 beats per line
// Random line writes and reads against a model, the answer latency of each
// organisation (1 cycle for 64-byte words, 8 for 4-byte words), and where
// the lines land in memory.
module tb_cm_adapter;
  localparam int LB = 32, MB = 4096;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [255:0] rnd_line();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // ---- three instances ---------------------------------------------------
  logic         rv [3];
  logic         rr [3];
  logic         rwe[3];
  logic [6:0]   rslot[3];
  logic [255:0] rwd[3];
  logic         sv [3];
  logic [255:0] srd[3];

  // A
  logic a_en[1], a_we[1]; logic [5:0] a_addr[1]; logic [63:0] a_be[1]; logic [511:0] a_wd[1], a_rd[1];
  cm_adapter #(.LINE_BYTES(LB), .MEM_W_BYTES(64), .NUM_BANKS(1), .MEM_BYTES(MB)) dut_a (
    .clk, .rst_n, .req_valid(rv[0]), .req_ready(rr[0]), .req_we(rwe[0]), .req_slot(rslot[0]),
    .req_wdata(rwd[0]), .rsp_valid(sv[0]), .rsp_rdata(srd[0]),
    .m_en(a_en), .m_we(a_we), .m_addr(a_addr), .m_be(a_be), .m_wdata(a_wd), .m_rdata(a_rd));
  acc_mem #(.DEPTH(64), .W_BYTES(64)) mem_a (.clk, .en(a_en[0]), .we(a_we[0]), .addr(a_addr[0]),
    .be(a_be[0]), .wdata(a_wd[0]), .rdata(a_rd[0]));
  // B
  logic b_en[2], b_we[2]; logic [4:0] b_addr[2]; logic [63:0] b_be[2]; logic [511:0] b_wd[2], b_rd[2];
  cm_adapter #(.LINE_BYTES(LB), .MEM_W_BYTES(64), .NUM_BANKS(2), .MEM_BYTES(MB)) dut_b (
    .clk, .rst_n, .req_valid(rv[1]), .req_ready(rr[1]), .req_we(rwe[1]), .req_slot(rslot[1]),
    .req_wdata(rwd[1]), .rsp_valid(sv[1]), .rsp_rdata(srd[1]),
    .m_en(b_en), .m_we(b_we), .m_addr(b_addr), .m_be(b_be), .m_wdata(b_wd), .m_rdata(b_rd));
  for (genvar b = 0; b < 2; b++) begin : g_b
    acc_mem #(.DEPTH(32), .W_BYTES(64)) mem_b (.clk, .en(b_en[b]), .we(b_we[b]), .addr(b_addr[b]),
      .be(b_be[b]), .wdata(b_wd[b]), .rdata(b_rd[b]));
  end
  // C
  logic c_en[1], c_we[1]; logic [9:0] c_addr[1]; logic [3:0] c_be[1]; logic [31:0] c_wd[1], c_rd[1];
  cm_adapter #(.LINE_BYTES(LB), .MEM_W_BYTES(4), .NUM_BANKS(1), .MEM_BYTES(MB)) dut_c (
    .clk, .rst_n, .req_valid(rv[2]), .req_ready(rr[2]), .req_we(rwe[2]), .req_slot(rslot[2]),
    .req_wdata(rwd[2]), .rsp_valid(sv[2]), .rsp_rdata(srd[2]),
    .m_en(c_en), .m_we(c_we), .m_addr(c_addr), .m_be(c_be), .m_wdata(c_wd), .m_rdata(c_rd));
  acc_mem #(.DEPTH(1024), .W_BYTES(4)) mem_c (.clk, .en(c_en[0]), .we(c_we[0]), .addr(c_addr[0]),
    .be(c_be[0]), .wdata(c_wd[0]), .rdata(c_rd[0]));

  // count memory accesses of C per request
  int c_acc;
  always @(posedge clk) if (c_en[0]) c_acc++;

  logic [255:0] model [3][128];
  logic         known [3][128];

  task automatic do_req(input int i, input logic we, input logic [6:0] slot, input logic [255:0] d,
                        output logic [255:0] q, output int lat);
    @(negedge clk);
    rv[i] = 1; rwe[i] = we; rslot[i] = slot; rwd[i] = d;
    while (!rr[i]) @(negedge clk);
    @(posedge clk); #1;
    rv[i] = 0;
    lat = 1;
    while (!sv[i]) begin @(posedge clk); #1; lat++; end
    q = srd[i];
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin rv[i] = 0; rwe[i] = 0; rslot[i] = 0; rwd[i] = 0; end
    for (int i = 0; i < 3; i++) for (int s = 0; s < 128; s++) known[i][s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      automatic int i = t % 3;
      automatic logic we = $urandom_range(1);
      automatic logic [6:0] slot = 7'($urandom_range(127));
      automatic logic [255:0] d = rnd_line(), q;
      automatic int lat, exp_lat;
      if (!known[i][slot]) we = 1;
      c_acc = 0;
      do_req(i, we, slot, d, q, lat);
      exp_lat = (i == 2) ? 8 : 1;
      checks++;
      if (lat != exp_lat) begin
        failures++; $display("adapter %0d: latency %0d, expected %0d", i, lat, exp_lat);
      end
      if (i == 2) begin
        checks++;
        if (c_acc != 8) begin failures++; $display("4-byte adapter made %0d accesses", c_acc); end
      end
      if (we) begin
        model[i][slot] = d; known[i][slot] = 1;
      end else begin
        checks++;
        if (q !== model[i][slot]) begin
          failures++; $display("adapter %0d slot %0d: read data wrong", i, slot);
        end
      end
    end
    // placement: slot s in A is word s/2, half s%2; in B word s/2 goes to bank (s/2)%2;
    // in C slot s is words 8s..8s+7.
    for (int s = 0; s < 128; s++) if (known[0][s]) begin
      checks++;
      if (mem_a.mem[s/2][(s%2)*256 +: 256] !== model[0][s]) failures++;
    end
    for (int s = 0; s < 128; s++) if (known[1][s]) begin
      checks++;
      if (g_b[0].mem_b.mem[s/4][(s%2)*256 +: 256] !== model[1][s] &&
          ((s/2)%2) == 0) failures++;
      if (((s/2)%2) == 1 && g_b[1].mem_b.mem[s/4][(s%2)*256 +: 256] !== model[1][s]) failures++;
    end
    for (int s = 0; s < 128; s++) if (known[2][s]) begin
      checks++;
      for (int w = 0; w < 8; w++) if (mem_c.mem[s*8+w] !== model[2][s][w*32 +: 32]) begin
        failures++; break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
