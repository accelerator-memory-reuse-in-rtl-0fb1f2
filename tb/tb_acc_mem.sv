// Testbench of acc_mem: random byte-masked writes and reads against a model,
// and the one-cycle read latency.
module tb_acc_mem;
  localparam int DEPTH = 64, WB = 64;
  logic clk = 0, en, we;
  logic [5:0] addr;
  logic [WB-1:0] be;
  logic [WB*8-1:0] wdata, rdata, model [DEPTH];
  int checks = 0, failures = 0;

  acc_mem #(.DEPTH(DEPTH), .W_BYTES(WB)) dut (.clk, .en, .we, .addr, .be, .wdata, .rdata);
  always #5 clk = ~clk;

  function automatic logic [WB*8-1:0] rnd();
    logic [WB*8-1:0] r;
    for (int i = 0; i < WB*8/32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; be = '0; wdata = '0;
    // fill everything
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); be = '1; wdata = rnd(); model[i] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom_range(DEPTH-1)); we = $urandom_range(1);
      be = {$urandom, $urandom}; wdata = rnd();
      begin
        automatic logic [WB*8-1:0] prev = model[addr];
        automatic logic [5:0] a = addr;
        automatic logic w = we;
        if (w) for (int b = 0; b < WB; b++) if (be[b]) model[a][b*8 +: 8] = wdata[b*8 +: 8];
        @(negedge clk);
        en = 0;
        checks++;
        // read data is the word as it was prev this cycle's write
        if (rdata !== prev) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d", a);
        end
      end
    end
    // en low holds rdata
    @(negedge clk); en = 1; we = 0; addr = 6'd3;
    @(negedge clk); en = 0; addr = 6'd4;
    @(negedge clk); checks++; if (rdata !== model[3]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
