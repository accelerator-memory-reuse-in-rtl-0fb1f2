// Testbench of l2_cache at a reduced size (2 KB, 4 ways, 16 sets) in front
// of a behavioural memory that answers after 12 cycles.
//   * random line reads and masked word stores over 8x the cache size: every
//     read must return the latest data (checked against a flat reference of
//     memory contents), and the memory must end up equal to it once all
//     dirty lines are pushed out;
//   * a hit is answered exactly 2 cycles after it is accepted;
//   * a write miss fetches the line (write-allocate) and keeps it dirty
//     (write-back: no memory write until it is evicted);
//   * LRU: after touching the oldest of four lines in a set, a fifth line
//     evicts the second-oldest.
module tb_l2_cache;
  import amr_pkg::*;
  localparam int L2B = 2048, WAYS = 4, SETS = L2B / 32 / WAYS, DLAT = 12;
  localparam int NLINES = 8 * L2B / 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid, cpu_req_ready, cpu_req_we, cpu_rsp_valid;
  logic [31:0] cpu_req_addr, cpu_req_wdata;
  logic [3:0]  cpu_req_be;
  logic [255:0] cpu_rsp_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_nak;
  mem_req_t mem_req;
  logic [255:0] mem_rsp_data;

  l2_cache #(.L2_BYTES(L2B), .WAYS(WAYS)) dut (.*);

  // ---- behavioural memory: one request at a time, DLAT cycles ----
  logic [255:0] mem   [NLINES];
  logic [255:0] refm  [NLINES];
  int n_mrd = 0, n_mwr = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [255:0] init_line(input int l);
    logic [255:0] r;
    for (int w = 0; w < 8; w++) r[w*32 +: 32] = {l[15:0], 13'h0a5, w[2:0]};
    return r;
  endfunction

  int        m_busy = 0;
  mem_req_t  m_cur;
  assign mem_req_ready = (m_busy == 0);
  assign mem_rsp_nak   = 1'b0;
  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (m_busy > 0) begin
      m_busy <= m_busy - 1;
      if (m_busy == 1) begin
        automatic int l = int'(m_cur.addr >> 5);
        if (m_cur.we) mem[l] <= m_cur.data;
        mem_rsp_data  <= mem[l];
        mem_rsp_valid <= 1'b1;
      end
    end else if (mem_req_valid && rst_n) begin
      m_cur  <= mem_req;
      m_busy <= DLAT;
      if (mem_req.we) n_mwr++; else n_mrd++;
    end
  end

  // ---- CPU side ----
  task automatic access(input bit we, input int l, input int wrd,
                        input logic [31:0] d, input logic [3:0] be,
                        output int lat, output logic [255:0] data);
    int t0;
    cpu_req_valid <= 1'b1; cpu_req_we <= we;
    cpu_req_addr  <= 32'(l * 32 + wrd * 4);
    cpu_req_wdata <= d; cpu_req_be <= be;
    do @(posedge clk); while (!cpu_req_ready);
    t0 = int'(cyc);
    cpu_req_valid <= 1'b0;
    do @(posedge clk); while (!cpu_rsp_valid);
    lat  = int'(cyc) - t0;
    data = cpu_rsp_data;
  endtask

  task automatic check_read(input int l, output int lat);
    logic [255:0] d;
    access(1'b0, l, 0, '0, '0, lat, d);
    checks++;
    if (d !== refm[l]) begin
      failures++;
      if (failures < 10) $display("FAIL read line %0d: got %h want %h", l, d, refm[l]);
    end
  endtask

  task automatic store(input int l, input int wrd, input logic [31:0] v,
                       input logic [3:0] be, output int lat);
    logic [255:0] d;
    access(1'b1, l, wrd, v, be, lat, d);
    for (int b = 0; b < 4; b++)
      if (be[b]) refm[l][wrd*32 + b*8 +: 8] = v[b*8 +: 8];
  endtask

  int hits = 0, misses = 0;
  initial begin
    int lat, wr0, l, l2;
    cpu_req_valid = 0; cpu_req_we = 0; cpu_req_addr = 0; cpu_req_wdata = 0; cpu_req_be = 0;
    for (int i = 0; i < NLINES; i++) begin mem[i] = init_line(i); refm[i] = init_line(i); end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // write-allocate and write-back: a store miss reads the line, writes nothing
    wr0 = n_mwr;
    store(3, 5, 32'hdeadbeef, 4'b0110, lat);
    checks++; if (n_mrd != 1 || n_mwr != wr0) begin failures++; $display("FAIL store miss: rd %0d wr %0d", n_mrd, n_mwr); end
    check_read(3, lat);
    checks++; if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end
    checks++; if (mem[3] !== init_line(3)) begin failures++; $display("FAIL write-through seen in memory"); end

    // LRU within set 0: lines 0, S, 2S, 3S; touch 0; 4S evicts S
    for (int k = 0; k < 4; k++) check_read(k * SETS, lat);
    check_read(0, lat);
    check_read(4 * SETS, lat);
    check_read(0, lat);
    checks++; if (lat != 2) begin failures++; $display("FAIL LRU: MRU line evicted"); end
    check_read(2 * SETS, lat);
    checks++; if (lat != 2) begin failures++; $display("FAIL LRU: younger line evicted"); end
    check_read(SETS, lat);
    checks++; if (lat == 2) begin failures++; $display("FAIL LRU: oldest line not evicted"); end

    // random traffic
    for (int i = 0; i < 4000; i++) begin
      l = $urandom_range(NLINES - 1);
      if ($urandom_range(2) == 0) store(l, $urandom_range(7), $urandom, 4'($urandom_range(15)), lat);
      else check_read(l, lat);
      if (lat == 2) hits++; else misses++;
      checks++; if (lat < 2) begin failures++; $display("FAIL latency %0d", lat); end
      if ($urandom_range(3) == 0) begin   // repeat at once: must hit in 2
        check_read(l, lat);
        checks++; if (lat != 2) begin failures++; $display("FAIL repeat missed (%0d)", lat); end
      end
    end

    // push every line out by reading other lines, then memory must match
    for (int k = 0; k < 2 * L2B / 32; k++) begin
      l2 = (NLINES - 1) - k;
      check_read(l2, lat);
    end
    for (int i = 0; i < NLINES - 2 * L2B / 32; i++) begin
      checks++;
      if (mem[i] !== refm[i]) begin
        failures++;
        if (failures < 10) $display("FAIL memory line %0d after eviction", i);
      end
    end
    checks++; if (hits == 0 || misses == 0 || n_mwr == 0) begin failures++; $display("FAIL no mix"); end
    $display("hits %0d misses %0d memory reads %0d writes %0d", hits, misses, n_mrd, n_mwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end
endmodule
