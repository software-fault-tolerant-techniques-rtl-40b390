// l1_cache_tb: self-checking test of the direct-mapped write-through cache.
//
// The cache (1 KB, default) is connected to a memory model in this testbench
// that acknowledges after a random 1..3 cycles and can be told to report a
// parity error. Checks: a first read misses and a second hits; a hit is
// acknowledged on the second clock edge after the request; writes reach
// memory at once, update a present line and do not allocate an absent one;
// two addresses with the same index evict each other; flush invalidates every
// line, so a value changed in memory behind the cache (as a rollback does) is
// read afresh; a flipped bit in a cached data word or tag is corrected by a
// refetch with perr_fix; a memory parity error is passed to the processor and
// the word is not cached. The processor side is also driven with random mixed
// traffic against a reference memory.
module l1_cache_tb;
  import ft_pkg::*;

  localparam int unsigned MWORDS = 4096;   // modelled memory, word addressed

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     flush = 1'b0;
  mem_req_t creq, mreq;
  mem_rsp_t crsp, mrsp;
  logic     idle, hit, miss, perr_fix;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fix = 0, n_mreads = 0, n_mwrites = 0;
  logic [31:0] mem [MWORDS];
  bit          mem_bad_addr_en = 0;
  int          mem_bad_addr = 0;

  l1_cache dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (hit)      n_hit++;
    if (miss)     n_miss++;
    if (perr_fix) n_fix++;
  end

  // Memory model: acknowledges a held request after 1..3 cycles.
  initial begin
    mrsp = '0;
    forever begin
      @(posedge clk);
      #1 mrsp = '0;
      if (mreq.req) begin
        int lat;
        mem_req_t r;
        lat = $urandom_range(0, 2);
        repeat (lat) @(posedge clk);
        #1;
        r = mreq;
        mrsp.ack = 1'b1;
        if (r.we) begin
          mem[r.addr % MWORDS] = merge_bytes(mem[r.addr % MWORDS], r.wdata, r.be);
          n_mwrites++;
        end else begin
          mrsp.rdata = mem[r.addr % MWORDS];
          mrsp.perr  = mem_bad_addr_en && (int'(r.addr) == mem_bad_addr);
          n_mreads++;
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input bit we, input int addr, input logic [3:0] be, input logic [31:0] wd,
                        output logic [31:0] rd, output logic perr, output int cyc);
    creq.req = 1'b1; creq.we = we; creq.addr = WADDR_W'(addr); creq.be = be; creq.wdata = wd;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!crsp.ack);
    rd = crsp.rdata; perr = crsp.perr;
    #1 creq = '0;
  endtask

  task automatic rd_check(input int addr, input string what, output int cyc);
    logic [31:0] rd;
    logic pe;
    access(1'b0, addr, 4'h0, '0, rd, pe, cyc);
    check(rd == mem[addr % MWORDS] && !pe, $sformatf("%s: addr %0d read %h exp %h", what, addr, rd, mem[addr % MWORDS]));
  endtask

  task automatic wr(input int addr, input logic [3:0] be, input logic [31:0] wd);
    logic [31:0] rd;
    logic pe;
    int cyc;
    access(1'b1, addr, be, wd, rd, pe, cyc);
  endtask

  initial begin
    int cyc, h0, m0, f0, mr0;
    logic [31:0] rd;
    logic pe;
    creq = '0;
    for (int i = 0; i < int'(MWORDS); i++) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // miss then hit
    m0 = n_miss; h0 = n_hit;
    rd_check(10, "first read", cyc);
    check(n_miss == m0 + 1, "first read counted as a miss");
    rd_check(10, "second read", cyc);
    check(n_hit == h0 + 1, "second read counted as a hit");
    check(cyc == 2, $sformatf("hit latency %0d edges, expected 2", cyc));
    // write through to a present line
    rd = mem[10];
    wr(10, 4'b0101, 32'hAABB_CCDD);
    check(mem[10] == {rd[31:24], 8'hBB, rd[15:8], 8'hDD}, "write-through reached memory");
    h0 = n_hit;
    rd_check(10, "read after write hit", cyc);
    check(n_hit == h0 + 1, "written line stays cached and updated");
    // write to an absent line does not allocate
    wr(20, 4'hF, 32'h1111_2222);
    check(mem[20] == 32'h1111_2222, "write-through of absent line");
    m0 = n_miss;
    rd_check(20, "read after non-allocating write", cyc);
    check(n_miss == m0 + 1, "no write-allocate");
    // conflict: same index, different tag
    rd_check(30, "a", cyc);
    rd_check(30 + 256, "b", cyc);
    m0 = n_miss;
    rd_check(30, "a again", cyc);
    check(n_miss == m0 + 1, "conflicting line evicted");
    // flush: change memory behind the cache, flush, read the new value
    rd_check(40, "before flush", cyc);
    mem[40] = 32'hDEAD_BEEF;
    flush = 1'b1; @(posedge clk); #1 flush = 1'b0;
    m0 = n_miss;
    rd_check(40, "after flush", cyc);
    check(n_miss == m0 + 1, "flush invalidated the line");
    // parity upset in a cached data word
    rd_check(50, "load", cyc);
    dut.data_ram[50][7] = ~dut.data_ram[50][7];
    f0 = n_fix; mr0 = n_mreads;
    rd_check(50, "data parity refetch", cyc);
    check(n_fix == f0 + 1 && n_mreads == mr0 + 1, "data parity error fixed by refetch");
    h0 = n_hit;
    rd_check(50, "after refetch", cyc);
    check(n_hit == h0 + 1, "refetched line cached again");
    // upset in a tag's parity bit: the tag still matches, parity catches it
    rd_check(60, "load", cyc);
    dut.tag_ram[60][22] = ~dut.tag_ram[60][22];
    f0 = n_fix;
    rd_check(60, "tag parity refetch", cyc);
    check(n_fix == f0 + 1, "tag parity error fixed by refetch");
    // upset in a tag bit: the lookup misses and refetches
    rd_check(61, "load", cyc);
    dut.tag_ram[61][3] = ~dut.tag_ram[61][3];
    mr0 = n_mreads;
    rd_check(61, "tag bit upset refetch", cyc);
    check(n_mreads == mr0 + 1, "tag bit upset turns into a miss");
    // memory parity error: reported, not cached
    mem_bad_addr_en = 1; mem_bad_addr = 70;
    access(1'b0, 70, 4'h0, '0, rd, pe, cyc);
    check(pe, "memory parity error passed to the processor");
    mem_bad_addr_en = 0;
    m0 = n_miss;
    rd_check(70, "after memory parity error", cyc);
    check(n_miss == m0 + 1, "word with memory parity error not cached");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, 1023);
      if ($urandom_range(3) == 0) wr(a, 4'($urandom_range(1, 15)), $urandom);
      else rd_check(a, "random", cyc);
    end
    check(n_hit > 100 && n_miss > 100, $sformatf("random traffic mixes hits %0d and misses %0d", n_hit, n_miss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
