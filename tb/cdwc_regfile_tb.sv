// cdwc_regfile_tb: self-checking test of the complement duplicate-with-compare
// register file at its default size (8 windows, 136 registers).
//
// Checks: the reset clearing pass takes NREGS cycles and leaves every register
// zero with no mismatch; random writes and dual-port reads against a reference
// array, with one cycle of read latency and the read-old-value rule; a bit
// flipped in either copy (primary or complement) of a register is flagged on
// the port that reads it, and only on reads with the enable set; rewriting the
// register clears the mismatch.
module cdwc_regfile_tb;
  localparam int unsigned NWIN  = 8;
  localparam int unsigned NREGS = NWIN * 16 + 8;
  localparam int unsigned AW    = $clog2(NREGS);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          init_busy;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [31:0]   wdata = '0;
  logic          re1 = 1'b0, re2 = 1'b0;
  logic [AW-1:0] raddr1 = '0, raddr2 = '0;
  logic [31:0]   rdata1, rdata2;
  logic          err1, err2, err;

  int checks = 0, failures = 0;
  logic [31:0] ref_rf [NREGS];

  cdwc_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Read both ports and compare with expected data and error flags.
  task automatic read2(input int a1, input int a2, input bit e1, input bit e2);
    raddr1 = AW'(a1); raddr2 = AW'(a2); re1 = 1'b1; re2 = 1'b1;
    @(posedge clk); #1;
    re1 = 1'b0; re2 = 1'b0;
    check(rdata1 == ref_rf[a1], $sformatf("port1 reg %0d data %h exp %h", a1, rdata1, ref_rf[a1]));
    check(rdata2 == ref_rf[a2], $sformatf("port2 reg %0d data %h exp %h", a2, rdata2, ref_rf[a2]));
    check(err1 == e1 && err2 == e2 && err == (e1 || e2),
          $sformatf("err flags %b%b%b exp %b%b reg %0d/%0d", err1, err2, err, e1, e2, a1, a2));
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
    ref_rf[a] = d;
  endtask

  initial begin
    int cyc;
    int k;
    for (int i = 0; i < int'(NREGS); i++) ref_rf[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // clearing pass length
    cyc = 0;
    while (init_busy) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(cyc == NREGS, $sformatf("init took %0d cycles, expected %0d", cyc, NREGS));
    // every register reads zero without mismatch
    for (int i = 0; i < int'(NREGS); i += 2) read2(i, i + 1, 1'b0, 1'b0);
    // random writes and reads
    for (int i = 0; i < int'(NREGS); i++) wr(i, $urandom);
    for (int n = 0; n < 300; n++) read2($urandom_range(NREGS - 1), $urandom_range(NREGS - 1), 1'b0, 1'b0);
    // read in the same cycle as a write returns the old value
    raddr1 = AW'(7); re1 = 1'b1; we = 1'b1; waddr = AW'(7); wdata = 32'hCAFE_F00D;
    @(posedge clk); #1;
    we = 1'b0; re1 = 1'b0;
    check(rdata1 == ref_rf[7] && !err1, "read-during-write returns old value");
    ref_rf[7] = 32'hCAFE_F00D;
    read2(7, 7, 1'b0, 1'b0);
    // upset in the complement copy, seen on port 1
    k = 17;
    dut.comp[k][13] = ~dut.comp[k][13];
    read2(k, 3, 1'b1, 1'b0);
    // the same, not flagged when the read enable is low
    raddr1 = AW'(k); re1 = 1'b0; re2 = 1'b0;
    @(posedge clk); #1;
    check(!err, "no error flag without a read enable");
    // rewrite clears it
    wr(k, 32'h1234_5678);
    read2(k, k, 1'b0, 1'b0);
    // upset in the primary copy, seen on port 2; data returned is the primary
    k = 100;
    dut.prim[k][0] = ~dut.prim[k][0];
    ref_rf[k][0] = ~ref_rf[k][0];
    read2(5, k, 1'b0, 1'b1);
    // both copies forced to the same value (e.g. a stuck data line): caught
    k = 42;
    dut.prim[k] = 32'hFFFF_0000;
    dut.comp[k] = 32'hFFFF_0000;
    ref_rf[k] = 32'hFFFF_0000;
    read2(k, k, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
