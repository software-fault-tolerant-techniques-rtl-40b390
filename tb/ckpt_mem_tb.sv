// ckpt_mem_tb: self-checking test of the checkpointed main memory.
//
// Two memories are driven: one at the default size (4 banks of 512 words) and
// one with twice the banks. Checks: reset clearing; byte-enable writes and
// reads against a reference image; a save and a restore each keep the memory
// busy for BANK_DEPTH + 1 cycles in both memories (the copy time does not
// depend on the number of banks); after a restore the memory equals the image
// at the save, including words changed and words corrupted since; a flipped
// stored bit is reported as a parity error; a request made during a copy waits
// for the copy to finish.
module ckpt_mem_tb;
  import ft_pkg::*;

  localparam int unsigned NB    = 4;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned WORDS = NB * DEPTH;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  mem_req_t req, req2;
  mem_rsp_t rsp, rsp2;
  logic     save_req = 1'b0, restore_req = 1'b0;
  logic     busy, done, busy2, done2;

  int checks = 0, failures = 0;
  logic [31:0] model [WORDS];
  logic [31:0] saved [WORDS];

  ckpt_mem dut (.clk, .rst_n, .req, .rsp, .save_req, .restore_req, .busy, .done);
  // A memory twice as large; it only serves to compare copy times.
  ckpt_mem #(.NBANKS(2 * NB), .BANK_DEPTH(DEPTH)) dut2 (
    .clk, .rst_n, .req(req2), .rsp(rsp2), .save_req, .restore_req, .busy(busy2), .done(done2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(input bit we, input int addr, input logic [3:0] be,
                        input logic [31:0] wd, output logic [31:0] rd, output logic perr);
    req.req = 1'b1; req.we = we; req.addr = WADDR_W'(addr); req.be = be; req.wdata = wd;
    do @(posedge clk); while (!rsp.ack);
    rd = rsp.rdata; perr = rsp.perr;
    #1 req.req = 1'b0;
  endtask

  task automatic write_word(input int addr, input logic [3:0] be, input logic [31:0] wd);
    logic [31:0] rd;
    logic        pe;
    access(1'b1, addr, be, wd, rd, pe);
    model[addr] = merge_bytes(model[addr], wd, be);
  endtask

  task automatic read_check(input int addr, input bit exp_perr);
    logic [31:0] rd;
    logic        pe;
    access(1'b0, addr, 4'h0, '0, rd, pe);
    check(pe == exp_perr, $sformatf("addr %0d perr %b exp %b", addr, pe, exp_perr));
    if (!exp_perr) check(rd == model[addr], $sformatf("addr %0d read %h exp %h", addr, rd, model[addr]));
  endtask

  // Run a save or restore and count the cycles each memory is busy.
  task automatic copy(input bit restore, output int cyc1, output int cyc2);
    bit d1, d2;
    cyc1 = 0; cyc2 = 0; d1 = 0; d2 = 0;
    if (restore) restore_req = 1'b1; else save_req = 1'b1;
    while (!(d1 && d2)) begin
      @(posedge clk);
      if (busy  && !d1) cyc1++;
      if (busy2 && !d2) cyc2++;
      if (done)  d1 = 1;
      if (done2) d2 = 1;
      if (d1 && d2) begin
        #1 save_req = 1'b0; restore_req = 1'b0;
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    int c1, c2, cyc;
    logic [31:0] rd;
    logic pe;
    req = '0; req2 = '0;
    for (int i = 0; i < int'(WORDS); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    check(cyc == DEPTH, $sformatf("reset clearing took %0d cycles", cyc));
    while (busy2) @(posedge clk);
    #1;
    for (int i = 0; i < 40; i++) read_check($urandom_range(WORDS - 1), 1'b0);
    // fill the memory, some words by bytes
    for (int i = 0; i < int'(WORDS); i++) write_word(i, 4'hF, $urandom);
    for (int i = 0; i < 200; i++) write_word($urandom_range(WORDS - 1), 4'($urandom_range(15)), $urandom);
    for (int i = 0; i < 300; i++) read_check($urandom_range(WORDS - 1), 1'b0);
    // checkpoint
    copy(1'b0, c1, c2);
    check(c1 == DEPTH + 1, $sformatf("save busy %0d cycles, expected %0d", c1, DEPTH + 1));
    check(c2 == c1, $sformatf("save time grows with memory size: %0d vs %0d", c2, c1));
    for (int i = 0; i < int'(WORDS); i++) saved[i] = model[i];
    // change memory after the checkpoint and corrupt a stored bit
    for (int i = 0; i < 300; i++) write_word($urandom_range(WORDS - 1), 4'hF, $urandom);
    for (int b = 0; b < int'(NB); b++) begin   // first and last word of every bank
      write_word(b * DEPTH, 4'hF, ~saved[b * DEPTH]);
      write_word(b * DEPTH + DEPTH - 1, 4'hF, ~saved[b * DEPTH + DEPTH - 1]);
    end
    write_word(DEPTH + 9, 4'hF, 32'h0F0F_0F0F);
    dut.g_bank[1].u_bank.work[9][4] = ~dut.g_bank[1].u_bank.work[9][4];
    read_check(DEPTH + 9, 1'b1);
    dut.g_bank[3].u_bank.work[100][33] = ~dut.g_bank[3].u_bank.work[100][33];
    read_check(3 * DEPTH + 100, 1'b1);
    // a request made while a copy runs waits for it
    fork
      copy(1'b1, c1, c2);
      begin
        @(posedge clk); #1;
        access(1'b0, 77, 4'h0, '0, rd, pe);
        check(!busy || done, "bus access served during a copy");
      end
    join
    check(c1 == DEPTH + 1, $sformatf("restore busy %0d cycles, expected %0d", c1, DEPTH + 1));
    check(c2 == c1, $sformatf("restore time grows with memory size: %0d vs %0d", c2, c1));
    for (int i = 0; i < int'(WORDS); i++) model[i] = saved[i];
    for (int i = 0; i < int'(WORDS); i++) read_check(i, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
