// ft_leon3_sys_tb: end-to-end test of the fault-tolerant subsystem at its
// default parameters (8 register windows, 1 KB caches, 4 x 512-word memory,
// interrupt every 10000 cycles).
//
// The testbench plays the processor core: it fetches instructions through the
// instruction cache, loads and stores through the data cache, uses the
// register file, answers the interval interrupt with a checkpoint routine
// (store all registers to a save area in memory, then request a checkpoint),
// and after core_restart runs a restore routine (reload the registers from the
// save area). Upsets are injected by flipping stored bits inside the design,
// the way a radiation upset would.
//
// Sequence: boot and run; first checkpoint from the interrupt; fatal check is
// left for the end. Then, for each detector: run on (changing memory and
// registers after the checkpoint), inject an upset, and check that the system
// rolled back to exactly the checkpointed memory image and registers, with
// the caches invalidated so that no post-checkpoint value is read from them.
// Detectors exercised: register-file complement mismatch, main-memory parity,
// a software-reported control-flow error. Also exercised: cache parity errors
// corrected by refetch without rollback, both caches contending for memory, and
// an error before any checkpoint (fatal). Every mechanism is counted, and one
// that never happened is a failure. Save and restore requests are checked to
// last BANK_DEPTH + 2 cycles: one cycle for the memory to start the copy, then
// BANK_DEPTH + 1 for the copy itself.
module ft_leon3_sys_tb;
  import ft_pkg::*;

  localparam int unsigned NREGS   = 8 * 16 + 8;
  localparam int unsigned RF_AW   = $clog2(NREGS);
  localparam int unsigned DEPTH   = 512;
  localparam int unsigned WORDS   = 4 * DEPTH;
  localparam int unsigned CODE    = 0;       // instruction words 0..255
  localparam int unsigned DATA    = 1024;    // data words 1024..1279
  localparam int unsigned NDATA   = 256;
  localparam int unsigned SAVE    = 1536;    // register save area

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             init_busy;
  logic             rf_we = 1'b0, rf_re1 = 1'b0, rf_re2 = 1'b0;
  logic [RF_AW-1:0] rf_waddr = '0, rf_raddr1 = '0, rf_raddr2 = '0;
  logic [31:0]      rf_wdata = '0, rf_rdata1, rf_rdata2;
  mem_req_t         i_req, d_req;
  mem_rsp_t         i_rsp, d_rsp;
  logic             irq, irq_ack = 1'b0, sw_ckpt_req = 1'b0, sw_err = 1'b0;
  logic             core_hold, core_restart, ckpt_valid, fatal;
  err_src_t         last_err;
  logic [15:0]      n_ckpt, n_rollback;
  logic             rf_err, mem_perr, ckpt_saving, ckpt_restoring;
  logic             ic_hit, ic_miss, ic_perr_fix, dc_hit, dc_miss, dc_perr_fix;

  ft_leon3_sys dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] mem_model [WORDS];
  logic [31:0] mem_ckpt  [WORDS];
  logic [31:0] rf_model  [NREGS];
  logic [31:0] rf_ckpt   [NREGS];

  // Mechanism counters.
  int c_ic_hit = 0, c_ic_miss = 0, c_dc_hit = 0, c_dc_miss = 0, c_ic_fix = 0, c_dc_fix = 0;
  int c_wt = 0, c_irq = 0, c_save = 0, c_restore = 0, c_rf_err = 0, c_mem_perr = 0;
  int c_sw_err = 0, c_restart = 0, c_contend = 0, c_fatal = 0;
  int save_cyc = 0, rest_cyc = 0, cyc_save_run = 0, cyc_rest_run = 0;

  always @(posedge clk) if (rst_n) begin
    if (ic_hit)  c_ic_hit++;
    if (ic_miss) c_ic_miss++;
    if (dc_hit)  c_dc_hit++;
    if (dc_miss) c_dc_miss++;
    if (ic_perr_fix) c_ic_fix++;
    if (dc_perr_fix) c_dc_fix++;
    if (dut.dc_mreq.req && dut.dc_mreq.we && dut.dc_mrsp.ack) c_wt++;
    if (dut.ic_mreq.req && dut.dc_mreq.req) c_contend++;
    if (rf_err)   c_rf_err++;
    if (mem_perr) c_mem_perr++;
    if (sw_err)   c_sw_err++;
    if (core_restart) c_restart++;
    if (ckpt_saving) cyc_save_run++;
    else if (cyc_save_run != 0) begin save_cyc = cyc_save_run; cyc_save_run = 0; c_save++; end
    if (ckpt_restoring) cyc_rest_run++;
    else if (cyc_rest_run != 0) begin rest_cyc = cyc_rest_run; cyc_rest_run = 0; c_restore++; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- core-side bus operations ----------------------------------------
  task automatic d_access(input bit we, input int addr, input logic [31:0] wd,
                          output logic [31:0] rd, output logic perr);
    d_req.req = 1'b1; d_req.we = we; d_req.addr = WADDR_W'(addr); d_req.be = 4'hF; d_req.wdata = wd;
    do @(posedge clk); while (!d_rsp.ack);
    rd = d_rsp.rdata; perr = d_rsp.perr;
    #1 d_req = '0;
  endtask

  task automatic store(input int addr, input logic [31:0] wd);
    logic [31:0] rd;
    logic pe;
    d_access(1'b1, addr, wd, rd, pe);
    mem_model[addr] = wd;
  endtask

  task automatic load_check(input int addr, input string what);
    logic [31:0] rd;
    logic pe;
    d_access(1'b0, addr, '0, rd, pe);
    check(!pe && rd == mem_model[addr], $sformatf("%s: load %0d = %h exp %h", what, addr, rd, mem_model[addr]));
  endtask

  task automatic fetch_check(input int addr, input string what);
    i_req.req = 1'b1; i_req.we = 1'b0; i_req.addr = WADDR_W'(addr); i_req.be = '0; i_req.wdata = '0;
    do @(posedge clk); while (!i_rsp.ack);
    check(!i_rsp.perr && i_rsp.rdata == mem_model[addr],
          $sformatf("%s: fetch %0d = %h exp %h", what, addr, i_rsp.rdata, mem_model[addr]));
    #1 i_req = '0;
  endtask

  task automatic rf_write(input int a, input logic [31:0] d);
    rf_we = 1'b1; rf_waddr = RF_AW'(a); rf_wdata = d;
    @(posedge clk); #1 rf_we = 1'b0;
    rf_model[a] = d;
  endtask

  task automatic rf_read(input int a, output logic [31:0] d, output logic e);
    rf_re1 = 1'b1; rf_raddr1 = RF_AW'(a);
    @(posedge clk); #1 rf_re1 = 1'b0;
    d = rf_rdata1; e = rf_err;
  endtask

  // ---- software routines -------------------------------------------------
  // Interrupt routine: store every register to the save area, then checkpoint.
  task automatic checkpoint_routine();
    logic [31:0] d;
    logic e;
    int c0;
    c0 = n_ckpt;
    irq_ack = 1'b1; @(posedge clk); #1 irq_ack = 1'b0;
    for (int r = 0; r < int'(NREGS); r++) begin
      rf_read(r, d, e);
      check(!e && d == rf_model[r], $sformatf("checkpoint routine reads r%0d", r));
      store(SAVE + r, d);
    end
    sw_ckpt_req = 1'b1; @(posedge clk); #1 sw_ckpt_req = 1'b0;
    while (n_ckpt == c0) @(posedge clk);
    #1;
    for (int i = 0; i < int'(WORDS); i++) mem_ckpt[i] = mem_model[i];
    for (int r = 0; r < int'(NREGS); r++) rf_ckpt[r] = rf_model[r];
  endtask

  // After core_restart: the memory image is the checkpoint; reload registers.
  task automatic restore_routine();
    logic [31:0] rd;
    logic pe;
    for (int i = 0; i < int'(WORDS); i++) mem_model[i] = mem_ckpt[i];
    for (int r = 0; r < int'(NREGS); r++) begin
      d_access(1'b0, SAVE + r, '0, rd, pe);
      rf_write(r, rd);
    end
  endtask

  task automatic wait_rollback(input string what);
    int n = 0;
    while (!core_restart && n < 5000) begin @(posedge clk); n++; end
    check(core_restart, {what, ": core_restart seen"});
    @(posedge clk); #1;
    restore_routine();
  endtask

  // Program run: fetch code and touch data, both caches at once.
  task automatic run_program(input int iters, input bit modify);
    fork
      for (int k = 0; k < iters; k++) fetch_check(CODE + (k % 256), "run");
      for (int k = 0; k < iters; k++) begin
        int a;
        a = DATA + $urandom_range(NDATA - 1);
        if (modify && $urandom_range(2) == 0) store(a, $urandom);
        else load_check(a, "run");
      end
    join
    if (modify) for (int r = 8; r < int'(NREGS); r += 5) rf_write(r, $urandom);
  endtask

  // Memory and registers equal the checkpoint.
  task automatic verify_rolled_back(input string what);
    logic [31:0] d;
    logic e;
    int bad;
    // The data region first, while the caches would still hold any stale
    // post-checkpoint line; then all of memory.
    bad = 0;
    for (int i = int'(DATA); i < int'(DATA + NDATA); i++) begin
      logic [31:0] rd;
      logic pe;
      d_access(1'b0, i, '0, rd, pe);
      if (pe || rd != mem_ckpt[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d data words read differ from the checkpoint", what, bad));
    bad = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      logic [31:0] rd;
      logic pe;
      d_access(1'b0, i, '0, rd, pe);
      if (pe || rd != mem_ckpt[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d memory words differ from the checkpoint", what, bad));
    bad = 0;
    for (int r = 0; r < int'(NREGS); r++) begin
      rf_read(r, d, e);
      if (e || d != rf_ckpt[r]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d registers differ from the checkpoint", what, bad));
  endtask

  initial begin
    logic [31:0] d;
    logic e;
    int r0, row;
    i_req = '0; d_req = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    #1;
    for (int i = 0; i < int'(WORDS); i++) mem_model[i] = '0;
    for (int r = 0; r < int'(NREGS); r++) rf_model[r] = '0;

    // boot: load code and data, set registers
    for (int i = 0; i < 256; i++) store(CODE + i, $urandom);
    for (int i = 0; i < int'(NDATA); i++) store(DATA + i, $urandom);
    for (int r = 0; r < int'(NREGS); r++) rf_write(r, $urandom);
    run_program(600, 1'b1);

    // first checkpoint, from the interval interrupt
    while (!irq) begin
      run_program(50, 1'b1);
    end
    c_irq++;
    checkpoint_routine();
    check(ckpt_valid && n_ckpt == 1, "first checkpoint taken");
    check(save_cyc == DEPTH + 2, $sformatf("save took %0d cycles, expected %0d", save_cyc, DEPTH + 2));

    // 1: register-file upset
    run_program(400, 1'b1);
    rf_read(20, d, e);                              // the register is fine
    check(!e, "no error before the upset");
    dut.u_rf.comp[20][9] = ~dut.u_rf.comp[20][9];
    r0 = n_rollback;
    rf_read(20, d, e);
    check(e, "register-file upset detected on read");
    wait_rollback("register file");
    check(n_rollback == r0 + 1 && last_err.rf, "rollback after register-file error");
    check(rest_cyc == DEPTH + 2, $sformatf("restore took %0d cycles, expected %0d", rest_cyc, DEPTH + 2));
    verify_rolled_back("register file");

    // 2: main-memory upset in a word the caches do not hold
    run_program(400, 1'b1);
    row = 700 - DEPTH;                              // word 700 is in bank 1
    dut.u_mem.g_bank[1].u_bank.work[row][17] = ~dut.u_mem.g_bank[1].u_bank.work[row][17];
    r0 = n_rollback;
    d_access(1'b0, 700, '0, d, e);
    check(e, "main-memory parity error reported on the load");
    wait_rollback("memory parity");
    check(n_rollback == r0 + 1 && last_err.mem, "rollback after memory parity error");
    verify_rolled_back("memory parity");

    // 3: software-detected control-flow error
    run_program(400, 1'b1);
    r0 = n_rollback;
    sw_err = 1'b1; @(posedge clk); #1 sw_err = 1'b0;
    wait_rollback("control flow");
    check(n_rollback == r0 + 1 && last_err.sw, "rollback after software-reported error");
    verify_rolled_back("control flow");

    // 4: cache upsets are corrected by refetch, without a rollback
    load_check(DATA + 3, "warm");
    fetch_check(CODE + 5, "warm");
    dut.u_dcache.data_ram[(DATA + 3) % 256][30] = ~dut.u_dcache.data_ram[(DATA + 3) % 256][30];
    dut.u_icache.data_ram[(CODE + 5) % 256][1]  = ~dut.u_icache.data_ram[(CODE + 5) % 256][1];
    r0 = n_rollback;
    load_check(DATA + 3, "data cache parity");
    fetch_check(CODE + 5, "instruction cache parity");
    repeat (5) @(posedge clk);
    check(n_rollback == r0 && !core_hold, "cache parity errors need no rollback");

    // a second checkpoint after more work, then one more rollback onto it
    run_program(300, 1'b1);
    while (!irq) @(posedge clk);
    #1 c_irq++;
    checkpoint_routine();
    run_program(200, 1'b1);
    sw_err = 1'b1; @(posedge clk); #1 sw_err = 1'b0;
    wait_rollback("second checkpoint");
    verify_rolled_back("second checkpoint");

    // 5: an error before any checkpoint is not recoverable
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    while (init_busy) @(posedge clk);
    #1 sw_err = 1'b1; @(posedge clk); #1 sw_err = 1'b0;
    repeat (10) @(posedge clk); #1;
    if (fatal) c_fatal++;
    check(fatal && core_hold, "error before the first checkpoint is fatal");

    // every mechanism happened
    check(c_ic_hit > 0,   "instruction cache hit happened");
    check(c_ic_miss > 0,  "instruction cache miss happened");
    check(c_dc_hit > 0,   "data cache hit happened");
    check(c_dc_miss > 0,  "data cache miss happened");
    check(c_wt > 0,       "write-through happened");
    check(c_ic_fix > 0,   "instruction cache parity refetch happened");
    check(c_dc_fix > 0,   "data cache parity refetch happened");
    check(c_contend > 0,  "both caches contended for memory");
    check(c_irq >= 2,     "interval interrupt happened");
    check(c_save >= 2,    "checkpoint save happened");
    check(c_restore >= 4, "checkpoint restore happened");
    check(c_restart >= 4, "core restart happened");
    check(c_rf_err > 0,   "register-file mismatch happened");
    check(c_mem_perr > 0, "memory parity error happened");
    check(c_sw_err > 0,   "software-reported error happened");
    check(c_fatal > 0,    "fatal state happened");
    $display("mechanisms: ic hit/miss/fix %0d/%0d/%0d dc hit/miss/fix %0d/%0d/%0d write-through %0d contention %0d",
             c_ic_hit, c_ic_miss, c_ic_fix, c_dc_hit, c_dc_miss, c_dc_fix, c_wt, c_contend);
    $display("mechanisms: irq %0d save %0d restore %0d restart %0d rf_err %0d mem_perr %0d sw_err %0d fatal %0d",
             c_irq, c_save, c_restore, c_restart, c_rf_err, c_mem_perr, c_sw_err, c_fatal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
