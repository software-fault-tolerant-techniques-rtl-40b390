// ckpt_ctrl_tb: self-checking test of the checkpoint and rollback controller.
//
// The memory's busy/done handshake and the caches' idle signal are modelled
// here. The interval is shortened to 60 cycles. Checks: irq rises every
// CKPT_INTERVAL cycles and falls on irq_ack; an error before any checkpoint
// ends in the fatal state with the core held; a checkpoint request waits for
// the caches to be idle, holds the core, keeps mem_save_req up until done and
// counts the checkpoint; each error source (register file, memory parity,
// software check) causes exactly one rollback with restore, one cache flush
// and one core restart pulse, in that order, and is reported in last_err; an
// error in the same cycle as a checkpoint request wins and voids the request;
// an error during a save is handled right after it.
module ckpt_ctrl_tb;
  import ft_pkg::*;

  localparam int unsigned INTERVAL = 60;
  localparam int unsigned MEM_CYC  = 7;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        irq, irq_ack = 1'b0;
  logic        sw_ckpt_req = 1'b0;
  err_src_t    err_in = '0;
  logic        sys_idle = 1'b1;
  logic        mem_busy = 1'b0, mem_done = 1'b0;
  logic        mem_save_req, mem_restore_req, cache_flush, core_hold, core_restart;
  logic        ckpt_valid, fatal;
  err_src_t    last_err;
  logic [15:0] n_ckpt, n_rollback;

  int checks = 0, failures = 0;
  int n_flush = 0, n_restart = 0, n_save_cyc = 0, n_rest_cyc = 0;
  int t_restore_end = 0, t_flush = 0, t_restart = 0, cycle = 0;

  ckpt_ctrl #(.CKPT_INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  // Memory model: a copy takes MEM_CYC cycles, done in the last one.
  initial begin
    int c;
    forever begin
      @(posedge clk);
      cycle++;
      if (cache_flush)  begin n_flush++;   t_flush = cycle; end
      if (core_restart) begin n_restart++; t_restart = cycle; end
      if (mem_save_req) n_save_cyc++;
      if (mem_restore_req) n_rest_cyc++;
      if ((mem_save_req || mem_restore_req) && !mem_busy) begin
        #1 mem_busy = 1'b1;
        c = 0;
        while (c < int'(MEM_CYC) - 1) begin @(posedge clk); cycle++; c++;
          if (mem_save_req) n_save_cyc++;
          if (mem_restore_req) n_rest_cyc++;
        end
        #1 mem_done = 1'b1;
        if (mem_restore_req) t_restore_end = cycle;
        @(posedge clk); cycle++;
        #1 mem_done = 1'b0; mem_busy = 1'b0;
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

  task automatic pulse_err(input err_src_t e);
    err_in = e; @(posedge clk); #1 err_in = '0;
  endtask

  task automatic wait_run();
    int n = 0;
    do begin @(posedge clk); n++; end while ((core_hold || mem_busy) && n < 200);
    #1;
  endtask

  // One rollback for error source e, checked step by step.
  task automatic rollback(input err_src_t e, input string name);
    int r0, f0, s0;
    r0 = n_rollback; f0 = n_flush; s0 = n_restart;
    pulse_err(e);
    wait_run();
    check(n_rollback == r0 + 1, {name, ": one rollback counted"});
    check(n_flush == f0 + 1 && n_restart == s0 + 1, {name, ": one flush and one restart"});
    check(t_restore_end < t_flush && t_flush < t_restart, {name, ": restore, then flush, then restart"});
    check(last_err == e, $sformatf("%s: last_err %b", name, last_err));
  endtask

  initial begin
    int t0, t1, c0, h;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // an error before any checkpoint cannot be recovered
    repeat (3) @(posedge clk); #1;
    pulse_err('{sw: 1'b1, mem: 1'b0, rf: 1'b0});
    repeat (20) @(posedge clk); #1;
    check(fatal && core_hold && !mem_restore_req && n_rollback == 0, "error without checkpoint is fatal");
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    check(!fatal && !core_hold && !ckpt_valid, "reset leaves the fatal state");
    // interval interrupt
    @(posedge irq); t0 = cycle;
    #1 irq_ack = 1'b1; @(posedge clk); #1 irq_ack = 1'b0;
    check(!irq, "irq_ack clears irq");
    @(posedge irq); t1 = cycle;
    check(t1 - t0 == INTERVAL, $sformatf("interrupt period %0d, expected %0d", t1 - t0, INTERVAL));
    #1 irq_ack = 1'b1; @(posedge clk); #1 irq_ack = 1'b0;
    // checkpoint waits for the caches, holds the core while saving
    sys_idle = 1'b0;
    c0 = n_ckpt;
    sw_ckpt_req = 1'b1; @(posedge clk); #1 sw_ckpt_req = 1'b0;
    h = 0;
    repeat (5) begin @(posedge clk); #1; if (mem_save_req) h++; end
    check(h == 0 && core_hold, "save waits for idle caches, core held");
    sys_idle = 1'b1;
    n_save_cyc = 0;
    wait_run();
    check(n_ckpt == c0 + 1 && ckpt_valid, "checkpoint counted and valid");
    check(n_save_cyc == MEM_CYC, $sformatf("save request held %0d cycles, expected %0d", n_save_cyc, MEM_CYC));
    // rollbacks for each error source
    rollback('{sw: 1'b0, mem: 1'b0, rf: 1'b1}, "register file");
    rollback('{sw: 1'b0, mem: 1'b1, rf: 1'b0}, "memory parity");
    rollback('{sw: 1'b1, mem: 1'b0, rf: 1'b0}, "software check");
    // error and checkpoint request in the same cycle
    c0 = n_ckpt; h = n_rollback;
    err_in.rf = 1'b1; sw_ckpt_req = 1'b1; @(posedge clk); #1 err_in = '0; sw_ckpt_req = 1'b0;
    wait_run();
    repeat (5) @(posedge clk); #1;
    check(n_rollback == h + 1 && n_ckpt == c0, "error wins over a simultaneous checkpoint request");
    // error during a save: handled right after it
    c0 = n_ckpt; h = n_rollback;
    sw_ckpt_req = 1'b1; @(posedge clk); #1 sw_ckpt_req = 1'b0;
    while (!mem_save_req) begin @(posedge clk); #1; end
    pulse_err('{sw: 1'b0, mem: 1'b1, rf: 1'b0});
    wait_run();
    check(n_ckpt == c0 + 1 && n_rollback == h + 1, "error during save rolls back after the save");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
