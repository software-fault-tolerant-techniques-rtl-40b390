// ckpt_ctrl: checkpoint and rollback controller.
//
// Recovery in this processor is by checkpoint and rollback. A checkpoint is the
// register file, the processor state registers and all of main memory; the
// caches are write-through and are not saved, only invalidated on rollback.
// Software and hardware share the work:
//
//  * An interval timer raises irq every CKPT_INTERVAL cycles. Its interrupt
//    routine runs the consistency checks on the functional units, and, if
//    they pass, stores the registers and state registers to main memory and
//    requests a checkpoint (sw_ckpt_req). The controller then holds the core,
//    waits for the caches and memory to be quiet, and has main memory copy
//    itself into its checkpoint image.
//  * Any detected error starts a rollback: a register-file complement
//    mismatch (rf_err), a main-memory parity error (mem_perr), or a software
//    check (sw_err: a control-flow signature mismatch at a block entry or a
//    failed consistency check). The controller holds the core, restores main
//    memory from the checkpoint, invalidates both caches, and pulses
//    core_restart so that the core re-enters its restore routine, which
//    reloads registers and state from the restored memory image.
//  * An error before any checkpoint has been taken cannot be recovered: the
//    controller raises fatal and keeps the core held until reset.
//
// Interface and timing: error inputs and sw_ckpt_req are one-cycle pulses and
// are latched, so none is lost while a sequence runs; errors take precedence
// over a pending checkpoint. irq stays high until irq_ack. mem_save_req and
// mem_restore_req are held until mem_done. cache_flush and core_restart are
// one-cycle pulses; core_hold is high from the start of a sequence until its
// last cycle. An error that arrives while a checkpoint is being saved is
// handled as soon as the save ends, without releasing the core, so it rolls
// back to that new checkpoint.
//
// From the source: periodic consistency-check and checkpoint interrupt
// routine, checkpoint contents, cache invalidation, rollback as the recovery
// for every unit. This design's choices: the interval, the handshake and the
// hold/restart signalling to the core, and the fatal state.
module ckpt_ctrl
  import ft_pkg::*;
#(
  parameter int unsigned CKPT_INTERVAL = 10000,
  parameter int unsigned CNT_W         = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // interrupt for the check/checkpoint routine
  output logic             irq,
  input  logic             irq_ack,
  // requests and error reports
  input  logic             sw_ckpt_req,
  input  err_src_t         err_in,
  // subsystem status
  input  logic             sys_idle,
  input  logic             mem_busy,
  input  logic             mem_done,
  // commands
  output logic             mem_save_req,
  output logic             mem_restore_req,
  output logic             cache_flush,
  output logic             core_hold,
  output logic             core_restart,
  // status
  output logic             ckpt_valid,
  output logic             fatal,
  output err_src_t         last_err,
  output logic [CNT_W-1:0] n_ckpt,
  output logic [CNT_W-1:0] n_rollback
);

  typedef enum logic [2:0] {
    K_RUN, K_SAVE_WAIT, K_SAVE, K_REST_WAIT, K_RESTORE, K_FLUSH, K_RESTART, K_FATAL
  } kstate_e;

  kstate_e  state;
  err_src_t err_pend;
  logic     ckpt_pend;
  logic [$clog2(CKPT_INTERVAL+1)-1:0] tmr;

  logic quiet;
  assign quiet = sys_idle && !mem_busy;

  // Interval timer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr <= '0;
      irq <= 1'b0;
    end else begin
      if (32'(tmr) == CKPT_INTERVAL - 1) begin
        tmr <= '0;
        irq <= 1'b1;
      end else begin
        tmr <= tmr + 1'b1;
        if (irq_ack) irq <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= K_RUN;
      err_pend   <= '0;
      ckpt_pend  <= 1'b0;
      ckpt_valid <= 1'b0;
      fatal      <= 1'b0;
      last_err   <= '0;
      n_ckpt     <= '0;
      n_rollback <= '0;
    end else begin
      // Latch requests; the sequences below consume them.
      if (sw_ckpt_req) ckpt_pend <= 1'b1;
      err_pend <= err_pend | err_in;

      unique case (state)
        K_RUN: begin
          if ((err_pend | err_in) != '0) begin
            last_err <= err_pend | err_in;
            err_pend <= '0;
            if (ckpt_valid) state <= K_REST_WAIT;
            else begin
              state <= K_FATAL;
              fatal <= 1'b1;
            end
          end else if (ckpt_pend) begin
            ckpt_pend <= 1'b0;
            state     <= K_SAVE_WAIT;
          end
        end
        K_SAVE_WAIT: if (quiet) state <= K_SAVE;
        K_SAVE: if (mem_done) begin
          ckpt_valid <= 1'b1;
          n_ckpt     <= n_ckpt + 1'b1;
          // An error seen during the save rolls back at once, without
          // releasing the core in between.
          if ((err_pend | err_in) != '0) begin
            last_err <= err_pend | err_in;
            err_pend <= '0;
            state    <= K_REST_WAIT;
          end else begin
            state    <= K_RUN;
          end
        end
        K_REST_WAIT: if (quiet) state <= K_RESTORE;
        K_RESTORE: if (mem_done) state <= K_FLUSH;
        K_FLUSH: begin
          ckpt_pend <= 1'b0;          // a request from the abandoned run is void
          err_pend  <= '0;            // as are errors seen while rolling back
          state     <= K_RESTART;
        end
        K_RESTART: begin
          n_rollback <= n_rollback + 1'b1;
          state      <= K_RUN;
        end
        K_FATAL: ;
        default: state <= K_RUN;
      endcase
    end
  end

  assign mem_save_req    = (state == K_SAVE);
  assign mem_restore_req = (state == K_RESTORE);
  assign cache_flush     = (state == K_FLUSH);
  assign core_restart    = (state == K_RESTART);
  assign core_hold       = (state != K_RUN);

endmodule
