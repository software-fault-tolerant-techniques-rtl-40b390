// ft_leon3_sys: the fault-tolerant storage and recovery subsystem of a LEON3
// softcore processor for SRAM-based FPGAs.
//
// In an SRAM FPGA a radiation upset can flip a configuration bit and so change
// the processor's logic or routing until the device is reconfigured. Instead of
// triplicating the processor, this design detects such faults with cheap checks
// and recovers by rolling back to a checkpoint, paying in run time rather than
// area. The hardware here is the part of that scheme that is not software:
//
//   cdwc_regfile  register file with a complemented duplicate, compared on read
//   l1_cache x2   1 KB direct-mapped write-through instruction and data caches,
//                 parity protected, flash-invalidated on rollback
//   mem_arb       shares main memory between the two caches
//   ckpt_mem      block-RAM main memory with a checkpoint image, saved and
//                 restored in all banks at once
//   ckpt_ctrl     interval interrupt for the check/checkpoint routine, error
//                 collection, checkpoint and rollback sequencing
//
// The LEON3 integer unit, multiplier/divider and interrupt controller are not
// part of this RTL; their side of every connection is a port here. The
// software techniques (control-flow signatures at block entries, consistency
// checks of the functional units, the checkpoint routine that stores registers
// and state registers to memory) run on that core and report to this
// subsystem through sw_err and sw_ckpt_req.
//
// Interface: the register file ports have the timing of cdwc_regfile; i_req /
// i_rsp and d_req / d_rsp follow the request/acknowledge rule of ft_pkg (word
// addresses, request held until ack). The core must stop issuing new
// requests while core_hold is high and must restart at its restore routine
// when core_restart pulses. init_busy is high after reset while the register
// file and the memory are cleared. Event outputs are one-cycle pulses.
module ft_leon3_sys
  import ft_pkg::*;
#(
  parameter int unsigned NWIN          = 8,
  parameter int unsigned CACHE_BYTES   = 1024,
  parameter int unsigned NBANKS        = 4,
  parameter int unsigned BANK_DEPTH    = 512,
  parameter int unsigned CKPT_INTERVAL = 10000,
  parameter int unsigned RF_AW         = $clog2(NWIN * 16 + 8)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_busy,
  // register file (integer unit side)
  input  logic             rf_we,
  input  logic [RF_AW-1:0] rf_waddr,
  input  logic [XLEN-1:0]  rf_wdata,
  input  logic             rf_re1,
  input  logic [RF_AW-1:0] rf_raddr1,
  output logic [XLEN-1:0]  rf_rdata1,
  input  logic             rf_re2,
  input  logic [RF_AW-1:0] rf_raddr2,
  output logic [XLEN-1:0]  rf_rdata2,
  // instruction fetch and data access
  input  mem_req_t         i_req,
  output mem_rsp_t         i_rsp,
  input  mem_req_t         d_req,
  output mem_rsp_t         d_rsp,
  // software fault tolerance
  output logic             irq,
  input  logic             irq_ack,
  input  logic             sw_ckpt_req,
  input  logic             sw_err,
  output logic             core_hold,
  output logic             core_restart,
  // status
  output logic             ckpt_valid,
  output logic             fatal,
  output err_src_t         last_err,
  output logic [15:0]      n_ckpt,
  output logic [15:0]      n_rollback,
  output logic             rf_err,
  output logic             mem_perr,
  output logic             ckpt_saving,
  output logic             ckpt_restoring,
  output logic             ic_hit,
  output logic             ic_miss,
  output logic             ic_perr_fix,
  output logic             dc_hit,
  output logic             dc_miss,
  output logic             dc_perr_fix
);

  logic     rf_init_busy;
  mem_req_t ic_mreq, dc_mreq, m_req;
  mem_rsp_t ic_mrsp, dc_mrsp, m_rsp;
  logic     ic_idle, dc_idle, cache_flush;
  logic     mem_busy, mem_done, mem_save_req, mem_restore_req;
  err_src_t err_in;

  cdwc_regfile #(.NWIN(NWIN), .DW(XLEN)) u_rf (
    .clk, .rst_n, .init_busy(rf_init_busy),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .re1(rf_re1), .raddr1(rf_raddr1), .rdata1(rf_rdata1), .err1(),
    .re2(rf_re2), .raddr2(rf_raddr2), .rdata2(rf_rdata2), .err2(),
    .err(rf_err)
  );

  l1_cache #(.SIZE_BYTES(CACHE_BYTES)) u_icache (
    .clk, .rst_n, .flush(cache_flush),
    .creq(i_req), .crsp(i_rsp), .mreq(ic_mreq), .mrsp(ic_mrsp),
    .idle(ic_idle), .hit(ic_hit), .miss(ic_miss), .perr_fix(ic_perr_fix)
  );

  l1_cache #(.SIZE_BYTES(CACHE_BYTES)) u_dcache (
    .clk, .rst_n, .flush(cache_flush),
    .creq(d_req), .crsp(d_rsp), .mreq(dc_mreq), .mrsp(dc_mrsp),
    .idle(dc_idle), .hit(dc_hit), .miss(dc_miss), .perr_fix(dc_perr_fix)
  );

  mem_arb u_arb (
    .clk, .rst_n,
    .m0_req(dc_mreq), .m0_rsp(dc_mrsp),
    .m1_req(ic_mreq), .m1_rsp(ic_mrsp),
    .s_req(m_req), .s_rsp(m_rsp)
  );

  ckpt_mem #(.NBANKS(NBANKS), .BANK_DEPTH(BANK_DEPTH)) u_mem (
    .clk, .rst_n, .req(m_req), .rsp(m_rsp),
    .save_req(mem_save_req), .restore_req(mem_restore_req),
    .busy(mem_busy), .done(mem_done)
  );

  assign mem_perr = m_rsp.ack && m_rsp.perr;

  always_comb begin
    err_in     = '0;
    err_in.rf  = rf_err;
    err_in.mem = mem_perr;
    err_in.sw  = sw_err;
  end

  ckpt_ctrl #(.CKPT_INTERVAL(CKPT_INTERVAL), .CNT_W(16)) u_ctrl (
    .clk, .rst_n, .irq, .irq_ack, .sw_ckpt_req, .err_in,
    .sys_idle(ic_idle && dc_idle), .mem_busy, .mem_done,
    .mem_save_req, .mem_restore_req, .cache_flush, .core_hold, .core_restart,
    .ckpt_valid, .fatal, .last_err, .n_ckpt, .n_rollback
  );

  assign init_busy      = rf_init_busy || (mem_busy && !mem_save_req && !mem_restore_req);
  assign ckpt_saving    = mem_save_req;
  assign ckpt_restoring = mem_restore_req;

endmodule
