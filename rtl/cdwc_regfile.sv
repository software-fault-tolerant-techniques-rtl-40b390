// cdwc_regfile: register file with complement duplicate-with-compare (CDWC).
//
// The windowed SPARC register file is held twice. Every write stores the value
// in the primary copy and its bitwise complement in the shadow copy. Every read
// fetches both copies and compares primary against the complement of the
// shadow; a difference means a stored bit, or the logic and routing in front
// of one of the copies, has been upset, and the matching err flag goes high
// with the read data. Storing the complement rather than a plain copy means a
// fault that forces the same value onto both copies (a stuck write-enable or
// data line, for example) still shows up as a mismatch. Detection only: the
// data returned is the primary copy, and recovery is left to the checkpoint
// controller. The technique replaces software instruction duplication, so it
// costs no extra instructions.
//
// Interface and timing: two read ports and one write port, as in the LEON3
// integer unit. Reads are synchronous (block-RAM style): raddrN and reN are
// sampled at a clock edge, and rdataN/errN are valid from that edge until the
// next. A read of the register written in the same cycle returns the old
// value. After reset the module spends NREGS cycles writing zero (and its
// complement) to every register, with init_busy high; writes are ignored and
// errors are masked meanwhile, so no register is ever read uninitialised.
//
// From the source: the complemented duplicate and the compare on the register
// file only. This design's own choices: 8 register windows (the usual LEON3
// setting), synchronous read, the reset-time clearing pass and the
// read-old-value rule.
module cdwc_regfile #(
  parameter int unsigned NWIN  = 8,                 // register windows
  parameter int unsigned DW    = 32,                // register width
  parameter int unsigned NREGS = NWIN * 16 + 8,     // 8 globals + 16 per window
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          init_busy,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // read port 1
  input  logic          re1,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata1,
  output logic          err1,
  // read port 2
  input  logic          re2,
  input  logic [AW-1:0] raddr2,
  output logic [DW-1:0] rdata2,
  output logic          err2,
  // either port flagged a mismatch this cycle
  output logic          err
);

  logic [DW-1:0] prim [NREGS];
  logic [DW-1:0] comp [NREGS];

  logic [AW-1:0] init_addr;
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  logic [DW-1:0] wr_data;

  // Write path: the clearing pass during init, the user port afterwards.
  always_comb begin
    if (init_busy) begin
      wr_en   = 1'b1;
      wr_addr = init_addr;
      wr_data = '0;
    end else begin
      wr_en   = we && (32'(waddr) < NREGS);
      wr_addr = waddr;
      wr_data = wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
    end else if (init_busy) begin
      if (32'(init_addr) == NREGS - 1) init_busy <= 1'b0;
      else                             init_addr <= init_addr + 1'b1;
    end
  end

  // Both copies are written together; the shadow gets the complement.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      prim[wr_addr] <= wr_data;
      comp[wr_addr] <= ~wr_data;
    end
  end

  // Synchronous reads of both copies on both ports.
  logic [DW-1:0] p1_q, c1_q, p2_q, c2_q;
  logic          re1_q, re2_q;

  always_ff @(posedge clk) begin
    p1_q <= prim[raddr1];
    c1_q <= comp[raddr1];
    p2_q <= prim[raddr2];
    c2_q <= comp[raddr2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re1_q <= 1'b0;
      re2_q <= 1'b0;
    end else begin
      re1_q <= re1 && !init_busy;
      re2_q <= re2 && !init_busy;
    end
  end

  assign rdata1 = p1_q;
  assign rdata2 = p2_q;
  assign err1   = re1_q && (p1_q != ~c1_q);
  assign err2   = re2_q && (p2_q != ~c2_q);
  assign err    = err1 || err2;

endmodule
