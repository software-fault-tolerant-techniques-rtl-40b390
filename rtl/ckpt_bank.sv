// ckpt_bank: one block RAM of the checkpointed main memory, with its shadow.
//
// A bank holds two arrays of DEPTH parity-protected words: the working copy the
// processor reads and writes, and the checkpoint copy taken at the last
// checkpoint. Each array has one synchronous port (read-first: a write returns
// the word's old value), which is what one FPGA block RAM offers per copy.
// ckpt_mem drives the two ports: normally only the working port serves the
// bus; during a save or restore all banks stream their words from one array to
// the other in lock step.
//
// The working port writes byte lanes: a set bit of w_be writes that data byte
// together with its parity bit. The checkpoint port always writes whole words.
module ckpt_bank
  import ft_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  // working copy
  input  logic               w_en,
  input  logic               w_we,
  input  logic [AW-1:0]      w_addr,
  input  logic [NBYTES-1:0]  w_be,
  input  logic [PWORD_W-1:0] w_wdata,
  output logic [PWORD_W-1:0] w_rdata,
  // checkpoint copy
  input  logic               c_en,
  input  logic               c_we,
  input  logic [AW-1:0]      c_addr,
  input  logic [PWORD_W-1:0] c_wdata,
  output logic [PWORD_W-1:0] c_rdata
);

  logic [PWORD_W-1:0] work [DEPTH];
  logic [PWORD_W-1:0] ckpt [DEPTH];

  always_ff @(posedge clk) begin
    if (w_en) begin
      if (w_we) begin
        for (int b = 0; b < int'(NBYTES); b++) begin
          if (w_be[b]) begin
            work[w_addr][8*b +: 8]  <= w_wdata[8*b +: 8];
            work[w_addr][XLEN + b]  <= w_wdata[XLEN + b];
          end
        end
      end
      w_rdata <= work[w_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (c_en) begin
      if (c_we) ckpt[c_addr] <= c_wdata;
      c_rdata <= ckpt[c_addr];
    end
  end

endmodule
