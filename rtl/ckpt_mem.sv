// ckpt_mem: on-chip block-RAM main memory with a one-deep checkpoint.
//
// Main memory is NBANKS block RAMs of BANK_DEPTH parity-protected 32-bit words
// (BANK_DEPTH words of 36 bits is one 18 Kbit FPGA block RAM). Every bank has
// a shadow array that holds the memory image of the last checkpoint. Because
// every bank has its own ports, a save (working -> checkpoint) or a restore
// (checkpoint -> working) runs in all banks at once, one word per bank per
// cycle, and takes BANK_DEPTH + 1 cycles whatever NBANKS is: the time to save
// or restore memory does not grow with the memory.
//
// Bus (mem_req_t / mem_rsp_t, see ft_pkg): the word address selects the bank
// with its upper bits and the word with its lower bits; address bits above the
// memory size are ignored. An access is taken when req is high and the memory
// is idle, and is acknowledged in the next cycle, with rdata and perr (the
// stored word's byte parity did not check) for a read. While a copy runs, busy
// is high and requests wait.
//
// Copy control: save_req and restore_req are held by the requester until done
// pulses in the last cycle of the copy; restore wins if both are high. A
// request is started only between bus accesses. After reset both copies of
// every word are cleared to zero with good parity (BANK_DEPTH cycles, busy
// high), so nothing is ever read uninitialised.
//
// From the source: main memory held in on-chip block RAMs, part of every
// checkpoint, saved and restored in constant time by writing all block RAMs
// simultaneously, and parity on memory bits. The bank size, byte parity, bus
// timing and reset clearing are this design's choices.
module ckpt_mem
  import ft_pkg::*;
#(
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_DEPTH = 512,
  parameter int unsigned ROW_W      = $clog2(BANK_DEPTH),
  parameter int unsigned BANK_W     = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output mem_rsp_t rsp,
  input  logic     save_req,
  input  logic     restore_req,
  output logic     busy,
  output logic     done
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_SAVE, S_RESTORE} state_e;

  state_e           state;
  logic [ROW_W:0]   idx;        // next row to read (one extra bit marks the end)
  logic [ROW_W-1:0] idx_q;      // row whose data is in the read registers
  logic             rv;         // read registers hold a word to be written
  logic             pend;       // a bus access was taken last cycle
  logic             pend_we;
  logic [BANK_W-1:0] pend_bank;

  logic [ROW_W-1:0]  bus_row;
  logic [BANK_W-1:0] bus_bank;
  logic              bus_take;
  logic              copy_issue;

  assign bus_row  = req.addr[ROW_W-1:0];
  assign bus_bank = (NBANKS > 1) ? BANK_W'(req.addr[ROW_W +: BANK_W]) : '0;
  assign bus_take = (state == S_IDLE) && req.req && !pend;
  assign copy_issue = (state == S_SAVE || state == S_RESTORE) && !idx[ROW_W];

  logic [PWORD_W-1:0] w_rdata [NBANKS];
  logic [PWORD_W-1:0] c_rdata [NBANKS];

  for (genvar g = 0; g < int'(NBANKS); g++) begin : g_bank
    logic               w_en, w_we, c_en, c_we;
    logic [ROW_W-1:0]   w_addr, c_addr;
    logic [NBYTES-1:0]  w_be;
    logic [PWORD_W-1:0] w_wdata, c_wdata;

    always_comb begin
      w_en = 1'b0; w_we = 1'b0; w_addr = bus_row; w_be = req.be;
      w_wdata = protect(req.wdata);
      c_en = 1'b0; c_we = 1'b0; c_addr = idx_q; c_wdata = w_rdata[g];
      unique case (state)
        S_IDLE: begin
          w_en = bus_take && (32'(bus_bank) == g);
          w_we = req.we;
        end
        S_CLEAR: begin
          w_en = 1'b1; w_we = 1'b1; w_addr = idx[ROW_W-1:0]; w_be = '1;
          w_wdata = protect('0);
          c_en = 1'b1; c_we = 1'b1; c_addr = idx[ROW_W-1:0]; c_wdata = protect('0);
        end
        S_SAVE: begin
          // read working[idx], write checkpoint[idx_q]
          w_en = copy_issue; w_addr = idx[ROW_W-1:0];
          c_en = rv; c_we = rv; c_addr = idx_q; c_wdata = w_rdata[g];
        end
        S_RESTORE: begin
          // read checkpoint[idx], write working[idx_q]
          c_en = copy_issue; c_addr = idx[ROW_W-1:0];
          w_en = rv; w_we = rv; w_addr = idx_q; w_be = '1; w_wdata = c_rdata[g];
        end
        default: ;
      endcase
    end

    ckpt_bank #(.DEPTH(BANK_DEPTH), .AW(ROW_W)) u_bank (
      .clk, .w_en, .w_we, .w_addr, .w_be, .w_wdata, .w_rdata(w_rdata[g]),
      .c_en, .c_we, .c_addr, .c_wdata, .c_rdata(c_rdata[g])
    );
  end

  logic copy_last;
  assign copy_last = rv && (32'(idx_q) == BANK_DEPTH - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      idx       <= '0;
      idx_q     <= '0;
      rv        <= 1'b0;
      pend      <= 1'b0;
      pend_we   <= 1'b0;
      pend_bank <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          pend <= bus_take;
          if (bus_take) begin
            pend_we   <= req.we;
            pend_bank <= bus_bank;
          end
          if (!pend && !bus_take && (restore_req || save_req)) begin
            state <= restore_req ? S_RESTORE : S_SAVE;
            idx   <= '0;
            rv    <= 1'b0;
          end
        end
        S_CLEAR: begin
          if (32'(idx) == BANK_DEPTH - 1) begin
            state <= S_IDLE;
            idx   <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: begin  // S_SAVE, S_RESTORE
          rv    <= copy_issue;
          idx_q <= idx[ROW_W-1:0];
          if (copy_issue) idx <= idx + 1'b1;
          if (copy_last) begin
            state <= S_IDLE;
            rv    <= 1'b0;
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_SAVE || state == S_RESTORE) && copy_last;

  always_comb begin
    rsp.ack   = pend;
    rsp.rdata = w_rdata[pend_bank][XLEN-1:0];
    rsp.perr  = pend && !pend_we && parity_bad(w_rdata[pend_bank]);
  end

endmodule
