// l1_cache: direct-mapped write-through cache with parity and flash invalidate.
//
// The processor has a 1 KB direct-mapped instruction cache and a 1 KB
// direct-mapped data cache; both are this module (the instruction cache is
// simply never written). Writes go through to main memory at once and update
// the cache only when the line is present (no write-allocate), so main memory
// always holds every value. That is what makes rollback cheap: a checkpoint
// never needs the cache contents, and a rollback only clears the valid bits
// (flush), which takes one cycle.
//
// Each line is one 32-bit word. Data words carry one parity bit per byte and
// tags one parity bit; valid bits are flip-flops. A parity error on a read
// lookup turns the access into a miss and the word is fetched again from main
// memory, so cache upsets are corrected without a rollback (perr_fix pulses).
// A parity error reported by main memory is passed to the processor in
// crsp.perr and is not cached.
//
// Interface and timing: the processor side (creq/crsp) and the memory side
// (mreq/mrsp) follow the mem_req_t/mem_rsp_t rule of ft_pkg: the master holds
// its request until ack. A read hit is acknowledged two cycles after req
// rises (array read, then tag compare); a miss or a write adds the main
// memory access. flush may come at any time but should come while idle: a
// refill already under way still writes its line. hit/miss/perr_fix are
// one-cycle event pulses for statistics.
//
// From the source: 1 KB, direct mapped, write through, invalidated instead of
// saved at a rollback, memory bits parity protected. This design's choices:
// one-word lines, no write-allocate, byte/tag parity, refetch on parity error.
module l1_cache
  import ft_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 1024,
  parameter int unsigned NLINES     = SIZE_BYTES / NBYTES,
  parameter int unsigned IDX_W      = $clog2(NLINES),
  parameter int unsigned TAG_W      = WADDR_W - IDX_W
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  mem_req_t creq,
  output mem_rsp_t crsp,
  output mem_req_t mreq,
  input  mem_rsp_t mrsp,
  output logic     idle,
  output logic     hit,
  output logic     miss,
  output logic     perr_fix
);

  typedef enum logic [1:0] {C_IDLE, C_LOOKUP, C_MISS, C_WRITE} cstate_e;

  logic [PWORD_W-1:0] data_ram [NLINES];
  logic [TAG_W:0]     tag_ram  [NLINES];   // {parity, tag}
  logic [NLINES-1:0]  valid;

  cstate_e            state;
  mem_req_t           a_q;                 // the access being served
  logic [PWORD_W-1:0] data_rd;
  logic [TAG_W:0]     tag_rd;

  logic [IDX_W-1:0] a_idx;
  logic [TAG_W-1:0] a_tag;
  assign a_idx = a_q.addr[IDX_W-1:0];
  assign a_tag = a_q.addr[WADDR_W-1:IDX_W];

  logic tag_ok, tag_perr, data_perr, line_hit;
  assign tag_perr  = ^tag_rd;                          // even parity over {p, tag}
  assign data_perr = parity_bad(data_rd);
  assign tag_ok    = valid[a_idx] && (tag_rd[TAG_W-1:0] == a_tag);
  assign line_hit  = tag_ok && !tag_perr;

  // Array writes requested by the state machine.
  logic             ram_we;
  logic [XLEN-1:0]  ram_wdata;
  logic             set_valid, clr_valid;

  always_comb begin
    ram_we    = 1'b0;
    ram_wdata = mrsp.rdata;
    set_valid = 1'b0;
    clr_valid = 1'b0;
    unique case (state)
      C_LOOKUP: if (a_q.we && line_hit) begin
        if (data_perr) clr_valid = 1'b1;                 // cannot merge into a bad word
        else begin
          ram_we    = 1'b1;
          ram_wdata = merge_bytes(data_rd[XLEN-1:0], a_q.wdata, a_q.be);
        end
      end
      C_MISS: if (mrsp.ack && !mrsp.perr) begin
        ram_we    = 1'b1;
        set_valid = 1'b1;
      end
      default: ;
    endcase
  end

  // Synchronous arrays: read on acceptance, write on update.
  always_ff @(posedge clk) begin
    if (state == C_IDLE && creq.req) begin
      data_rd <= data_ram[creq.addr[IDX_W-1:0]];
      tag_rd  <= tag_ram[creq.addr[IDX_W-1:0]];
    end
    if (ram_we) begin
      data_ram[a_idx] <= protect(ram_wdata);
      tag_ram[a_idx]  <= {^a_tag, a_tag};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      valid <= '0;
      a_q   <= '0;
    end else begin
      if (set_valid) valid[a_idx] <= 1'b1;
      if (clr_valid) valid[a_idx] <= 1'b0;
      if (flush)     valid        <= '0;
      unique case (state)
        C_IDLE:   if (creq.req) begin
          a_q   <= creq;
          state <= C_LOOKUP;
        end
        C_LOOKUP: begin
          if (a_q.we)                       state <= C_WRITE;
          else if (line_hit && !data_perr)  state <= C_IDLE;
          else                              state <= C_MISS;
        end
        C_MISS:   if (mrsp.ack) state <= C_IDLE;
        C_WRITE:  if (mrsp.ack) state <= C_IDLE;
        default:  state <= C_IDLE;
      endcase
    end
  end

  // Memory side: a read on a miss, the write-through on a write.
  always_comb begin
    mreq       = a_q;
    mreq.req   = (state == C_MISS) || (state == C_WRITE);
    mreq.we    = (state == C_WRITE);
  end

  // Processor side.
  always_comb begin
    crsp = '0;
    unique case (state)
      C_LOOKUP: if (!a_q.we && line_hit && !data_perr) begin
        crsp.ack   = 1'b1;
        crsp.rdata = data_rd[XLEN-1:0];
      end
      C_MISS: if (mrsp.ack) begin
        crsp.ack   = 1'b1;
        crsp.rdata = mrsp.rdata;
        crsp.perr  = mrsp.perr;
      end
      C_WRITE: crsp.ack = mrsp.ack;
      default: ;
    endcase
  end

  assign idle     = (state == C_IDLE);
  assign hit      = (state == C_LOOKUP) && !a_q.we && line_hit && !data_perr;
  assign miss     = (state == C_LOOKUP) && !a_q.we && !tag_ok;
  assign perr_fix = (state == C_LOOKUP) && tag_ok && (tag_perr || data_perr);

  // The processor holds its request, unchanged, until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            creq.req && !crsp.ack |=> creq.req && $stable(creq.addr) && $stable(creq.we))
    else $error("l1_cache: request dropped or changed before ack");

endmodule
