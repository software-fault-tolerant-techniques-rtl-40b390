// ft_pkg: types and helpers shared by the fault-tolerant LEON3 memory subsystem.
//
// The subsystem protects stored bits with byte parity (one even-parity bit per
// data byte, the layout of a 36-bit-wide FPGA block RAM word) and moves data
// between the caches and the checkpointed main memory over a small word-wide
// request/acknowledge bus, described by mem_req_t / mem_rsp_t.
//
// Bus rule: a master raises req with we/addr/be/wdata and holds them stable
// until the cycle in which ack is high. On a read, rdata and perr are valid in
// that ack cycle. Byte parity and the bus are choices of this design; the
// source only states that memory bits are parity protected.
package ft_pkg;

  localparam int unsigned XLEN   = 32;             // SPARC V8 word
  localparam int unsigned NBYTES = XLEN / 8;
  localparam int unsigned WADDR_W = XLEN - 2;      // word address

  // Stored word: data plus one parity bit per byte.
  localparam int unsigned PWORD_W = XLEN + NBYTES;

  typedef struct packed {
    logic               req;
    logic               we;
    logic [WADDR_W-1:0] addr;   // word address
    logic [NBYTES-1:0]  be;     // byte enables for writes
    logic [XLEN-1:0]    wdata;
  } mem_req_t;

  typedef struct packed {
    logic            ack;
    logic [XLEN-1:0] rdata;
    logic            perr;      // parity error in the word read
  } mem_rsp_t;

  // Sources of a detected error, as reported to the checkpoint controller.
  typedef struct packed {
    logic sw;    // software check: control-flow signature or consistency check
    logic mem;   // parity error in main memory
    logic rf;    // complement mismatch in the register file
  } err_src_t;

  // Even parity per byte: the parity bit is the XOR of the byte's bits.
  function automatic logic [NBYTES-1:0] byte_parity(input logic [XLEN-1:0] d);
    logic [NBYTES-1:0] p;
    for (int b = 0; b < int'(NBYTES); b++) p[b] = ^d[8*b +: 8];
    return p;
  endfunction

  // Pack data and its parity into a stored word {parity, data}.
  function automatic logic [PWORD_W-1:0] protect(input logic [XLEN-1:0] d);
    return {byte_parity(d), d};
  endfunction

  // True when a stored word's parity does not match its data.
  function automatic logic parity_bad(input logic [PWORD_W-1:0] w);
    return byte_parity(w[XLEN-1:0]) != w[PWORD_W-1:XLEN];
  endfunction

  // Merge the enabled bytes of wdata into old.
  function automatic logic [XLEN-1:0] merge_bytes(input logic [XLEN-1:0] old,
                                                  input logic [XLEN-1:0] wdata,
                                                  input logic [NBYTES-1:0] be);
    logic [XLEN-1:0] r;
    for (int b = 0; b < int'(NBYTES); b++)
      r[8*b +: 8] = be[b] ? wdata[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

endpackage
