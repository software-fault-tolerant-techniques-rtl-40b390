// mem_arb: two-master arbiter in front of main memory.
//
// The data cache (master 0) and the instruction cache (master 1) share the one
// main memory port. When no access is in flight, the arbiter grants a
// requesting master, master 0 first, and keeps that grant until the memory
// acknowledges; the acknowledge is routed back only to the granted master. The
// fixed priority is this design's choice: the write-through traffic of the data
// cache is short and the processor waits on it either way.
//
// Timing: the grant is decided combinationally in the cycle a request is seen,
// so the arbiter adds no cycle to an access.
module mem_arb
  import ft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t m0_req,
  output mem_rsp_t m0_rsp,
  input  mem_req_t m1_req,
  output mem_rsp_t m1_rsp,
  output mem_req_t s_req,
  input  mem_rsp_t s_rsp
);

  logic busy_q, owner_q;   // an access is in flight, and whose
  logic owner;

  always_comb begin
    if (busy_q)           owner = owner_q;
    else if (m0_req.req)  owner = 1'b0;
    else                  owner = m1_req.req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= 1'b0;
    end else begin
      if (s_req.req && !s_rsp.ack) begin
        busy_q  <= 1'b1;
        owner_q <= owner;
      end else if (s_rsp.ack) begin
        busy_q  <= 1'b0;
      end
    end
  end

  assign s_req = owner ? m1_req : m0_req;

  always_comb begin
    m0_rsp = s_rsp;
    m1_rsp = s_rsp;
    m0_rsp.ack = s_rsp.ack && !owner;
    m1_rsp.ack = s_rsp.ack &&  owner;
  end

endmodule
