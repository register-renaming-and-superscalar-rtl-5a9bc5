// fetch3: third fetch stage. It receives the instructions of one strike from
// the instruction cache and enqueues them, in order, into the superscalar
// FIFO that feeds decode.
//
// Lane i of the cache answer goes to enqueue lane i of the FIFO (the FIFO's
// rotating pointer keeps program order). Each enqueued instruction carries its
// pc (strike pc + 4i), its own predicted next pc (pc + 4 inside the strike, the
// strike's ppc for the last one) and the fetch epoch. The answer is taken only
// when every lane it needs is ready, so a strike is never split. Purely
// combinational: no added latency. The instruction words and the epoch are
// carried through as they arrive; only pc, ppc and the lane valids are
// computed here.
module fetch3
  import ooo_pkg::*;
#(
  parameter int unsigned K = SUP_K
) (
  input  logic          in_valid,
  input  fetch_req_t    in_req,
  input  inst_t         in_inst   [K],
  input  logic [K-1:0]  in_ivalid,
  output logic          in_ready,
  output logic [K-1:0]  enq_valid,
  output fetched_inst_t enq_data  [K],
  input  logic [K-1:0]  enq_rdy
);
  always_comb begin
    in_ready = 1'b1;
    for (int unsigned i = 0; i < K; i++) begin
      if (in_ivalid[i] && !enq_rdy[i]) in_ready = 1'b0;
    end
    for (int unsigned i = 0; i < K; i++) begin
      enq_valid[i]      = in_valid && in_ready && in_ivalid[i];
      enq_data[i].pc    = in_req.pc + addr_t'(4 * i);
      enq_data[i].ppc   = (i + 1 == 32'(in_req.count)) ? in_req.ppc : in_req.pc + ((addr_t'(i) + 64'd1) << 2);
      enq_data[i].epoch = in_req.epoch;
      enq_data[i].inst  = in_inst[i];
    end
  end
endmodule
