// icache: instruction cache that answers a whole strike at once.
//
// A request names a pc and a count of at most K instructions that all lie in
// the cache line of pc. The answer is a vector of K "maybe instructions":
// lane i holds the instruction at pc + 4i and is valid for i < count. The
// request itself (pc, ppc, epoch, count) is returned with the answer.
//
// Organisation (own choice): direct mapped, SETS lines of LINE_W 32-bit
// words, blocking. A hit is answered one cycle after the request; a new
// request is accepted every cycle while the response register is free or
// being read. On a miss the cache asks the next level for the whole line
// (mem_req, line-aligned address, valid-ready), waits for mem_resp carrying
// the full line in one beat, fills the line and answers from it.
// Reset invalidates every line.
module icache
  import ooo_pkg::*;
#(
  parameter int unsigned K      = SUP_K,
  parameter int unsigned SETS   = 64,
  parameter int unsigned LINE_W = LINE_WORDS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // request from fetch2
  input  logic                    req_valid,
  input  fetch_req_t              req,
  output logic                    req_ready,
  // response to fetch3
  output logic                    resp_valid,
  output fetch_req_t              resp_req,
  output inst_t                   resp_inst  [K],
  output logic [K-1:0]            resp_ivalid,
  input  logic                    resp_ready,
  // refill from the next memory level
  output logic                    mem_req_valid,
  output addr_t                   mem_req_addr,
  input  logic                    mem_req_ready,
  input  logic                    mem_resp_valid,
  input  logic [LINE_W*ILEN-1:0]  mem_resp_data
);
  localparam int unsigned OW = $clog2(LINE_W);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned TW = XLEN - SW - OW - 2;
  typedef logic [OW-1:0] off_t;
  typedef logic [SW-1:0] set_t;
  typedef logic [TW-1:0] tag_t;

  typedef enum logic [1:0] {S_IDLE, S_MISS_REQ, S_MISS_WAIT} state_t;

  logic  valid_q [SETS];
  tag_t  tag_q   [SETS];
  inst_t data_q  [SETS][LINE_W];

  state_t     state_q;
  fetch_req_t pend_q;

  function automatic off_t off_of(addr_t a); return a[OW+1:2];           endfunction
  function automatic set_t set_of(addr_t a); return a[SW+OW+1:OW+2];     endfunction
  function automatic tag_t tag_of(addr_t a); return a[XLEN-1:SW+OW+2];   endfunction

  wire hit = valid_q[set_of(req.pc)] && tag_q[set_of(req.pc)] == tag_of(req.pc);

  assign req_ready     = (state_q == S_IDLE) && (!resp_valid || resp_ready);
  assign mem_req_valid = (state_q == S_MISS_REQ);
  assign mem_req_addr  = {pend_q.pc[XLEN-1:OW+2], {(OW+2){1'b0}}};

  wire accept = req_valid && req_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      resp_valid <= 1'b0;
      for (int unsigned s = 0; s < SETS; s++) valid_q[s] <= 1'b0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (accept) begin
          if (hit) begin
            resp_valid <= 1'b1;
            resp_req   <= req;
            for (int unsigned i = 0; i < K; i++) begin
              resp_inst[i]   <= data_q[set_of(req.pc)][off_t'(32'(off_of(req.pc)) + i)];
              resp_ivalid[i] <= (i < 32'(req.count));
            end
          end else begin
            pend_q  <= req;
            state_q <= S_MISS_REQ;
          end
        end
        S_MISS_REQ: if (mem_req_ready) state_q <= S_MISS_WAIT;
        S_MISS_WAIT: if (mem_resp_valid) begin
          valid_q[set_of(pend_q.pc)] <= 1'b1;
          tag_q[set_of(pend_q.pc)]   <= tag_of(pend_q.pc);
          for (int unsigned w = 0; w < LINE_W; w++)
            data_q[set_of(pend_q.pc)][w] <= mem_resp_data[w*ILEN +: ILEN];
          resp_valid <= 1'b1;
          resp_req   <= pend_q;
          for (int unsigned i = 0; i < K; i++) begin
            resp_inst[i]   <= mem_resp_data[32'(off_t'(32'(off_of(pend_q.pc)) + i)) * ILEN +: ILEN];
            resp_ivalid[i] <= (i < 32'(pend_q.count));
          end
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_strike_in_line: assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> (32'(off_of(req.pc)) + 32'(req.count) <= LINE_W) && req.count != 0);
endmodule
