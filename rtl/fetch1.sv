// fetch1: first fetch stage. Holds the pc and the fetch epoch and decides how
// many instructions to fetch this cycle.
//
// From pc it forms the longest run ("strike") of at most K consecutive
// instructions such that all lie in the same cache line and the BTB predicts
// pc+4 for every one but the last. The strike stops at the end of the line or
// at the first instruction for which the BTB indicates a jump; that
// instruction is still part of the strike and its BTB target becomes the
// predicted next pc (ppc). Otherwise ppc = pc + 4*count.
//
// Interface: btb_pc[i] = pc + 4i go to the BTB, whose answers come back in the
// same cycle. req/req_valid/req_ready is a valid-ready handshake to fetch2;
// on a handshake pc <= ppc. A redirect from the back-end (priority) or from
// decode loads the pc, increments the epoch and issues no request in that
// cycle; `redirect` tells the later stages. Every request carries the epoch,
// so instructions fetched before a redirect can be recognised and dropped.
// Reset: pc = RESET_PC, epoch = 0. 4-byte instructions, no compressed ones.
module fetch1
  import ooo_pkg::*;
#(
  parameter int unsigned K        = SUP_K,
  parameter int unsigned LINE_W   = LINE_WORDS,
  parameter addr_t       RESET_PC = 64'h0000_0000_8000_0000
) (
  input  logic         clk,
  input  logic         rst_n,
  // BTB
  output addr_t        btb_pc     [K],
  input  logic [K-1:0] btb_hit,
  input  addr_t        btb_target [K],
  // redirections
  input  logic         be_redir_valid,
  input  addr_t        be_redir_pc,
  input  logic         dec_redir_valid,
  input  addr_t        dec_redir_pc,
  output logic         redirect,
  output epoch_t       cur_epoch,
  // request to fetch2
  output logic         req_valid,
  output fetch_req_t   req,
  input  logic         req_ready
);
  localparam int unsigned LW = $clog2(LINE_W);
  typedef logic [$clog2(K+1)-1:0] cnt_t;

  addr_t  pc_q;
  epoch_t epoch_q;

  assign redirect  = be_redir_valid || dec_redir_valid;
  assign cur_epoch = epoch_q;

  always_comb begin
    cnt_t n;
    logic stop;
    logic [LW:0] off;
    for (int unsigned i = 0; i < K; i++) btb_pc[i] = pc_q + addr_t'(4 * i);
    off  = {1'b0, pc_q[LW+1:2]};
    n    = '0;
    stop = 1'b0;
    req.ppc = pc_q;
    for (int unsigned i = 0; i < K; i++) begin
      if (!stop && (off + (LW+1)'(i)) < (LW+1)'(LINE_W)) begin
        n = n + 1'b1;
        req.ppc = btb_hit[i] ? btb_target[i] : pc_q + ((addr_t'(i) + 64'd1) << 2);
        if (btb_hit[i]) stop = 1'b1;
      end else begin
        stop = 1'b1;
      end
    end
    req.pc    = pc_q;
    req.epoch = epoch_q;
    req.count = $bits(req.count)'(n);
    req_valid = !redirect;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q    <= RESET_PC;
      epoch_q <= '0;
    end else if (be_redir_valid) begin
      pc_q    <= be_redir_pc;
      epoch_q <= epoch_q + 1'b1;
    end else if (dec_redir_valid) begin
      pc_q    <= dec_redir_pc;
      epoch_q <= epoch_q + 1'b1;
    end else if (req_valid && req_ready) begin
      pc_q    <= req.ppc;
    end
  end
endmodule
