// fetch2: second fetch stage. It forwards the fetch request (still a single
// pc with its strike length) to the instruction cache.
//
// Implemented as a one-entry pipeline register with a valid-ready handshake
// on both sides: in_ready is high when the register is empty or is being
// emptied in the same cycle, so a request per cycle can flow through. A flush
// (any redirect) discards the held request, which belongs to an old epoch;
// this drop is a design choice, later stages would also drop it by epoch.
// Latency: one cycle. Synchronous reset empties the register.
module fetch2
  import ooo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       in_valid,
  input  fetch_req_t in_req,
  output logic       in_ready,
  output logic       out_valid,
  output fetch_req_t out_req,
  input  logic       out_ready
);
  logic       v_q;
  fetch_req_t r_q;

  assign out_valid = v_q;
  assign out_req   = r_q;
  assign in_ready  = !v_q || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      v_q <= 1'b0;
    end else if (in_ready) begin
      v_q <= in_valid;
    end
    if (in_ready && in_valid) r_q <= in_req;
  end
endmodule
