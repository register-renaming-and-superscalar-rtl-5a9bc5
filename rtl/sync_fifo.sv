// sync_fifo: a sized first-in first-out queue, one of the k lanes inside
// sup_fifo. It behaves like a conventional sized FIFO: enq_rdy is "not full"
// and does not look at a dequeue in the same cycle; first/not_empty show the
// oldest entry. clear empties the queue and has priority over enq/deq.
// Data appears at the output the cycle after it is enqueued. Helper of
// sup_fifo; its behaviour is a design choice.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic enq,
  input  T     enq_data,
  output logic not_full,
  input  logic deq,
  output T     first,
  output logic not_empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T               mem [DEPTH];
  logic [PW-1:0]  wp, rp;
  logic [CW-1:0]  cnt;

  assign not_full  = (cnt != CW'(DEPTH));
  assign not_empty = (cnt != '0);
  assign first     = mem[rp];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else if (clear) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (enq) wp <= inc(wp);
      if (deq) rp <= inc(rp);
      cnt <= cnt + CW'(enq) - CW'(deq);
    end
  end

  always_ff @(posedge clk) begin
    if (enq && !clear) mem[wp] <= enq_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) enq |-> not_full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) deq |-> not_empty);
endmodule
