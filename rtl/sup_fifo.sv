// sup_fifo: a k-wide superscalar FIFO. Up to K elements can be enqueued and up
// to K dequeued in one cycle, in order.
//
// How it works: the storage is K ordinary FIFOs of depth N, used round-robin.
// enq_ptr names the internal FIFO that receives the next element and deq_ptr
// the one that holds the oldest element. Enqueue lane i writes internal FIFO
// (enq_ptr + i) mod K and dequeue lane i reads (deq_ptr + i) mod K. After the
// cycle each pointer advances by the number of lanes used. All lane requests
// are collected first and applied together, so the lanes never conflict.
// The organisation (k internal sized FIFOs, two rotating pointers of log2(k)
// bits, requests gathered then applied together) follows the source
// description; K must therefore be a power of two. Depth N is a design choice.
//
// Interface: lanes must be used as a prefix (lane i only with lanes 0..i-1);
// assertions check this. enq_rdy[i] says the internal FIFO lane i would write
// is not full, first_valid[i] that lane i has an element. not_full and
// not_empty are lane 0's. clear empties everything.
// Timing: an element enqueued in cycle t can be dequeued in cycle t+1.
module sup_fifo #(
  parameter type         T = logic [31:0],
  parameter int unsigned K = ooo_pkg::SUP_K,
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  // enqueue lanes
  input  logic [K-1:0] enq_valid,
  input  T             enq_data    [K],
  output logic [K-1:0] enq_rdy,
  output logic         not_full,
  // dequeue lanes
  output T             first       [K],
  output logic [K-1:0] first_valid,
  input  logic [K-1:0] deq,
  output logic         not_empty
);
  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned CW = $clog2(K + 1);

  logic [PW-1:0] enq_ptr, deq_ptr;

  logic [K-1:0] f_enq, f_deq, f_nf, f_ne;
  T             f_in  [K];
  T             f_out [K];

  for (genvar j = 0; j < K; j++) begin : g_lane
    sync_fifo #(.T(T), .DEPTH(N)) u_fifo (
      .clk, .rst_n, .clear,
      .enq(f_enq[j]), .enq_data(f_in[j]), .not_full(f_nf[j]),
      .deq(f_deq[j]), .first(f_out[j]), .not_empty(f_ne[j])
    );
  end

  function automatic logic [PW-1:0] slot(logic [PW-1:0] base, int unsigned i);
    return PW'((32'(base) + i) % K);
  endfunction

  logic [CW-1:0] n_enq, n_deq;

  always_comb begin
    f_enq = '0;
    f_deq = '0;
    n_enq = '0;
    n_deq = '0;
    for (int unsigned j = 0; j < K; j++) f_in[j] = enq_data[0];
    for (int unsigned i = 0; i < K; i++) begin
      enq_rdy[i]     = f_nf[slot(enq_ptr, i)];
      first_valid[i] = f_ne[slot(deq_ptr, i)];
      first[i]       = f_out[slot(deq_ptr, i)];
      if (enq_valid[i]) begin
        f_enq[slot(enq_ptr, i)] = 1'b1;
        f_in[slot(enq_ptr, i)]  = enq_data[i];
        n_enq = n_enq + 1'b1;
      end
      if (deq[i]) begin
        f_deq[slot(deq_ptr, i)] = 1'b1;
        n_deq = n_deq + 1'b1;
      end
    end
  end

  assign not_full  = enq_rdy[0];
  assign not_empty = first_valid[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enq_ptr <= '0;
      deq_ptr <= '0;
    end else if (clear) begin
      enq_ptr <= '0;
      deq_ptr <= '0;
    end else begin
      enq_ptr <= slot(enq_ptr, 32'(n_enq));
      deq_ptr <= slot(deq_ptr, 32'(n_deq));
    end
  end

  for (genvar i = 1; i < K; i++) begin : g_chk
    a_enq_prefix: assert property (@(posedge clk) disable iff (!rst_n) enq_valid[i] |-> enq_valid[i-1]);
    a_deq_prefix: assert property (@(posedge clk) disable iff (!rst_n) deq[i] |-> deq[i-1]);
  end
  for (genvar i = 0; i < K; i++) begin : g_chk2
    a_enq_rdy:  assert property (@(posedge clk) disable iff (!rst_n) enq_valid[i] |-> enq_rdy[i]);
    a_deq_rdy:  assert property (@(posedge clk) disable iff (!rst_n) deq[i] |-> first_valid[i]);
  end
endmodule
