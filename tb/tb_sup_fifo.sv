// tb_sup_fifo: drives the k-wide FIFO with random prefix enqueues and
// dequeues and compares the dequeued stream with a reference queue. Also
// checks that a full pass of K elements per cycle is sustained (one cycle
// from enqueue to first), that lanes report ready per internal FIFO, and clear.
module tb_sup_fifo;
  localparam int unsigned K = 2, N = 4;
  typedef logic [15:0] T;

  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic [K-1:0] enq_valid, enq_rdy, first_valid, deq;
  T enq_data [K];
  T first [K];
  logic not_full, not_empty;

  sup_fifo #(.T(T), .K(K), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_wide_enq = 0, n_wide_deq = 0;
  T ref_q[$];
  T next_val = 1;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq_valid = '0; deq = '0;
    for (int i = 0; i < K; i++) enq_data[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one element in, visible the next cycle
    @(negedge clk);
    enq_valid = 1; enq_data[0] = 16'hBEEF;
    @(negedge clk);
    enq_valid = 0;
    check("latency valid", first_valid[0], 1);
    check("latency data", first[0], 16'hBEEF);
    deq = 1;
    @(negedge clk);
    deq = 0;
    check("empty again", not_empty, 0);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int ne, nd, mode;
      mode = (cyc / 300) % 3;
      @(negedge clk);
      // expected outputs
      for (int i = 0; i < K; i++) begin
        check("first_valid", first_valid[i], ref_q.size() > i);
        if (ref_q.size() > i) check("first", first[i], ref_q[i]);
      end
      if (ref_q.size() == K * N) n_full++;
      // choose a prefix of lanes to enqueue, limited by enq_rdy
      ne = $urandom_range(0, K - (mode == 2 ? 1 : 0));
      if (mode == 0) ne = K;
      enq_valid = '0;
      for (int i = 0; i < K; i++)
        if (i < ne && enq_rdy[i] && (i == 0 || enq_valid[i-1])) begin
          enq_valid[i] = 1; enq_data[i] = next_val; next_val++;
        end
      // ready per lane follows capacity: with the round-robin layout lane i is
      // ready exactly when the occupancy leaves room for i+1 more elements
      for (int i = 0; i < K; i++) check("enq_rdy", enq_rdy[i], ref_q.size() + i < K * N);
      nd = $urandom_range(0, K);
      if (mode == 0) nd = $urandom_range(0, 1);
      if (mode == 2) nd = K;
      deq = '0;
      for (int i = 0; i < nd; i++) if (first_valid[i] && (i == 0 || deq[i-1])) deq[i] = 1;
      if (enq_valid == '1) n_wide_enq++;
      if (deq == '1) n_wide_deq++;
      @(posedge clk);
      for (int i = 0; i < K; i++) if (deq[i]) void'(ref_q.pop_front());
      for (int i = 0; i < K; i++) if (enq_valid[i]) ref_q.push_back(enq_data[i]);
    end
    // clear
    @(negedge clk);
    enq_valid = '0; deq = '0; clear = 1;
    @(negedge clk);
    clear = 0;
    check("cleared", not_empty, 0);
    check("after clear ready", not_full, 1);
    check("full reached", n_full > 0, 1);
    check("K-wide enq", n_wide_enq > 100, 1);
    check("K-wide deq", n_wide_deq > 100, 1);
    $display("full=%0d wide_enq=%0d wide_deq=%0d", n_full, n_wide_enq, n_wide_deq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
