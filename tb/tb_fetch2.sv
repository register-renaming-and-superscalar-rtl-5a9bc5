// tb_fetch2: streams numbered requests through the fetch2 register with
// random stalls on both sides and checks order, no loss or duplication, one
// cycle of latency, full throughput when the output is always ready, and
// that a flush drops the held request.
module tb_fetch2;
  import ooo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, in_valid, in_ready, out_valid, out_ready;
  fetch_req_t in_req, out_req;
  fetch2 dut (.*);

  int checks = 0, failures = 0, n_flush = 0;
  addr_t exp_q[$];
  addr_t next_pc;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; in_valid = 0; out_ready = 0; in_req = '0; next_pc = 64'h1000;
    repeat (2) @(posedge clk); rst_n = 1;
    // throughput/latency: 20 back-to-back requests, output always ready
    for (int c = 0; c < 22; c++) begin
      @(negedge clk);
      out_ready = 1;
      if (c >= 1) begin check("lat valid", out_valid, c <= 20); if (c <= 20) check("lat pc", out_req.pc, 64'h1000 + 4 * (c - 1)); end
      in_valid = (c < 20); in_req.pc = 64'h1000 + 4 * c;
      if (in_valid) check("ready", in_ready, 1);
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    // random stalls and flushes
    next_pc = 64'h2000;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      if (out_valid && exp_q.size() > 0) check("data", out_req.pc, exp_q[0]);
      check("valid", out_valid, exp_q.size() > 0);
      flush = ($urandom_range(0, 30) == 0);
      in_valid = !flush && ($urandom_range(0, 1) == 0);
      in_req.pc = next_pc;
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (flush) begin if (exp_q.size() > 0) n_flush++; exp_q.delete(); end
      else begin
        if (out_valid && out_ready) void'(exp_q.pop_front());
        if (in_valid && in_ready) begin exp_q.push_back(next_pc); next_pc += 4; end
      end
    end
    check("flushes", n_flush > 5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
