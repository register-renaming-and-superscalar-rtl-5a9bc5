// tb_icache: sends random strike requests (pc and count within one line)
// to the instruction cache, with a next-level memory stand-in that returns
// word(a) = a[31:0] ^ 32'h13579BDF for each word after a random delay. Checks
// each answer lane by lane, the valid mask, the returned request, the refill
// address, that a hit answers one cycle after the request, and that misses
// and hits are where a reference tag table says they should be.
module tb_icache;
  import ooo_pkg::*;
  localparam int unsigned K = SUP_K, SETS = 64, LW = LINE_WORDS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid, resp_ready;
  fetch_req_t req, resp_req;
  inst_t resp_inst [K];
  logic [K-1:0] resp_ivalid;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t mem_req_addr;
  logic [LW*ILEN-1:0] mem_resp_data;

  icache #(.K(K), .SETS(SETS), .LINE_W(LW)) dut (.*);

  function automatic inst_t word(addr_t a);
    return a[31:0] ^ 32'h13579BDF;
  endfunction

  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  bit    m_v [SETS];
  addr_t m_tag [SETS];
  fetch_req_t exp_q[$];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // next-level memory: accept, wait, return the line
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      addr_t a;
      @(negedge clk);
      mem_req_ready = 1;
      if (mem_req_valid) begin
        a = mem_req_addr;
        check("refill aligned", a[5:0], 0);
        @(negedge clk); mem_req_ready = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
        for (int w = 0; w < LW; w++) mem_resp_data[w*ILEN +: ILEN] = word(a + 4 * w);
        mem_resp_valid = 1;
        @(negedge clk); mem_resp_valid = 0;
      end
    end
  end

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // response checker
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && resp_valid && resp_ready) begin
        fetch_req_t e;
        if (exp_q.size() == 0) begin check("unexpected response", 1, 0); continue; end
        e = exp_q.pop_front();
        check("resp pc", resp_req.pc, e.pc);
        check("resp count", resp_req.count, e.count);
        for (int i = 0; i < K; i++) begin
          check("ivalid", resp_ivalid[i], i < e.count);
          if (i < e.count) check("inst", resp_inst[i], word(e.pc + 4 * i));
        end
      end
    end
  end

  initial begin
    req_valid = 0; req = '0; resp_ready = 0;
    for (int s = 0; s < SETS; s++) m_v[s] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      addr_t pc; int off, cnt, s; bit hit;
      // pcs from a 16 KiB window so that lines are reused and evicted
      pc  = 64'h8000_0000 + {$urandom_range(0, 4095), 2'b00};
      off = int'(pc[5:2]);
      cnt = $urandom_range(1, (LW - off < K) ? LW - off : K);
      @(negedge clk);
      req_valid = 1; req.pc = pc; req.count = cnt[$bits(req.count)-1:0]; req.ppc = pc + 4 * cnt; req.epoch = epoch_t'(n);
      resp_ready = ($urandom_range(0, 3) != 0);
      #1;
      while (!req_ready) begin @(negedge clk); resp_ready = ($urandom_range(0, 3) != 0); #1; end
      s = int'(pc[11:6]);
      hit = m_v[s] && m_tag[s] == pc[63:12];
      @(posedge clk);
      exp_q.push_back(req);
      m_v[s] = 1; m_tag[s] = pc[63:12];
      #1;
      if (hit) begin n_hit++; check("hit latency", resp_valid, 1); end
      else begin n_miss++; check("miss: no answer yet", resp_valid, 0); end
      @(negedge clk); req_valid = 0;
    end
    resp_ready = 1;
    repeat (30) @(negedge clk);
    check("all answered", exp_q.size(), 0);
    check("hits", n_hit > 100, 1);
    check("misses", n_miss > 50, 1);
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
