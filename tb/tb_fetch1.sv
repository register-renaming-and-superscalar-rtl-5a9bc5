// tb_fetch1: checks the strike rule of the first fetch stage. A BTB stand-in
// answers from a fixed rule (pcs whose bits [5:2] equal 3 or 9 "jump" to a
// pc derived from the address). The testbench recomputes, for every request,
// how many instructions should be fetched (same line, stop after a predicted
// jump) and the predicted next pc, follows pc <= ppc, and applies back-end
// and decode redirects, checking pc and epoch after each.
module tb_fetch1;
  import ooo_pkg::*;
  localparam int unsigned K = SUP_K, LW = LINE_WORDS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t btb_pc [K];
  logic [K-1:0] btb_hit;
  addr_t btb_target [K];
  logic be_redir_valid, dec_redir_valid, redirect, req_valid, req_ready;
  addr_t be_redir_pc, dec_redir_pc;
  epoch_t cur_epoch;
  fetch_req_t req;

  fetch1 #(.K(K), .LINE_W(LW)) dut (.*);

  function automatic bit jumps(addr_t pc);
    return pc[5:2] == 4'd3 || pc[5:2] == 4'd9;
  endfunction
  function automatic addr_t jtarget(addr_t pc);
    return 64'h8000_0000 + {pc[13:6] ^ 8'h5A, 6'b0} + {pc[3:2], 2'b00} * 4;
  endfunction
  always_comb for (int i = 0; i < K; i++) begin
    btb_hit[i] = jumps(btb_pc[i]);
    btb_target[i] = jtarget(btb_pc[i]);
  end

  int checks = 0, failures = 0;
  int n_full = 0, n_line_cut = 0, n_jump_cut = 0, n_redir = 0;
  addr_t  m_pc;
  epoch_t m_ep;

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
    be_redir_valid = 0; dec_redir_valid = 0; be_redir_pc = '0; dec_redir_pc = '0; req_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    m_pc = 64'h8000_0000; m_ep = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int n; addr_t ppc; bit stop;
      @(negedge clk);
      be_redir_valid  = ($urandom_range(0, 40) == 0);
      dec_redir_valid = ($urandom_range(0, 40) == 0);
      be_redir_pc  = 64'h8000_0000 + {$urandom_range(0, 4095), 2'b00};
      dec_redir_pc = 64'h8000_4000 + {$urandom_range(0, 4095), 2'b00};
      req_ready = ($urandom_range(0, 3) != 0);
      #1;
      // reference strike
      n = 0; stop = 0; ppc = m_pc;
      for (int i = 0; i < K; i++) begin
        addr_t p; p = m_pc + 4 * i;
        if (!stop && int'(m_pc[5:2]) + i < LW) begin
          n++;
          ppc = jumps(p) ? jtarget(p) : p + 4;
          if (jumps(p)) stop = 1;
        end else stop = 1;
      end
      check("valid", req_valid, !(be_redir_valid || dec_redir_valid));
      check("pc", req.pc, m_pc);
      check("epoch", req.epoch, m_ep);
      check("count", req.count, n);
      check("ppc", req.ppc, ppc);
      if (req_valid && req_ready) begin
        if (n == K) n_full++;
        else if (jumps(m_pc + 4 * (n - 1))) n_jump_cut++;
        else n_line_cut++;
      end
      @(posedge clk);
      if (be_redir_valid) begin m_pc = be_redir_pc; m_ep++; n_redir++; end
      else if (dec_redir_valid) begin m_pc = dec_redir_pc; m_ep++; n_redir++; end
      else if (req_ready) m_pc = ppc;
    end
    check("full strikes", n_full > 50, 1);
    check("line cuts", n_line_cut > 5, 1);
    check("jump cuts", n_jump_cut > 5, 1);
    $display("full=%0d line_cut=%0d jump_cut=%0d redirects=%0d", n_full, n_line_cut, n_jump_cut, n_redir);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
