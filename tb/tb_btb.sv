// tb_btb: trains the BTB with random taken/not-taken updates and compares
// every lookup port against a reference table of the same organisation
// (direct mapped, 64 entries, index pc[7:2]), including aliasing pcs.
module tb_btb;
  import ooo_pkg::*;
  localparam int unsigned K = SUP_K, E = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t rd_pc [K];
  logic [K-1:0] rd_hit;
  addr_t rd_target [K];
  logic upd_valid, upd_taken;
  addr_t upd_pc, upd_target;

  btb #(.K(K), .ENTRIES(E)) dut (.*);

  int checks = 0, failures = 0, n_hit = 0, n_alias = 0;
  bit    m_v [E];
  addr_t m_pc [E];
  addr_t m_tg [E];

  function automatic addr_t rand_pc();
    // a small set of tags so that hits and aliasing both happen
    return {32'h0, 20'h80000, 2'($urandom_range(0, 3)), 8'($urandom) & 8'hFC, 2'b00};
  endfunction

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_valid = 0; upd_taken = 0; upd_pc = '0; upd_target = '0;
    for (int i = 0; i < K; i++) rd_pc[i] = '0;
    for (int e = 0; e < E; e++) m_v[e] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) rd_pc[i] = (i == 0) ? rand_pc() : rd_pc[0] + addr_t'(4 * i);
      #1;
      for (int i = 0; i < K; i++) begin
        int ix; bit exp_hit;
        ix = int'(rd_pc[i][7:2]);
        exp_hit = m_v[ix] && m_pc[ix][63:8] == rd_pc[i][63:8];
        checks++;
        if (rd_hit[i] !== exp_hit || (exp_hit && rd_target[i] !== m_tg[ix])) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d pc %h hit %b exp %b", i, rd_pc[i], rd_hit[i], exp_hit);
        end
        if (exp_hit) n_hit++;
        if (m_v[ix] && !exp_hit) n_alias++;
      end
      upd_valid  = ($urandom_range(0, 2) == 0);
      upd_pc     = rand_pc();
      upd_target = {32'h0, $urandom} & ~64'h3;
      upd_taken  = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (upd_valid) begin
        int ix; ix = int'(upd_pc[7:2]);
        if (upd_taken) begin m_v[ix] = 1; m_pc[ix] = upd_pc; m_tg[ix] = upd_target; end
        else if (m_pc[ix][63:8] == upd_pc[63:8]) m_v[ix] = 0;
      end
    end
    checks++; if (n_hit < 100 || n_alias < 100) failures++;
    $display("hits=%0d alias=%0d", n_hit, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
