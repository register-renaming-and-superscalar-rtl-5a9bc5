// tb_rename_stage: streams random decoded instructions through the rename
// stage with random back-end readiness and random in-order commits. Checks
// that every source is renamed to the physical register given to the latest
// earlier writer of that register, that a new destination is never a
// register still in use, that the speculation mask is attached, that the
// stage stalls when all physical registers are taken, and that commit
// releases them.
module tb_rename_stage;
  import ooo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  decoded_inst_t in_first;
  logic in_valid, in_deq, out_valid, out_ready;
  spec_bits_t spec_bits_in;
  renamed_inst_t out_inst;
  logic commit_valid, commit_rdy, wrong_spec_valid, right_spec_valid;
  arch_idx_t commit_arch; phy_idx_t commit_phy;
  spec_tag_t wrong_spec_tag, right_spec_tag;
  logic [$clog2(NUM_PHY_REG-NUM_ARCH_REG+1)-1:0] in_flight;

  rename_stage dut (.*);

  int checks = 0, failures = 0, n_out = 0, n_stall = 0, n_commit = 0;
  phy_idx_t spec_map [NUM_ARCH_REG];     // latest renaming per register
  phy_idx_t arch_map [NUM_ARCH_REG];     // committed renaming
  typedef struct { arch_idx_t a; phy_idx_t p; } ent_t;
  ent_t q[$];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic bit in_use(phy_idx_t p);
    foreach (arch_map[a]) if (arch_map[a] == p) return 1;
    foreach (q[i]) if (q[i].p == p) return 1;
    return 0;
  endfunction

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NUM_ARCH_REG; a++) begin spec_map[a] = phy_idx_t'(a); arch_map[a] = phy_idx_t'(a); end
    in_valid = 0; in_first = '0; out_ready = 0; spec_bits_in = '0;
    commit_valid = 0; wrong_spec_valid = 0; right_spec_valid = 0; wrong_spec_tag = 0; right_spec_tag = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_first = '0;
      in_first.regs.rs1_v = 1; in_first.regs.rs1 = arch_idx_t'($urandom_range(1, 6));
      in_first.regs.rs2_v = 1; in_first.regs.rs2 = arch_idx_t'($urandom_range(1, 6));
      in_first.regs.rd_v  = ($urandom_range(0, 4) != 0);
      in_first.regs.rd    = arch_idx_t'($urandom_range(1, 6));
      spec_bits_in = spec_bits_t'($urandom);
      out_ready = ($urandom_range(0, 4) != 0);
      // commits are slow in the first half so that the table fills up
      commit_valid = commit_rdy && ($urandom_range(0, 9) < ((n % 1000) < 500 ? 1 : 9));
      #1;
      check("no input, no output", out_valid && !in_valid, 0);
      if (in_valid) begin
        bit full;
        full = (q.size() == NUM_PHY_REG - NUM_ARCH_REG);
        check("valid", out_valid, !(full && in_first.regs.rd_v));
        if (full && in_first.regs.rd_v) n_stall++;
        if (out_valid) begin
          check("rs1", out_inst.phys.rs1, spec_map[in_first.regs.rs1]);
          check("rs2", out_inst.phys.rs2, spec_map[in_first.regs.rs2]);
          check("spec", out_inst.spec, spec_bits_in);
          if (in_first.regs.rd_v) check("rd free", in_use(out_inst.phys.rd), 0);
        end
        check("deq", in_deq, out_valid && out_ready);
      end
      if (commit_valid) check("commit phy", commit_phy, q[0].p);
      @(posedge clk);
      if (commit_valid) begin
        arch_map[q[0].a] = q[0].p; void'(q.pop_front()); n_commit++;
      end
      if (in_valid && out_valid && out_ready) begin
        n_out++;
        if (in_first.regs.rd_v) begin
          spec_map[in_first.regs.rd] = out_inst.phys.rd;
          q.push_back('{in_first.regs.rd, out_inst.phys.rd});
        end
      end
    end
    check("outputs", n_out > 500, 1);
    check("full stalls", n_stall > 5, 1);
    check("commits", n_commit > 500, 1);
    $display("out=%0d stall=%0d commit=%0d", n_out, n_stall, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
