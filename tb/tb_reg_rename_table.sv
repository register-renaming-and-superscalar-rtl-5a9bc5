// tb_reg_rename_table: randomized check of the renaming table against a
// reference model kept in queues (committed map, in-flight list, free set).
// Every cycle it compares source lookups and the claimed register, then
// applies a random mix of claim, commit, wrong- and right-speculation.
module tb_reg_rename_table;
  import ooo_pkg::*;
  localparam int unsigned NA = NUM_ARCH_REG, NP = NUM_PHY_REG, S = NP - NA;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  arch_regs_t lk_regs, claim_regs;
  phy_regs_t  lk_phys;
  logic claim_valid, claim_rdy, commit_valid, commit_rdy;
  arch_idx_t commit_arch; phy_idx_t commit_phy;
  spec_bits_t claim_spec;
  logic wrong_spec_valid, right_spec_valid;
  spec_tag_t wrong_spec_tag, right_spec_tag;
  logic [$clog2(S+1)-1:0] in_flight;

  reg_rename_table dut (.*);

  int checks = 0, failures = 0;
  int n_claim = 0, n_commit = 0, n_kill = 0, n_right = 0, n_full = 0;

  // reference model
  phy_idx_t m_map [NA];
  typedef struct { arch_idx_t a; phy_idx_t p; spec_bits_t s; } ent_t;
  ent_t q[$];
  spec_tag_t br[$];   // outstanding branches, oldest first
  function automatic spec_bits_t cur_mask();
    spec_bits_t m = '0;
    foreach (br[i]) m[br[i]] = 1'b1;
    return m;
  endfunction
  function automatic bit br_has(spec_tag_t t);
    foreach (br[i]) if (br[i] == t) return 1;
    return 0;
  endfunction
  bit m_free [NP];

  function automatic phy_idx_t m_src(arch_idx_t r);
    phy_idx_t p = m_map[r];
    foreach (q[i]) if (q[i].a == r) p = q[i].p;
    return p;
  endfunction
  function automatic phy_idx_t m_lowest_free();
    for (int i = 0; i < NP; i++) if (m_free[i]) return phy_idx_t'(i);
    return '0;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NA; a++) m_map[a] = phy_idx_t'(a);
    for (int p = 0; p < NP; p++) m_free[p] = (p >= NA);
    {claim_valid, commit_valid, wrong_spec_valid, right_spec_valid} = '0;
    lk_regs = '0; claim_regs = '0; claim_spec = '0; wrong_spec_tag = '0; right_spec_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int phase;
      phase = (cyc / 500) % 3;   // 0: fill-heavy, 1: balanced, 2: drain-heavy
      @(negedge clk);
      lk_regs.rs1 = arch_idx_t'($urandom_range(0, 7));
      lk_regs.rs2 = arch_idx_t'($urandom_range(0, 7));
      claim_regs.rd = arch_idx_t'($urandom_range(0, 7));
      // speculation follows program order: a new branch takes a free tag,
      // every later claim carries the tags of all outstanding branches
      if (br.size() < NUM_SPEC_TAGS && $urandom_range(0, 5) == 0) begin
        spec_tag_t t;
        do t = spec_tag_t'($urandom); while (br_has(t));
        br.push_back(t);
      end
      claim_spec = cur_mask();
      wrong_spec_valid = (br.size() > 0) && ($urandom_range(0, 29) == 0);
      wrong_spec_tag   = wrong_spec_valid ? br[$urandom_range(0, br.size() - 1)] : '0;
      right_spec_valid = (br.size() > 0) && ($urandom_range(0, 7) == 0);
      right_spec_tag   = right_spec_valid ? br[$urandom_range(0, br.size() - 1)] : '0;
      if (right_spec_valid && wrong_spec_valid && right_spec_tag == wrong_spec_tag)
        right_spec_valid = 1'b0;
      #1;
      // compare combinational outputs with the model
      check("rs1", lk_phys.rs1, m_src(lk_regs.rs1));
      check("rs2", lk_phys.rs2, m_src(lk_regs.rs2));
      check("count", in_flight, q.size());
      check("claim_rdy", claim_rdy, (q.size() < S) && !wrong_spec_valid);
      check("commit_rdy", commit_rdy, q.size() > 0);
      if (q.size() > 0) check("commit_phy", commit_phy, q[0].p);
      if (claim_rdy) check("new rd", lk_phys.rd, m_lowest_free());
      if (q.size() == S) n_full++;
      claim_valid  = claim_rdy && ($urandom_range(0, 9) < (phase == 0 ? 8 : phase == 1 ? 5 : 2));
      // only non-speculative entries (mask zero) may commit
      commit_valid = commit_rdy && (q[0].s == '0) && !(wrong_spec_valid && q[0].s[wrong_spec_tag])
                     && ($urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 5 : 9));
      @(posedge clk);
      // model update, in the order the table applies them
      begin
        phy_idx_t np;
        np = m_lowest_free();
        if (commit_valid) begin
          m_free[m_map[q[0].a]] = 1;
          m_map[q[0].a] = q[0].p;
          void'(q.pop_front());
          n_commit++;
        end
        if (wrong_spec_valid) begin
          ent_t keep[$];
          keep.delete();
          foreach (q[i]) begin
            if (q[i].s[wrong_spec_tag]) begin m_free[q[i].p] = 1; n_kill++; end
            else keep.push_back(q[i]);
          end
          q = keep;
          // the mispredicted branch and every younger one are gone
          for (int i = 0; i < br.size(); i++)
            if (br[i] == wrong_spec_tag) begin
              while (br.size() > i) void'(br.pop_back());
              break;
            end
        end
        if (right_spec_valid) begin
          foreach (q[i]) q[i].s[right_spec_tag] = 1'b0;
          for (int i = 0; i < br.size(); i++)
            if (br[i] == right_spec_tag) begin br.delete(i); break; end
          n_right++;
        end
        if (claim_valid) begin
          ent_t e;
          e.a = claim_regs.rd; e.p = np;
          e.s = claim_spec;
          if (right_spec_valid) e.s[right_spec_tag] = 1'b0;
          m_free[np] = 0;
          q.push_back(e);
          n_claim++;
        end
      end
    end
    check("claims seen",  n_claim  > 100, 1);
    check("commits seen", n_commit > 100, 1);
    check("kills seen",   n_kill   > 10,  1);
    check("full seen",    n_full   > 0,   1);
    $display("claims=%0d commits=%0d killed=%0d right=%0d full_cycles=%0d", n_claim, n_commit, n_kill, n_right, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
