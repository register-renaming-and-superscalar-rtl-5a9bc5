// reg_rename_table: register renaming table with speculation support.
//
// State (following the table's described organisation):
//   * map      : committed architectural -> physical mapping, one entry per
//                architectural register (reset: Rn -> Pn).
//   * in-flight renaming stack of NUM_PHY_REG - NUM_ARCH_REG entries, a
//                circular buffer with enqueue and dequeue pointers; each
//                entry holds valid, architectural register, physical register
//                and the speculation mask of the instruction that claimed it.
// Operations:
//   * lookup  (get_renaming)      combinational: a source register maps to the
//     youngest valid stack entry for it, else to the committed map; lk_phys.rd
//     is the physical register a claim in this cycle would receive.
//   * claim   (claim_renaming)    pushes {rd, new physical register, spec mask}
//     at the enqueue end.
//   * commit                      pops the oldest entry and writes it into the
//     committed map; the physical register it replaces becomes free.
//   * wrong_spec (incorrectSpeculation tag) invalidates every entry whose mask
//     has the tag set, frees their physical registers and moves the enqueue
//     pointer back over them (they are the youngest entries).
//   * right_spec (correctSpeculation tag) clears the tag in every mask.
// Own choices: free physical registers are kept as a bitmap and the lowest
// free one is allocated; a claim is refused in a cycle with wrong_spec; a
// right_spec in the same cycle as a claim also clears the tag in the claimed
// entry; claim is meant only for instructions that write a register, and
// commit is given once per such instruction, in order.
// All updates take effect at the next rising clock edge; reset is synchronous.
module reg_rename_table
  import ooo_pkg::*;
#(
  parameter int unsigned NUM_ARCH = NUM_ARCH_REG,
  parameter int unsigned NUM_PHY  = NUM_PHY_REG
) (
  input  logic          clk,
  input  logic          rst_n,
  // get_renaming
  input  arch_regs_t    lk_regs,
  output phy_regs_t     lk_phys,
  // claim_renaming
  input  logic          claim_valid,
  input  arch_regs_t    claim_regs,
  input  spec_bits_t    claim_spec,
  output logic          claim_rdy,
  // commit
  input  logic          commit_valid,
  output logic          commit_rdy,
  output arch_idx_t     commit_arch,   // oldest entry, for the caller's checks
  output phy_idx_t      commit_phy,
  // speculation update
  input  logic          wrong_spec_valid,
  input  spec_tag_t     wrong_spec_tag,
  input  logic          right_spec_valid,
  input  spec_tag_t     right_spec_tag,
  output logic [$clog2(NUM_PHY-NUM_ARCH+1)-1:0] in_flight
);
  localparam int unsigned S  = NUM_PHY - NUM_ARCH;   // stack entries
  localparam int unsigned SW = $clog2(S);
  localparam int unsigned CW = $clog2(S + 1);

  phy_idx_t   map_q      [NUM_ARCH];
  logic       valid_q    [S];
  phy_idx_t   stk_phy_q  [S];
  arch_idx_t  stk_arch_q [S];
  spec_bits_t stk_spec_q [S];
  logic [SW-1:0] enq_p, deq_p;
  logic [CW-1:0] cnt;
  logic [NUM_PHY-1:0] free_q;

  function automatic logic [SW-1:0] wrap(logic [SW-1:0] base, int unsigned off);
    return SW'((32'(base) + off) % S);
  endfunction

  // ---- lookup: youngest in-flight renaming wins -----------------------------
  function automatic phy_idx_t rename_src(arch_idx_t r);
    phy_idx_t p = map_q[r];
    for (int unsigned j = 0; j < S; j++) begin
      if (CW'(j) < cnt && valid_q[wrap(deq_p, j)] && stk_arch_q[wrap(deq_p, j)] == r)
        p = stk_phy_q[wrap(deq_p, j)];
    end
    return p;
  endfunction

  // lowest free physical register
  phy_idx_t new_phy;
  logic     have_free;
  always_comb begin
    new_phy   = '0;
    have_free = 1'b0;
    for (int i = NUM_PHY - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        new_phy   = phy_idx_t'(i);
        have_free = 1'b1;
      end
    end
  end

  always_comb begin
    lk_phys.rs1 = rename_src(lk_regs.rs1);
    lk_phys.rs2 = rename_src(lk_regs.rs2);
    lk_phys.rd  = new_phy;
  end

  assign claim_rdy   = (cnt != CW'(S)) && have_free && !wrong_spec_valid;
  assign commit_rdy  = (cnt != '0) && valid_q[deq_p];
  assign commit_arch = stk_arch_q[deq_p];
  assign commit_phy  = stk_phy_q[deq_p];
  assign in_flight   = cnt;

  wire claim_fire  = claim_valid && claim_rdy;
  wire commit_fire = commit_valid && commit_rdy;

  // ---- kill set for a wrong speculation -------------------------------------
  logic [S-1:0]       kill;
  logic [CW-1:0]      n_kill;
  logic [NUM_PHY-1:0] freed_by_kill;
  always_comb begin
    kill          = '0;
    n_kill        = '0;
    freed_by_kill = '0;
    for (int unsigned e = 0; e < S; e++) begin
      if (wrong_spec_valid && valid_q[e] && stk_spec_q[e][wrong_spec_tag]) begin
        kill[e]                   = 1'b1;
        n_kill                    = n_kill + 1'b1;
        freed_by_kill[stk_phy_q[e]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < NUM_ARCH; a++) map_q[a] <= phy_idx_t'(a);
      for (int unsigned e = 0; e < S; e++) begin
        valid_q[e]    <= 1'b0;
        stk_phy_q[e]  <= '0;
        stk_arch_q[e] <= '0;
        stk_spec_q[e] <= '0;
      end
      enq_p <= '0;
      deq_p <= '0;
      cnt   <= '0;
      for (int unsigned p = 0; p < NUM_PHY; p++) free_q[p] <= (p >= NUM_ARCH);
    end else begin
      logic [NUM_PHY-1:0] free_n;
      free_n = free_q | freed_by_kill;
      // speculation update on the stored masks
      for (int unsigned e = 0; e < S; e++) begin
        if (kill[e]) valid_q[e] <= 1'b0;
        if (right_spec_valid) stk_spec_q[e][right_spec_tag] <= 1'b0;
      end
      // commit: oldest renaming becomes architectural
      if (commit_fire) begin
        map_q[stk_arch_q[deq_p]] <= stk_phy_q[deq_p];
        free_n[map_q[stk_arch_q[deq_p]]] = 1'b1;
        valid_q[deq_p] <= 1'b0;
        deq_p <= wrap(deq_p, 1);
      end
      // claim: push a new renaming
      if (claim_fire) begin
        spec_bits_t sb;
        sb = claim_spec;
        if (right_spec_valid) sb[right_spec_tag] = 1'b0;
        valid_q[enq_p]    <= 1'b1;
        stk_phy_q[enq_p]  <= new_phy;
        stk_arch_q[enq_p] <= claim_regs.rd;
        stk_spec_q[enq_p] <= sb;
        free_n[new_phy]   = 1'b0;
        enq_p <= wrap(enq_p, 1);
      end else if (n_kill != '0) begin
        enq_p <= wrap(enq_p, S - 32'(n_kill));
      end
      cnt    <= cnt + CW'(claim_fire) - CW'(commit_fire) - n_kill;
      free_q <= free_n;
    end
  end

  a_claim_ok:  assert property (@(posedge clk) disable iff (!rst_n) claim_valid |-> claim_rdy);
  a_commit_ok: assert property (@(posedge clk) disable iff (!rst_n) commit_valid |-> commit_rdy);
  a_commit_nonspec: assert property (@(posedge clk) disable iff (!rst_n)
                                      commit_valid |-> !(wrong_spec_valid && kill[deq_p]));
endmodule
