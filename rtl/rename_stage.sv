// rename_stage: renames one decoded instruction per cycle (the back-end is
// single-issue) through reg_rename_table and hands it to the back-end.
//
// The oldest entry of the decode-to-rename FIFO is looked up in the renaming
// table: sources get their current physical registers, and an instruction
// that writes a register claims a new physical register together with the
// speculation mask given by the back-end (spec_bits_in, the unresolved
// branches it depends on). It holds no wrong-path filter of its own: the
// FIFO in front of it is cleared on every back-end redirect. The result
// leaves on a valid-ready port; most of its bits are the decoded instruction
// carried through unchanged, next to the physical registers and the mask.
// commit and the speculation updates go straight to the table;
// commit_arch/commit_phy show the oldest in-flight renaming and in_flight
// the number of them. Combinational from FIFO head to output; the table
// updates at the clock edge of the handshake.
module rename_stage
  import ooo_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // from the rename FIFO, lane 0
  input  decoded_inst_t in_first,
  input  logic          in_valid,
  output logic          in_deq,
  // to the back-end
  input  spec_bits_t    spec_bits_in,
  output logic          out_valid,
  output renamed_inst_t out_inst,
  input  logic          out_ready,
  // commit and speculation update
  input  logic          commit_valid,
  output logic          commit_rdy,
  output arch_idx_t     commit_arch,
  output phy_idx_t      commit_phy,
  output logic [$clog2(NUM_PHY_REG-NUM_ARCH_REG+1)-1:0] in_flight,
  input  logic          wrong_spec_valid,
  input  spec_tag_t     wrong_spec_tag,
  input  logic          right_spec_valid,
  input  spec_tag_t     right_spec_tag
);
  phy_regs_t phys;
  logic      claim_rdy;

  assign out_valid      = in_valid && (claim_rdy || !in_first.regs.rd_v);
  assign out_inst.dinst = in_first;
  assign out_inst.phys  = phys;
  assign out_inst.spec  = spec_bits_in;
  assign in_deq         = out_valid && out_ready;

  reg_rename_table u_rat (
    .clk, .rst_n,
    .lk_regs(in_first.regs), .lk_phys(phys),
    .claim_valid(out_valid && out_ready && in_first.regs.rd_v),
    .claim_regs(in_first.regs), .claim_spec(spec_bits_in), .claim_rdy,
    .commit_valid, .commit_rdy, .commit_arch, .commit_phy,
    .wrong_spec_valid, .wrong_spec_tag, .right_spec_valid, .right_spec_tag,
    .in_flight
  );
endmodule
