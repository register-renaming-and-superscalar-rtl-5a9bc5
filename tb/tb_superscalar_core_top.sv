// tb_superscalar_core_top: runs the whole front-end and rename stage at its
// default parameters on a generated program, with the testbench acting as
// the next memory level and as the back-end.
//
// Program (1 KiB window at 0x8000_0000, 256 words, word w); the jumps sit
// at different BTB entries so that a trained entry survives a loop pass:
//   w = 255            : jal x0, back to word 0 (the program loops)
//   w = 7, w = 130     : jal x1, +12
//   w % 80 == 13       : beq x3, x4, +32, taken when (w/80) is even, except
//                        w = 93, taken on odd passes through the loop
//   w % 16 == 5        : sw x(w%7+1), 8(x(w%5+1))    (no destination)
//   w % 8  == 2        : add rd, rs1, rs2
//   otherwise          : addi rd, rs1, w             (rd = w%31 + 1, or x0)
// Back-end model: renamed instructions enter an in-order queue. A beq takes a
// speculation tag and resolves 3..12 cycles later; if its predicted next pc
// was wrong the testbench redirects fetch, kills the tag's renamings and
// trains the BTB. Instructions commit in order once no unresolved branch is
// older; each commit is checked against the program's true path (pc,
// instruction word) and its renamed sources against the committed renamings
// of the registers, and taken jumps train the BTB. Every mechanism of the
// design is counted and must occur at least once.
module tb_superscalar_core_top;
  import ooo_pkg::*;
  localparam int unsigned NWIN = 256;
  localparam addr_t BASE = 64'h8000_0000;
  localparam int unsigned TARGET_COMMITS = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t mem_req_addr;
  logic [LINE_WORDS*ILEN-1:0] mem_resp_data;
  logic be_redir_valid, train_valid, train_taken;
  addr_t be_redir_pc, train_pc, train_target;
  logic ren_valid, ren_ready;
  renamed_inst_t ren_inst;
  spec_bits_t spec_bits_in;
  logic commit_valid, commit_rdy;
  arch_idx_t commit_arch;
  phy_idx_t commit_phy;
  logic wrong_spec_valid, right_spec_valid;
  spec_tag_t wrong_spec_tag, right_spec_tag;
  perf_events_t events;

  superscalar_core_top dut (.*);

  // ---------------- program -------------------------------------------------
  function automatic inst_t prog(addr_t pc);
    int unsigned w;
    logic [4:0] rd, rs1, rs2;
    if (pc < BASE || pc >= BASE + 4 * NWIN) return 32'h0000_0013;   // nop
    w = 32'((pc - BASE) >> 2);
    rd  = 5'(w % 31 + 1);
    if (w % 11 == 0) rd = 5'd0;
    rs1 = 5'((w * 3) % 31 + 1);
    rs2 = 5'((w * 5) % 29 + 1);
    if (w == NWIN - 1) begin
      logic [20:0] im; im = 21'(-(4 * (NWIN - 1)));
      return {im[20], im[10:1], im[11], im[19:12], 5'd0, 7'b1101111};
    end
    if (w == 7 || w == 130) begin
      logic [20:0] im; im = 21'd12;
      return {im[20], im[10:1], im[11], im[19:12], 5'd1, 7'b1101111};
    end
    if (w % 80 == 13 && w < NWIN - 16) begin
      logic [12:0] im; im = 13'd32;
      return {im[12], im[10:5], 5'd4, 5'd3, 3'b000, im[4:1], im[11], 7'b1100011};
    end
    if (w % 16 == 5) return {7'd0, 5'(w % 7 + 1), 5'(w % 5 + 1), 3'b010, 5'd8, 7'b0100011};
    if (w % 8 == 2) return {7'd0, rs2, rs1, 3'b000, rd, 7'b0110011};
    return {12'(w), rs1, 3'b000, rd, 7'b0010011};
  endfunction

  function automatic bit is_beq(inst_t i);  return i[6:0] == 7'b1100011; endfunction
  function automatic bit is_jal(inst_t i);  return i[6:0] == 7'b1101111; endfunction
  int passes = 0;   // completed loop passes (commits of word 255)
  function automatic addr_t true_next(addr_t pc);
    inst_t i; int unsigned w;
    i = prog(pc);
    w = 32'((pc - BASE) >> 2);
    if (is_jal(i)) return pc + 64'(signed'({i[31], i[19:12], i[20], i[30:21], 1'b0}));
    if (is_beq(i) && (w == 93 ? passes % 2 == 1 : (w / 80) % 2 == 0)) return pc + 64'(signed'({i[31], i[7], i[30:25], i[11:8], 1'b0}));
    return pc + 4;
  endfunction

  // ---------------- counters ------------------------------------------------
  int checks = 0, failures = 0;
  int c_strike_full = 0, c_line_cut = 0, c_btb_cut = 0, c_fetch_blocked = 0, c_dec_wide = 0;
  int c_dec_redir = 0, c_dec_drop = 0, c_ff_kill = 0, c_rf_kill = 0, c_no_reg = 0, c_miss = 0;
  int c_be_redir = 0, c_kill = 0, c_right = 0, c_commit = 0, c_btb_pred = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    c_strike_full   += int'(events.strike_full);
    c_line_cut      += int'(events.strike_line_cut);
    c_btb_cut       += int'(events.strike_btb_cut);
    c_fetch_blocked += int'(events.fetch_blocked);
    c_dec_wide      += int'(events.decode_wide);
    c_dec_redir     += int'(events.decode_redirect);
    c_dec_drop      += int'(events.decode_drop);
    c_ff_kill       += int'(events.fetch_fifo_kill);
    c_rf_kill       += int'(events.rename_fifo_kill);
    c_no_reg        += int'(events.rename_no_reg);
    c_miss          += int'(mem_req_valid && mem_req_ready);
  end

  // ---------------- next memory level ---------------------------------------
  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_data = '0;
    forever begin
      addr_t a;
      @(negedge clk);
      mem_req_ready = 1;
      #1;
      if (mem_req_valid) begin
        a = mem_req_addr;
        @(negedge clk); mem_req_ready = 0;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        for (int w = 0; w < LINE_WORDS; w++) mem_resp_data[w*ILEN +: ILEN] = prog(a + 4 * w);
        mem_resp_valid = 1;
        @(negedge clk); mem_resp_valid = 0;
      end
    end
  end

  // ---------------- back-end model ------------------------------------------
  typedef struct {
    renamed_inst_t r;
    bit         br;        // conditional branch holding a tag
    spec_tag_t  tag;
    bit         resolved;
    longint     due;
  } rob_t;
  rob_t rob[$];
  bit   tag_busy [NUM_SPEC_TAGS];
  phy_idx_t cmap [NUM_ARCH_REG];
  addr_t gold_pc;
  longint cyc = 0;

  function automatic spec_bits_t open_mask();
    spec_bits_t m = '0;
    foreach (rob[i]) if (rob[i].br && !rob[i].resolved) m[rob[i].tag] = 1'b1;
    return m;
  endfunction
  function automatic int free_tag();
    for (int t = 0; t < NUM_SPEC_TAGS; t++) if (!tag_busy[t]) return t;
    return -1;
  endfunction

  initial begin
    #1000000;   // 100k cycles; the full run needs about 7k
    failures++;
    $display("watchdog expired after %0d commits", c_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    be_redir_valid = 0; be_redir_pc = '0; train_valid = 0; train_pc = '0; train_target = '0; train_taken = 0;
    ren_ready = 0; spec_bits_in = '0; commit_valid = 0;
    wrong_spec_valid = 0; right_spec_valid = 0; wrong_spec_tag = '0; right_spec_tag = '0;
    for (int t = 0; t < NUM_SPEC_TAGS; t++) tag_busy[t] = 0;
    for (int a = 0; a < NUM_ARCH_REG; a++) cmap[a] = phy_idx_t'(a);
    gold_pc = BASE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (c_commit < TARGET_COMMITS) begin
      int rb; bit do_commit, redir_now; int slow;
      @(negedge clk);
      cyc++;
      slow = ((cyc / 700) % 4 == 3) ? 1 : 0;   // phases of slow commit fill the table
      be_redir_valid = 0; wrong_spec_valid = 0; right_spec_valid = 0;
      train_valid = 0; commit_valid = 0; redir_now = 0;
      // resolve the oldest due branch
      rb = -1;
      foreach (rob[i]) if (rob[i].br && !rob[i].resolved) begin rb = i; break; end
      if (rb >= 0 && rob[rb].due <= cyc) begin
        addr_t tn;
        tn = true_next(rob[rb].r.dinst.pc);
        rob[rb].resolved = 1;
        if (rob[rb].r.dinst.ppc != tn) begin
          spec_tag_t t; rob_t keep[$];
          t = rob[rb].tag;
          be_redir_valid = 1; be_redir_pc = tn; redir_now = 1;
          wrong_spec_valid = 1; wrong_spec_tag = t;
          train_valid = 1; train_pc = rob[rb].r.dinst.pc; train_target = tn;
          train_taken = (tn != rob[rb].r.dinst.pc + 4);
          keep.delete();
          foreach (rob[i]) begin
            if (rob[i].r.spec[t]) begin
              c_kill++;
              if (rob[i].br && !rob[i].resolved) tag_busy[rob[i].tag] = 0;
            end else keep.push_back(rob[i]);
          end
          rob = keep;
          tag_busy[t] = 0;
          c_be_redir++;
        end else begin
          right_spec_valid = 1; right_spec_tag = rob[rb].tag;
          foreach (rob[i]) rob[i].r.spec[rob[rb].tag] = 1'b0;
          tag_busy[rob[rb].tag] = 0;
          c_right++;
          if (tn != rob[rb].r.dinst.pc + 4) c_btb_pred++;
        end
      end
      // commit the oldest instruction when nothing older is unresolved
      do_commit = 0;
      if (rob.size() > 0 && (!rob[0].br || rob[0].resolved) && rob[0].r.spec == '0
          && $urandom_range(0, 9) < (slow ? 1 : 8)) begin
        rob_t h; h = rob[0];
        if (!h.r.dinst.regs.rd_v || commit_rdy) begin
          do_commit = 1;
          check("commit pc", h.r.dinst.pc, gold_pc);
          check("commit inst", h.r.dinst.inst, prog(gold_pc));
          if (h.r.dinst.regs.rs1_v) check("rs1 renaming", h.r.phys.rs1, cmap[h.r.dinst.regs.rs1]);
          if (h.r.dinst.regs.rs2_v) check("rs2 renaming", h.r.phys.rs2, cmap[h.r.dinst.regs.rs2]);
          if (h.r.dinst.regs.rd_v) begin
            commit_valid = 1;
            check("commit phy", commit_phy, h.r.phys.rd);
            check("commit arch", commit_arch, h.r.dinst.regs.rd);
            cmap[h.r.dinst.regs.rd] = h.r.phys.rd;
          end
          if (is_jal(h.r.dinst.inst) && !train_valid) begin
            train_valid = 1; train_pc = h.r.dinst.pc; train_target = true_next(h.r.dinst.pc); train_taken = 1;
          end
          gold_pc = true_next(gold_pc);
          if (h.r.dinst.pc == BASE + 4 * (NWIN - 1)) passes++;
          void'(rob.pop_front());
          c_commit++;
        end
      end
      // accept renamed instructions
      spec_bits_in = open_mask();
      #1;
      ren_ready = !redir_now && ($urandom_range(0, 9) != 0);
      if (ren_valid && is_beq(ren_inst.dinst.inst) && free_tag() < 0) ren_ready = 0;
      #1;
      if (ren_valid && ren_ready) begin
        rob_t e;
        e.r = ren_inst; e.br = is_beq(ren_inst.dinst.inst); e.resolved = 0;
        e.tag = '0; e.due = cyc + $urandom_range(3, 12);
        check("spec mask", ren_inst.spec, spec_bits_in);
        if (e.br) begin e.tag = spec_tag_t'(free_tag()); tag_busy[e.tag] = 1; end
        rob.push_back(e);
      end
      if (rob.size() > 200) begin
        check("back-end queue bounded", rob.size(), 0);
        break;
      end
    end
    @(negedge clk);
    be_redir_valid = 0; wrong_spec_valid = 0; right_spec_valid = 0; train_valid = 0; commit_valid = 0; ren_ready = 0;
    // every mechanism must have happened
    check("full-width strikes", c_strike_full > 0, 1);
    check("strike cut at line end", c_line_cut > 0, 1);
    check("strike cut by BTB jump", c_btb_cut > 0, 1);
    check("fetch FIFO back-pressure", c_fetch_blocked > 0, 1);
    check("K-wide decode", c_dec_wide > 0, 1);
    check("decode JAL redirect", c_dec_redir > 0, 1);
    check("decode wrong-path drop", c_dec_drop > 0, 1);
    check("fetch FIFO killed in place", c_ff_kill > 0, 1);
    check("rename FIFO killed in place", c_rf_kill > 0, 1);
    check("rename waits for register", c_no_reg > 0, 1);
    check("icache refills", c_miss > 0, 1);
    check("back-end redirect", c_be_redir > 0, 1);
    check("renamings killed", c_kill > 0, 1);
    check("speculation confirmed", c_right > 0, 1);
    check("BTB-predicted taken branch", c_btb_pred > 0, 1);
    $display("commits=%0d cycles=%0d strikes: full=%0d line_cut=%0d btb_cut=%0d fetch_blocked=%0d",
             c_commit, cyc, c_strike_full, c_line_cut, c_btb_cut, c_fetch_blocked);
    $display("decode: wide=%0d redirect=%0d drop=%0d  killed in place: fetch FIFO=%0d rename FIFO=%0d  rename no_reg=%0d  refills=%0d",
             c_dec_wide, c_dec_redir, c_dec_drop, c_ff_kill, c_rf_kill, c_no_reg, c_miss);
    $display("back-end: redirects=%0d killed=%0d confirmed=%0d btb_predicted_taken=%0d",
             c_be_redir, c_kill, c_right, c_btb_pred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
