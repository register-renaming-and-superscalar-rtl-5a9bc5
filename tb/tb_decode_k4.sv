// tb_decode_k4: the tb_decode test with K = 4 lanes.
// It drives the K decode lanes with random instruction mixes (ALU,
// loads, stores, branches, LUI, JAL with right and wrong predictions), stale
// epochs and random output readiness. A reference model recomputes which lanes
// dequeue, which are enqueued where, the register-use flags, immediates, and
// the JAL redirect.
module tb_decode_k4;
  import ooo_pkg::*;
  localparam int unsigned K = 4;
  epoch_t cur_epoch;
  fetched_inst_t in_first [K];
  logic [K-1:0] in_valid, in_deq, out_enq, out_rdy;
  decoded_inst_t out_data [K];
  logic dec_redir_valid;
  addr_t dec_redir_pc;

  decode #(.K(K)) dut (.*);

  int checks = 0, failures = 0, n_drop = 0, n_redir = 0, n_wide = 0, n_block = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // random instruction of a chosen kind, with its expected flags
  typedef struct { inst_t i; bit r1, r2, rd; addr_t imm; bit jal; } gen_t;
  function automatic gen_t gen();
    gen_t g; int k; logic [4:0] rd, rs1, rs2;
    rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
    k = $urandom_range(0, 5);
    g.jal = 0;
    case (k)
      0: begin // addi rd, rs1, imm
        logic [11:0] im; im = 12'($urandom);
        g.i = {im, rs1, 3'b000, rd, 7'b0010011}; g.r1 = 1; g.r2 = 0; g.rd = 1; g.imm = 64'(signed'(im));
      end
      1: begin // add
        g.i = {7'b0, rs2, rs1, 3'b000, rd, 7'b0110011}; g.r1 = 1; g.r2 = 1; g.rd = 1; g.imm = 0;
      end
      2: begin // sw
        logic [11:0] im; im = 12'($urandom);
        g.i = {im[11:5], rs2, rs1, 3'b010, im[4:0], 7'b0100011}; g.r1 = 1; g.r2 = 1; g.rd = 0; g.imm = 64'(signed'(im));
      end
      3: begin // beq
        logic [12:0] im; im = {12'($urandom), 1'b0};
        g.i = {im[12], im[10:5], rs2, rs1, 3'b000, im[4:1], im[11], 7'b1100011}; g.r1 = 1; g.r2 = 1; g.rd = 0; g.imm = 64'(signed'(im));
      end
      4: begin // lui
        logic [19:0] im; im = 20'($urandom);
        g.i = {im, rd, 7'b0110111}; g.r1 = 0; g.r2 = 0; g.rd = 1; g.imm = 64'(signed'({im, 12'b0}));
      end
      default: begin // jal
        logic [20:0] im; im = {20'($urandom), 1'b0};
        g.i = {im[20], im[10:1], im[11], im[19:12], rd, 7'b1101111}; g.r1 = 0; g.r2 = 0; g.rd = 1; g.imm = 64'(signed'(im)); g.jal = 1;
      end
    endcase
    if (rd == 0) g.rd = 0;
    return g;
  endfunction

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      gen_t g [K];
      epoch_t e; bit go; int o; bit exp_redir; addr_t exp_rpc;
      logic [K-1:0] exp_deq, exp_enq;
      cur_epoch = epoch_t'($urandom_range(0, 3));
      for (int i = 0; i < K; i++) begin
        g[i] = gen();
        in_first[i].inst  = g[i].i;
        in_first[i].pc    = 64'h8000_0000 + {$urandom_range(0, 1023), 2'b00};
        in_first[i].epoch = ($urandom_range(0, 3) == 0) ? epoch_t'($urandom_range(0, 3)) : cur_epoch;
        in_first[i].ppc   = (g[i].jal && $urandom_range(0, 1)) ? in_first[i].pc + g[i].imm : in_first[i].pc + 4;
        in_valid[i] = ($urandom_range(0, 5) != 0);
        out_rdy[i]  = ($urandom_range(0, 5) != 0);
      end
      for (int i = 1; i < K; i++) if (!in_valid[i-1]) in_valid[i] = 0;
      #1;
      // reference
      e = cur_epoch; go = 1; o = 0; exp_deq = 0; exp_enq = 0; exp_redir = 0; exp_rpc = 0;
      for (int i = 0; i < K; i++) begin
        if (go && in_valid[i]) begin
          if (in_first[i].epoch != e) begin exp_deq[i] = 1; n_drop++; end
          else if (out_rdy[o]) begin
            addr_t tgt; tgt = in_first[i].pc + g[i].imm;
            exp_deq[i] = 1; exp_enq[o] = 1;
            check("rs1_v", out_data[o].regs.rs1_v, g[i].r1);
            check("rs2_v", out_data[o].regs.rs2_v, g[i].r2);
            check("rd_v",  out_data[o].regs.rd_v,  g[i].rd);
            check("rd",    out_data[o].regs.rd,    g[i].i[11:7]);
            check("rs1",   out_data[o].regs.rs1,   g[i].i[19:15]);
            check("imm",   out_data[o].imm,        g[i].imm);
            check("pc",    out_data[o].pc,         in_first[i].pc);
            if (g[i].jal && in_first[i].ppc != tgt) begin
              exp_redir = 1; exp_rpc = tgt; e = e + 1; n_redir++;
              check("fixed ppc", out_data[o].ppc, tgt);
            end else check("ppc", out_data[o].ppc, in_first[i].ppc);
            o++;
          end else begin go = 0; n_block++; end
        end else go = 0;
      end
      if (exp_enq == '1) n_wide++;
      check("deq", in_deq, exp_deq);
      check("enq", out_enq, exp_enq);
      check("redir", dec_redir_valid, exp_redir);
      if (exp_redir) check("redir pc", dec_redir_pc, exp_rpc);
      #9;
    end
    check("drops", n_drop > 50, 1);
    check("redirects", n_redir > 50, 1);
    check("wide", n_wide > 50, 1);
    check("blocked", n_block > 50, 1);
    $display("drop=%0d redir=%0d wide=%0d blocked=%0d", n_drop, n_redir, n_wide, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
