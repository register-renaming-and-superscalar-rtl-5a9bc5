// decode: K in-order decode lanes between the fetch FIFO and the rename FIFO.
//
// Each cycle lane 0 looks at the oldest fetched instruction, lane 1 at the
// next one, and so on. The lanes act in order and share the fetch epoch the
// way consecutive rules share a register with ordered ports: a lane sees the
// epoch as left by the lanes before it. An instruction from an old epoch is
// dropped. A live one is decoded (RV64I major opcodes: register fields that
// are really read or written, immediate, instruction class) and enqueued into
// the next superscalar FIFO on the next free output lane, so output order is
// program order. Lane i proceeds only if lanes 0..i-1 did and its output
// lane is ready, which keeps the FIFO's prefix rule.
//
// Decode-time redirect (own choice for how decode "touches the pc"): a JAL
// whose predicted next pc differs from its computed target redirects fetch to
// that target (dec_redir_*) and the instructions after it in the same cycle
// are treated as belonging to the old epoch. Writes to x0 are not renamed.
// Purely combinational.
module decode
  import ooo_pkg::*;
#(
  parameter int unsigned K = SUP_K
) (
  input  epoch_t        cur_epoch,
  // from the fetch FIFO
  input  fetched_inst_t in_first [K],
  input  logic [K-1:0]  in_valid,
  output logic [K-1:0]  in_deq,
  // to the rename FIFO
  output logic [K-1:0]  out_enq,
  output decoded_inst_t out_data [K],
  input  logic [K-1:0]  out_rdy,
  // redirect to fetch
  output logic          dec_redir_valid,
  output addr_t         dec_redir_pc
);
  function automatic decoded_inst_t decode_one(fetched_inst_t f);
    decoded_inst_t d;
    inst_t i = f.inst;
    addr_t imm_i = {{(XLEN-12){i[31]}}, i[31:20]};
    addr_t imm_s = {{(XLEN-12){i[31]}}, i[31:25], i[11:7]};
    addr_t imm_b = {{(XLEN-13){i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0};
    addr_t imm_u = {{(XLEN-32){i[31]}}, i[31:12], 12'b0};
    addr_t imm_j = {{(XLEN-21){i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0};
    d.pc       = f.pc;
    d.ppc      = f.ppc;
    d.epoch    = f.epoch;
    d.inst     = i;
    d.regs.rs1 = i[19:15];
    d.regs.rs2 = i[24:20];
    d.regs.rd  = i[11:7];
    d.regs.rs1_v = 1'b0;
    d.regs.rs2_v = 1'b0;
    d.regs.rd_v  = 1'b0;
    d.imm      = '0;
    d.iclass   = IC_ILLEGAL;
    unique case (i[6:0])
      7'b0110111: begin d.iclass = IC_LUI;    d.regs.rd_v = 1; d.imm = imm_u; end
      7'b0010111: begin d.iclass = IC_AUIPC;  d.regs.rd_v = 1; d.imm = imm_u; end
      7'b1101111: begin d.iclass = IC_JAL;    d.regs.rd_v = 1; d.imm = imm_j; end
      7'b1100111: begin d.iclass = IC_JALR;   d.regs.rd_v = 1; d.regs.rs1_v = 1; d.imm = imm_i; end
      7'b1100011: begin d.iclass = IC_BRANCH; d.regs.rs1_v = 1; d.regs.rs2_v = 1; d.imm = imm_b; end
      7'b0000011: begin d.iclass = IC_LOAD;   d.regs.rd_v = 1; d.regs.rs1_v = 1; d.imm = imm_i; end
      7'b0100011: begin d.iclass = IC_STORE;  d.regs.rs1_v = 1; d.regs.rs2_v = 1; d.imm = imm_s; end
      7'b0010011, 7'b0011011:
                  begin d.iclass = IC_ALU;    d.regs.rd_v = 1; d.regs.rs1_v = 1; d.imm = imm_i; end
      7'b0110011, 7'b0111011:
                  begin d.iclass = IC_ALU;    d.regs.rd_v = 1; d.regs.rs1_v = 1; d.regs.rs2_v = 1; end
      7'b0001111: begin d.iclass = IC_FENCE; end
      7'b1110011: begin d.iclass = IC_SYSTEM; d.regs.rd_v = 1; d.regs.rs1_v = 1; d.imm = imm_i; end
      default:    ;
    endcase
    if (d.regs.rd == '0) d.regs.rd_v = 1'b0;
    return d;
  endfunction

  always_comb begin
    epoch_t e;
    logic   go;
    int unsigned o;
    e  = cur_epoch;
    go = 1'b1;
    o  = 0;
    in_deq  = '0;
    out_enq = '0;
    dec_redir_valid = 1'b0;
    dec_redir_pc    = '0;
    for (int unsigned j = 0; j < K; j++) out_data[j] = decode_one(in_first[0]);
    for (int unsigned i = 0; i < K; i++) begin
      decoded_inst_t d;
      d = decode_one(in_first[i]);
      if (go && in_valid[i]) begin
        if (in_first[i].epoch != e) begin
          in_deq[i] = 1'b1;                       // wrong path: drop
        end else if (out_rdy[o]) begin
          in_deq[i] = 1'b1;
          if (d.iclass == IC_JAL && d.ppc != d.pc + d.imm) begin
            d.ppc           = d.pc + d.imm;
            dec_redir_valid = 1'b1;
            dec_redir_pc    = d.pc + d.imm;
            e               = e + 1'b1;           // later lanes are wrong path
          end
          out_enq[o]  = 1'b1;
          out_data[o] = d;
          o = o + 1;
        end else begin
          go = 1'b0;
        end
      end else begin
        go = 1'b0;
      end
    end
  end
endmodule
