// superscalar_core_top: superscalar front-end of an out-of-order RISC-V core
// feeding its register-renaming stage.
//
// The stage split (fetch1/fetch2/cache/fetch3/decode, superscalar FIFOs in
// between, single-issue renaming) and killing wrong-path instructions in
// place follow the source description; the sizes, the handshakes and the
// epoch scheme are this design's choices.
//
// Pipeline: fetch1 (pc, epoch, BTB lookups, strike length and ppc) -> fetch2
// (request register) -> icache (K instructions of one line per access) ->
// fetch3 (in-order enqueue) -> superscalar FIFO -> decode (K ordered lanes,
// JAL redirect) -> superscalar FIFO -> rename_stage (one instruction per
// cycle through the renaming table) -> back-end port.
//
// Wrong-path instructions are removed in two ways. Those inside the two
// superscalar FIFOs are killed in place with the FIFO's clear on a redirect;
// those still in fetch2, the cache or its answer carry an old epoch and are
// dropped by decode.
//
// The rest of the core is outside this module and connects through ports:
// the next memory level refills the instruction cache (mem_*), the back-end
// redirects fetch (be_redir_*), trains the BTB (train_*), accepts renamed
// instructions (ren_*), supplies their speculation mask (spec_bits_in),
// commits renamings in order (commit_*) and resolves speculation
// (wrong_spec_*, right_spec_*). `events` gives one-cycle pulses for
// performance counters (an addition of this design). All handshakes are
// valid-ready; single clock; synchronous active-low reset.
module superscalar_core_top
  import ooo_pkg::*;
#(
  parameter int unsigned K           = SUP_K,
  parameter int unsigned FIFO_DEPTH  = 4,
  parameter int unsigned IC_SETS     = 64,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter addr_t       RESET_PC    = 64'h0000_0000_8000_0000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // instruction refill from the next memory level
  output logic                        mem_req_valid,
  output addr_t                       mem_req_addr,
  input  logic                        mem_req_ready,
  input  logic                        mem_resp_valid,
  input  logic [LINE_WORDS*ILEN-1:0]  mem_resp_data,
  // back-end -> front-end
  input  logic                        be_redir_valid,
  input  addr_t                       be_redir_pc,
  input  logic                        train_valid,
  input  addr_t                       train_pc,
  input  addr_t                       train_target,
  input  logic                        train_taken,
  // renamed instructions to the back-end
  output logic                        ren_valid,
  output renamed_inst_t               ren_inst,
  input  logic                        ren_ready,
  input  spec_bits_t                  spec_bits_in,
  // commit and speculation resolution
  input  logic                        commit_valid,
  output logic                        commit_rdy,
  output arch_idx_t                   commit_arch,
  output phy_idx_t                    commit_phy,
  input  logic                        wrong_spec_valid,
  input  spec_tag_t                   wrong_spec_tag,
  input  logic                        right_spec_valid,
  input  spec_tag_t                   right_spec_tag,
  // event pulses for performance counters
  output perf_events_t                events
);
  // ---- fetch1 + BTB -----------------------------------------------------
  addr_t        btb_pc [K];
  logic [K-1:0] btb_hit;
  addr_t        btb_target [K];
  logic         dec_redir_valid, redirect;
  addr_t        dec_redir_pc;
  epoch_t       cur_epoch;
  logic         f1_valid, f1_ready;
  fetch_req_t   f1_req;

  btb #(.K(K), .ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .rd_pc(btb_pc), .rd_hit(btb_hit), .rd_target(btb_target),
    .upd_valid(train_valid), .upd_pc(train_pc), .upd_target(train_target), .upd_taken(train_taken)
  );

  fetch1 #(.K(K), .LINE_W(LINE_WORDS), .RESET_PC(RESET_PC)) u_fetch1 (
    .clk, .rst_n,
    .btb_pc, .btb_hit, .btb_target,
    .be_redir_valid, .be_redir_pc, .dec_redir_valid, .dec_redir_pc,
    .redirect, .cur_epoch,
    .req_valid(f1_valid), .req(f1_req), .req_ready(f1_ready)
  );

  // ---- fetch2 -------------------------------------------------------------
  logic       f2_valid, f2_ready;
  fetch_req_t f2_req;

  fetch2 u_fetch2 (
    .clk, .rst_n, .flush(redirect),
    .in_valid(f1_valid), .in_req(f1_req), .in_ready(f1_ready),
    .out_valid(f2_valid), .out_req(f2_req), .out_ready(f2_ready)
  );

  // ---- instruction cache ------------------------------------------------
  logic         ic_valid, ic_ready;
  fetch_req_t   ic_req;
  inst_t        ic_inst [K];
  logic [K-1:0] ic_ivalid;

  icache #(.K(K), .SETS(IC_SETS), .LINE_W(LINE_WORDS)) u_icache (
    .clk, .rst_n,
    .req_valid(f2_valid), .req(f2_req), .req_ready(f2_ready),
    .resp_valid(ic_valid), .resp_req(ic_req), .resp_inst(ic_inst), .resp_ivalid(ic_ivalid),
    .resp_ready(ic_ready),
    .mem_req_valid, .mem_req_addr, .mem_req_ready, .mem_resp_valid, .mem_resp_data
  );

  // ---- fetch3 -> fetch FIFO ---------------------------------------------
  logic [K-1:0]  ff_enq, ff_rdy, ff_valid, ff_deq;
  fetched_inst_t ff_in [K];
  fetched_inst_t ff_first [K];

  fetch3 #(.K(K)) u_fetch3 (
    .in_valid(ic_valid), .in_req(ic_req), .in_inst(ic_inst), .in_ivalid(ic_ivalid),
    .in_ready(ic_ready),
    .enq_valid(ff_enq), .enq_data(ff_in), .enq_rdy(ff_rdy)
  );

  // Every instruction in the fetch FIFO is younger than any redirecting
  // instruction, so a redirect kills them all in place.
  sup_fifo #(.T(fetched_inst_t), .K(K), .N(FIFO_DEPTH)) u_fetch_fifo (
    .clk, .rst_n, .clear(redirect),
    .enq_valid(ff_enq), .enq_data(ff_in), .enq_rdy(ff_rdy), .not_full(),
    .first(ff_first), .first_valid(ff_valid), .deq(ff_deq), .not_empty()
  );

  // ---- decode -> rename FIFO --------------------------------------------
  logic [K-1:0]  rf_enq, rf_rdy, rf_valid, rf_deq;
  decoded_inst_t rf_in [K];
  decoded_inst_t rf_first [K];

  decode #(.K(K)) u_decode (
    .cur_epoch,
    .in_first(ff_first), .in_valid(ff_valid), .in_deq(ff_deq),
    .out_enq(rf_enq), .out_data(rf_in), .out_rdy(rf_rdy),
    .dec_redir_valid, .dec_redir_pc
  );

  // A back-end redirect comes from an instruction already renamed, so the
  // rename FIFO holds only younger ones: they are killed in place.
  sup_fifo #(.T(decoded_inst_t), .K(K), .N(FIFO_DEPTH)) u_rename_fifo (
    .clk, .rst_n, .clear(be_redir_valid),
    .enq_valid(rf_enq), .enq_data(rf_in), .enq_rdy(rf_rdy), .not_full(),
    .first(rf_first), .first_valid(rf_valid), .deq(rf_deq), .not_empty()
  );

  // ---- rename (single issue: only lane 0 of the rename FIFO is used) -----
  logic in_deq0;

  rename_stage u_rename (
    .clk, .rst_n,
    .in_first(rf_first[0]), .in_valid(rf_valid[0]), .in_deq(in_deq0),
    .spec_bits_in,
    .out_valid(ren_valid), .out_inst(ren_inst), .out_ready(ren_ready),
    .commit_valid, .commit_rdy, .commit_arch, .commit_phy, .in_flight(),
    .wrong_spec_valid, .wrong_spec_tag, .right_spec_valid, .right_spec_tag
  );

  always_comb begin
    rf_deq    = '0;
    rf_deq[0] = in_deq0;
  end

  // ---- event pulses -----------------------------------------------------
  always_comb begin
    logic f1_fire, last_hit;
    int unsigned n_in, n_out;
    f1_fire  = f1_valid && f1_ready;
    last_hit = 1'b0;                 // BTB answer for the strike's last lane
    for (int unsigned i = 0; i < K; i++)
      if (32'(f1_req.count) == i + 1) last_hit = btb_hit[i];
    n_in  = 0;
    n_out = 0;
    for (int unsigned i = 0; i < K; i++) begin
      n_in  += 32'(ff_deq[i]);
      n_out += 32'(rf_enq[i]);
    end
    events.strike_full     = f1_fire && (32'(f1_req.count) == K);
    events.strike_line_cut = f1_fire && (32'(f1_req.count) < K) && !last_hit;
    events.strike_btb_cut  = f1_fire && (32'(f1_req.count) < K) &&  last_hit;
    events.fetch_blocked   = ic_valid && !ic_ready;
    events.decode_wide     = (rf_enq == '1);
    events.decode_redirect = dec_redir_valid && !be_redir_valid;
    events.decode_drop     = (n_in > n_out);
    events.fetch_fifo_kill = redirect && ff_valid[0];
    events.rename_fifo_kill = be_redir_valid && rf_valid[0];
    events.rename_no_reg   = rf_valid[0] && !ren_valid;
  end
endmodule
