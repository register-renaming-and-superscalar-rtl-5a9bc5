// ooo_pkg: types and constants shared by the superscalar RISC-V front-end and
// the register-renaming stage.
//
// Sizes that the design takes from its description: 32 architectural registers
// (R1..R32 in the map table), a 4-bit speculation mask per in-flight renaming,
// and a superscalar degree of 2 (the first k-wide FIFO proposal has enq1/enq2
// and first/second). Everything else here is this design's own choice: 64-bit
// program counters (RV64), 64 physical registers, 4-byte instructions, 64-byte
// cache lines and a 4-bit fetch epoch.
package ooo_pkg;

  // ---- architecture ------------------------------------------------------
  localparam int unsigned XLEN          = 64;
  localparam int unsigned ILEN          = 32;
  localparam int unsigned NUM_ARCH_REG  = 32;
  localparam int unsigned NUM_PHY_REG   = 64;
  localparam int unsigned NUM_SPEC_TAGS = 4;
  localparam int unsigned SUP_K         = 2;   // superscalar degree
  localparam int unsigned LINE_WORDS    = 16;  // instructions per cache line
  localparam int unsigned EPOCH_W       = 4;

  typedef logic [XLEN-1:0]                    addr_t;
  typedef logic [ILEN-1:0]                    inst_t;
  typedef logic [$clog2(NUM_ARCH_REG)-1:0]    arch_idx_t;
  typedef logic [$clog2(NUM_PHY_REG)-1:0]     phy_idx_t;
  typedef logic [NUM_SPEC_TAGS-1:0]           spec_bits_t;
  typedef logic [$clog2(NUM_SPEC_TAGS)-1:0]   spec_tag_t;
  // Fetch epoch: counts redirects; decode drops instructions of an old one.
  typedef logic [EPOCH_W-1:0]                 epoch_t;

  // Architectural registers named by one instruction (sources and destination).
  typedef struct packed {
    logic      rs1_v;
    arch_idx_t rs1;
    logic      rs2_v;
    arch_idx_t rs2;
    logic      rd_v;
    arch_idx_t rd;
  } arch_regs_t;

  // Physical registers: renamed sources and the newly claimed destination.
  typedef struct packed {
    phy_idx_t rs1;
    phy_idx_t rs2;
    phy_idx_t rd;
  } phy_regs_t;

  // A fetch request: a strike of `count` instructions starting at `pc`.
  typedef struct packed {
    addr_t                     pc;
    addr_t                     ppc;    // predicted pc after the strike
    epoch_t                    epoch;
    logic [$clog2(LINE_WORDS+1)-1:0] count;   // sized for any K up to a line
  } fetch_req_t;

  // One fetched instruction on its way to decode.
  typedef struct packed {
    addr_t  pc;
    addr_t  ppc;     // predicted next pc of this instruction
    epoch_t epoch;
    inst_t  inst;
  } fetched_inst_t;

  typedef enum logic [3:0] {
    IC_ALU, IC_LUI, IC_AUIPC, IC_JAL, IC_JALR, IC_BRANCH,
    IC_LOAD, IC_STORE, IC_FENCE, IC_SYSTEM, IC_ILLEGAL
  } iclass_t;

  typedef struct packed {
    addr_t      pc;
    addr_t      ppc;
    epoch_t     epoch;
    iclass_t    iclass;
    arch_regs_t regs;
    addr_t      imm;
    inst_t      inst;
  } decoded_inst_t;

  typedef struct packed {
    decoded_inst_t dinst;
    phy_regs_t     phys;
    spec_bits_t    spec;
  } renamed_inst_t;

  // One-cycle event pulses from the front-end and rename stage, for
  // performance counters outside the core.
  typedef struct packed {
    logic strike_full;      // fetch1 sent a strike of K instructions
    logic strike_line_cut;  // strike shortened by the end of the cache line
    logic strike_btb_cut;   // strike shortened by a predicted jump
    logic fetch_blocked;    // cache answer waiting for room in the fetch FIFO
    logic decode_wide;      // decode enqueued K instructions
    logic decode_redirect;  // decode corrected a JAL target
    logic decode_drop;      // decode dropped a wrong-path instruction
    logic fetch_fifo_kill;  // a redirect cleared a non-empty fetch FIFO
    logic rename_fifo_kill; // a back-end redirect cleared a non-empty rename FIFO
    logic rename_no_reg;    // rename waiting for a free physical register
  } perf_events_t;

endpackage
