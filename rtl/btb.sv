// btb: branch target buffer with one lookup port per fetch lane.
//
// Fetch asks, for each of the K consecutive instruction addresses of a strike,
// whether the BTB "indicates pc+4" (miss) or a jump (hit, with its target).
// Organisation (own choice, the BTB's insides are not specified): direct
// mapped, ENTRIES entries indexed by pc[log2(ENTRIES)+1:2], each holding a
// valid bit, the remaining pc bits as tag and the target. Lookups are
// combinational. The training port (from the back-end) writes an entry when a
// control transfer was taken and removes a matching entry when it was not.
// Training takes effect at the next rising edge; reset clears all entries.
module btb
  import ooo_pkg::*;
#(
  parameter int unsigned K       = SUP_K,
  parameter int unsigned ENTRIES = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  addr_t        rd_pc     [K],
  output logic [K-1:0] rd_hit,
  output addr_t        rd_target [K],
  input  logic         upd_valid,
  input  addr_t        upd_pc,
  input  addr_t        upd_target,
  input  logic         upd_taken
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = XLEN - IW - 2;
  typedef logic [IW-1:0] idx_t;
  typedef logic [TW-1:0] tag_t;

  logic valid_q  [ENTRIES];
  tag_t tag_q    [ENTRIES];
  addr_t target_q [ENTRIES];

  function automatic idx_t idx_of(addr_t pc);
    return pc[IW+1:2];
  endfunction
  function automatic tag_t tag_of(addr_t pc);
    return pc[XLEN-1:IW+2];
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      rd_hit[i]    = valid_q[idx_of(rd_pc[i])] && tag_q[idx_of(rd_pc[i])] == tag_of(rd_pc[i]);
      rd_target[i] = target_q[idx_of(rd_pc[i])];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++) valid_q[e] <= 1'b0;
    end else if (upd_valid) begin
      if (upd_taken) begin
        valid_q[idx_of(upd_pc)]  <= 1'b1;
        tag_q[idx_of(upd_pc)]    <= tag_of(upd_pc);
        target_q[idx_of(upd_pc)] <= upd_target;
      end else if (tag_q[idx_of(upd_pc)] == tag_of(upd_pc)) begin
        valid_q[idx_of(upd_pc)]  <= 1'b0;
      end
    end
  end
endmodule
