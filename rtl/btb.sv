// btb: set-associative branch target buffer.
//
// WAYS x SETS entries of {valid, tag, target}. The set index is the PC bits
// just above the instruction-offset bits, PC[IDX_LSB +: log2(SETS)] (PC[7:2]
// by default) and the tag is the PC bits above the index (PC[31:8] by
// default). The lookup port compares the tag of every way of the indexed set
// with the fetch PC in parallel and returns hit and the target of the matching
// way in the same cycle (combinational read).
//
// The update port writes one entry at the next clock edge: if upd_pc already
// has an entry its target is rewritten, otherwise a way of its set is
// allocated, the lowest-numbered invalid way if there is one and otherwise the
// way named by the set's round-robin victim pointer, which then advances.
//
// The organisation (4 ways, 64 sets, tag match, PC[31:8]/PC[7:2] split) follows
// the predictor description; with a 24-bit tag, a 32-bit target and a valid
// bit an entry holds 57 bits, 256 entries about 1.8 KB. The replacement
// policy, the same-cycle read and the reset of the valid bits are this design's
// choices.
module btb
  import gshare_pkg::*;
#(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned SETS    = 64,
  parameter int unsigned IDX_LSB = 2,
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W  = ADDR_W - IDX_LSB - SET_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup (fetch)
  input  logic [ADDR_W-1:0] lk_pc,
  output logic              lk_hit,
  output logic [ADDR_W-1:0] lk_target,
  // update (execute)
  input  logic              upd_en,
  input  logic [ADDR_W-1:0] upd_pc,
  input  logic [ADDR_W-1:0] upd_target
);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] target;
  } entry_t;

  entry_t             mem_q   [SETS][WAYS];
  logic [WAYS-1:0]    valid_q [SETS];
  logic [WAY_W-1:0]   rr_q    [SETS];

  function automatic logic [SET_W-1:0] set_of(logic [ADDR_W-1:0] pc);
    return pc[IDX_LSB +: SET_W];
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(logic [ADDR_W-1:0] pc);
    return pc[ADDR_W-1 -: TAG_W];
  endfunction

  // ---------------- lookup ----------------
  logic [SET_W-1:0] lk_set;
  assign lk_set = set_of(lk_pc);

  always_comb begin
    lk_hit    = 1'b0;
    lk_target = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[lk_set][w] && mem_q[lk_set][w].tag == tag_of(lk_pc)) begin
        lk_hit    = 1'b1;
        lk_target = mem_q[lk_set][w].target;
      end
    end
  end

  // ---------------- update ----------------
  logic [SET_W-1:0] up_set;
  logic             up_hit;
  logic [WAY_W-1:0] up_hit_way;
  logic             up_free;
  logic [WAY_W-1:0] up_free_way;
  logic [WAY_W-1:0] up_way;

  assign up_set = set_of(upd_pc);

  always_comb begin
    up_hit      = 1'b0;
    up_hit_way  = '0;
    up_free     = 1'b0;
    up_free_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[up_set][w] && mem_q[up_set][w].tag == tag_of(upd_pc)) begin
        up_hit     = 1'b1;
        up_hit_way = WAY_W'(w);
      end
      if (!valid_q[up_set][w]) begin
        up_free     = 1'b1;
        up_free_way = WAY_W'(w);
      end
    end
    if (up_hit)       up_way = up_hit_way;
    else if (up_free) up_way = up_free_way;
    else              up_way = rr_q[up_set];
  end

  // Tag and target storage: no reset, guarded by the valid bits.
  always_ff @(posedge clk) begin
    if (upd_en) begin
      mem_q[up_set][up_way].tag    <= tag_of(upd_pc);
      mem_q[up_set][up_way].target <= upd_target;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (upd_en) begin
      valid_q[up_set][up_way] <= 1'b1;
      if (!up_hit && !up_free)
        rr_q[up_set] <= (rr_q[up_set] == WAY_W'(WAYS - 1)) ? '0 : rr_q[up_set] + 1'b1;
    end
  end

endmodule
