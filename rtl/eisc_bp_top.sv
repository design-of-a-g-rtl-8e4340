// eisc_bp_top: branch-prediction front end for the EISC pipeline.
//
// Fetch stage: each fetched 16-bit instruction enters the LERI folding unit.
// LERI prefixes are absorbed; the next instruction leaves the folding unit in
// the same cycle as one folded instruction. If it is a conditional branch the
// G-share predictor is consulted with the instruction's own fetch PC, and the
// prediction (f_pred_taken, f_pred_target) is returned at once so that the
// processor can redirect its next fetch. The predicted direction is shifted into
// the speculative fetch GHR.
//
// Fetch/decode register: the folded instruction and its prediction are held
// for the decode stage, which outputs them on d_*. The decode stage computes
// the actual PC of the instruction, d_branch_pc = folded PC + 2 * LERI count,
// so that a branch that followed LERIs can be trained under the PC at which it
// is fetched.
//
// Execute stage: the processor reports each resolved conditional branch on
// ex_* with the d_branch_pc and prediction it carried down the pipeline. The
// predictor updates its PHT, BTB and resolved GHR, and raises ex_mispredict,
// which flushes the fetch/decode register and any half-collected LERI group and
// restores the fetch GHR. The processor is expected to redirect fetch on
// ex_mispredict and to flush its own younger stages. stall holds the
// fetch/decode register and refuses fetched instructions (f_ready low); flush
// lets the processor clear the front end for other reasons.
//
// Timing: prediction is combinational in the fetch cycle; d_* is valid one
// cycle after the instruction is accepted; updates take effect at the edge that
// ends the ex_valid cycle. The split into units follows the predictor
// description; the port protocol is this design's choice.
module eisc_bp_top
  import gshare_pkg::*;
#(
  parameter int unsigned PHT_ENTRIES = 64,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned BTB_SETS    = 64,
  parameter int unsigned IDX_LSB     = 2,
  parameter bit          SPEC_GHR    = 1'b1,
  localparam int unsigned GHR_W      = $clog2(PHT_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stall,
  input  logic                  flush,
  // fetch
  input  logic                  f_valid,
  input  logic [INSTR_W-1:0]    f_instr,
  input  logic [ADDR_W-1:0]     f_pc,
  output logic                  f_ready,
  output logic                  f_pred_taken,
  output logic [ADDR_W-1:0]     f_pred_target,
  // decode
  output logic                  d_valid,
  output logic [INSTR_W-1:0]    d_instr,
  output logic [ADDR_W-1:0]     d_folded_pc,
  output logic [LERI_CNT_W-1:0] d_leri_cnt,
  output logic [ADDR_W-1:0]     d_leri_imm,
  output logic [ADDR_W-1:0]     d_branch_pc,
  output logic                  d_is_branch,
  output logic                  d_pred_taken,
  output logic [ADDR_W-1:0]     d_pred_target,
  // execute
  input  logic                  ex_valid,
  input  logic [ADDR_W-1:0]     ex_pc,
  input  logic                  ex_taken,
  input  logic [ADDR_W-1:0]     ex_target,
  input  logic                  ex_pred_taken,
  input  logic [ADDR_W-1:0]     ex_pred_target,
  output logic                  ex_mispredict,
  // observation
  output logic [GHR_W-1:0]      ghr_fetch,
  output logic [GHR_W-1:0]      ghr_exec
);

  logic  fe_flush;
  logic  fold_valid;
  fold_t fold;
  logic  f_branch;
  logic  pred_taken;
  logic [ADDR_W-1:0] pred_target;

  typedef struct packed {
    fold_t             fold;
    logic              is_branch;
    logic              pred_taken;
    logic [ADDR_W-1:0] pred_target;
  } fd_t;

  logic fd_valid_q;
  fd_t  fd_q;

  assign fe_flush = flush || ex_mispredict;
  assign f_ready  = !stall;

  // ---------------- fetch: LERI folding ----------------
  leri_fold u_fold (
    .clk          (clk),
    .rst_n        (rst_n),
    .flush        (fe_flush),
    .stall        (stall),
    .in_valid     (f_valid),
    .in_instr     (f_instr),
    .in_pc        (f_pc),
    .in_is_leri   (),
    .out_valid    (fold_valid),
    .out          (fold),
    .leri_pending ()
  );

  assign f_branch = fold_valid && is_cond_branch(fold.instr);

  // ---------------- predictor ----------------
  gshare_predictor #(
    .PHT_ENTRIES (PHT_ENTRIES),
    .BTB_WAYS    (BTB_WAYS),
    .BTB_SETS    (BTB_SETS),
    .IDX_LSB     (IDX_LSB),
    .SPEC_GHR    (SPEC_GHR)
  ) u_pred (
    .clk            (clk),
    .rst_n          (rst_n),
    .f_valid        (fold_valid),
    .f_is_branch    (f_branch),
    .f_pc           (f_pc),
    .f_pred_taken   (pred_taken),
    .f_pred_target  (pred_target),
    .f_btb_hit      (),
    .f_pht_taken    (),
    .ex_valid       (ex_valid),
    .ex_pc          (ex_pc),
    .ex_taken       (ex_taken),
    .ex_target      (ex_target),
    .ex_pred_taken  (ex_pred_taken),
    .ex_pred_target (ex_pred_target),
    .ex_mispredict  (ex_mispredict),
    .ghr_fetch      (ghr_fetch),
    .ghr_exec       (ghr_exec)
  );

  assign f_pred_taken  = f_branch && pred_taken;
  assign f_pred_target = pred_target;

  // ---------------- fetch/decode register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd_valid_q <= 1'b0;
      fd_q       <= '0;
    end else if (fe_flush) begin
      fd_valid_q <= 1'b0;
    end else if (!stall) begin
      fd_valid_q <= fold_valid;
      if (fold_valid) begin
        fd_q.fold        <= fold;
        fd_q.is_branch   <= f_branch;
        fd_q.pred_taken  <= f_branch && pred_taken;
        fd_q.pred_target <= pred_target;
      end
    end
  end

  // ---------------- decode: actual branch PC ----------------
  branch_pc_calc u_pc_calc (
    .folded_pc (fd_q.fold.folded_pc),
    .leri_cnt  (fd_q.fold.leri_cnt),
    .actual_pc (d_branch_pc)
  );

  assign d_valid       = fd_valid_q;
  assign d_instr       = fd_q.fold.instr;
  assign d_folded_pc   = fd_q.fold.folded_pc;
  assign d_leri_cnt    = fd_q.fold.leri_cnt;
  assign d_leri_imm    = fd_q.fold.leri_imm;
  assign d_is_branch   = fd_q.is_branch;
  assign d_pred_taken  = fd_q.pred_taken;
  assign d_pred_target = fd_q.pred_target;

endmodule
