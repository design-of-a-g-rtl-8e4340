// gshare_predictor: G-share branch predictor with a speculative fetch-stage
// global history.
//
// Prediction (fetch stage, combinational): the PHT is read at
//   idx = PC[IDX_LSB +: GHR_W] XOR ghr_fetch
// and the BTB is looked up with the same PC. A branch is predicted taken, and
// fetch is redirected to f_pred_target, when the BTB hits and the counter is 10
// or 11; otherwise it is predicted not taken. For every fetched branch
// (f_valid && f_is_branch) the predicted direction is shifted into the fetch
// GHR at the next edge, so a branch fetched right behind it already sees it.
//
// Update (execute stage): a resolved branch (ex_valid) updates the PHT counter
// at PC XOR ghr_exec, where ghr_exec holds only resolved outcomes, then shifts
// its outcome into ghr_exec. A taken branch is written into the BTB with its
// target. ex_mispredict is raised when the predicted direction differs from the
// outcome, or a taken branch went to another target than predicted; it
// overwrites the fetch GHR with ghr_exec including the outcome being recorded,
// which discards the history of the younger, flushed branches. An overwrite
// wins over a fetch-side shift in the same cycle.
//
// The history length is log2 of the PHT size, as in the predictor
// description, which also gives the counter, the XOR indexing, the BTB shape,
// the two GHRs (fetch GHR for PHT read, execute GHR for PHT write) and the
// overwrite on misprediction. SPEC_GHR = 0 reads the PHT with ghr_exec instead
// (the conventional G-share, kept for comparison); the default is the design's
// enhanced configuration. Requiring a BTB hit for a taken prediction, and the
// exact recovery value, are this design's choices.
module gshare_predictor
  import gshare_pkg::*;
#(
  parameter int unsigned PHT_ENTRIES = 64,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned BTB_SETS    = 64,
  parameter int unsigned IDX_LSB     = 2,
  parameter bit          SPEC_GHR    = 1'b1,
  localparam int unsigned GHR_W      = $clog2(PHT_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch
  input  logic              f_valid,
  input  logic              f_is_branch,
  input  logic [ADDR_W-1:0] f_pc,
  output logic              f_pred_taken,
  output logic [ADDR_W-1:0] f_pred_target,
  output logic              f_btb_hit,
  output logic              f_pht_taken,
  // execute
  input  logic              ex_valid,
  input  logic [ADDR_W-1:0] ex_pc,
  input  logic              ex_taken,
  input  logic [ADDR_W-1:0] ex_target,
  input  logic              ex_pred_taken,
  input  logic [ADDR_W-1:0] ex_pred_target,
  output logic              ex_mispredict,
  // histories, for observation
  output logic [GHR_W-1:0]  ghr_fetch,
  output logic [GHR_W-1:0]  ghr_exec
);

  logic [GHR_W-1:0] ghr_exec_next;
  logic [GHR_W-1:0] rd_hist;
  logic [GHR_W-1:0] rd_idx;
  logic [GHR_W-1:0] wr_idx;

  // ---------------- index generation ----------------
  assign rd_hist = SPEC_GHR ? ghr_fetch : ghr_exec;
  assign rd_idx  = f_pc[IDX_LSB +: GHR_W] ^ rd_hist;
  assign wr_idx  = ex_pc[IDX_LSB +: GHR_W] ^ ghr_exec;

  // ---------------- tables ----------------
  pht #(.ENTRIES(PHT_ENTRIES)) u_pht (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_idx   (rd_idx),
    .rd_cnt   (),
    .rd_taken (f_pht_taken),
    .wr_en    (ex_valid),
    .wr_idx   (wr_idx),
    .wr_taken (ex_taken)
  );

  btb #(.WAYS(BTB_WAYS), .SETS(BTB_SETS), .IDX_LSB(IDX_LSB)) u_btb (
    .clk        (clk),
    .rst_n      (rst_n),
    .lk_pc      (f_pc),
    .lk_hit     (f_btb_hit),
    .lk_target  (f_pred_target),
    .upd_en     (ex_valid && ex_taken),
    .upd_pc     (ex_pc),
    .upd_target (ex_target)
  );

  assign f_pred_taken = f_btb_hit && f_pht_taken;

  // ---------------- misprediction ----------------
  assign ex_mispredict = ex_valid &&
                         ((ex_pred_taken != ex_taken) ||
                          (ex_taken && ex_pred_target != ex_target));

  // ---------------- global histories ----------------
  ghr #(.WIDTH(GHR_W)) u_ghr_exec (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (ex_valid),
    .shift_bit (ex_taken),
    .load_en   (1'b0),
    .load_val  ('0),
    .hist      (ghr_exec),
    .hist_next (ghr_exec_next)
  );

  ghr #(.WIDTH(GHR_W)) u_ghr_fetch (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (f_valid && f_is_branch),
    .shift_bit (f_pred_taken),
    .load_en   (ex_mispredict),
    .load_val  (ghr_exec_next),
    .hist      (ghr_fetch),
    .hist_next ()
  );

endmodule
