// loop_runner: testbench helper that runs one nested-loop branch workload
// through an eisc_bp_top front end (PHT size and history mode set by the
// parameters) and counts mispredictions.
//
// The program is "for (i = 0; i < OUTER; i++) { body; for (j = 0; j < INNER;
// j++) body; }" compiled with bottom-tested loops: one ALU instruction and a
// back edge per inner iteration, one ALU instruction and a back edge per outer
// iteration (optionally behind two LERI prefixes). The runner acts as the
// processor: it fetches one instruction per cycle, resolves each branch EX_LAT
// cycles after decode, and on a misprediction drops younger work and refetches
// after the branch. It checks every decoded actual PC and raises done with the
// branch and misprediction counts.
module loop_runner #(
  parameter int PHT_ENTRIES = 64,
  parameter bit SPEC_GHR   = 1'b1,
  parameter int INNER      = 4,
  parameter int OUTER      = 100,
  parameter bit LERI_OUTER = 1'b0,
  parameter int EX_LAT     = 2
) (
  output bit done,
  output int branches,
  output int misses,
  output int errors
);
  import gshare_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic stall, flush, f_valid, f_ready, f_pred_taken;
  logic [15:0] f_instr;
  logic [31:0] f_pc, f_pred_target;
  logic d_valid, d_is_branch, d_pred_taken;
  logic [15:0] d_instr;
  logic [31:0] d_folded_pc, d_leri_imm, d_branch_pc, d_pred_target;
  logic [1:0] d_leri_cnt;
  logic ex_valid, ex_taken, ex_pred_taken, ex_mispredict;
  logic [31:0] ex_pc, ex_target, ex_pred_target;
  logic [$clog2(PHT_ENTRIES)-1:0] ghr_fetch, ghr_exec;

  eisc_bp_top #(.PHT_ENTRIES(PHT_ENTRIES), .SPEC_GHR(SPEC_GHR)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [15:0] instr;
    logic [31:0] pc;
    bit          taken;
    logic [31:0] target;
  } ins_t;

  typedef struct {
    int          idx;
    int          cyc;
    logic [31:0] pc;
    bit          pred;
    logic [31:0] ptgt;
  } exq_t;

  ins_t tr [$];
  int   dq [$];
  exq_t xq [$];

  initial begin
    int cyc, next;
    bit mis;
    exq_t e;
    done = 0; branches = 0; misses = 0; errors = 0;
    for (int i = 0; i < OUTER; i++) begin
      tr.push_back('{16'hA101, 32'h7600, 0, 0});
      for (int j = 0; j < INNER; j++) begin
        tr.push_back('{16'hA202, 32'h7604, 0, 0});
        tr.push_back('{16'hD4FE, 32'h7608, j < INNER - 1, 32'h7604});
      end
      if (LERI_OUTER) begin
        tr.push_back('{16'h4001, 32'h760C, 0, 0});
        tr.push_back('{16'h4002, 32'h760E, 0, 0});
      end
      tr.push_back('{16'hD4F8, 32'h7610, i < OUTER - 1, 32'h7600});
    end
    stall = 0; flush = 0; f_valid = 0; f_instr = 0; f_pc = 0;
    ex_valid = 0; ex_pc = 0; ex_taken = 0; ex_target = 0; ex_pred_taken = 0; ex_pred_target = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    cyc = 0; next = 0;
    while (next < tr.size() || dq.size() != 0 || xq.size() != 0) begin
      ex_valid = xq.size() != 0 && xq[0].cyc + EX_LAT <= cyc;
      if (ex_valid) begin
        e = xq[0];
        ex_pc = e.pc; ex_taken = tr[e.idx].taken; ex_target = tr[e.idx].target;
        ex_pred_taken = e.pred; ex_pred_target = e.ptgt;
      end
      f_valid = next < tr.size();
      if (f_valid) begin f_instr = tr[next].instr; f_pc = tr[next].pc; end
      #1;
      mis = ex_valid && ex_mispredict;
      if (d_valid && !mis) begin
        int k;
        k = dq.pop_front();
        if (d_branch_pc != tr[k].pc) errors++;
        if (d_is_branch) xq.push_back('{k, cyc, d_branch_pc, d_pred_taken, d_pred_target});
      end
      if (ex_valid) begin
        branches++;
        if (mis) misses++;
        void'(xq.pop_front());
      end
      if (f_valid && !mis) begin
        if (!is_leri(tr[next].instr)) dq.push_back(next);
        next++;
      end
      if (mis) begin
        dq.delete();
        xq.delete();
        next = e.idx + 1;
      end
      @(posedge clk); #1;
      cyc++;
    end
    f_valid = 0; ex_valid = 0;
    done = 1;
  end
endmodule
