// eisc_bp_top_tb: end-to-end test of the branch-prediction front end at its
// default sizes (64-entry PHT, 6-bit GHRs, 4-way 64-set BTB).
//
// The testbench plays the processor. It fetches a dynamic instruction trace:
// 100 iterations of a nested loop (an inner back edge taken 3 times out of 4,
// and an outer back edge that sits behind two LERI prefixes), followed by 40
// executions of a branch behind three LERIs. Decoded instructions are sent to
// an execute stage EX_LAT cycles later, with the actual branch PC and the
// prediction the front end attached to them. On a misprediction the younger
// work is dropped and fetch restarts after the mispredicted branch. Random
// stall cycles hold the front end.
//
// Checks: every decoded instruction (instruction word, folded PC, LERI count,
// LERI immediate, actual PC, branch flag) against values computed from the
// trace; the misprediction flag against prediction and outcome; the
// nested-loop miss rate below 10% (a branch behind LERIs that could not be
// trained would alone cost 20%); and that every mechanism occurred: LERI
// folding, a taken prediction for a LERI-prefixed branch, speculative history
// with an older branch unresolved, history overwrite on misprediction, stall
// and flush.
module eisc_bp_top_tb;
  import gshare_pkg::*;

  localparam int EX_LAT = 2;

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
  logic [5:0] ghr_fetch, ghr_exec;
  int checks = 0, failures = 0;

  eisc_bp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [15:0] instr;
    logic [31:0] pc;
    bit          leri;
    bit          branch;
    bit          taken;
    logic [31:0] target;
    logic [31:0] fold_pc;   // expected folded PC (non-LERI only)
    int          cnt;
    logic [31:0] imm;
    bit          in_loop;
  } ins_t;

  typedef struct {
    int          idx;
    int          cyc;
    logic [31:0] pc;
    bit          pred;
    logic [31:0] ptgt;
  } exq_t;

  ins_t tr [$];
  int   dq [$];    // trace indices expected at decode, oldest first
  exq_t xq [$];    // branches waiting for execute

  function automatic logic [15:0] leri_word();
    return {2'b01, 14'($urandom)};
  endfunction

  function automatic logic [15:0] alu_word();
    return {4'hA, 12'($urandom)};
  endfunction

  task automatic emit(logic [15:0] instr, logic [31:0] pc, bit br, bit t,
                      logic [31:0] tgt, bit in_loop);
    ins_t x;
    int n;
    x = '{instr, pc, is_leri(instr), br, t, tgt, pc, 0, 32'h0, in_loop};
    if (!x.leri) begin
      // collect the LERIs directly before this instruction
      n = 0;
      while (n < tr.size() && tr[tr.size() - 1 - n].leri) n++;
      x.cnt = n;
      for (int k = n; k > 0; k--) begin
        x.imm = (x.imm << 14) | 32'(tr[tr.size() - k].instr[13:0]);
        if (k == n) x.fold_pc = tr[tr.size() - k].pc;
      end
    end
    tr.push_back(x);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    int cyc, next, loop_miss, loop_br, folds, leri_taken, spec, overwrites, stalls, flushes;
    bit mis, acc;
    exq_t e;

    // ---- build the dynamic trace ----
    for (int i = 0; i < 100; i++) begin
      emit(alu_word(), 32'h7600, 0, 0, 0, 1);
      for (int j = 0; j < 4; j++) begin
        emit(alu_word(), 32'h7602, 0, 0, 0, 1);
        emit(16'hD4FE, 32'h7604, 1, j < 3, 32'h7602, 1);
      end
      emit(leri_word(), 32'h7606, 0, 0, 0, 1);
      emit(leri_word(), 32'h7608, 0, 0, 0, 1);
      emit(16'hD4F8, 32'h760A, 1, i < 99, 32'h7600, 1);
    end
    emit(alu_word(), 32'h760C, 0, 0, 0, 0);
    for (int i = 0; i < 40; i++) begin
      emit(leri_word(), 32'h7700, 0, 0, 0, 0);
      emit(leri_word(), 32'h7702, 0, 0, 0, 0);
      emit(leri_word(), 32'h7704, 0, 0, 0, 0);
      emit(16'hD510, 32'h7706, 1, 1, 32'h0001_2000, 0);
      emit(alu_word(), 32'h0001_2000, 0, 0, 0, 0);
    end

    stall = 0; flush = 0; f_valid = 0; f_instr = 0; f_pc = 0;
    ex_valid = 0; ex_pc = 0; ex_taken = 0; ex_target = 0; ex_pred_taken = 0; ex_pred_target = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    cyc = 0; next = 0; loop_miss = 0; loop_br = 0; folds = 0; leri_taken = 0;
    spec = 0; overwrites = 0; stalls = 0; flushes = 0;
    while (next < tr.size() || dq.size() != 0 || xq.size() != 0) begin
      // execute
      ex_valid = xq.size() != 0 && xq[0].cyc + EX_LAT <= cyc;
      if (ex_valid) begin
        e = xq[0];
        ex_pc = e.pc; ex_taken = tr[e.idx].taken; ex_target = tr[e.idx].target;
        ex_pred_taken = e.pred; ex_pred_target = e.ptgt;
      end
      mis = ex_valid && ((e.pred != tr[e.idx].taken) ||
                         (tr[e.idx].taken && e.ptgt != tr[e.idx].target));
      // one external flush, late in the run, between loop and call phase
      flush = (cyc == 200);
      // fetch
      stall   = 1'($urandom_range(7) == 0);
      f_valid = next < tr.size() && $urandom_range(4) != 0;
      if (f_valid) begin f_instr = tr[next].instr; f_pc = tr[next].pc; end
      #1;
      if (stall) stalls++;
      check(f_ready == !stall, "f_ready");
      if (ex_valid) check(ex_mispredict == mis, "misprediction flag");
      // decode stage consumes its register
      if (d_valid && !stall && !mis && !flush) begin
        int k;
        k = dq.pop_front();
        check(d_instr == tr[k].instr && d_folded_pc == tr[k].fold_pc &&
              int'(d_leri_cnt) == tr[k].cnt && d_leri_imm == tr[k].imm &&
              d_branch_pc == tr[k].pc && d_is_branch == tr[k].branch,
              $sformatf("decode of %h", tr[k].pc));
        if (tr[k].cnt > 0) folds++;
        if (tr[k].branch) begin
          if (tr[k].cnt > 0 && d_pred_taken) leri_taken++;
          if (xq.size() != 0) spec++;
          xq.push_back('{k, cyc, d_branch_pc, d_pred_taken, d_pred_target});
        end
      end
      if (ex_valid) begin
        if (tr[e.idx].in_loop) begin loop_br++; if (mis) loop_miss++; end
        void'(xq.pop_front());
      end
      // fetch acceptance
      acc = f_valid && !stall && !mis && !flush;
      if (acc) begin
        if (!tr[next].leri) dq.push_back(next);
        next++;
      end
      if (flush) begin
        // restart at the oldest instruction not yet executed, at the start
        // of its LERI group
        flushes++;
        if (xq.size() != 0) next = xq[0].idx;
        else if (dq.size() != 0) next = dq[0];
        while (next > 0 && tr[next - 1].leri) next--;
        dq.delete();
        xq.delete();
      end
      if (mis) begin
        overwrites++;
        dq.delete();
        xq.delete();
        next = e.idx + 1;
      end
      @(posedge clk); #1;
      cyc++;
      if (mis) check(ghr_fetch == ghr_exec, "fetch GHR restored from execute GHR");
    end
    f_valid = 0; ex_valid = 0; stall = 0; flush = 0;
    $display("loop branches %0d mispredicted %0d; folded %0d; LERI branches predicted taken %0d",
             loop_br, loop_miss, folds, leri_taken);
    $display("speculative-history fetches %0d; overwrites %0d; stall cycles %0d; flushes %0d",
             spec, overwrites, stalls, flushes);
    check(loop_br == 500, "all 500 loop branches executed");
    check(loop_miss * 10 < loop_br, "nested-loop miss rate below 10%");
    check(folds > 0, "LERI folding happened");
    check(leri_taken > 0, "LERI-prefixed branch predicted taken");
    check(spec > 0, "branch fetched with an older branch unresolved");
    check(overwrites > 0, "fetch GHR overwritten on misprediction");
    check(stalls > 0, "stall happened");
    check(flushes > 0, "external flush happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
