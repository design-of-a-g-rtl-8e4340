// gshare_predictor_tb: self-checking test of the G-share predictor with its
// speculative fetch GHR.
//
// A small pipeline model fetches branches from a trace (the nested loop
// "for i<100 { for j<4 }" followed by random branches at 12 addresses), one
// per cycle with random gaps, and resolves each one EX_LAT cycles after it was
// fetched. On a misprediction the younger in-flight branches are discarded and
// fetch restarts at the branch after the mispredicted one, as a processor
// would. An independent reference model of the PHT, BTB and both histories
// predicts every output: the prediction, BTB hit and counter direction at
// fetch, the misprediction flag at execute, and both GHRs after every cycle.
// The test also requires that consecutive in-flight branches, recovery
// overwrites and BTB hits all occur, and that the nested loop ends with a
// miss rate below 10%.
module gshare_predictor_tb;
  import gshare_pkg::*;

  localparam int EX_LAT = 3;
  localparam int NLOOP  = 500;
  localparam int NRAND  = 800;
  localparam int NTR    = NLOOP + NRAND;

  logic clk = 1'b0, rst_n = 1'b0;
  logic f_valid, f_is_branch, f_pred_taken, f_btb_hit, f_pht_taken;
  logic [31:0] f_pc, f_pred_target;
  logic ex_valid, ex_taken, ex_pred_taken, ex_mispredict;
  logic [31:0] ex_pc, ex_target, ex_pred_target;
  logic [5:0] ghr_fetch, ghr_exec;
  int checks = 0, failures = 0;

  gshare_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [31:0] pc;
    bit          taken;
    logic [31:0] target;
  } br_t;

  typedef struct {
    int          idx;
    int          cyc;
    bit          pred;
    logic [31:0] ptgt;
  } inflight_t;

  br_t trace [NTR];
  inflight_t pipe [$];

  // reference model
  int m_pht [64];
  int m_gf, m_ge;
  logic [31:0] m_btb [logic [31:0]];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("cycle mismatch: %s", what); end
  endtask

  initial begin
    int cyc, next, loop_miss, back_to_back, overwrites, btb_hits;
    bit m_pred, m_hit, m_cnt_t, fetch_now, do_ex, m_mis;
    int idx;
    logic [31:0] m_tgt;
    logic [31:0] rpc [12];
    inflight_t e;

    // nested loop of Fig. 10 style: inner back edge at 0x7610, outer at 0x7618
    idx = 0;
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 4; j++) trace[idx++] = '{32'h7610, j < 3, 32'h7608};
      trace[idx++] = '{32'h7618, i < 99, 32'h7600};
    end
    for (int k = 0; k < 12; k++) rpc[k] = 32'h0001_0000 + 32'(k * 36);
    for (int k = 0; k < NRAND; k++) begin
      int r;
      r = $urandom_range(11);
      trace[idx++] = '{rpc[r], (r % 3 == 0) ? 1'b1 : 1'($urandom), rpc[r] + 32'h200};
    end

    foreach (m_pht[i]) m_pht[i] = 1;
    m_gf = 0; m_ge = 0;
    f_valid = 0; f_is_branch = 0; f_pc = 0;
    ex_valid = 0; ex_pc = 0; ex_taken = 0; ex_target = 0; ex_pred_taken = 0; ex_pred_target = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    cyc = 0; next = 0; loop_miss = 0; back_to_back = 0; overwrites = 0; btb_hits = 0;
    while (next < NTR || pipe.size() != 0) begin
      // execute stage
      do_ex = pipe.size() != 0 && pipe[0].cyc + EX_LAT == cyc;
      if (do_ex) begin
        e = pipe[0];
        ex_valid = 1; ex_pc = trace[e.idx].pc; ex_taken = trace[e.idx].taken;
        ex_target = trace[e.idx].target; ex_pred_taken = e.pred; ex_pred_target = e.ptgt;
      end else ex_valid = 0;
      // fetch stage
      fetch_now = next < NTR && $urandom_range(2) != 0;
      f_valid = fetch_now; f_is_branch = fetch_now;
      f_pc = fetch_now ? trace[next].pc : 32'h0;
      #1;
      // model: fetch prediction from the state before this edge
      if (fetch_now) begin
        int ri;
        ri = int'(f_pc[7:2]) ^ m_gf;
        m_hit   = m_btb.exists(f_pc);
        m_tgt   = m_hit ? m_btb[f_pc] : 32'h0;
        m_cnt_t = m_pht[ri] >= 2;
        m_pred  = m_hit && m_cnt_t;
        check(f_btb_hit == m_hit, "btb hit");
        check(f_pht_taken == m_cnt_t, "pht direction");
        check(f_pred_taken == m_pred, "prediction");
        if (m_pred) check(f_pred_target == m_tgt, "predicted target");
        if (m_hit) btb_hits++;
      end
      // model: execute
      m_mis = 0;
      if (do_ex) begin
        int wi;
        bit t;
        t = trace[e.idx].taken;
        m_mis = (e.pred != t) || (t && e.ptgt != trace[e.idx].target);
        check(ex_mispredict == m_mis, "mispredict flag");
        wi = int'(ex_pc[7:2]) ^ m_ge;
        if (t) m_pht[wi] = (m_pht[wi] == 3) ? 3 : m_pht[wi] + 1;
        else   m_pht[wi] = (m_pht[wi] == 0) ? 0 : m_pht[wi] - 1;
        if (t) m_btb[ex_pc] = trace[e.idx].target;
        if (m_mis) m_gf = ((m_ge << 1) | int'(t)) & 63;
        m_ge = ((m_ge << 1) | int'(t)) & 63;
        if (m_mis && e.idx < NLOOP) loop_miss++;
        void'(pipe.pop_front());
      end
      if (fetch_now && !m_mis) begin
        m_gf = ((m_gf << 1) | int'(m_pred)) & 63;
        if (pipe.size() != 0) back_to_back++;
        pipe.push_back('{next, cyc, m_pred, m_pred ? m_tgt : 32'h0});
        next++;
      end
      if (m_mis) begin
        // discard younger branches and refetch after the mispredicted one
        overwrites++;
        pipe.delete();
        next = e.idx + 1;
      end
      @(posedge clk); #1;
      cyc++;
      check(int'(ghr_fetch) == m_gf, "fetch GHR");
      check(int'(ghr_exec) == m_ge, "execute GHR");
    end
    f_valid = 0; ex_valid = 0;
    $display("loop mispredictions %0d of %0d, in-flight fetches %0d, overwrites %0d, btb hits %0d",
             loop_miss, NLOOP, back_to_back, overwrites, btb_hits);
    check(loop_miss * 10 < NLOOP, "nested-loop miss rate below 10%");
    check(back_to_back > 0 && overwrites > 0 && btb_hits > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
