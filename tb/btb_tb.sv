// btb_tb: self-checking test of the 4-way, 64-set branch target buffer.
// A reference model keeps, per set, a list of (tag, target) entries and the
// replacement rule (fill empty ways first, then evict round-robin) and
// predicts hit and target for every lookup. A directed part fills one set
// with five branches that share PC[7:2] and checks that the first one is
// evicted; a random part mixes updates and lookups over a small address pool
// so that sets overflow often.
module btb_tb;
  import gshare_pkg::*;

  localparam int WAYS = 4, SETS = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0] lk_pc, lk_target, upd_pc, upd_target;
  logic lk_hit, upd_en;
  int checks = 0, failures = 0;

  // reference model
  bit          m_valid [SETS][WAYS];
  logic [23:0] m_tag   [SETS][WAYS];
  logic [31:0] m_tgt   [SETS][WAYS];
  int          m_rr    [SETS];

  btb #(.WAYS(WAYS), .SETS(SETS), .IDX_LSB(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int set_of(logic [31:0] pc);
    return int'(pc[7:2]);
  endfunction

  task automatic model_update(logic [31:0] pc, logic [31:0] tgt);
    int s, w;
    s = set_of(pc);
    w = -1;
    for (int i = 0; i < WAYS; i++) if (m_valid[s][i] && m_tag[s][i] == pc[31:8]) w = i;
    if (w < 0) for (int i = WAYS - 1; i >= 0; i--) if (!m_valid[s][i]) w = i;
    if (w < 0) begin
      w = m_rr[s];
      m_rr[s] = (m_rr[s] + 1) % WAYS;
    end
    m_valid[s][w] = 1;
    m_tag[s][w]   = pc[31:8];
    m_tgt[s][w]   = tgt;
  endtask

  task automatic do_update(logic [31:0] pc, logic [31:0] tgt);
    upd_en = 1'b1; upd_pc = pc; upd_target = tgt;
    @(posedge clk); #1;
    upd_en = 1'b0;
    model_update(pc, tgt);
  endtask

  task automatic do_lookup(logic [31:0] pc);
    int s;
    bit hit;
    logic [31:0] tgt;
    s = set_of(pc);
    hit = 0; tgt = '0;
    for (int i = 0; i < WAYS; i++)
      if (m_valid[s][i] && m_tag[s][i] == pc[31:8]) begin hit = 1; tgt = m_tgt[s][i]; end
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit != hit || (hit && lk_target != tgt)) begin
      failures++;
      $display("lookup %h: got %b/%h want %b/%h", pc, lk_hit, lk_target, hit, tgt);
    end
  endtask

  logic [31:0] pool [48];

  initial begin
    upd_en = 0; upd_pc = 0; upd_target = 0; lk_pc = 0;
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) m_valid[s][w] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // empty after reset
    for (int s = 0; s < SETS; s++) do_lookup(32'h1000 + 32'(s * 4));
    // directed: five branches in set 0x2d (PC[7:2]), different tags
    for (int k = 0; k < 5; k++) do_update(32'h0000_76b4 + 32'(k << 8), 32'h0000_9000 + 32'(k * 16));
    for (int k = 0; k < 5; k++) do_lookup(32'h0000_76b4 + 32'(k << 8));
    checks++;
    lk_pc = 32'h0000_76b4; #1;
    if (lk_hit) begin failures++; $display("oldest entry not evicted"); end
    // target rewrite of an existing entry
    do_update(32'h0000_77b4, 32'h0000_1234);
    do_lookup(32'h0000_77b4);
    // random traffic over a pool: 12 sets x 4 tags
    for (int i = 0; i < 48; i++) pool[i] = {16'($urandom_range(7)), 8'h0, 6'($urandom_range(11)) , 2'b00} | 32'(i % 4) << 16;
    for (int k = 0; k < 4000; k++) begin
      if ($urandom_range(2) == 0) do_update(pool[$urandom_range(47)], {$urandom} & ~32'h1);
      do_lookup(pool[$urandom_range(47)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
