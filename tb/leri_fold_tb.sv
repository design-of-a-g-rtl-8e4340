// leri_fold_tb: self-checking test of the fetch-stage LERI folding unit.
// The testbench generates groups of 0..3 LERI prefixes followed by one
// non-LERI instruction at consecutive 2-byte addresses, with random stall and
// idle cycles, and occasionally a flush in the middle of a group. For every
// non-LERI instruction it checks that exactly one folded instruction appears,
// with the instruction itself, the PC of the first LERI, the LERI count and
// the concatenated immediates; LERIs must never appear at the output.
module leri_fold_tb;
  import gshare_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic flush, stall, in_valid, in_is_leri, out_valid, leri_pending;
  logic [INSTR_W-1:0] in_instr;
  logic [ADDR_W-1:0] in_pc;
  fold_t out;
  int checks = 0, failures = 0, folded_groups = 0, flushes = 0;

  leri_fold dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one instruction until it is accepted; check the output in the
  // accepting cycle. exp_* describe the expected folded output (non-LERI).
  task automatic send(logic [15:0] instr, logic [31:0] pc, bit expect_out,
                      logic [31:0] exp_pc, int exp_cnt, logic [31:0] exp_imm);
    while ($urandom_range(3) == 0) begin
      in_valid = 1'b0; stall = 1'b0; #1;
      checks++;
      if (out_valid) begin failures++; $display("output while idle"); end
      @(posedge clk); #1;
    end
    in_valid = 1'b1; in_instr = instr; in_pc = pc;
    forever begin
      stall = 1'($urandom_range(4) == 0);
      #1;
      checks++;
      if (stall) begin
        if (out_valid) begin failures++; $display("output while stalled"); end
      end else if (!expect_out) begin
        if (out_valid || !in_is_leri) begin failures++; $display("LERI %h leaked", instr); end
      end else begin
        if (!out_valid || out.instr != instr || out.folded_pc != exp_pc ||
            int'(out.leri_cnt) != exp_cnt || out.leri_imm != exp_imm) begin
          failures++;
          $display("fold @%h: got v%b %h pc %h cnt %0d imm %h; want %h pc %h cnt %0d imm %h",
                   pc, out_valid, out.instr, out.folded_pc, out.leri_cnt, out.leri_imm,
                   instr, exp_pc, exp_cnt, exp_imm);
        end
      end
      @(posedge clk); #1;
      if (!stall) break;
    end
    in_valid = 1'b0; stall = 1'b0;
  endtask

  initial begin
    logic [31:0] pc, first_pc, imm;
    logic [15:0] ins;
    int n;
    flush = 0; stall = 0; in_valid = 0; in_instr = 0; in_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    pc = 32'h0000_7600;
    for (int g = 0; g < 1500; g++) begin
      n = $urandom_range(3);
      first_pc = pc;
      imm = '0;
      for (int i = 0; i < n; i++) begin
        ins = {2'b01, 14'($urandom)};
        send(ins, pc, 0, '0, 0, '0);
        imm = (imm << 14) | 32'(ins[13:0]);
        pc += 2;
      end
      if (n > 0 && $urandom_range(9) == 0) begin
        // flush in the middle of the group: it must be forgotten
        flush = 1'b1; @(posedge clk); #1; flush = 1'b0;
        checks++;
        if (leri_pending) begin failures++; $display("group survived flush"); end
        flushes++;
        first_pc = pc; imm = '0; n = 0;
      end
      // a non-LERI instruction: top bits anything except 2'b01
      do ins = 16'($urandom); while (ins[15:14] == 2'b01);
      send(ins, pc, 1, first_pc, n, imm);
      if (n > 0) folded_groups++;
      pc += 2;
    end
    checks++;
    if (folded_groups == 0 || flushes == 0) begin failures++; $display("no folding or flush exercised"); end
    $display("folded groups %0d, flushes %0d", folded_groups, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
