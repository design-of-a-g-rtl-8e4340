// branch_pc_calc_tb: self-checking test of the decode-stage actual PC
// calculation. For random folded PCs and every LERI count 0..3 the result must
// be the PC of the instruction that follows the LERIs, i.e. folded PC plus two
// bytes per LERI, including wrap-around at the top of the address space.
module branch_pc_calc_tb;
  import gshare_pkg::*;
  logic [ADDR_W-1:0] folded_pc, actual_pc;
  logic [LERI_CNT_W-1:0] leri_cnt;
  int checks = 0, failures = 0;

  branch_pc_calc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_W-1:0] expect_pc;
    for (int k = 0; k < 400; k++) begin
      folded_pc = (k == 0) ? 32'hFFFF_FFFC : {$urandom} & ~32'h1;
      for (int c = 0; c < 4; c++) begin
        leri_cnt = LERI_CNT_W'(c);
        expect_pc = folded_pc;
        for (int i = 0; i < c; i++) expect_pc = expect_pc + 32'd2;
        #1;
        checks++;
        if (actual_pc !== expect_pc) begin
          failures++;
          $display("pc %h cnt %0d: got %h want %h", folded_pc, c, actual_pc, expect_pc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
