// ghr_tb: self-checking test of the global history register.
// Random shift and load commands are compared with a reference history that
// is rebuilt as (history * 2 + bit) mod 64; hist_next is checked before each
// edge and hist after it, and a load is checked to win over a shift.
module ghr_tb;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_en, shift_bit, load_en;
  logic [W-1:0] load_val, hist, hist_next;
  int checks = 0, failures = 0;
  int model;

  ghr #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nxt;
    shift_en = 0; shift_bit = 0; load_en = 0; load_val = 0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (hist != 0) begin failures++; $display("reset value %h", hist); end
    for (int k = 0; k < 3000; k++) begin
      shift_en  = 1'($urandom_range(3) != 0);
      shift_bit = 1'($urandom);
      load_en   = 1'($urandom_range(7) == 0);
      load_val  = W'($urandom);
      if (load_en)       nxt = int'(load_val);
      else if (shift_en) nxt = (model * 2 + int'(shift_bit)) % (1 << W);
      else               nxt = model;
      #1;
      checks++;
      if (int'(hist_next) != nxt) begin
        failures++;
        $display("hist_next %h want %h", hist_next, nxt);
      end
      @(posedge clk); #1;
      model = nxt;
      checks++;
      if (int'(hist) != model) begin
        failures++;
        $display("hist %h want %h", hist, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
