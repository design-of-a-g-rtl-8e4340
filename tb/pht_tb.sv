// pht_tb: self-checking test of the pattern history table.
// Random updates and reads at the default 64-entry size are compared with a
// reference array of integer counters clamped to 0..3; a directed sequence
// walks one entry through every state of Fig. 5's counter, including both
// saturation ends.
module pht_tb;
  import gshare_pkg::*;

  localparam int N = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] rd_idx, wr_idx;
  cnt_t rd_cnt;
  logic rd_taken, wr_en, wr_taken;
  int checks = 0, failures = 0;
  int model [N];

  pht #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(int idx);
    rd_idx = 6'(idx);
    #1;
    checks++;
    if (int'(rd_cnt) != model[idx] || rd_taken != (model[idx] >= 2)) begin
      failures++;
      $display("mismatch idx %0d: got %0d/%0b want %0d", idx, rd_cnt, rd_taken, model[idx]);
    end
  endtask

  task automatic update(int idx, bit t);
    wr_en = 1'b1; wr_idx = 6'(idx); wr_taken = t;
    @(posedge clk); #1;
    wr_en = 1'b0;
    if (t) model[idx] = (model[idx] == 3) ? 3 : model[idx] + 1;
    else   model[idx] = (model[idx] == 0) ? 0 : model[idx] - 1;
  endtask

  initial begin
    wr_en = 0; wr_idx = 0; wr_taken = 0; rd_idx = 0;
    foreach (model[i]) model[i] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) check_read(i);
    // directed walk of entry 2: up to saturation and back down
    for (int k = 0; k < 4; k++) begin update(2, 1); check_read(2); end
    for (int k = 0; k < 5; k++) begin update(2, 0); check_read(2); end
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      update($urandom_range(N - 1), 1'($urandom));
      check_read($urandom_range(N - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
