// leri_fold: fetch-stage LERI folding with LERI counter.
//
// EISC extends the immediate of an instruction with up to three LERI prefix
// instructions placed before it. This unit takes the fetched instruction stream,
// one instruction per accepted cycle (in_valid && !stall), and removes the
// LERIs from it: each LERI appends its 14-bit immediate to an accumulator (the
// first LERI ends up most significant), remembers its PC if it is the first of
// a group, and increments the LERI counter. When the next non-LERI instruction
// arrives it is emitted, in the same cycle, as one folded instruction that
// carries
//   folded_pc - the PC of the first LERI of the group (or its own PC if none),
//   leri_cnt  - the number of LERIs folded into it,
//   leri_imm  - the accumulated LERI immediate,
// and the accumulator and counter are cleared. out_valid is combinational from
// the inputs and out.instr is the input instruction wired through; the
// fetch/decode pipeline register lives in the caller. flush
// (misprediction or other redirect) drops a partly collected group.
//
// Folding, the first-LERI PC and the LERI counter passed to decode follow the
// predictor description. The LERI encoding and immediate width come from
// gshare_pkg and are assumptions of this design; leri_pending tells the caller
// that a group is being collected.
module leri_fold
  import gshare_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               stall,
  input  logic               in_valid,
  input  logic [INSTR_W-1:0] in_instr,
  input  logic [ADDR_W-1:0]  in_pc,
  output logic               in_is_leri,
  output logic               out_valid,
  output fold_t              out,
  output logic               leri_pending
);

  logic [LERI_CNT_W-1:0] cnt_q;
  logic [ADDR_W-1:0]     first_pc_q;
  logic [ADDR_W-1:0]     acc_q;
  logic                  accept;

  assign in_is_leri   = is_leri(in_instr);
  assign accept       = in_valid && !stall && !flush;
  assign leri_pending = cnt_q != '0;

  assign out_valid     = accept && !in_is_leri;
  assign out.instr     = in_instr;
  assign out.folded_pc = (cnt_q != '0) ? first_pc_q : in_pc;
  assign out.leri_cnt  = cnt_q;
  assign out.leri_imm  = acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      first_pc_q <= '0;
      acc_q      <= '0;
    end else if (flush) begin
      cnt_q <= '0;
      acc_q <= '0;
    end else if (accept) begin
      if (in_is_leri) begin
        if (cnt_q == '0) first_pc_q <= in_pc;
        acc_q <= {acc_q[ADDR_W-LERI_IMM_W-1:0], in_instr[LERI_IMM_W-1:0]};
        cnt_q <= cnt_q + 1'b1;
      end else begin
        cnt_q <= '0;
        acc_q <= '0;
      end
    end
  end

  // A fourth LERI in a row is outside the instruction set.
  a_max_leri : assert property (@(posedge clk) disable iff (!rst_n)
    (accept && in_is_leri) |-> (cnt_q < LERI_CNT_W'(MAX_LERI)));

endmodule
