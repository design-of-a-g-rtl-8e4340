// branch_pc_calc: decode-stage recovery of the actual PC of a folded
// instruction.
//
// A folded instruction travels down the pipeline with the PC of its first
// LERI prefix, which PC-relative addressing and exceptions need. To train the
// BTB and PHT with the PC at which the branch itself was fetched, the decode
// stage adds the LERI count scaled by the instruction size:
//   actual_pc = folded_pc + leri_cnt * INSTR_BYTES.
// Purely combinational.
//
// Adding the LERI counter to the folded PC follows the predictor description;
// the scaling by 2 bytes per instruction follows from EISC's 16-bit
// instructions (consecutive addresses in its listings differ by 2).
module branch_pc_calc
  import gshare_pkg::*;
#(
  parameter int unsigned BYTES_PER_INSTR = INSTR_BYTES
) (
  input  logic [ADDR_W-1:0]     folded_pc,
  input  logic [LERI_CNT_W-1:0] leri_cnt,
  output logic [ADDR_W-1:0]     actual_pc
);

  assign actual_pc = folded_pc + ADDR_W'(leri_cnt) * ADDR_W'(BYTES_PER_INSTR);

endmodule
