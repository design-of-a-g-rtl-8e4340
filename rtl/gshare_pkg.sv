// gshare_pkg: shared constants, types and helper functions of the EISC
// G-share branch predictor.
//
// The sizes follow the predictor's main configuration: a 64-entry pattern
// history table of 2-bit saturating counters, 6-bit global history registers
// (history length = log2 of the PHT size), a 4-way, 64-set BTB whose set index
// is PC[7:2] and whose tag is PC[31:8], and 32-bit addresses. EISC
// instructions are 16 bits wide, so consecutive instructions are 2 bytes apart.
//
// Instruction encodings are this design's own assumption, kept here so that
// they can be changed in one place: a LERI prefix is any halfword whose top two
// bits are 2'b01 and it carries a 14-bit immediate in its low bits; a
// conditional branch (jcc) has 4'hD in its top nibble and an 8-bit halfword
// displacement in its low byte.
package gshare_pkg;

  localparam int unsigned ADDR_W      = 32;  // PC width
  localparam int unsigned INSTR_W     = 16;  // EISC instruction width
  localparam int unsigned INSTR_BYTES = 2;   // bytes per instruction
  localparam int unsigned LERI_IMM_W  = 14;  // immediate bits per LERI
  localparam int unsigned MAX_LERI    = 3;   // LERIs that may prefix one instruction
  localparam int unsigned LERI_CNT_W  = 2;   // width of the LERI counter

  // 2-bit saturating counter states (Fig. 5 of the predictor description).
  typedef enum logic [1:0] {
    CNT_STRONG_NT = 2'b00,
    CNT_WEAK_NT   = 2'b01,
    CNT_WEAK_T    = 2'b10,
    CNT_STRONG_T  = 2'b11
  } cnt_t;

  // Counter value given to every PHT entry at reset.
  localparam cnt_t CNT_RESET = CNT_WEAK_NT;

  // Next state of a saturating counter: up on taken, down on not taken.
  function automatic cnt_t cnt_next(cnt_t c, logic taken);
    cnt_t n;
    n = c;
    if (taken && c != CNT_STRONG_T)
      n = cnt_t'(c + 2'd1);
    else if (!taken && c != CNT_STRONG_NT)
      n = cnt_t'(c - 2'd1);
    return n;
  endfunction

  // Taken for 10 and 11, not taken for 00 and 01.
  function automatic logic cnt_taken(cnt_t c);
    return c[1];
  endfunction

  function automatic logic is_leri(logic [INSTR_W-1:0] instr);
    return instr[15:14] == 2'b01;
  endfunction

  function automatic logic is_cond_branch(logic [INSTR_W-1:0] instr);
    return instr[15:12] == 4'hD;
  endfunction

  // Folded instruction handed from fetch to decode.
  typedef struct packed {
    logic [INSTR_W-1:0]    instr;      // the non-LERI instruction
    logic [ADDR_W-1:0]     folded_pc;  // PC of the first LERI, or own PC if none
    logic [LERI_CNT_W-1:0] leri_cnt;   // number of LERIs folded into it
    logic [ADDR_W-1:0]     leri_imm;   // LERI immediates, first LERI most significant
  } fold_t;

endpackage
