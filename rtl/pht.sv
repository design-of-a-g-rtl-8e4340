// pht: pattern history table of 2-bit saturating counters.
//
// ENTRIES counters, read combinationally at the fetch stage through rd_idx and
// updated at the execute stage through wr_idx: on wr_en the addressed counter
// moves one step towards 11 when wr_taken is set and towards 00 when it is
// clear, saturating at both ends. The read/modify/write of the update happens
// inside the table, so the execute stage needs only the index and the outcome.
// A read of the entry being updated in the same cycle returns the old value.
// Counters with 10 or 11 predict taken.
//
// The counter behaviour and the 64-entry size follow the predictor
// description; the combinational read and the reset value (01, weakly not
// taken) are this design's choices.
module pht
  import gshare_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // read port (fetch)
  input  logic [IDX_W-1:0] rd_idx,
  output cnt_t             rd_cnt,
  output logic             rd_taken,
  // update port (execute)
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_taken
);

  cnt_t table_q [ENTRIES];

  assign rd_cnt   = table_q[rd_idx];
  assign rd_taken = cnt_taken(rd_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= CNT_RESET;
    end else if (wr_en) begin
      table_q[wr_idx] <= cnt_next(table_q[wr_idx], wr_taken);
    end
  end

endmodule
