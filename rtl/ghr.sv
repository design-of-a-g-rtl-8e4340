// ghr: global history register.
//
// A WIDTH-bit shift register of branch directions (1 = taken). On shift_en the
// register moves one place towards the MSB and shift_bit enters at the LSB, so
// the LSB always holds the most recent branch. On load_en the whole register is
// overwritten with load_val; a load wins over a shift in the same cycle. The
// new value appears on hist one cycle after the enable. hist_next shows the
// value the register takes at the next clock edge, so that another register can
// copy the history including the branch being recorded now.
//
// LSB insertion and WIDTH = log2(PHT entries) follow the predictor
// description; the same module serves as the resolved (execute-stage) GHR and
// as the speculative (fetch-stage) GHR, which uses the load port for recovery.
// Reset clears the history to all not-taken, a choice of this design.
module ghr #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             shift_bit,
  input  logic             load_en,
  input  logic [WIDTH-1:0] load_val,
  output logic [WIDTH-1:0] hist,
  output logic [WIDTH-1:0] hist_next
);

  logic [WIDTH-1:0] hist_q;

  always_comb begin
    hist_next = hist_q;
    if (load_en)
      hist_next = load_val;
    else if (shift_en)
      hist_next = {hist_q[WIDTH-2:0], shift_bit};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hist_q <= '0;
    else        hist_q <= hist_next;
  end

  assign hist = hist_q;

endmodule
