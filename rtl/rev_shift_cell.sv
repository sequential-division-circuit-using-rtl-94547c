// rev_shift_cell: one bit of the reversible PIPO left-shift register.
// A Fredkin gate controlled by E chooses the parallel input i_in (E = 1) or
// the previous cell's bit q_prev (E = 0, shift). A second Fredkin gate
// controlled by HOLD chooses between the stored bit (HOLD = 1) and that
// choice. The bit is stored on the rising edge of clk; an HNFG fed by a
// Feynman copy fans the stored bit out to the next cell (q) and to the
// parallel output (o).
// The cell drawing keeps the bit in a clock-gated Fredkin loop; here it is an
// edge-triggered flip-flop, so a row of cells moves exactly one place per
// clock. Reset (active low, asynchronous) clears the bit; this is this
// design's addition.
module rev_shift_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic e,
  input  logic q_prev,
  input  logic i_in,
  output logic q,
  output logic o
);
  logic state, d_sel, d_next;
  logic g_e, g_e2, g_h, g_h2, copy, g_fg, g_hn, g_hr;

  // E = 1: parallel input; E = 0: shift in from the previous cell
  rev_fredkin u_frg_e (.a(e),    .b(i_in),  .c(q_prev), .p(g_e), .q(g_e2), .r(d_sel));
  // HOLD = 1: keep the stored bit
  rev_fredkin u_frg_h (.a(hold), .b(state), .c(d_sel),  .p(g_h), .q(g_h2), .r(d_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= d_next;
  end

  // fan-out of the stored bit
  rev_feynman u_fg   (.a(state), .b(1'b0), .p(g_fg), .q(copy));
  rev_hnfg    u_hnfg (.a(state), .b(copy), .c(1'b0), .d(1'b0),
                      .p(g_hn), .q(q), .r(g_hr), .s(o));
endmodule
