// rev_divider: sequential restoring divider for unsigned integers, built
// from reversible-gate blocks.
//
// Datapath: register A (remainder) and register Q (quotient) are
// rev_shift_reg PIPO left-shift registers. A is fed by a 3-input MUX
// (rev_mux3: 0, subtractor output P, or A itself) and Q by a 2-input MUX
// (rev_mux2: dividend, or Q with bit 0 replaced by the new quotient bit).
// rev_subtractor forms P = A - divisor; its MSB P[WIDTH-1] is the sign.
// Feynman gates copy the register outputs (fan-out) and turn the sign into
// N = not P[WIDTH-1]; a Fredkin gate forces N = 1 while M = 1.
//
// Operation, one step per clock (rev_div_control):
//   pulse 0           A <= 0, Q <= dividend
//   pulse 2i-1        {A,Q} shift left one place as one 2*WIDTH-bit register
//   pulse 2i          if A - divisor >= 0: A <= A - divisor, q0 <= 1
//                     else:                A unchanged (restored), q0 <= 0
// After 2*WIDTH+1 pulses done (K) rises and both registers hold: quotient
// and remainder stay on the outputs until start is pulsed or reset applied.
// A new division starts when reset is released or one cycle after a start
// pulse; dividend and divisor are sampled at pulse 0 (dividend) and read at
// every pulse 2i (divisor), so hold them steady during the division.
//
// Range: the sign test on a WIDTH-bit difference is exact for
// 1 <= divisor <= 2^(WIDTH-1), with any dividend. Division by zero is not
// detected. Gate outputs named g_* are the reversible gates' garbage
// outputs and are unused on purpose.
module rev_divider
  import rev_div_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             done
);
  logic   e, sel, m, k;
  phase_t phase;

  logic [WIDTH-1:0] a_q, q_q;          // register contents
  logic [WIDTH-1:0] a_to_sub, a_to_mux, a_out;
  logic [WIDTH-1:0] q_to_mux, q_out;
  logic [WIDTH-1:0] a_next, q_next, q_fb, diff;
  logic             a_so, q_so;
  logic             sign, sign_n, n_sel;
  logic             g_sign, g_m, g_n, g_sel;

  rev_div_control #(.WIDTH(WIDTH)) u_control (
    .clk(clk), .rst_n(rst_n), .start(start),
    .e(e), .sel(sel), .m(m), .k(k), .phase(phase)
  );

  // remainder register A: serial input is the quotient register's MSB
  rev_shift_reg #(.WIDTH(WIDTH)) u_reg_a (
    .clk(clk), .rst_n(rst_n), .hold(k), .e(e), .si(q_so),
    .d(a_next), .q(a_q), .so(a_so)
  );

  // quotient register Q: zero shifted in, bit 0 filled on the next pulse
  rev_shift_reg #(.WIDTH(WIDTH)) u_reg_q (
    .clk(clk), .rst_n(rst_n), .hold(k), .e(e), .si(1'b0),
    .d(q_next), .q(q_q), .so(q_so)
  );

  // fan-out of the register outputs
  for (genvar i = 0; i < WIDTH; i++) begin : g_fan
    rev_f2g     u_f2g_a (.a(a_q[i]), .b(1'b0), .c(1'b0),
                         .p(a_out[i]), .q(a_to_sub[i]), .r(a_to_mux[i]));
    rev_feynman u_fg_q  (.a(q_q[i]), .b(1'b0), .p(q_out[i]), .q(q_to_mux[i]));
  end

  rev_subtractor #(.WIDTH(WIDTH)) u_sub (
    .a(a_to_sub), .b(divisor), .p(diff)
  );

  // N = not sign, forced to 1 during the initial load (M = 1)
  assign sign = diff[WIDTH-1];
  rev_feynman u_fg_n  (.a(sign), .b(1'b1), .p(g_sign), .q(sign_n));
  rev_fredkin u_frg_n (.a(m), .b(1'b1), .c(sign_n), .p(g_m), .q(g_n), .r(n_sel));

  // A <= M ? 0 : (N ? P : A)
  rev_mux3 #(.WIDTH(WIDTH)) u_mux3 (
    .sel1(m), .sel2(n_sel), .a('0), .b(diff), .c(a_to_mux), .z(a_next)
  );

  // Q <= SELECT ? dividend : {Q[WIDTH-1:1], not sign}
  assign q_fb = {q_to_mux[WIDTH-1:1], sign_n};
  rev_mux2 #(.WIDTH(WIDTH)) u_mux2 (
    .sel(sel), .a(dividend), .b(q_fb), .z(q_next), .sel_o(g_sel)
  );

  assign quotient  = q_out;
  assign remainder = a_out;
  assign done      = k;

  // once done, the registers keep their values until a new division starts
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (k && !start) |=> ($stable(a_q) && $stable(q_q)));
endmodule
