// rev_shift_reg: WIDTH-bit reversible parallel-in parallel-out left-shift
// register, a row of rev_shift_cell cells sharing CLK, HOLD and E.
// On each rising clock edge:
//   hold = 1          the register keeps its value;
//   hold = 0, e = 1   it loads d in parallel;
//   hold = 0, e = 0   it shifts left: q <= {q[WIDTH-2:0], si}.
// so is the most significant bit (the serial output of the last cell).
// Output q is the stored value, available right after the edge.
module rev_shift_reg #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hold,
  input  logic             e,
  input  logic             si,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             so
);
  logic [WIDTH:0] chain;  // chain[i] feeds cell i; chain[i+1] is its bit
  assign chain[0] = si;
  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rev_shift_cell u_cell (
      .clk(clk), .rst_n(rst_n), .hold(hold), .e(e),
      .q_prev(chain[i]), .i_in(d[i]), .q(chain[i+1]), .o(q[i])
    );
  end
  assign so = chain[WIDTH];
endmodule
