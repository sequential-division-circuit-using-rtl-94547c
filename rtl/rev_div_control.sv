// rev_div_control: control unit of the sequential reversible divider.
// A counter counts clock pulses from 0 and a comparator raises K once
// 2*WIDTH+1 pulses have been given; K then stops the counter and, wired to
// HOLD of both registers, freezes quotient and remainder.
// The count also sequences the datapath (this decoding is this design's own;
// the counter/comparator structure and the 2n+1 pulse count follow the
// division algorithm):
//   count 0            PH_LOAD   e=1 sel=1 m=1
//   count odd          PH_SHIFT  e=0 sel=0 m=0
//   count even, >= 2   PH_STEP   e=1 sel=0 m=0
//   count = 2*WIDTH+1  PH_DONE   k=1
// Reset (active low, asynchronous) clears the count, so a division starts as
// soon as reset is released; a one-cycle start pulse clears it again and
// begins a new division on the next edge. All outputs decode the registered
// count and are valid for the whole cycle.
module rev_div_control
  import rev_div_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   e,
  output logic   sel,
  output logic   m,
  output logic   k,
  output phase_t phase
);
  localparam int unsigned LAST = 2 * WIDTH + 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (start) count <= '0;
    else if (!k)    count <= count + 1'b1;
  end

  // comparator
  assign k = (count == CW'(LAST));

  always_comb begin
    if (k)                  phase = PH_DONE;
    else if (count == '0)   phase = PH_LOAD;
    else if (count[0])      phase = PH_SHIFT;
    else                    phase = PH_STEP;
  end

  assign e   = (phase == PH_LOAD) || (phase == PH_STEP);
  assign sel = (phase == PH_LOAD);
  assign m   = (phase == PH_LOAD);

  // the counter never runs past the comparator value
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(LAST));
endmodule
