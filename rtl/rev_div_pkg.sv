// rev_div_pkg: types shared by the divider's control unit and top level.
// phase_t names what the registers do on the coming clock edge:
//   PH_LOAD  first pulse: A <= 0, Q <= dividend          (E=1, SELECT=1, M=1)
//   PH_SHIFT A and Q shift left together, q_(n-1) -> a_0  (E=0)
//   PH_STEP  A <= difference or old A, q_0 <= not sign   (E=1, SELECT=0, M=0)
//   PH_DONE  K = 1, both registers hold
package rev_div_pkg;
  typedef enum logic [1:0] {
    PH_LOAD  = 2'd0,
    PH_SHIFT = 2'd1,
    PH_STEP  = 2'd2,
    PH_DONE  = 2'd3
  } phase_t;
endpackage
