// ti_and_component: one component function of the three-share threshold
// implementation of an AND gate.
//
// Given shares j and j+1 of the two inputs x and y it computes output share
//   z_j = x_j y_j + x_j y_(j+1) + x_(j+1) y_j
// with three 2-input AND gates (A = xa&ya, B = xa&yb, C = xb&ya) feeding one
// 3-input XOR, the gate structure of the first share of the shared AND. The
// third share of each input never reaches this circuit (non-completeness),
// so its timing and its glitches depend on two shares only. Purely
// combinational; the three instances of the shared AND wire shares (1,2),
// (2,3) and (3,1) to it.
module ti_and_component (
  input  logic xa,  // share j of x
  input  logic xb,  // share j+1 of x
  input  logic ya,  // share j of y
  input  logic yb,  // share j+1 of y
  output logic z    // share j of x AND y
);

  logic and_a, and_b, and_c;

  always_comb begin
    and_a = xa & ya;
    and_b = xa & yb;
    and_c = xb & ya;
    z     = and_a ^ and_b ^ and_c;
  end

endmodule
