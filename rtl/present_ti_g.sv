// present_ti_g: second quadratic stage ("G") of the three-share PRESENT
// S-box.
//
// With the input nibble (x,y,z,w), x the most significant bit, it computes
//   G(x,y,z,w) = (y+z+w+xw, x+zw, y+z+xw, z+yw)
// so that G(F(v)) is the PRESENT S-box for all 16 values v (see
// present_ti_f). The sharing is the same direct, non-complete one: output
// share j uses input shares j and j+1 only, products uv become
// u_j v_j + u_j v_(j+1) + u_(j+1) v_j. G has no constant term. Like F, the
// shared stage is a bijection on the 12 share bits (uniform).
// Combinational.
module present_ti_g
  import ti_pkg::*;
(
  input  present_sh_t x_sh,
  output present_sh_t y_sh
);

  function automatic logic [3:0] comp(input logic [3:0] a, input logic [3:0] b);
    logic xa, ya, za, wa, xb, yb, zb, wb;
    logic [3:0] r;
    {xa, ya, za, wa} = a;
    {xb, yb, zb, wb} = b;
    r[3] = ya ^ za ^ wa ^ mul_share(xa, xb, wa, wb);
    r[2] = xa ^ mul_share(za, zb, wa, wb);
    r[1] = ya ^ za ^ mul_share(xa, xb, wa, wb);
    r[0] = za ^ mul_share(ya, yb, wa, wb);
    return r;
  endfunction

  always_comb begin
    for (int unsigned j = 0; j < NUM_SHARES; j++) begin
      y_sh[j] = comp(x_sh[j], x_sh[next_share(j)]);
    end
  end

endmodule
