// present_ti_f: first quadratic stage ("F") of the three-share PRESENT
// S-box.
//
// The PRESENT S-box (C56B90AD3EF84712) is cubic; a first-order threshold
// implementation splits it into two quadratic permutations applied one after
// the other, each of which can be shared non-completely with three shares.
// With the input nibble (x,y,z,w), x the most significant bit, this stage
// computes
//   F(x,y,z,w) = (y+z+w, 1+y+z, 1+x+z+yw+zw, 1+w+xy+xz+yz)
// and present_ti_g completes the S-box. Output share j is a function of
// input shares j and j+1 only: linear terms take share j, each product uv
// becomes u_j v_j + u_j v_(j+1) + u_(j+1) v_j, and the constant 1s are added
// to share 1 only. The XOR of the three output shares is F of the XOR of the
// input shares. The shared stage is a bijection on the 12 share bits, so a
// uniform input sharing gives a uniform output sharing. The two-stage split
// follows the protected design the paper attacks; its coordinate functions
// are not printed there, so the standard decomposition is used, and this
// particular direct sharing is this design's choice. Combinational.
module present_ti_f
  import ti_pkg::*;
(
  input  present_sh_t x_sh,
  output present_sh_t y_sh
);

  // One component function: shares a (= j) and b (= j+1), c1 = constant
  // enable (set for share 1 only).
  function automatic logic [3:0] comp(input logic [3:0] a, input logic [3:0] b,
                                      input logic c1);
    logic xa, ya, za, wa, xb, yb, zb, wb;
    logic [3:0] r;
    {xa, ya, za, wa} = a;
    {xb, yb, zb, wb} = b;
    r[3] = ya ^ za ^ wa;
    r[2] = c1 ^ ya ^ za;
    r[1] = c1 ^ xa ^ za ^ mul_share(ya, yb, wa, wb) ^ mul_share(za, zb, wa, wb);
    r[0] = c1 ^ wa ^ mul_share(xa, xb, ya, yb) ^ mul_share(xa, xb, za, zb)
              ^ mul_share(ya, yb, za, zb);
    return r;
  endfunction

  always_comb begin
    for (int unsigned j = 0; j < NUM_SHARES; j++) begin
      y_sh[j] = comp(x_sh[j], x_sh[next_share(j)], j == 0);
    end
  end

endmodule
