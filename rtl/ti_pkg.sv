// ti_pkg: constants and share-vector types shared by the threshold
// implementation (TI) blocks.
//
// Every sensitive value is split into NUM_SHARES Boolean shares whose XOR is
// the value. A shared word is stored as a packed array [share][bit], share 0
// being the first share. The widths are those of the two S-boxes studied:
// the 4-bit PRESENT S-box and the 5-bit KECCAK chi row, whose shared
// implementation takes 4 extra random bits. The helper next_share() gives the
// cyclic neighbour used by the non-complete component functions: output
// share j is computed from input shares j and next_share(j) only.
package ti_pkg;

  localparam int unsigned NUM_SHARES   = 3;
  localparam int unsigned PRESENT_W    = 4;
  localparam int unsigned KECCAK_W     = 5;
  localparam int unsigned KECCAK_RND_W = 4;

  typedef logic [NUM_SHARES-1:0][PRESENT_W-1:0] present_sh_t;
  typedef logic [NUM_SHARES-1:0][KECCAK_W-1:0]  keccak_sh_t;

  function automatic int unsigned next_share(input int unsigned j);
    return (j + 1) % NUM_SHARES;
  endfunction

  // Share of the product u*v computed from shares a and b of each factor:
  // u_a v_a + u_a v_b + u_b v_a. Summed over the cyclic pairs (0,1), (1,2),
  // (2,0) this covers all nine cross products, so the XOR of the three
  // results is u*v.
  function automatic logic mul_share(input logic ua, input logic ub,
                                     input logic va, input logic vb);
    return (ua & va) ^ (ua & vb) ^ (ub & va);
  endfunction

endpackage
