// share_split: Boolean masking of a W-bit value into three shares.
//
// The first two shares are fresh uniform random words taken from rnd, the
// third is z XOR share1 XOR share2, so the three shares XOR to z and any two
// of them are independent of z. The randomness must be fresh for every
// value; where it comes from is left to the user. Combinational.
//
// rnd[W-1:0] becomes share 1, rnd[2W-1:W] share 2; sh[0] is share 1.
module share_split
  import ti_pkg::*;
#(
  parameter int unsigned W = PRESENT_W
) (
  input  logic [W-1:0]                 z,
  input  logic [2*W-1:0]               rnd,
  output logic [NUM_SHARES-1:0][W-1:0] sh
);

  always_comb begin
    sh[0] = rnd[W-1:0];
    sh[1] = rnd[2*W-1:W];
    sh[2] = z ^ rnd[W-1:0] ^ rnd[2*W-1:W];
  end

endmodule
