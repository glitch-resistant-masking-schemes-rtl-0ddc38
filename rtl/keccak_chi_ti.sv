// keccak_chi_ti: three-share threshold implementation of one 5-bit KECCAK
// chi row, out_i = a_i + (NOT a_(i+1)) a_(i+2), indices mod 5.
//
// Output share j, bit i, is computed from input shares j and j+1 only:
//   y_j,i = x_j,i + (NOT x_j,(i+1)) x_j,(i+2)
//           + x_j,(i+1) x_(j+1),(i+2) + x_(j+1),(i+1) x_j,(i+2)
// Summed over the three shares the linear terms give a_i + a_(i+2) and the
// products give all nine cross terms of a_(i+1) a_(i+2), which is chi.
// This sharing alone is correct and non-complete but not uniform. The 4-bit
// input rnd re-masks the result, each random bit going into one bit
// position of two shares so that the unshared value is unchanged:
//   r0 -> bit 0 of shares 1 and 2     r1 -> bit 0 of shares 2 and 3
//   r2 -> bit 1 of shares 1 and 2     r3 -> bit 1 of shares 2 and 3
// i.e. share 1 gets {r2,r0}, share 2 gets {r2^r3,r0^r1}, share 3 gets
// {r3,r1} on bits 1..0. With uniform input sharings and uniform rnd, every
// output sharing of chi(a) is equally likely (checked exhaustively for all
// 32 rows); with rnd = 0 the block is the plain, non-uniform sharing. The
// count of 4 random bits follows the paper; where they are added is
// this design's choice.
//
// Timing: x_sh and rnd are taken with in_valid, y_sh is valid with
// out_valid one clock edge later; one row per cycle.
module keccak_chi_ti
  import ti_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  keccak_sh_t              x_sh,
  input  logic [KECCAK_RND_W-1:0] rnd,
  output logic                    out_valid,
  output keccak_sh_t              y_sh
);

  keccak_sh_t chi_d;

  function automatic logic [KECCAK_W-1:0] comp(input logic [KECCAK_W-1:0] a,
                                               input logic [KECCAK_W-1:0] b);
    logic [KECCAK_W-1:0] r;
    for (int unsigned i = 0; i < KECCAK_W; i++) begin
      r[i] = a[i] ^ (~a[(i+1)%KECCAK_W] & a[(i+2)%KECCAK_W])
                  ^ (a[(i+1)%KECCAK_W] & b[(i+2)%KECCAK_W])
                  ^ (b[(i+1)%KECCAK_W] & a[(i+2)%KECCAK_W]);
    end
    return r;
  endfunction

  always_comb begin
    for (int unsigned j = 0; j < NUM_SHARES; j++) begin
      chi_d[j] = comp(x_sh[j], x_sh[next_share(j)]);
    end
    chi_d[0][1:0] = chi_d[0][1:0] ^ {rnd[2], rnd[0]};
    chi_d[1][1:0] = chi_d[1][1:0] ^ {rnd[2] ^ rnd[3], rnd[0] ^ rnd[1]};
    chi_d[2][1:0] = chi_d[2][1:0] ^ {rnd[3], rnd[1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) y_sh <= chi_d;
  end

endmodule
