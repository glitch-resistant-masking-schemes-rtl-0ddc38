// keccak_ti_round: the protected KECCAK target, a dummy cipher round of one
// shared 5-bit chi row and a key addition.
//
//   s_in -> share_split -> share register -> keccak_chi_ti (rnd_chi)
//        -> key_add_combine (K1, K2, K3) -> ct = chi(s_in) + K1 + K2 + K3
//
// rnd_share masks the input; rnd_chi re-masks the chi output (all zero
// turns the re-masking off and leaves a non-uniform output sharing).
// s_out_sh brings out the chi output shares.
//
// Timing: s_in and rnd_share are taken with in_valid; rnd_chi is used one
// cycle later, when the shares leave the share register; ct is valid with
// out_valid two clock edges after in_valid. One row per cycle. The register
// placement and valid flags are this design's choice.
module keccak_ti_round
  import ti_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [KECCAK_W-1:0]     s_in,
  input  logic [2*KECCAK_W-1:0]   rnd_share,
  input  logic [KECCAK_RND_W-1:0] rnd_chi,
  input  keccak_sh_t              k_sh,
  output logic                    out_valid,
  output logic [KECCAK_W-1:0]     ct,
  output keccak_sh_t              s_out_sh
);

  keccak_sh_t in_sh_d, in_sh_q;
  logic       in_v_q;

  share_split #(.W(KECCAK_W)) u_split (.z(s_in), .rnd(rnd_share), .sh(in_sh_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_v_q <= 1'b0;
    else        in_v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) in_sh_q <= in_sh_d;
  end

  keccak_chi_ti u_chi (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_v_q), .x_sh(in_sh_q), .rnd(rnd_chi),
    .out_valid(out_valid), .y_sh(s_out_sh)
  );

  key_add_combine #(.W(KECCAK_W)) u_key (.s_sh(s_out_sh), .k_sh(k_sh), .ct(ct));

endmodule
