// fsa_ti_top: the three threshold-implementation circuits side by side.
//
// They are independent examples of first-order, three-share, non-complete
// masking, each with its own ports (prefix and_, pr_, kc_); only clock and
// reset are shared:
//   - ti_and3:          shared AND gate, latency 2, z = x AND y
//   - present_ti_round: shared PRESENT S-box plus key, latency 3,
//                       ct = S(s_in) + K
//   - keccak_ti_round:  shared KECCAK chi row plus key, latency 2,
//                       ct = chi(s_in) + K
// All accept one input per cycle. Randomness and key shares are inputs.
module fsa_ti_top
  import ti_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // shared AND gate
  input  logic                    and_in_valid,
  input  logic [NUM_SHARES-1:0]   and_x_sh,
  input  logic [NUM_SHARES-1:0]   and_y_sh,
  output logic                    and_out_valid,
  output logic [NUM_SHARES-1:0]   and_z_sh,
  // PRESENT round
  input  logic                    pr_in_valid,
  input  logic [PRESENT_W-1:0]    pr_s_in,
  input  logic [2*PRESENT_W-1:0]  pr_rnd,
  input  present_sh_t             pr_k_sh,
  output logic                    pr_out_valid,
  output logic [PRESENT_W-1:0]    pr_ct,
  output present_sh_t             pr_s_out_sh,
  // KECCAK chi round
  input  logic                    kc_in_valid,
  input  logic [KECCAK_W-1:0]     kc_s_in,
  input  logic [2*KECCAK_W-1:0]   kc_rnd_share,
  input  logic [KECCAK_RND_W-1:0] kc_rnd_chi,
  input  keccak_sh_t              kc_k_sh,
  output logic                    kc_out_valid,
  output logic [KECCAK_W-1:0]     kc_ct,
  output keccak_sh_t              kc_s_out_sh
);

  ti_and3 u_and (
    .clk(clk), .rst_n(rst_n),
    .in_valid(and_in_valid), .x_sh(and_x_sh), .y_sh(and_y_sh),
    .out_valid(and_out_valid), .z_sh(and_z_sh)
  );

  present_ti_round u_present (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pr_in_valid), .s_in(pr_s_in), .rnd(pr_rnd), .k_sh(pr_k_sh),
    .out_valid(pr_out_valid), .ct(pr_ct), .s_out_sh(pr_s_out_sh)
  );

  keccak_ti_round u_keccak (
    .clk(clk), .rst_n(rst_n),
    .in_valid(kc_in_valid), .s_in(kc_s_in), .rnd_share(kc_rnd_share),
    .rnd_chi(kc_rnd_chi), .k_sh(kc_k_sh),
    .out_valid(kc_out_valid), .ct(kc_ct), .s_out_sh(kc_s_out_sh)
  );

endmodule
