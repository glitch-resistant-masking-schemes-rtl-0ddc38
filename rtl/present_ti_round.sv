// present_ti_round: the protected PRESENT target, a dummy cipher round of
// one shared S-box and a key addition.
//
//   s_in -> share_split -> share register -> present_sbox_ti (F | G)
//        -> key_add_combine (K1, K2, K3) -> ct = S(s_in) + K1 + K2 + K3
//
// Only s_in and ct are unshared. The share register holds the three input
// shares that drive the first S-box stage: its previous content is the
// starting point ("reset value") of each input transition. s_out_sh brings
// out the S-box output shares, the boundary at which a profiling attacker
// observes the shared circuit.
//
// Timing: s_in, rnd are taken with in_valid; ct is valid with out_valid
// three clock edges later (share register, stage F register, stage G
// register). One input per cycle. k_sh must be stable while results are
// read. The structure follows the paper's attacked circuit; the register
// placement and valid flags are this design's choice.
module present_ti_round
  import ti_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [PRESENT_W-1:0]   s_in,
  input  logic [2*PRESENT_W-1:0] rnd,      // fresh randomness for the sharing
  input  present_sh_t            k_sh,     // key shares K1..K3
  output logic                   out_valid,
  output logic [PRESENT_W-1:0]   ct,
  output present_sh_t            s_out_sh
);

  present_sh_t in_sh_d, in_sh_q;
  logic        in_v_q;

  share_split #(.W(PRESENT_W)) u_split (.z(s_in), .rnd(rnd), .sh(in_sh_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_v_q <= 1'b0;
    else        in_v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) in_sh_q <= in_sh_d;
  end

  present_sbox_ti u_sbox (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_v_q), .x_sh(in_sh_q),
    .out_valid(out_valid), .y_sh(s_out_sh)
  );

  key_add_combine #(.W(PRESENT_W)) u_key (.s_sh(s_out_sh), .k_sh(k_sh), .ct(ct));

endmodule
