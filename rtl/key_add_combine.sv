// key_add_combine: key addition on the shares and recombination.
//
// Adds key share k_sh[i] to data share s_sh[i] (one XOR per share) and XORs
// the three keyed shares into the unshared result
//   ct = (s1 + K1) + (s2 + K2) + (s3 + K3),
// i.e. the S-box output plus the key K = K1 + K2 + K3. This is the last part
// of the dummy cipher round used as the target. Combinational.
module key_add_combine
  import ti_pkg::*;
#(
  parameter int unsigned W = PRESENT_W
) (
  input  logic [NUM_SHARES-1:0][W-1:0] s_sh,
  input  logic [NUM_SHARES-1:0][W-1:0] k_sh,
  output logic [W-1:0]                 ct
);

  logic [NUM_SHARES-1:0][W-1:0] keyed;

  always_comb begin
    ct = '0;
    for (int unsigned i = 0; i < NUM_SHARES; i++) begin
      keyed[i] = s_sh[i] ^ k_sh[i];
      ct       = ct ^ keyed[i];
    end
  end

endmodule
