// tb_keccak_chi_ti: three-share KECCAK chi row with re-masking.
//
// Inputs go in back to back in groups of five that share one unshared row
// a: (sharing s, rnd 0), (s, rnd r), and s with share 3, 1 or 2 replaced by
// a random word (rnd 0). Checks, per output:
//   - XOR of the shares = chi(a), chi(a)_i = a_i ^ (~a_(i+1) & a_(i+2));
//   - result exactly one clock edge after the input;
//   - rnd r changes share 1 by {r2,r0}, share 2 by {r2^r3,r0^r1} and
//     share 3 by {r3,r1} on bits 1..0, and no other bit;
//   - output share j ignores input share j+2 (non-completeness).
module tb_keccak_chi_ti;
  import ti_pkg::*;

  localparam int GROUPS = 2000;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  keccak_sh_t x_sh = '0, y_sh;
  logic [3:0] rnd = '0;
  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  keccak_sh_t outs[5*GROUPS];
  int out_cyc[5*GROUPS], in_cyc[5*GROUPS];
  logic [4:0] rows[GROUPS];
  logic [3:0] rs[GROUPS];

  keccak_chi_ti dut (.*);

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = a[i] ^ (~a[(i+1)%5] & a[(i+2)%5]);
    return r;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20 * GROUPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && n_out < 5 * GROUPS) begin
      outs[n_out]    <= y_sh;
      out_cyc[n_out] <= cycle;
      n_out          <= n_out + 1;
    end
  end

  initial begin
    keccak_sh_t s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < GROUPS; g++) begin
      rows[g] = 5'($urandom);
      rs[g]   = 4'($urandom_range(1, 15));
      s[0] = 5'($urandom);
      s[1] = 5'($urandom);
      s[2] = rows[g] ^ s[0] ^ s[1];
      for (int k = 0; k < 5; k++) begin
        x_sh = s;
        rnd  = (k == 1) ? rs[g] : 4'd0;
        if (k >= 2) x_sh[k%3] = 5'($urandom);  // k=2: index 2, k=3: index 0, k=4: index 1
        in_valid = 1;
        in_cyc[5*g+k] = cycle;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != 5 * GROUPS) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, 5 * GROUPS);
    end
    for (int g = 0; g < GROUPS && n_out == 5 * GROUPS; g++) begin
      keccak_sh_t o0, o1;
      o0 = outs[5*g];
      o1 = outs[5*g+1];
      for (int k = 0; k < 2; k++) begin
        checks++;
        if ((outs[5*g+k][0] ^ outs[5*g+k][1] ^ outs[5*g+k][2]) !== chi(rows[g])
            || out_cyc[5*g+k] != in_cyc[5*g+k] + 1) begin
          failures++;
          $display("FAIL group %0d k %0d: chi mismatch or latency", g, k);
        end
      end
      checks++;
      if ((o0[0] ^ o1[0]) !== {3'b0, rs[g][2], rs[g][0]}
          || (o0[1] ^ o1[1]) !== {3'b0, rs[g][2] ^ rs[g][3], rs[g][0] ^ rs[g][1]}
          || (o0[2] ^ o1[2]) !== {3'b0, rs[g][3], rs[g][1]}) begin
        failures++;
        $display("FAIL group %0d: re-masking r=%h", g, rs[g]);
      end
      // k=2 replaced share 3 (index 2): output share index 0 must not move;
      // k=3 replaced index 0: output index 1; k=4 replaced index 1: output index 2.
      for (int k = 2; k < 5; k++) begin
        checks++;
        if (outs[5*g+k][k-2] !== o0[k-2]) begin
          failures++;
          $display("FAIL group %0d: output share %0d depends on input share %0d", g, k-2, k%3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
