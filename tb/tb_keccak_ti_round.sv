// tb_keccak_ti_round: protected KECCAK chi dummy round.
//
// Random rows with fresh sharing and re-masking randomness (re-masking bits
// zero for the first half, random after), back to back and with idle
// cycles, under key shares that change every 64 cycles. Each output must
// arrive two clock edges after its input, with XOR(s_out_sh) = chi(s_in)
// and ct = chi(s_in) ^ K1 ^ K2 ^ K3.
module tb_keccak_ti_round;
  import ti_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [4:0] s_in = 0, ct;
  logic [9:0] rnd_share = 0;
  logic [3:0] rnd_chi = 0;
  keccak_sh_t k_sh = '0, s_out_sh;
  int checks = 0, failures = 0, cycle = 0;
  logic [4:0] exp_q[$];
  int due_q[$];

  keccak_ti_round dut (.*);

  function automatic logic [4:0] chi(input logic [4:0] a);
    logic [4:0] r;
    for (int i = 0; i < 5; i++) r[i] = a[i] ^ (~a[(i+1)%5] & a[(i+2)%5]);
    return r;
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic [4:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if ((s_out_sh[0] ^ s_out_sh[1] ^ s_out_sh[2]) !== e
            || ct !== (e ^ k_sh[0] ^ k_sh[1] ^ k_sh[2]) || cycle != d) begin
          failures++;
          $display("FAIL cycle %0d due %0d: ct=%h chi=%h", cycle, d, ct, e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      if (n % 64 == 0) k_sh = 15'($urandom);
      in_valid  = (n < 500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      s_in      = 5'($urandom);
      rnd_share = 10'($urandom);
      rnd_chi   = (n < 1000) ? 4'd0 : 4'($urandom);
      if (in_valid) begin
        exp_q.push_back(chi(s_in));
        due_q.push_back(cycle + 2);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
