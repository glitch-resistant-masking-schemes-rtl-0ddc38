// tb_present_ti_round: protected PRESENT dummy round.
//
// Random nibbles with fresh sharing randomness, back to back and with idle
// cycles, under key shares that change every 64 cycles. Each output must
// arrive three clock edges after its input, with
//   XOR(s_out_sh) = S(s_in)  and  ct = S(s_in) ^ K1 ^ K2 ^ K3,
// S being the PRESENT S-box C56B90AD3EF84712 (entry 0 first).
module tb_present_ti_round;
  import ti_pkg::*;

  localparam logic [63:0] SBOX = 64'hC56B90AD3EF84712;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [3:0] s_in = 0, ct;
  logic [7:0] rnd = 0;
  present_sh_t k_sh = '0, s_out_sh;
  int checks = 0, failures = 0, cycle = 0;
  logic [3:0] exp_q[$];
  int due_q[$];

  present_ti_round dut (.*);

  function automatic logic [3:0] sbox(input logic [3:0] v);
    return SBOX[(15 - v) * 4 +: 4];
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
        logic [3:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if ((s_out_sh[0] ^ s_out_sh[1] ^ s_out_sh[2]) !== e
            || ct !== (e ^ k_sh[0] ^ k_sh[1] ^ k_sh[2]) || cycle != d) begin
          failures++;
          $display("FAIL cycle %0d due %0d: ct=%h S=%h", cycle, d, ct, e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      if (n % 64 == 0) k_sh = 12'($urandom);
      in_valid = (n < 500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      s_in = 4'($urandom);
      rnd  = 8'($urandom);
      if (in_valid) begin
        exp_q.push_back(sbox(s_in));
        due_q.push_back(cycle + 3);
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
