// tb_present_sbox_ti: pipelined three-share PRESENT S-box.
//
// Feeds all 16 nibbles, each with random sharings, back to back and with
// idle cycles, and checks every result against the PRESENT S-box table
// C56B90AD3EF84712 (entry 0 first) and its arrival exactly two clock edges
// after the input.
module tb_present_sbox_ti;
  import ti_pkg::*;

  localparam logic [63:0] SBOX = 64'hC56B90AD3EF84712;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  present_sh_t x_sh = '0, y_sh;
  int checks = 0, failures = 0, cycle = 0, n_in = 0;
  logic [3:0] exp_q[$];
  int due_q[$];

  present_sbox_ti dut (.*);

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
        if ((y_sh[0] ^ y_sh[1] ^ y_sh[2]) !== e || cycle != d) begin
          failures++;
          $display("FAIL cycle %0d due %0d: y=%h expected %h", cycle, d, y_sh[0]^y_sh[1]^y_sh[2], e);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1600; n++) begin
      logic [3:0] v;
      v = 4'(n);
      in_valid = (n < 800) ? 1'b1 : ($urandom_range(0, 2) != 0);
      x_sh[0] = 4'($urandom);
      x_sh[1] = 4'($urandom);
      x_sh[2] = v ^ x_sh[0] ^ x_sh[1];
      if (in_valid) begin
        exp_q.push_back(sbox(v));
        due_q.push_back(cycle + 2);
        n_in++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
