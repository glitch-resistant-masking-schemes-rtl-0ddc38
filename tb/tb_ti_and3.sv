// tb_ti_and3: shared AND gate with registers.
//
// Drives random share triples, some back to back and some with idle cycles,
// and checks that each result appears exactly two clock edges after its
// input with XOR(z) = XOR(x) AND XOR(y). Also checks that the output
// register keeps its value while no input is accepted.
module tb_ti_and3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [2:0] x_sh = 0, y_sh = 0, z_sh;
  int checks = 0, failures = 0;
  int cycle = 0;

  ti_and3 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results with the cycle they are due
  logic exp_q[$];
  int   due_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if ((^z_sh) !== e || cycle != d) begin
          failures++;
          $display("FAIL cycle %0d (due %0d): z=%b expected %b", cycle, d, z_sh, e);
        end
      end
    end
  end

  initial begin
    logic [2:0] hold;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      x_sh = 3'($urandom);
      y_sh = 3'($urandom);
      if (in_valid) begin
        exp_q.push_back((^x_sh) & (^y_sh));
        due_q.push_back(cycle + 2);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    // output holds while idle
    hold = z_sh;
    repeat (3) @(negedge clk);
    checks++;
    if (z_sh !== hold) begin
      failures++;
      $display("FAIL output changed while idle");
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
