// tb_ti_and_component: exhaustive test of the shared-AND component function.
//
// Three instances are wired as in the shared AND gate (shares (1,2), (2,3),
// (3,1)). For all 64 share combinations the XOR of the three outputs must
// equal (x1^x2^x3) AND (y1^y2^y3), and each instance must not change when
// the share it does not see is flipped (non-completeness).
module tb_ti_and_component;

  logic [2:0] x, y, z;
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 3; j++) begin : g_c
    ti_and_component dut (.xa(x[j]), .xb(x[(j+1)%3]), .ya(y[j]), .yb(y[(j+1)%3]), .z(z[j]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] z0;
    for (int v = 0; v < 64; v++) begin
      {x, y} = 6'(v);
      #1;
      checks++;
      if ((^z) !== ((^x) & (^y))) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b", x, y, z);
      end
      // the share excluded from component j is (j+2)%3
      z0 = z;
      for (int j = 0; j < 3; j++) begin
        x[(j+2)%3] = ~x[(j+2)%3];
        y[(j+2)%3] = ~y[(j+2)%3];
        #1;
        checks++;
        if (z[j] !== z0[j]) begin
          failures++;
          $display("FAIL non-completeness share %0d x=%b y=%b", j, x, y);
        end
        x[(j+2)%3] = ~x[(j+2)%3];
        y[(j+2)%3] = ~y[(j+2)%3];
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
