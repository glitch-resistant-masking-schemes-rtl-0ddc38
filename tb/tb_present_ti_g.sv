// tb_present_ti_g: exhaustive test of the second PRESENT TI stage.
//
// For all 4096 share triples checks that the XOR of the output shares is
// G(XOR of the input shares), with G given as a 16-entry table
// (G = 08B7A31C46F9ED52, entry 0 first), and that output share j does not
// change when input share j+2 (the one it must not see) is replaced by a
// random nibble.
module tb_present_ti_g;
  import ti_pkg::*;

  localparam logic [63:0] TAB = 64'h08B7A31C46F9ED52;

  present_sh_t x_sh, y_sh, y_ref;
  int checks = 0, failures = 0;

  present_ti_g dut (.x_sh(x_sh), .y_sh(y_sh));

  function automatic logic [3:0] lut(input logic [3:0] v);
    return TAB[(15 - v) * 4 +: 4];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x_sh = 12'(v);
      #1;
      checks++;
      if ((y_sh[0] ^ y_sh[1] ^ y_sh[2]) !== lut(x_sh[0] ^ x_sh[1] ^ x_sh[2])) begin
        failures++;
        $display("FAIL x_sh=%h y_sh=%h", x_sh, y_sh);
      end
      y_ref = y_sh;
      for (int j = 0; j < 3; j++) begin
        x_sh = 12'(v);
        x_sh[(j+2)%3] = 4'($urandom);
        #1;
        checks++;
        if (y_sh[j] !== y_ref[j]) begin
          failures++;
          $display("FAIL non-completeness: share %0d depends on share %0d", j, (j+2)%3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
