// tb_key_add_combine: key addition and recombination of three shares.
//
// For random data and key shares checks ct = XOR of all six words, for the
// 4-bit and the 5-bit instance.
module tb_key_add_combine;

  logic [2:0][3:0] s4, k4;  logic [3:0] c4;
  logic [2:0][4:0] s5, k5;  logic [4:0] c5;
  int checks = 0, failures = 0;

  key_add_combine #(.W(4)) dut4 (.s_sh(s4), .k_sh(k4), .ct(c4));
  key_add_combine #(.W(5)) dut5 (.s_sh(s5), .k_sh(k5), .ct(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      s4 = 12'($urandom); k4 = 12'($urandom);
      s5 = 15'($urandom); k5 = 15'($urandom);
      #1;
      checks += 2;
      if (c4 !== (s4[0] ^ s4[1] ^ s4[2] ^ k4[0] ^ k4[1] ^ k4[2])) begin
        failures++;
        $display("FAIL W=4 s=%h k=%h ct=%h", s4, k4, c4);
      end
      if (c5 !== (s5[0] ^ s5[1] ^ s5[2] ^ k5[0] ^ k5[1] ^ k5[2])) begin
        failures++;
        $display("FAIL W=5 s=%h k=%h ct=%h", s5, k5, c5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
