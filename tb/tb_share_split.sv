// tb_share_split: masking of a value into three shares.
//
// For random values and random words (4-bit and 5-bit instances) checks
// that the shares XOR to the value and that shares 1 and 2 are the random
// words.
module tb_share_split;

  logic [3:0] z4;  logic [7:0] r4;  logic [2:0][3:0] s4;
  logic [4:0] z5;  logic [9:0] r5;  logic [2:0][4:0] s5;
  int checks = 0, failures = 0;

  share_split #(.W(4)) dut4 (.z(z4), .rnd(r4), .sh(s4));
  share_split #(.W(5)) dut5 (.z(z5), .rnd(r5), .sh(s5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      z4 = 4'($urandom); r4 = 8'($urandom);
      z5 = 5'($urandom); r5 = 10'($urandom);
      #1;
      checks += 2;
      if ((s4[0] ^ s4[1] ^ s4[2]) !== z4 || s4[0] !== r4[3:0] || s4[1] !== r4[7:4]) begin
        failures++;
        $display("FAIL W=4 z=%h rnd=%h sh=%h", z4, r4, s4);
      end
      if ((s5[0] ^ s5[1] ^ s5[2]) !== z5 || s5[0] !== r5[4:0] || s5[1] !== r5[9:5]) begin
        failures++;
        $display("FAIL W=5 z=%h rnd=%h sh=%h", z5, r5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
