// tb_bec: exhaustive check of the binary to excess-1 converter at its
// default 3 bits and at 9 bits, against x = b + 1 modulo 2^W.
module tb_bec;
  logic [2:0] b3, x3;
  logic [8:0] b9, x9;
  int checks = 0, failures = 0;

  bec          dut3 (.b(b3), .x(x3));
  bec #(.W(9)) dut9 (.b(b9), .x(x9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      b3 = 3'(i);
      #1;
      checks++;
      if (x3 != 3'(i + 1)) begin
        failures++;
        $display("FAIL W=3 b=%0d x=%0d", b3, x3);
      end
    end
    for (int i = 0; i < 512; i++) begin
      b9 = 9'(i);
      #1;
      checks++;
      if (x9 != 9'(i + 1)) begin
        failures++;
        $display("FAIL W=9 b=%0d x=%0d", b9, x9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
