// tb_rca: exhaustive check of the ripple carry adder at its default width
// (2 bits) and at 6 bits, against {co, s} = a + b + ci.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [5:0] a6, b6, s6;
  logic       ci, co2, co6;
  int checks = 0, failures = 0;

  rca           dut2 (.a(a2), .b(b2), .ci(ci), .s(s2), .co(co2));
  rca #(.W(6))  dut6 (.a(a6), .b(b6), .ci(ci), .s(s6), .co(co6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} != 3'(a2) + 3'(b2) + 3'(ci)) begin
        failures++;
        $display("FAIL W=2 %0d+%0d+%0d -> %0d", a2, b2, ci, {co2, s2});
      end
    end
    for (int i = 0; i < 8192; i++) begin
      {ci, a6, b6} = 13'(i);
      #1;
      checks++;
      if ({co6, s6} != 7'(a6) + 7'(b6) + 7'(ci)) begin
        failures++;
        $display("FAIL W=6 %0d+%0d+%0d -> %0d", a6, b6, ci, {co6, s6});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
