// tb_vm_group_sizes: checks that the multipliers stay correct when the
// carry select adders use other group sizes than the default: the 32x32
// multiplier with 1-bit groups and with 4-bit groups, against a * b, on
// corners and random operands of varied bit density.
module tb_vm_group_sizes;
  localparam int N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p1, p4, expect_p;
  logic           c3_1, c3_4;
  int checks = 0, failures = 0;

  vm32x32 #(.G(1)) dut_g1 (.a(a), .b(b), .p(p1), .c3(c3_1));
  vm32x32 #(.G(4)) dut_g4 (.a(a), .b(b), .p(p4), .c3(c3_4));

  task automatic apply();
    #1;
    expect_p = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    checks++;
    if (p1 != expect_p || c3_1 != 1'b0) begin
      failures++;
      $display("FAIL G=1 %h * %h -> %h, expected %h", a, b, p1, expect_p);
    end
    checks++;
    if (p4 != expect_p || c3_4 != 1'b0) begin
      failures++;
      $display("FAIL G=4 %h * %h -> %h, expected %h", a, b, p4, expect_p);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; apply();
    a = '1; b = '1; apply();
    a = {16'd2, 16'hffff}; b = '1; apply();  // C2 without C1
    for (int i = 0; i < 10000; i++) begin
      a = $urandom;
      b = $urandom;
      if (i % 3 == 1) begin a |= $urandom; b |= $urandom; end
      if (i % 3 == 2) begin a &= $urandom; b &= $urandom; end
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
