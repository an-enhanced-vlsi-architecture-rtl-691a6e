// tb_vm8x8: checks the 8x8 Vedic multiplier against a * b computed
// by the simulator's own multiply.
// Every operand pair is applied.
// The carries C1 (out of the adder of the two crosswise products) and C2 (out
// of the adder that brings in the upper half of AlBl) are worked out from the
// operands; the test fails if either never occurred, since the OR that joins
// them would then be untested. C3 must stay 0.
module tb_vm8x8;
  localparam int N = 8;
  localparam int H = N / 2;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p, expect_p;
  logic           c3;
  int checks = 0, failures = 0;
  int seen_c1 = 0, seen_c2 = 0;

  vm8x8 dut (.a(a), .b(b), .p(p), .c3(c3));

  function automatic logic [N-1:0] rand_word(input int density);
    logic [N-1:0] w;
    w = 8'($urandom);
    // density 0: uniform; 1: mostly ones; 2: mostly zeros
    if (density == 1) w |= rand_word(0);
    if (density == 2) w &= rand_word(0);
    return w;
  endfunction

  task automatic apply();
    logic [N:0] x1, x2;
    logic [N-1:0] lh, hl, ll;
    #1;
    expect_p = {{N{1'b0}}, a} * {{N{1'b0}}, b};
    checks++;
    if (p != expect_p || c3 != 1'b0) begin
      failures++;
      $display("FAIL %h * %h -> %h c3=%b, expected %h", a, b, p, c3, expect_p);
    end
    lh = N'(a[H-1:0]) * N'(b[N-1:H]);
    hl = N'(a[N-1:H]) * N'(b[H-1:0]);
    ll = N'(a[H-1:0]) * N'(b[H-1:0]);
    x1 = {1'b0, lh} + {1'b0, hl};
    x2 = {1'b0, x1[N-1:0]} + (N+1)'(ll[N-1:H]);
    if (x1[N]) seen_c1++;
    if (x2[N]) seen_c2++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*N)); i++) begin
      {a, b} = (2*N)'(i);
      apply();
    end
    $display("C1 seen %0d times, C2 seen %0d times", seen_c1, seen_c2);
    if (seen_c1 == 0) begin failures++; $display("FAIL C1 never set"); end
    if (seen_c2 == 0) begin failures++; $display("FAIL C2 never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
