// tb_mlcsla: checks the modified linear carry select adder against
// {co, s} = a + b + ci.
//  - default size (128 bits, 2-bit groups): directed corners (a carry that
//    ripples through every group, all ones, zero) and random operands of
//    varied bit density;
//  - 4 bits: exhaustive;
//  - 12 bits with 3-bit groups (4-bit BECs): random.
// It counts how often a selected group receives a carry of 1 (the BEC path
// is taken) and how often the carry travels from the carry in to the carry
// out, and fails if either never happened.
module tb_mlcsla;
  localparam int N = 128;

  logic [N-1:0]  a, b, s;
  logic          ci, co;
  logic [3:0]    a4, b4, s4;
  logic          co4;
  logic [11:0]   a12, b12, s12;
  logic          co12;
  logic [N:0]    expect_sum;
  int checks = 0, failures = 0;
  int bec_taken = 0, full_ripple = 0;

  mlcsla                 dut   (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  mlcsla #(.N(4))        dut4  (.a(a4), .b(b4), .ci(ci), .s(s4), .co(co4));
  mlcsla #(.N(12), .G(3)) dut12 (.a(a12), .b(b12), .ci(ci), .s(s12), .co(co12));

  function automatic logic [N-1:0] rand_word(input int density);
    logic [N-1:0] w;
    for (int i = 0; i < N / 32; i++) w[i*32 +: 32] = $urandom;
    // density 0: uniform; 1: mostly ones; 2: mostly zeros
    if (density == 1) for (int i = 0; i < N / 32; i++) w[i*32 +: 32] |= $urandom;
    if (density == 2) for (int i = 0; i < N / 32; i++) w[i*32 +: 32] &= $urandom;
    return w;
  endfunction

  task automatic check128();
    logic [N:0] low;
    #1;
    expect_sum = {1'b0, a} + {1'b0, b} + (N+1)'(ci);
    checks++;
    if ({co, s} != expect_sum) begin
      failures++;
      $display("FAIL N=128 a=%h b=%h ci=%b -> %h, expected %h", a, b, ci, {co, s}, expect_sum);
    end
    // carry into group k (k >= 1) is bit 2k of the partial sum of the bits below
    for (int k = 1; k < N / 2; k++) begin
      low = ({1'b0, a} & ((129'd1 << (2*k)) - 1)) + ({1'b0, b} & ((129'd1 << (2*k)) - 1)) + (N+1)'(ci);
      if (low[2*k]) begin
        bec_taken++;
        break;
      end
    end
    if (ci && ((a ^ b) == '1)) full_ripple++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; ci = 1'b0; a4 = '0; b4 = '0; a12 = '0; b12 = '0;
    // directed: zero, all ones, a carry that ripples all the way
    check128();
    a = '1; b = '1; ci = 1'b1; check128();
    a = '1; b = '0; ci = 1'b1; check128();
    a = {64{2'b10}}; b = {64{2'b01}}; ci = 1'b1; check128();
    a = '1; b = 128'd1; ci = 1'b0; check128();
    for (int i = 0; i < 3000; i++) begin
      a  = rand_word(i % 3);
      b  = rand_word((i / 3) % 3);
      ci = 1'($urandom);
      check128();
    end

    for (int i = 0; i < 512; i++) begin
      {ci, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci)) begin
        failures++;
        $display("FAIL N=4 %0d+%0d+%0d -> %0d", a4, b4, ci, {co4, s4});
      end
    end

    for (int i = 0; i < 3000; i++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      ci  = 1'($urandom);
      #1;
      checks++;
      if ({co12, s12} != 13'(a12) + 13'(b12) + 13'(ci)) begin
        failures++;
        $display("FAIL N=12 %0d+%0d+%0d -> %0d", a12, b12, ci, {co12, s12});
      end
    end

    $display("BEC path taken in %0d vectors, full ripple in %0d", bec_taken, full_ripple);
    if (bec_taken == 0) begin failures++; $display("FAIL BEC path never taken"); end
    if (full_ripple == 0) begin failures++; $display("FAIL full ripple never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
