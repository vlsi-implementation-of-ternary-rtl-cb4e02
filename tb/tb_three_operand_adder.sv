// End-to-end testbench for three_operand_adder at its default width (N = 16).
//
// Applies directed corner cases and random operand triples with a random
// carry input, and checks the N+2-bit result against a + b + c + cin worked
// out with plain integer arithmetic. The design is combinational, so each
// vector is sampled 1 ns after it is applied.
//
// It also counts how often each mechanism of the adder was exercised, from
// the operands alone, and counts a failure for any that never happened:
//   cin      - the carry input was set (enters at base-logic position 0)
//   cout     - the result overflowed into the carry out, Cout = G_{N:0}
//   longest  - a carry generated at position 0 crossed every position up to N
//              (worst-case path through the prefix tree)
//   top_gen  - the partial carry cy_{N-1} alone set result bit N or Cout
module tb_three_operand_adder;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, c;
  logic         cin;
  logic [N+1:0] sum;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_longest = 0, n_top = 0;

  three_operand_adder dut (.a(a), .b(b), .c(c), .cin(cin), .sum(sum));

  task automatic apply(input logic [N-1:0] ta, tb, tc, input logic tcin);
    logic [N+1:0] exp;
    logic [N-1:0] s, cy;
    logic [N:0]   x, y, pv;
    a = ta; b = tb; c = tc; cin = tcin;
    #1;
    exp = (N+2)'(a) + (N+2)'(b) + (N+2)'(c) + (N+2)'(cin);
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h cin=%b sum=%h exp=%h", a, b, c, cin, sum, exp);
    end
    // mechanism bookkeeping, from a carry-save view worked out here
    for (int i = 0; i < N; i++) begin
      s[i]  = ^{a[i], b[i], c[i]};
      cy[i] = (32'(a[i]) + 32'(b[i]) + 32'(c[i])) >= 2;
    end
    x  = {1'b0, s};
    y  = {cy, cin};
    pv = x ^ y;
    if (cin) n_cin++;
    if (exp[N+1]) n_cout++;
    if ((x[0] & y[0]) && (pv[N:1] == '1)) n_longest++;
    if (cy[N-1] && (exp[N+1] || exp[N])) n_top++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0, 1'b0);
    apply('1, '1, '1, 1'b1);   // largest sum
    apply('1, '1, '1, 1'b0);
    apply('1, '0, '0, 1'b1);   // a carry from bit 0 ripples up to bit N
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, '0, 1'b0);
    apply(N'(1), '1, '0, 1'b0);
    // s = 1...1, cy = 1 0...0, cin = 1: generate at position 0, propagate at
    // every position above it, carry leaves through Cout
    apply('1, N'(1) << (N-1), N'(1) << (N-1), 1'b1);
    for (int k = 0; k < 200000; k++)
      apply(N'($urandom), N'($urandom), N'($urandom), 1'($urandom));
    $display("mechanisms: cin=%0d cout=%0d longest=%0d top_gen=%0d",
             n_cin, n_cout, n_longest, n_top);
    if (n_cin == 0)     begin failures++; $display("FAIL cin never set");            end
    if (n_cout == 0)    begin failures++; $display("FAIL carry out never produced"); end
    if (n_longest == 0) begin failures++; $display("FAIL longest chain never hit");  end
    if (n_top == 0)     begin failures++; $display("FAIL top carry never used");     end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
