// Self-checking testbench for bitwise_add (stage 1, carry-save row).
//
// Drives random and corner operand triples and checks every bit against a
// count of ones (bit 0 of the count is s_i, bit 1 is cy_i), and the whole
// vectors against the identity a + b + c == s + 2*cy. Combinational: each
// vector is applied and sampled 1 ns later. A watchdog ends a hung run.
module tb_bitwise_add;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  bitwise_add dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic apply(input logic [N-1:0] ta, tb, tc);
    logic [1:0] cnt;
    a = ta; b = tb; c = tc;
    #1;
    for (int i = 0; i < N; i++) begin
      cnt = 2'(a[i]) + 2'(b[i]) + 2'(c[i]);
      checks++;
      if (s[i] !== cnt[0] || cy[i] !== cnt[1]) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h c=%h s=%h cy=%h", i, a, b, c, s, cy);
      end
    end
    checks++;
    if ((N+2)'(a) + (N+2)'(b) + (N+2)'(c) != (N+2)'(s) + ((N+2)'(cy) << 1)) begin
      failures++;
      $display("FAIL sum identity a=%h b=%h c=%h", a, b, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply('1, '1, '0);
    apply('0, '1, '1);
    for (int k = 0; k < 2000; k++)
      apply(N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
