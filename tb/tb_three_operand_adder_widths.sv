// Exhaustive testbench for three_operand_adder at small widths.
//
// Instantiates the adder at N = 1, 2, 3, 4 and 5 and walks through every
// combination of a, b, c and cin for each (2^(3N+1) vectors; 65536 at N = 5),
// comparing with integer addition. This covers the tree shapes of several
// widths, including those where the extra carry position N sits alone at
// the top of a new prefix level.
module tb_three_operand_adder_widths;
  logic [4:0] a, b, c;
  logic       cin;
  logic [2:0] sum1;
  logic [3:0] sum2;
  logic [4:0] sum3;
  logic [5:0] sum4;
  logic [6:0] sum5;
  int checks = 0, failures = 0;

  three_operand_adder #(.N(1)) dut1 (.a(a[0:0]), .b(b[0:0]), .c(c[0:0]), .cin(cin), .sum(sum1));
  three_operand_adder #(.N(2)) dut2 (.a(a[1:0]), .b(b[1:0]), .c(c[1:0]), .cin(cin), .sum(sum2));
  three_operand_adder #(.N(3)) dut3 (.a(a[2:0]), .b(b[2:0]), .c(c[2:0]), .cin(cin), .sum(sum3));
  three_operand_adder #(.N(4)) dut4 (.a(a[3:0]), .b(b[3:0]), .c(c[3:0]), .cin(cin), .sum(sum4));
  three_operand_adder #(.N(5)) dut5 (.a(a),      .b(b),      .c(c),      .cin(cin), .sum(sum5));

  task automatic check(input int n, input logic [6:0] got);
    int unsigned m = (1 << n) - 1;
    int unsigned exp = (a & m) + (b & m) + (c & m) + cin;
    checks++;
    if (32'(got) != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d a=%0d b=%0d c=%0d cin=%b got=%0d exp=%0d",
                 n, a & m, b & m, c & m, cin, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      {cin, c, b, a} = 16'(v);
      #1;
      check(5, sum5);
      if (c[4] == 0 && b[4] == 0 && a[4] == 0) check(4, 7'(sum4));
      if (a[4:3] == 0 && b[4:3] == 0 && c[4:3] == 0) check(3, 7'(sum3));
      if (a[4:2] == 0 && b[4:2] == 0 && c[4:2] == 0) check(2, 7'(sum2));
      if (a[4:1] == 0 && b[4:1] == 0 && c[4:1] == 0) check(1, 7'(sum1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
