// Self-checking testbench for final_add (stage 4).
//
// Builds a consistent stage-4 input from two random (N+1)-bit numbers X and Y:
// p = X ^ Y, g = X & Y, and the carries G_{i:0} from a ripple chain worked
// out here. The block's N+2-bit output must then equal X + Y.
module tb_final_add;
  import toa_pkg::*;
  localparam int unsigned N = 16;

  pg_t  [N:0]   pg;
  logic [N:0]   g_all;
  logic [N+1:0] sum;
  int checks = 0, failures = 0;

  final_add dut (.pg(pg), .g_all(g_all), .sum(sum));

  task automatic apply(input logic [N:0] x, y);
    logic c = 1'b0;
    for (int i = 0; i <= N; i++) begin
      pg[i].p = x[i] ^ y[i];
      pg[i].g = x[i] & y[i];
      c = pg[i].g | (pg[i].p & c);
      g_all[i] = c;
    end
    #1;
    checks++;
    if (sum !== (N+2)'(x) + (N+2)'(y)) begin
      failures++;
      $display("FAIL x=%h y=%h sum=%h exp=%h", x, y, sum, (N+2)'(x) + (N+2)'(y));
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
    apply('0, '0);
    apply('1, '1);
    apply('1, (N+1)'(1));
    for (int k = 0; k < 3000; k++)
      apply((N+1)'($urandom), (N+1)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
