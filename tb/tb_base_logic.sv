// Self-checking testbench for base_logic (stage 2).
//
// For each bit position the reference adds the partial-sum bit and the carry
// arriving from below (cin at bit 0, cy_{i-1} above it, nothing from s at bit
// N) as a two-bit number: its high bit is the expected generate and its low
// bit the expected propagate. Random and corner inputs; 1 ns per vector.
module tb_base_logic;
  import toa_pkg::*;
  localparam int unsigned N = 16;

  logic [N-1:0] s, cy;
  logic         cin;
  pg_t  [N:0]   pg;
  int checks = 0, failures = 0;

  base_logic dut (.s(s), .cy(cy), .cin(cin), .pg(pg));

  task automatic apply(input logic [N-1:0] ts, tcy, input logic tcin);
    logic [N:0] x, y;
    logic [1:0] t;
    s = ts; cy = tcy; cin = tcin;
    #1;
    x = {1'b0, s};     // partial sum, nothing at position N
    y = {cy, cin};     // carries shifted up one position, cin at the bottom
    for (int i = 0; i <= N; i++) begin
      t = 2'(x[i]) + 2'(y[i]);
      checks++;
      if (pg[i].g !== t[1] || pg[i].p !== t[0]) begin
        failures++;
        $display("FAIL pos %0d s=%h cy=%h cin=%b g=%b p=%b", i, s, cy, cin, pg[i].g, pg[i].p);
      end
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
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    apply('0, '1, 1'b0);
    for (int k = 0; k < 2000; k++)
      apply(N'($urandom), N'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
