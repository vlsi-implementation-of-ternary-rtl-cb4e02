// Self-checking testbench for black_cell.
//
// Exhaustive over the 16 input combinations. The reference reasons about
// spans: the combined span generates if the upper span generates, or if it
// propagates and the lower span generates; it propagates only if both do.
module tb_black_cell;
  import toa_pkg::*;

  pg_t hi, lo, o;
  int checks = 0, failures = 0;

  black_cell dut (.hi(hi), .lo(lo), .o(o));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      if (hi.g) eg = 1'b1;
      else if (hi.p) eg = lo.g;
      else eg = 1'b0;
      ep = (hi.p && lo.p) ? 1'b1 : 1'b0;
      checks++;
      if (o.g !== eg || o.p !== ep) begin
        failures++;
        $display("FAIL hi=%b%b lo=%b%b -> g=%b p=%b", hi.g, hi.p, lo.g, lo.p, o.g, o.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
