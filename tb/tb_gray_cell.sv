// Self-checking testbench for gray_cell.
//
// Exhaustive over the 8 input combinations: the carry out of the combined
// span is set if the upper span generates, or propagates an incoming carry.
module tb_gray_cell;
  import toa_pkg::*;

  pg_t  hi;
  logic g_lo, g;
  int checks = 0, failures = 0;

  gray_cell dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg;
    for (int v = 0; v < 8; v++) begin
      {hi.g, hi.p, g_lo} = 3'(v);
      #1;
      eg = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g !== eg) begin
        failures++;
        $display("FAIL hi=%b%b g_lo=%b -> g=%b", hi.g, hi.p, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
