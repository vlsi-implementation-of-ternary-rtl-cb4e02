// Self-checking testbench for sklansky_prefix (stage 3).
//
// Several tree widths run side by side from the same random (g, p) vectors:
// the default 17 positions, a power of two (16), a width just past one (33)
// and two small odd ones (5, 1). The reference is a plain ripple chain,
// carry_i = g_i | p_i & carry_{i-1} with no carry into bit 0, which every
// g_all[i] = G_{i:0} must match. Directed patterns add the longest chain
// (generate at bit 0, propagate everywhere else) and alternating bits.
module tb_sklansky_prefix;
  import toa_pkg::*;

  localparam int unsigned MAXW = 33;

  logic [MAXW-1:0] gv, pv;
  pg_t  [MAXW-1:0] pg;
  logic [16:0] out17;
  logic [15:0] out16;
  logic [32:0] out33;
  logic [4:0]  out5;
  logic [0:0]  out1;
  int checks = 0, failures = 0;

  always_comb
    for (int i = 0; i < MAXW; i++) begin
      pg[i].g = gv[i];
      pg[i].p = pv[i];
    end

  sklansky_prefix            dut17 (.pg(pg[16:0]), .g_all(out17));
  sklansky_prefix #(.W(16))  dut16 (.pg(pg[15:0]), .g_all(out16));
  sklansky_prefix #(.W(33))  dut33 (.pg(pg[32:0]), .g_all(out33));
  sklansky_prefix #(.W(5))   dut5  (.pg(pg[4:0]),  .g_all(out5));
  sklansky_prefix #(.W(1))   dut1  (.pg(pg[0:0]),  .g_all(out1));

  function automatic logic [MAXW-1:0] ripple(input logic [MAXW-1:0] g, p);
    logic c = 1'b0;
    for (int i = 0; i < MAXW; i++) begin
      c = g[i] | (p[i] & c);
      ripple[i] = c;
    end
  endfunction

  task automatic compare(input int w, input logic [MAXW-1:0] got, input logic [MAXW-1:0] exp);
    for (int i = 0; i < w; i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL W=%0d bit %0d g=%h p=%h got=%h exp=%h", w, i, gv, pv, got, exp);
        break;
      end
    end
  endtask

  task automatic apply(input logic [MAXW-1:0] tg, tp);
    logic [MAXW-1:0] exp;
    gv = tg; pv = tp;
    #1;
    exp = ripple(gv, pv);
    compare(17, MAXW'(out17), exp);
    compare(16, MAXW'(out16), exp);
    compare(33, MAXW'(out33), exp);
    compare(5,  MAXW'(out5),  exp);
    compare(1,  MAXW'(out1),  exp);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXW-1:0] rg, rp;
    apply(MAXW'(1), ~MAXW'(0));               // carry from bit 0 through everything
    apply(MAXW'(1), ~MAXW'(1) ^ (MAXW'(1) << 20)); // chain broken at bit 20
    apply('0, '1);
    apply('1, '0);
    apply({(MAXW+1)/2{2'b01}}, {(MAXW+1)/2{2'b10}});
    for (int k = 0; k < 5000; k++) begin
      rg = {MAXW'($urandom), $urandom};
      rp = {MAXW'($urandom), $urandom};
      // keep g and p exclusive as in a real adder on half the vectors,
      // and bias towards propagate to grow long chains
      if (k[0]) rg = rg & ~rp;
      if (k[1]) rp = rp | {MAXW'($urandom), $urandom};
      apply(rg, rp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
