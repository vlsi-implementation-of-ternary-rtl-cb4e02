// Three-operand binary adder built as a four-stage parallel prefix adder,
// with a Sklansky tree in the carry stage.
//
// Computes sum = a + b + c + cin for three N-bit unsigned operands and a
// one-bit carry input, giving an N+2-bit result. Instead of a carry-save row
// followed by a separate two-operand adder, the four stages are fused:
//   1. bitwise addition  (bitwise_add)     a,b,c   -> s, cy   (full adders)
//   2. base logic        (base_logic)      s,cy,cin-> P_i, G_i for bits 0..N
//   3. PG logic          (sklansky_prefix) P,G     -> G_{i:0} for bits 0..N
//   4. final addition    (final_add)       P,G_{i:0}-> S_i, Cout
// The only carry chain is the log-depth prefix tree of stage 3.
//
// Interface: a, b, c (N bits), cin; sum (N+2 bits, sum[N+1] is Cout).
// Timing: purely combinational, no clock or reset; depth is two gate levels
// for stages 1-2, ceil(log2(N+1)) cell levels for stage 3, one XOR for stage 4.
// Stage equations and the Sklansky choice follow the architecture; N = 16
// follows the 16-bit tree it is drawn with; the extra bit position N used to
// form Cout is this design's reading of Cout = G_{n:0}.
module three_operand_adder
  import toa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N+1:0] sum
);

  logic [N-1:0] s, cy;
  pg_t  [N:0]   pg;
  logic [N:0]   g_all;

  bitwise_add #(.N(N)) u_stage1 (
    .a (a),
    .b (b),
    .c (c),
    .s (s),
    .cy(cy)
  );

  base_logic #(.N(N)) u_stage2 (
    .s  (s),
    .cy (cy),
    .cin(cin),
    .pg (pg)
  );

  sklansky_prefix #(.W(N+1)) u_stage3 (
    .pg   (pg),
    .g_all(g_all)
  );

  final_add #(.N(N)) u_stage4 (
    .pg   (pg),
    .g_all(g_all),
    .sum  (sum)
  );

endmodule
