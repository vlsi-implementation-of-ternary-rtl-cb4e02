// Stage 4 of the three-operand adder: final addition.
//
// Forms the result from the per-bit propagates of stage 2 and the carries
// G_{i:0} of the prefix tree:
//   S_0 = P_0,  S_i = P_i ^ G_{i-1:0} (1 <= i <= N),  Cout = G_{N:0}.
// The sum has N+2 bits: S_N..S_0 plus Cout, enough for a + b + c + cin.
//
// Interface: pg (N+1 pairs; only .p is read, the generates having already
// been folded into g_all by the prefix tree), g_all (N+1 carries);
// sum is {Cout, S_N .. S_0}. Timing: combinational, one XOR delay.
module final_add
  import toa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  pg_t  [N:0]   pg,
  input  logic [N:0]   g_all,
  output logic [N+1:0] sum
);

  always_comb begin
    sum[0] = pg[0].p;
    for (int unsigned i = 1; i <= N; i++)
      sum[i] = pg[i].p ^ g_all[i-1];
    sum[N+1] = g_all[N];
  end

endmodule
