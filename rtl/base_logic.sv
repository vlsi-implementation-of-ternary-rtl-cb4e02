// Stage 2 of the three-operand adder: base logic.
//
// Turns the partial sum s and partial carry cy of stage 1 into one
// (generate, propagate) pair per bit of the two-operand sum s + 2*cy + cin.
// Bit i (1 <= i < N) pairs s_i with the carry from the bit below, cy_{i-1}:
//   G_i = s_i & cy_{i-1},  P_i = s_i ^ cy_{i-1}.
// Bit 0 pairs s_0 with the carry input: G_0 = s_0 & cin, P_0 = s_0 ^ cin.
// Bit N has no partial sum (s_N = 0), only the carry cy_{N-1}, so
// G_N = 0 and P_N = cy_{N-1}; this extra position is what lets the final
// stage produce Cout = G_{N:0} and the full (N+2)-bit result.
//
// Interface: s, cy (N bits), cin; pg is N+1 pairs, index = bit position.
// Timing: combinational, one XOR/AND delay.
// The per-bit equations follow the adder architecture; the treatment of
// position N is this design's reading of how Cout = G_{n:0} is formed.
module base_logic
  import toa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] cy,
  input  logic         cin,
  output pg_t  [N:0]   pg
);

  always_comb begin
    pg[0].g = s[0] & cin;
    pg[0].p = s[0] ^ cin;
    for (int unsigned i = 1; i < N; i++) begin
      pg[i].g = s[i] & cy[i-1];
      pg[i].p = s[i] ^ cy[i-1];
    end
    pg[N].g = 1'b0;
    pg[N].p = cy[N-1];
  end

endmodule
