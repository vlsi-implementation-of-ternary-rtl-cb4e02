// Stage 3 of the three-operand adder: Sklansky parallel prefix tree.
//
// Takes one (generate, propagate) pair per bit position and returns, for every
// position i, the group generate G_{i:0}, i.e. the carry out of bits i..0.
//
// Structure (divide and conquer, ceil(log2 W) levels): at level l every
// position i whose bit l is set combines its current pair with the pair held
// by position k = ((i >> l) << l) - 1, the top position of the lower half of
// the 2^(l+1)-wide block that i sits in. After level l each position holds the
// span from itself down to the bottom of its 2^(l+1)-wide block. A position
// whose new span reaches bit 0 (i < 2^(l+1)) uses a gray cell, every other
// combining position a black cell, and positions with bit l clear keep their
// pair unchanged (a buffer, which in RTL is just a wire). The fan-out of the
// block tops doubles with each level, which is the Sklansky trade: minimum
// depth and few cells, at the cost of high fan-out.
//
// Interface: pg is W pairs (index = bit position); g_all[i] = G_{i:0}.
// Timing: combinational, ceil(log2 W) cell delays.
// W defaults to 17: the 16-bit tree of the design plus the extra carry
// position the three-operand adder needs for its carry out.
module sklansky_prefix
  import toa_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  pg_t  [W-1:0] pg,
  output logic [W-1:0] g_all
);

  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  // lvl[l] holds the pairs entering level l; lvl[L] holds the final groups.
  pg_t [W-1:0] lvl [L+1];

  assign lvl[0] = pg;

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      localparam int unsigned K = ((i >> l) << l) - 1;  // top of the lower half
      if (((i >> l) & 1) == 0) begin : g_buf
        assign lvl[l+1][i] = lvl[l][i];
      end else if (i < (2 << l)) begin : g_gray
        gray_cell u_gray (
          .hi  (lvl[l][i]),
          .g_lo(lvl[l][K].g),
          .g   (lvl[l+1][i].g)
        );
        // The span now reaches bit 0; its propagate is never used again.
        assign lvl[l+1][i].p = 1'b0;
      end else begin : g_black
        black_cell u_black (
          .hi(lvl[l][i]),
          .lo(lvl[l][K]),
          .o (lvl[l+1][i])
        );
      end
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_out
    assign g_all[i] = lvl[L][i].g;
  end

endmodule
