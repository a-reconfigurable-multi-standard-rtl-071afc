// cse_multiplier_block: multiplier-less product block of the parent filter.
//
// Forms x*h(k) for k = 0..HALF (the symmetric half of the parent filter) with shifts and
// adds only. Two adders make the common subexpressions first, kept exact by scaling by 4:
//   x2s = 4*x + x  (= 4 * (x + x>>2))      x3s = 4*x - x  (= 4 * (x - x>>2))
// Each product is then the signed sum of at most MAX_TERMS shifted copies of x, x2s or
// x3s as listed in qmf_pkg::CSE_TERMS. All products are exact and scaled by 2^FRAC, so
// prod[k] = x * round(h(k) * 2^FRAC) with no rounding inside the block.
// The term list is the published CSD/CSE factorisation; the exact integer scaling is this
// design's choice.
//
// Interface: x (W bits, signed; default DATA_W) in, prod[0..HALF] (W + FRAC bits, signed) out.
// Timing: purely combinational.
module cse_multiplier_block
  import qmf_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic signed [W-1:0]           x,
  output logic signed [W+FRAC-1:0]      prod [0:HALF]
);

  localparam int PW = W + FRAC;

  logic signed [PW-1:0] x1w, x2s, x3s;

  // the two shared subexpression adders
  always_comb begin
    x1w = PW'(x);
    x2s = (x1w <<< 2) + x1w;
    x3s = (x1w <<< 2) - x1w;
  end

  for (genvar k = 0; k <= HALF; k++) begin : g_prod
    always_comb begin
      logic signed [PW-1:0] acc, term;
      acc = '0;
      for (int t = 0; t < MAX_TERMS; t++) begin
        unique case (CSE_TERMS[k][t].src)
          SRC_X1:  term = x1w <<< (FRAC - int'(CSE_TERMS[k][t].shift));
          SRC_X2:  term = x2s <<< (FRAC - 2 - int'(CSE_TERMS[k][t].shift));
          SRC_X3:  term = x3s <<< (FRAC - 2 - int'(CSE_TERMS[k][t].shift));
          default: term = '0;
        endcase
        if (CSE_TERMS[k][t].neg) acc = acc - term;
        else                     acc = acc + term;
      end
      prod[k] = acc;
    end
  end

endmodule
