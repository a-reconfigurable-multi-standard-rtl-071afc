// qmf_filter: reconfigurable-length parent filter giving both QMF subbands.
//
// Implements y0(n) = sum h(k) x(n-k) (low band, H0) and y1(n) = sum (-1)^k h(k) x(n-k)
// (high band, H1) with one fixed coefficient set. The products x*h(k) come from the
// shared shift-and-add block (cse_multiplier_block). The structure is the transposed
// direct form, split into two accumulation chains: one collects the even-index taps
// (E), the other the odd-index taps (O). Then y0 = E + O and y1 = E - O, so the high-pass
// filter costs no multiplier and no second coefficient set.
//
// Length reconfiguration: `trim` taps are removed from each end of the parent filter,
// leaving the central PARENT_LEN - 2*trim coefficients (trim = 0: 9 taps, trim = 2:
// 5 taps). Products outside the kept window are gated to zero at the chain inputs, and
// the output is tapped from chain register trim+1, so the same adders and registers serve
// every length. The first kept tap becomes tap 0 of the truncated filter, so for an odd
// trim the sign pattern of y1 is flipped. After trim changes the chain holds samples
// of the old length for PARENT_LEN-1 inputs; the mode controller clears it instead.
//
// Output: each sum is rounded to nearest (half up) from FRAC fractional bits and
// saturated to W bits; the rounding and saturation are this design's choice.
//
// Interface: in_valid/x accept one sample per valid cycle. out_valid/y0/y1 are
// registered and follow the accepted sample by one clock. `clear` (synchronous) empties
// the delay chain as if all earlier inputs were zero. Reset is active low, asynchronous.
module qmf_filter
  import qmf_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic [TRIM_W-1:0]     trim,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   x,
  output logic                  out_valid,
  output logic signed [W-1:0]   y0,
  output logic signed [W-1:0]   y1
);

  localparam int N  = PARENT_LEN;
  localparam int PW = W + FRAC;
  localparam int AW = W + FRAC + 2;

  logic signed [PW-1:0] prod [0:HALF];

  cse_multiplier_block #(.W(W)) u_mult (
    .x    (x),
    .prod (prod)
  );

  // product of every tap, gated to zero outside the kept window
  logic signed [AW-1:0] tap_e [0:N-1];  // even-index taps (zero for odd k)
  logic signed [AW-1:0] tap_o [0:N-1];  // odd-index taps (zero for even k)

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam int M = (k <= HALF) ? k : N - 1 - k;  // symmetric partner
    logic in_window;
    assign in_window = (k >= int'(trim)) && (k <= N - 1 - int'(trim));
    if (k % 2 == 0) begin : g_even
      assign tap_e[k] = in_window ? AW'(prod[M]) : '0;
      assign tap_o[k] = '0;
    end else begin : g_odd
      assign tap_e[k] = '0;
      assign tap_o[k] = in_window ? AW'(prod[M]) : '0;
    end
  end

  // transposed-form state: r(k) = tap(k)*x(n) + r(k+1) delayed; r(N) = 0
  logic signed [AW-1:0] r_e [1:N-1];
  logic signed [AW-1:0] r_o [1:N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < N; k++) begin
        r_e[k] <= '0;
        r_o[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 1; k < N; k++) begin
        r_e[k] <= '0;
        r_o[k] <= '0;
      end
    end else if (in_valid) begin
      for (int k = 1; k < N - 1; k++) begin
        r_e[k] <= tap_e[k] + r_e[k+1];
        r_o[k] <= tap_o[k] + r_o[k+1];
      end
      r_e[N-1] <= tap_e[N-1];
      r_o[N-1] <= tap_o[N-1];
    end
  end

  // output tap: sum at position `trim` of each chain
  logic signed [AW-1:0] sum_e, sum_o, lo, hi;

  logic signed [AW-1:0] first_e, first_o, rest_e, rest_o;

  always_comb begin
    first_e = '0;
    first_o = '0;
    rest_e  = '0;
    rest_o  = '0;
    for (int k = 0; k <= HALF; k++) begin
      if (int'(trim) == k) begin
        first_e = tap_e[k];
        first_o = tap_o[k];
        rest_e  = r_e[k+1];
        rest_o  = r_o[k+1];
      end
    end
    sum_e = first_e + rest_e;
    sum_o = first_o + rest_o;
    lo = sum_e + sum_o;
    hi = trim[0] ? (sum_o - sum_e) : (sum_e - sum_o);
  end

  // round half up from FRAC fractional bits, then saturate to W bits
  function automatic logic signed [W-1:0] round_sat(logic signed [AW-1:0] v);
    logic signed [AW-1:0] r;
    logic signed [AW-1:0] maxv, minv;
    r    = (v + (AW'(1) <<< (FRAC - 1))) >>> FRAC;
    maxv = AW'((longint'(1) <<< (W - 1)) - 1);
    minv = -(AW'(1) <<< (W - 1));
    if (r > maxv)      return maxv[W-1:0];
    else if (r < minv) return minv[W-1:0];
    else               return r[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y0        <= '0;
      y1        <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (in_valid && !clear) begin
        y0 <= round_sat(lo);
        y1 <= round_sat(hi);
      end
    end
  end

endmodule
