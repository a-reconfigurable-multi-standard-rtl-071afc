// qmf_node: one two-channel QMF analysis bank of the tree (H0 and H1, each followed by
// decimation by two).
//
// The input stream is filtered by qmf_filter, which forms the low band y0 and the high
// band y1 from the same parent coefficients. Every second filter output is kept: the
// first sample accepted after reset or clear and then every other one (input indices
// 0, 2, 4, ...). Computing all outputs and discarding half, rather than a polyphase
// split, is this design's simple choice; the published scheme specifies only filtering
// followed by decimation.
//
// Interface: in_valid/x, one sample per valid cycle (any cycle spacing). out_valid/lo/hi
// pulse for one clock, one clock after every kept input sample, so the output rate is
// half the input rate. `clear` empties the filter and restarts the decimation phase.
module qmf_node
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
  output logic signed [W-1:0]   lo,
  output logic signed [W-1:0]   hi
);

  logic f_valid;
  logic odd_phase;   // next accepted sample has an odd index (is dropped)
  logic keep_q;      // the filter output now presented belongs to an even index

  qmf_filter #(.W(W)) u_filter (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .trim      (trim),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (f_valid),
    .y0        (lo),
    .y1        (hi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_phase <= 1'b0;
      keep_q    <= 1'b0;
    end else if (clear) begin
      odd_phase <= 1'b0;
      keep_q    <= 1'b0;
    end else if (in_valid) begin
      odd_phase <= !odd_phase;
      keep_q    <= !odd_phase;
    end
  end

  assign out_valid = f_valid && keep_q;

endmodule
