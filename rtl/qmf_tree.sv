// qmf_tree: full binary tree of QMF analysis banks.
//
// Stage s (1..STAGES) holds 2^(s-1) qmf_node banks and delivers 2^s subbands, each
// (FS/2)/2^s wide and sampled at FS/2^s. Subband j of stage s-1 feeds node j of stage s;
// node j emits subband 2j (its low band) and 2j+1 (its high band). All banks share the
// same fixed parent coefficients and the same truncation `trim`. Because each high band
// is mirrored by decimation, subband index j is in tree order: its frequency slot is
// the binary-reflected Gray decode of j (see the README).
//
// `active_stages` switches off every stage deeper than the one the current mode reads
// (their inputs see no valid), so unused stages do not toggle. This gating is this
// design's choice.
//
// Interface: in_valid/x at the input rate. stage_valid[s] pulses, one clock wide, when
// all subbands of stage s present a new sample in stage_data[s][0 .. 2^s-1]; entries
// above 2^s-1 are zero. A sample reaches stage s s clocks after the input sample that
// completes it (one register per stage). `clear` empties every bank.
module qmf_tree
  import qmf_pkg::*;
#(
  parameter int STAGES = NUM_STAGES,
  parameter int W      = DATA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic [TRIM_W-1:0]           trim,
  input  logic [$clog2(STAGES+1)-1:0] active_stages,
  input  logic                        in_valid,
  input  logic signed [W-1:0]         x,
  output logic                        stage_valid [1:STAGES],
  output logic signed [W-1:0]         stage_data  [1:STAGES][0:(1<<STAGES)-1]
);

  localparam int NB = 1 << STAGES;

  // sb_*[s]: subbands produced by stage s; level 0 is the tree input
  logic                sb_valid [0:STAGES];
  logic signed [W-1:0] sb_data  [0:STAGES][0:NB-1];

  assign sb_valid[0] = in_valid;
  for (genvar j = 0; j < NB; j++) begin : g_in
    if (j == 0) begin : g_x
      assign sb_data[0][j] = x;
    end else begin : g_zero
      assign sb_data[0][j] = '0;
    end
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    logic stage_in_valid;
    logic node_valid [0:(1<<(s-1))-1];

    assign stage_in_valid = sb_valid[s-1] && (s <= int'(active_stages));
    assign sb_valid[s]    = node_valid[0];

    for (genvar j = 0; j < (1 << (s - 1)); j++) begin : g_node
      qmf_node #(.W(W)) u_node (
        .clk       (clk),
        .rst_n     (rst_n),
        .clear     (clear),
        .trim      (trim),
        .in_valid  (stage_in_valid),
        .x         (sb_data[s-1][j]),
        .out_valid (node_valid[j]),
        .lo        (sb_data[s][2*j]),
        .hi        (sb_data[s][2*j+1])
      );
    end
    for (genvar j = (1 << s); j < NB; j++) begin : g_unused
      assign sb_data[s][j] = '0;
    end

    assign stage_valid[s] = sb_valid[s];
    for (genvar j = 0; j < NB; j++) begin : g_out
      assign stage_data[s][j] = sb_data[s][j];
    end
  end

endmodule
