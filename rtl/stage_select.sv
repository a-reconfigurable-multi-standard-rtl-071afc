// stage_select: picks the channel outputs from the tree stage of the current mode.
//
// Architecture-level reconfiguration of the channelizer: the same tree serves every
// mode, and only the stage whose subbands are read changes. This block registers the
// subbands of stage sel_stage whenever that stage delivers a sample.
//
// Interface: stage_valid/stage_data from qmf_tree; sel_stage (1..STAGES). ch_valid
// pulses one clock after stage_valid[sel_stage]; ch_data[0 .. 2^sel_stage - 1] then
// holds the channel samples in tree order and the rest are zero; ch_count = 2^sel_stage.
// A sample that leaves the tree in a `clear` cycle (mode change) was filtered for the
// old mode and is dropped.
module stage_select
  import qmf_pkg::*;
#(
  parameter int STAGES = NUM_STAGES,
  parameter int W      = DATA_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic [$clog2(STAGES+1)-1:0] sel_stage,
  input  logic                        stage_valid [1:STAGES],
  input  logic signed [W-1:0]         stage_data  [1:STAGES][0:(1<<STAGES)-1],
  output logic                        ch_valid,
  output logic [STAGES:0]             ch_count,
  output logic signed [W-1:0]         ch_data     [0:(1<<STAGES)-1]
);

  localparam int NB = 1 << STAGES;

  logic                sel_valid;
  logic signed [W-1:0] sel_data [0:NB-1];

  always_comb begin
    sel_valid = 1'b0;
    for (int j = 0; j < NB; j++) sel_data[j] = '0;
    for (int s = 1; s <= STAGES; s++) begin
      if (int'(sel_stage) == s) begin
        sel_valid = stage_valid[s];
        for (int j = 0; j < NB; j++) sel_data[j] = stage_data[s][j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_valid <= 1'b0;
      for (int j = 0; j < NB; j++) ch_data[j] <= '0;
    end else begin
      ch_valid <= sel_valid && !clear;
      if (sel_valid && !clear) begin
        for (int j = 0; j < NB; j++) ch_data[j] <= sel_data[j];
      end
    end
  end

  assign ch_count = (STAGES+1)'(1) << sel_stage;

endmodule
