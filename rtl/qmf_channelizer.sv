// qmf_channelizer: reconfigurable dual-mode (GSM/PDC) channelizer built on a QMF tree.
//
// A wideband IF signal, sampled at FS = 25.6 MHz (12.8 MHz band), is split by a full
// binary tree of two-channel QMF analysis banks (qmf_tree). Every bank uses one fixed
// parent low-pass filter, realised without multipliers from shared common
// subexpressions; the high band reuses the same coefficients with alternating signs.
// Reconfiguration happens at two levels, both driven by mode_control:
//   * architecture level: channels are read from the stage whose subband width equals
//     the channel spacing (GSM 200 kHz: stage 6, 64 channels at 400 kHz; PDC 25 kHz:
//     stage 9, 512 channels at 50 kHz), selected by stage_select;
//   * filter level: PDC uses the whole parent filter, GSM the centrally truncated one.
// Sample-rate conversion and baseband processing that follow the channelizer, and the
// RF front end and ADC before it, are outside this module.
//
// Interface:
//   adc_valid/adc_data - one signed ADC_W-bit IF sample per valid cycle (every cycle at
//                        full rate; the clock then runs at FS).
//   cfg_we/cfg_mode    - write a new mode; a change flushes the tree (one clock).
//   mode               - current mode.
//   ch_valid           - one-clock pulse per output frame (every 2^stage input samples).
//   ch_count           - channels in the frame (64 or 512).
//   ch_data[j]         - channel j in tree order, DATA_W bits; entries >= ch_count are 0.
// Timing: the frame completed by input sample n (n a multiple of 2^stage) appears
// stage + 1 clocks after that sample is accepted (7 clocks in GSM, 10 in PDC).
module qmf_channelizer
  import qmf_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  mode_e                     cfg_mode,
  output mode_e                     mode,
  input  logic                      adc_valid,
  input  logic signed [ADC_W-1:0]   adc_data,
  output logic                      ch_valid,
  output logic [NUM_STAGES:0]       ch_count,
  output logic signed [DATA_W-1:0]  ch_data [0:(1<<NUM_STAGES)-1]
);

  localparam int NB = 1 << NUM_STAGES;

  logic [STAGE_W-1:0]  sel_stage, active_stages;
  logic [TRIM_W-1:0]   trim;
  logic                clear;
  logic signed [DATA_W-1:0] x;
  logic                stage_valid [1:NUM_STAGES];
  logic signed [DATA_W-1:0] stage_data [1:NUM_STAGES][0:NB-1];

  // Both channel spacings must be power-of-two fractions of FS/2, 2^s = (FS/2)/spacing,
  // so the coarser spacing is an even multiple of the finer one.
  initial begin
    assert (GSM_SPACING_HZ % PDC_SPACING_HZ == 0 && (GSM_SPACING_HZ / PDC_SPACING_HZ) % 2 == 0)
      else $error("GSM spacing is not an even multiple of the PDC spacing");
    assert ((64'd1 << GSM_STAGE) * GSM_SPACING_HZ == FS_HZ / 2)
      else $error("GSM spacing is not (FS/2)/2^s");
    assert ((64'd1 << PDC_STAGE) * PDC_SPACING_HZ == FS_HZ / 2)
      else $error("PDC spacing is not (FS/2)/2^s");
  end

  mode_control u_mode (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_we        (cfg_we),
    .cfg_mode      (cfg_mode),
    .mode          (mode),
    .sel_stage     (sel_stage),
    .active_stages (active_stages),
    .trim          (trim),
    .clear         (clear)
  );

  // sign-extend the ADC word into the tree word; the extra bits absorb the filter gain
  assign x = DATA_W'(adc_data);

  qmf_tree #(.STAGES(NUM_STAGES), .W(DATA_W)) u_tree (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (clear),
    .trim          (trim),
    .active_stages (active_stages),
    .in_valid      (adc_valid),
    .x             (x),
    .stage_valid   (stage_valid),
    .stage_data    (stage_data)
  );

  stage_select #(.STAGES(NUM_STAGES), .W(DATA_W)) u_select (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .sel_stage   (sel_stage),
    .stage_valid (stage_valid),
    .stage_data  (stage_data),
    .ch_valid    (ch_valid),
    .ch_count    (ch_count),
    .ch_data     (ch_data)
  );

endmodule
