// mode_control: reconfiguration controller of the channelizer.
//
// Holds the current air-interface mode and turns it into the two settings that
// reconfigure the shared hardware:
//   * sel_stage - the tree stage whose subband width equals the mode's channel spacing,
//                 2^s = (FS/2)/spacing (GSM: stage 6, PDC: stage 9);
//   * trim      - taps removed from each end of the parent filter (PDC, which needs the
//                 most attenuation, uses the whole parent filter; GSM a truncated one).
// Deeper stages are not needed, so active_stages equals sel_stage.
// On a write that changes the mode it raises `clear` for one clock, together with the
// new settings, so that no sample filtered with the old length reaches the new mode's
// outputs. The write port and the flush are this design's choice.
//
// Interface: cfg_we/cfg_mode, sampled on the clock edge; outputs are registered and
// change one clock after the write. Reset (active low, asynchronous) selects RESET_MODE.
module mode_control
  import qmf_pkg::*;
#(
  parameter mode_e RESET_MODE = MODE_GSM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cfg_we,
  input  mode_e               cfg_mode,
  output mode_e               mode,
  output logic [STAGE_W-1:0]  sel_stage,
  output logic [STAGE_W-1:0]  active_stages,
  output logic [TRIM_W-1:0]   trim,
  output logic                clear
);

  function automatic logic [STAGE_W-1:0] stage_of(mode_e m);
    return (m == MODE_PDC) ? STAGE_W'(PDC_STAGE) : STAGE_W'(GSM_STAGE);
  endfunction

  function automatic logic [TRIM_W-1:0] trim_of(mode_e m);
    return (m == MODE_PDC) ? TRIM_W'(PDC_TRIM) : TRIM_W'(GSM_TRIM);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= RESET_MODE;
      clear <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (cfg_we && cfg_mode != mode) begin
        mode  <= cfg_mode;
        clear <= 1'b1;
      end
    end
  end

  assign sel_stage     = stage_of(mode);
  assign active_stages = stage_of(mode);
  assign trim          = trim_of(mode);

endmodule
