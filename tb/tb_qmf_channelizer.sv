// tb_qmf_channelizer: end-to-end test of the dual-mode channelizer at its full size
// (9-stage tree, 512 subbands). Random 12-bit IF samples with random gaps are fed
// through four phases: GSM after reset, a switch to PDC, a switch back to GSM, and
// a write of the current mode in the middle of a stream. Every output frame is compared
// with a reference tree (GSM: 5-tap filter, stage 6, 64 channels; PDC: 9-tap filter,
// stage 9, 512 channels); unused channel slots must be zero; each frame must leave
// stage + 1 clocks after the input sample that completes it; frame counts must match.
// Counts each mechanism (mode switch in both directions, flush, same-mode write,
// truncated and full filter frames, gating of the unused deeper stages) and fails if
// one never happened.
module tb_qmf_channelizer;
  import qmf_pkg::*;
  import qmf_ref_pkg::*;

  localparam int S  = NUM_STAGES;
  localparam int NB = 1 << S;

  logic                      clk = 0, rst_n = 0, cfg_we = 0, adc_valid = 0;
  mode_e                     cfg_mode = MODE_GSM;
  mode_e                     mode;
  logic signed [ADC_W-1:0]   adc_data = '0;
  logic                      ch_valid;
  logic [S:0]                ch_count;
  logic signed [DATA_W-1:0]  ch_data [0:NB-1];

  int checks = 0, failures = 0, cycles = 0;
  int n_gsm_to_pdc = 0, n_pdc_to_gsm = 0, n_same_write = 0;
  int n_gsm_frames = 0, n_pdc_frames = 0, n_gated = 0, n_deep_active = 0;

  qmf_channelizer dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_mode(cfg_mode), .mode(mode),
    .adc_valid(adc_valid), .adc_data(adc_data),
    .ch_valid(ch_valid), .ch_count(ch_count), .ch_data(ch_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // the stages below the GSM extraction stage must be idle in GSM mode
  always @(posedge clk) begin
    if (rst_n && mode == MODE_GSM && dut.stage_valid[S]) begin
      failures++;
      $display("FAIL stage %0d active in GSM mode", S);
    end
    if (mode == MODE_PDC && dut.stage_valid[S]) n_deep_active++;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  // write a mode; the sample offered in the following clear cycle is dropped
  task automatic write_mode(mode_e m);
    @(negedge clk);
    cfg_we = 1;
    cfg_mode = m;
    adc_valid = 1;
    adc_data = ADC_W'($urandom);
    @(negedge clk);
    cfg_we = 0;
    adc_data = ADC_W'($urandom);
    @(negedge clk);
    adc_valid = 0;
  endtask

  // stream n samples in the current mode and check every frame
  task automatic run_stream(int n, bit same_write_midway);
    bit pdc, wrote;
    int stage, trim_v, frames, accepted;
    longint hist[$];
    longint sb [0:S][0:NB-1][$];
    int accept_cycle[$];
    pdc    = (mode == MODE_PDC);
    stage  = pdc ? PDC_STAGE : GSM_STAGE;
    trim_v = pdc ? PDC_TRIM : GSM_TRIM;
    for (int i = 0; i < n; i++) hist.push_back(longint'($signed(ADC_W'($urandom))));
    sb[0][0] = hist;
    for (int s = 1; s <= stage; s++)
      for (int j = 0; j < (1 << (s - 1)); j++)
        analysis(sb[s-1][j], trim_v, DATA_W, sb[s][2*j], sb[s][2*j+1]);
    frames = 0;
    accepted = 0;
    wrote = 0;
    for (int c = 0; c < 2 * n + 64; c++) begin
      if (ch_valid) begin
        int idx;
        idx = frames * (1 << stage);
        expect_eq("frame latency", cycles - accept_cycle[idx], stage + 1);
        expect_eq("ch_count", ch_count, 1 << stage);
        for (int j = 0; j < NB; j++)
          expect_eq($sformatf("frame %0d channel %0d", frames, j), longint'(ch_data[j]),
                    (j < (1 << stage)) ? sb[stage][j][frames] : 0);
        frames++;
        if (pdc) n_pdc_frames++;
        else     n_gsm_frames++;
      end
      // a write of the current mode must not disturb the stream
      cfg_we = same_write_midway && !wrote && (accepted >= n / 2);
      cfg_mode = mode;
      if (cfg_we) begin
        wrote = 1;
        n_same_write++;
      end
      adc_valid = (accepted < n) && ($urandom_range(0, 4) != 0);
      adc_data = adc_valid ? ADC_W'(hist[accepted]) : ADC_W'($urandom);
      @(posedge clk);
      if (adc_valid) begin
        accept_cycle.push_back(cycles);
        accepted++;
      end
      @(negedge clk);
    end
    cfg_we = 0;
    adc_valid = 0;
    expect_eq("frames in phase", frames, (n + (1 << stage) - 1) / (1 << stage));
    if (!pdc && frames > 0) n_gated++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("reset mode is GSM", longint'(mode == MODE_GSM), 1);
    run_stream(64 * 6 + 5, 0);
    write_mode(MODE_PDC);
    expect_eq("mode PDC", longint'(mode == MODE_PDC), 1);
    n_gsm_to_pdc++;
    run_stream(512 * 3 + 7, 0);
    write_mode(MODE_GSM);
    expect_eq("mode GSM", longint'(mode == MODE_GSM), 1);
    n_pdc_to_gsm++;
    run_stream(64 * 5, 1);
    $display("GSM->PDC %0d, PDC->GSM %0d, same-mode writes %0d, GSM frames %0d, PDC frames %0d, gated GSM phases %0d, deep-stage pulses in PDC %0d",
             n_gsm_to_pdc, n_pdc_to_gsm, n_same_write, n_gsm_frames, n_pdc_frames, n_gated, n_deep_active);
    expect_eq("GSM->PDC switch happened", longint'(n_gsm_to_pdc > 0), 1);
    expect_eq("PDC->GSM switch happened", longint'(n_pdc_to_gsm > 0), 1);
    expect_eq("same-mode write happened", longint'(n_same_write > 0), 1);
    expect_eq("truncated-filter (GSM) frames", longint'(n_gsm_frames > 0), 1);
    expect_eq("full-filter (PDC) frames", longint'(n_pdc_frames > 0), 1);
    expect_eq("stage gating in GSM", longint'(n_gated > 0), 1);
    expect_eq("deep stage active in PDC", longint'(n_deep_active > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
