// tb_channel_tone: channel-extraction workload on the full-size channelizer. For several
// GSM channels (200 kHz spacing, stage 6) and PDC channels (25 kHz spacing, stage 9)
// a 12-bit tone is placed at the channel centre, (f + 1/2) * spacing, and the energy of
// every output slot is summed after the tree has settled. The strongest slot must be the
// tree-order index of channel f, the Gray code f ^ (f >> 1), and it must hold most of
// the energy of its two neighbours in frequency.
module tb_channel_tone;
  import qmf_pkg::*;

  localparam int S  = NUM_STAGES;
  localparam int NB = 1 << S;
  localparam real PI = 3.14159265358979323846;

  logic                      clk = 0, rst_n = 0, cfg_we = 0, adc_valid = 0;
  mode_e                     cfg_mode = MODE_GSM;
  mode_e                     mode;
  logic signed [ADC_W-1:0]   adc_data = '0;
  logic                      ch_valid;
  logic [S:0]                ch_count;
  logic signed [DATA_W-1:0]  ch_data [0:NB-1];

  int checks = 0, failures = 0, cycles = 0;

  qmf_channelizer dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_mode(cfg_mode), .mode(mode),
    .adc_valid(adc_valid), .adc_data(adc_data),
    .ch_valid(ch_valid), .ch_count(ch_count), .ch_data(ch_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_mode(mode_e m);
    @(negedge clk);
    cfg_we = 1;
    cfg_mode = m;
    @(negedge clk);
    cfg_we = 0;
    @(negedge clk);
  endtask

  // tone at the centre of channel f; `frames` frames measured after `skip` frames
  task automatic tone_test(mode_e m, int f, int skip, int frames);
    int stage, nch, frame, best, slot, lo_slot, hi_slot;
    real w, energy [0:NB-1], nb_energy;
    set_mode(m);
    stage = (m == MODE_PDC) ? PDC_STAGE : GSM_STAGE;
    nch = 1 << stage;
    w = PI * (real'(f) + 0.5) / real'(nch);   // radians per input sample
    for (int j = 0; j < NB; j++) energy[j] = 0.0;
    frame = 0;
    for (int n = 0; frame < skip + frames; n++) begin
      adc_valid = 1;
      adc_data = ADC_W'($rtoi(1800.0 * $cos(w * real'(n))));
      @(negedge clk);
      if (ch_valid) begin
        if (frame >= skip)
          for (int j = 0; j < nch; j++) energy[j] += real'(ch_data[j]) * real'(ch_data[j]);
        frame++;
      end
    end
    adc_valid = 0;
    best = 0;
    for (int j = 1; j < nch; j++) if (energy[j] > energy[best]) best = j;
    slot = f ^ (f >> 1);
    lo_slot = (f > 0) ? ((f - 1) ^ ((f - 1) >> 1)) : slot;
    hi_slot = (f < nch - 1) ? ((f + 1) ^ ((f + 1) >> 1)) : slot;
    nb_energy = ((lo_slot != slot) ? energy[lo_slot] : 0.0) + ((hi_slot != slot) ? energy[hi_slot] : 0.0);
    $display("%s channel %0d: strongest slot %0d (expected %0d), energy %0.3g, neighbours %0.3g",
             (m == MODE_PDC) ? "PDC" : "GSM", f, best, slot, energy[slot], nb_energy);
    checks++;
    if (best != slot) begin
      failures++;
      $display("FAIL tone in channel %0d peaks in slot %0d", f, best);
    end
    checks++;
    if (!(energy[slot] > nb_energy)) begin
      failures++;
      $display("FAIL channel %0d does not dominate its neighbours", f);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    tone_test(MODE_GSM, 5, 8, 16);
    tone_test(MODE_GSM, 37, 8, 16);
    tone_test(MODE_GSM, 62, 8, 16);
    tone_test(MODE_PDC, 100, 6, 10);
    tone_test(MODE_PDC, 301, 6, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
