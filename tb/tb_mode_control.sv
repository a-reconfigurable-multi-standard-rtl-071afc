// tb_mode_control: checks the reconfiguration controller against a small model: reset
// into GSM, the stage and truncation of each mode (GSM: stage 6, 5-tap filter; PDC:
// stage 9, full 9-tap filter, as required by 2^s = (FS/2)/spacing), a one-clock clear
// on every write that changes the mode and none on writes that do not, and no change
// without a write. Random writes follow a directed sequence.
module tb_mode_control;
  import qmf_pkg::*;

  logic               clk = 0, rst_n = 0, cfg_we = 0;
  mode_e              cfg_mode = MODE_GSM;
  mode_e              mode;
  logic [STAGE_W-1:0] sel_stage, active_stages;
  logic [TRIM_W-1:0]  trim;
  logic               clear;

  int checks = 0, failures = 0, cycles = 0, switches = 0;

  mode_control dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_mode(cfg_mode), .mode(mode),
    .sel_stage(sel_stage), .active_stages(active_stages), .trim(trim), .clear(clear)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
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

  bit m_pdc, m_clear;  // model state

  task automatic check_outputs();
    // channel spacing 200 kHz (GSM) or 25 kHz (PDC) out of a 12.8 MHz band
    expect_eq("mode", longint'(mode == MODE_PDC), longint'(m_pdc));
    expect_eq("sel_stage", sel_stage, m_pdc ? 9 : 6);
    expect_eq("active_stages", active_stages, m_pdc ? 9 : 6);
    expect_eq("trim", trim, m_pdc ? 0 : 2);
    expect_eq("clear", clear, m_clear);
  endtask

  task automatic step(bit we, bit pdc);
    @(negedge clk);
    cfg_we = we;
    cfg_mode = pdc ? MODE_PDC : MODE_GSM;
    @(negedge clk);
    cfg_we = 0;
    m_clear = we && (pdc != m_pdc);
    if (m_clear) switches++;
    if (we) m_pdc = pdc;
    check_outputs();
    @(negedge clk);
    m_clear = 0;
    check_outputs();
  endtask

  initial begin
    m_pdc = 0;
    m_clear = 0;
    repeat (2) @(negedge clk);
    check_outputs();
    rst_n = 1;
    @(negedge clk);
    check_outputs();
    step(1, 1);  // GSM -> PDC
    step(1, 1);  // same mode: no clear
    step(0, 0);  // no write: no change
    step(1, 0);  // PDC -> GSM
    for (int i = 0; i < 200; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    expect_eq("mode switches seen", longint'(switches >= 2), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
