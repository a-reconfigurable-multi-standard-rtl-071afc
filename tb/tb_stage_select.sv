// tb_stage_select: drives random stage outputs of a 4-stage tree and checks that the
// block registers exactly the selected stage's subbands one clock later, holds them
// between pulses, reports 2^stage channels, and drops a pulse that coincides with clear.
module tb_stage_select;
  import qmf_pkg::*;

  localparam int S  = 4;
  localparam int W  = DATA_W;
  localparam int NB = 1 << S;

  logic                   clk = 0, rst_n = 0, clear = 0;
  logic [$clog2(S+1)-1:0] sel = 1;
  logic                   stage_valid [1:S];
  logic signed [W-1:0]    stage_data  [1:S][0:NB-1];
  logic                   ch_valid;
  logic [S:0]             ch_count;
  logic signed [W-1:0]    ch_data [0:NB-1];

  int checks = 0, failures = 0, cycles = 0, drops = 0, pulses = 0;

  stage_select #(.STAGES(S), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .sel_stage(sel), .stage_valid(stage_valid),
    .stage_data(stage_data), .ch_valid(ch_valid), .ch_count(ch_count), .ch_data(ch_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
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

  longint held [0:NB-1];

  initial begin
    bit exp_v;
    for (int s = 1; s <= S; s++) begin
      stage_valid[s] = 0;
      for (int j = 0; j < NB; j++) stage_data[s][j] = '0;
    end
    for (int j = 0; j < NB; j++) held[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      sel = ($clog2(S+1))'($urandom_range(1, S));
      clear = ($urandom_range(0, 15) == 0);
      for (int s = 1; s <= S; s++) begin
        stage_valid[s] = ($urandom_range(0, 2) == 0);
        for (int j = 0; j < NB; j++) stage_data[s][j] = (j < (1 << s)) ? W'($urandom) : '0;
      end
      exp_v = stage_valid[sel] && !clear;
      if (stage_valid[sel] && clear) drops++;
      if (exp_v) begin
        pulses++;
        for (int j = 0; j < NB; j++) held[j] = longint'(stage_data[sel][j]);
      end
      #1 expect_eq("ch_count", ch_count, 1 << sel);
      @(negedge clk);
      expect_eq("ch_valid", ch_valid, exp_v);
      for (int j = 0; j < NB; j++) expect_eq("ch_data", longint'(ch_data[j]), held[j]);
      for (int s = 1; s <= S; s++) stage_valid[s] = 0;
    end
    expect_eq("pulses dropped on clear seen", longint'(drops > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
