// tb_qmf_tree: checks a 4-stage QMF tree against the reference tree model. Every
// subband of every stage is compared on every output pulse, unused entries must be
// zero, each stage's output must come exactly s clocks after the input sample that
// completes it, and the valid pulses per stage must equal (accepted samples)/2^s.
// A second pass clears the tree, switches to the truncated filter and switches off the
// last stage, which must then stay silent.
module tb_qmf_tree;
  import qmf_pkg::*;
  import qmf_ref_pkg::*;

  localparam int S  = 4;
  localparam int W  = DATA_W;
  localparam int NB = 1 << S;

  logic                clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [TRIM_W-1:0]   trim = '0;
  logic [$clog2(S+1)-1:0] active = '0;
  logic signed [W-1:0] x = '0;
  logic                stage_valid [1:S];
  logic signed [W-1:0] stage_data  [1:S][0:NB-1];

  int checks = 0, failures = 0, cycles = 0;
  int gated_silent = 0;

  qmf_tree #(.STAGES(S), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .trim(trim), .active_stages(active),
    .in_valid(in_valid), .x(x), .stage_valid(stage_valid), .stage_data(stage_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
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

  task automatic run_phase(int t, int act, int n);
    longint hist[$];
    longint sb [0:S][0:NB-1][$];
    int accept_cycle[$];
    int outs [1:S];
    int accepted;
    @(negedge clk);
    trim = TRIM_W'(t);
    active = ($clog2(S+1))'(act);
    clear = 1;
    @(negedge clk);
    clear = 0;
    // stimulus, known up front so the reference can be built first
    for (int i = 0; i < n; i++) hist.push_back(longint'($signed(12'($urandom))));
    sb[0][0] = hist;
    for (int s = 1; s <= S; s++)
      for (int j = 0; j < (1 << (s - 1)); j++)
        analysis(sb[s-1][j], t, W, sb[s][2*j], sb[s][2*j+1]);
    for (int s = 1; s <= S; s++) outs[s] = 0;
    accepted = 0;
    for (int c = 0; c < 4 * n + 50; c++) begin
      // outputs present now (after the last edge)
      for (int s = 1; s <= S; s++) begin
        if (stage_valid[s]) begin
          int idx;
          idx = outs[s] * (1 << s);  // input index completing this output
          if (s > act) expect_eq("gated stage silent", 1, 0);
          else begin
            expect_eq($sformatf("latency stage %0d", s), cycles - accept_cycle[idx], s);
            for (int j = 0; j < NB; j++)
              expect_eq($sformatf("stage %0d band %0d out %0d", s, j, outs[s]),
                        longint'(stage_data[s][j]),
                        (j < (1 << s)) ? sb[s][j][outs[s]] : 0);
          end
          outs[s]++;
        end
      end
      in_valid = (accepted < n) && ($urandom_range(0, 3) != 0);
      x = in_valid ? W'(hist[accepted]) : W'($urandom);
      @(posedge clk);
      if (in_valid) begin
        accept_cycle.push_back(cycles);
        accepted++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    for (int s = 1; s <= S; s++)
      expect_eq($sformatf("stage %0d output count", s), outs[s],
                (s <= act) ? (n + (1 << s) - 1) / (1 << s) : 0);
    if (act < S && outs[S] == 0) gated_silent++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_phase(0, S, 16 * 12);
    run_phase(2, S - 1, 8 * 10 + 3);
    run_phase(0, S, 16 * 5);
    checks++;
    if (gated_silent == 0) begin
      failures++;
      $display("FAIL stage gating never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
