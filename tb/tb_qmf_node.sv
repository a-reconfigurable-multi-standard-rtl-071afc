// tb_qmf_node: checks one QMF analysis bank (filter plus decimation by two) against the
// reference model: only even-index samples produce an output, one clock after they are
// accepted, with both subbands bit-exact, for the full and the truncated parent filter
// and random gaps between input samples. A clear must restart the decimation phase.
module tb_qmf_node;
  import qmf_pkg::*;
  import qmf_ref_pkg::*;

  localparam int W = DATA_W;

  logic                clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [TRIM_W-1:0]   trim = '0;
  logic signed [W-1:0] x = '0;
  logic                out_valid;
  logic signed [W-1:0] lo, hi;

  int checks = 0, failures = 0, cycles = 0, outputs = 0;

  qmf_node #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .trim(trim), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .lo(lo), .hi(hi)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d expected=%0d (trim=%0d)", what, got, exp, trim);
    end
  endtask

  task automatic run_phase(int t, int n);
    longint hist[$], rlo[$], rhi[$];
    bit prev_v;
    int accepted, outs;
    @(negedge clk);
    trim = TRIM_W'(t);
    clear = 1;
    @(negedge clk);
    clear = 0;
    hist = {};
    prev_v = 0;
    accepted = 0;
    outs = 0;
    while (accepted < n || prev_v) begin
      // sample index hist.size()-1 was accepted at the last edge: output only if even
      expect_eq("out_valid", longint'(out_valid), longint'(prev_v && ((hist.size() - 1) % 2 == 0)));
      if (out_valid) begin
        analysis(hist, t, W, rlo, rhi);
        expect_eq("lo", longint'(lo), rlo[outs]);
        expect_eq("hi", longint'(hi), rhi[outs]);
        outs++;
        outputs++;
      end
      in_valid = (accepted < n) && ($urandom_range(0, 2) != 0);
      x = W'($signed(14'($urandom)));
      prev_v = in_valid;
      if (in_valid) begin
        hist.push_back(longint'(x));
        accepted++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    expect_eq("output count", outs, (n + 1) / 2);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_phase(0, 301);
    run_phase(2, 300);
    run_phase(0, 51);
    $display("outputs checked: %0d", outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
