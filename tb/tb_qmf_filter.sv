// tb_qmf_filter: checks the reconfigurable dual-output parent filter sample by sample
// against the reference model, for every truncation (9, 7, 5, 3 and 1 taps), with
// random gaps between input samples, a clear before each length, and full-scale input
// that drives the outputs into saturation. Also checks the one-clock output latency.
module tb_qmf_filter;
  import qmf_pkg::*;
  import qmf_ref_pkg::*;

  localparam int W = DATA_W;

  logic                clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [TRIM_W-1:0]   trim = '0;
  logic signed [W-1:0] x = '0;
  logic                out_valid;
  logic signed [W-1:0] y0, y1;

  int checks = 0, failures = 0, sat_events = 0, cycles = 0;

  qmf_filter #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .trim(trim), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y0(y0), .y1(y1)
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

  // run `n` samples at truncation t; big=1 uses full-scale input
  task automatic run_phase(int t, int n, bit big);
    longint hist[$];
    longint lo, hi;
    bit s, prev_v;
    int accepted;
    // clear with the new length applied
    @(negedge clk);
    trim = TRIM_W'(t);
    clear = 1;
    in_valid = 1;           // ignored while clear is high
    x = W'(12345);
    @(negedge clk);
    clear = 0;
    expect_eq("valid after clear", longint'(out_valid), 0);
    hist = {};
    prev_v = 0;
    accepted = 0;
    while (accepted < n || prev_v) begin
      // outputs of the sample accepted at the last edge
      expect_eq("out_valid", longint'(out_valid), longint'(prev_v));
      if (prev_v) begin
        qmf_at(hist, hist.size() - 1, t, W, lo, hi, s);
        if (s) sat_events++;
        expect_eq("y0", longint'(y0), lo);
        expect_eq("y1", longint'(y1), hi);
      end
      in_valid = (accepted < n) && ($urandom_range(0, 3) != 0);
      if (big) x = ($urandom_range(0, 1) != 0) ? W'((1 << (W - 1)) - 1 - $urandom_range(0, 20))
                                               : W'(-(1 << (W - 1)) + $urandom_range(0, 20));
      else     x = W'($urandom);
      if (big && accepted < 12) x = W'((1 << (W - 1)) - 1);  // constant full scale: DC gain > 1
      prev_v = in_valid;
      if (in_valid) begin
        hist.push_back(longint'(x));
        accepted++;
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_phase(0, 400, 0);
    run_phase(2, 400, 0);
    run_phase(1, 200, 0);
    run_phase(3, 200, 0);
    run_phase(4, 100, 0);
    run_phase(0, 200, 1);
    run_phase(2, 200, 1);
    checks++;
    if (sat_events == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturation events: %0d", sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
