// tb_cse_multiplier_block: checks every product of the shift-and-add block against
// x * coefficient, with the coefficients taken from the reference list, for extreme
// and random inputs.
module tb_cse_multiplier_block;
  import qmf_pkg::*;
  import qmf_ref_pkg::*;

  localparam int W = DATA_W;

  logic signed [W-1:0]      x;
  logic signed [W+FRAC-1:0] prod [0:HALF];
  int checks = 0, failures = 0;

  cse_multiplier_block #(.W(W)) dut (.x(x), .prod(prod));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_x(longint v);
    x = W'(v);
    #1;
    for (int k = 0; k <= HALF; k++) begin
      checks++;
      if (longint'(prod[k]) != v * COEF[k]) begin
        failures++;
        $display("FAIL x=%0d k=%0d prod=%0d expected=%0d", v, k, prod[k], v * COEF[k]);
      end
    end
  endtask

  initial begin
    longint maxv, minv;
    maxv = (64'sd1 <<< (W - 1)) - 1;
    minv = -(64'sd1 <<< (W - 1));
    check_x(0);
    check_x(1);
    check_x(-1);
    check_x(maxv);
    check_x(minv);
    for (int i = 0; i < 2000; i++) check_x(longint'($signed(W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
