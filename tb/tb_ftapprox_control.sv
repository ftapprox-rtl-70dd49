// tb_ftapprox_control: all 128 possible control signals against a brute-force
// nearest-codeword model, then every legal codeword with every single and
// every double bit flip: singles must be corrected, doubles detected.
module tb_ftapprox_control;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  logic       clk = 1'b0;
  logic [6:0] ctrl, fixed;
  logic [2:0] order, min_dist;
  logic       corr, unc;
  int checks = 0, failures = 0;
  int n_corr = 0, n_det = 0;

  always #5 clk = ~clk;

  ftapprox_control dut (.ctrl(ctrl), .order(order), .ctrl_fixed(fixed),
                        .min_dist(min_dist), .corrected(corr), .uncorrectable(unc));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [6:0] c);
    int dm, idx;
    ctrl = c;
    #1;
    idx = ref_nearest(c, dm);
    checks++;
    if (int'(min_dist) != dm) begin
      failures++; $display("FAIL %07b min_dist %0d exp %0d", c, min_dist, dm);
    end
    checks++;
    if (idx < 0) begin
      if (!unc || corr) begin
        failures++; $display("FAIL %07b tie not flagged", c);
      end
    end else begin
      if (unc || int'(order) != idx || fixed != CODES[idx] || corr != (dm != 0)) begin
        failures++;
        $display("FAIL %07b order %0d exp %0d unc %0d corr %0d", c, order, idx, unc, corr);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 128; c++) check_one(7'(c));
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 7; i++) begin
        ctrl = CODES[k] ^ (7'd1 << i);
        #1;
        checks++;
        if (!corr || unc || int'(order) != k) failures++; else n_corr++;
        for (int j = i + 1; j < 7; j++) begin
          ctrl = CODES[k] ^ (7'd1 << i) ^ (7'd1 << j);
          #1;
          checks++;
          if (!unc) failures++; else n_det++;
        end
      end
    end
    $display("single flips corrected: %0d/56, double flips detected: %0d/168", n_corr, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
