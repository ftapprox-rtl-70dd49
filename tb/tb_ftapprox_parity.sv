// tb_ftapprox_parity: exhaustive check of the parity module over all 256 data
// parts and both stored parity values, against a bit-counting model.
module tb_ftapprox_parity;
  import ftapprox_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] data;
  logic       stored;
  logic       parity, perr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftapprox_parity dut (.data(data), .stored_parity(stored), .parity(parity), .parity_err(perr));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      for (int s = 0; s < 2; s++) begin
        logic exp_p;
        data   = 8'(d);
        stored = 1'(s);
        #1;
        exp_p = ($countones(d) % 2) == 1;
        checks++;
        if (parity !== exp_p || perr !== (exp_p != 1'(s))) begin
          failures++;
          $display("FAIL data=%02h stored=%0d parity=%0d err=%0d", d, s, parity, perr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
