// tb_ftapprox_multiplier: exhaustive 8x8 products with random positions.
module tb_ftapprox_multiplier;
  import ftapprox_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  da, db;
  logic [2:0]  pa, pb;
  logic [15:0] prod;
  logic [3:0]  pos;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftapprox_multiplier dut (.data_a(da), .pos_a(pa), .data_b(db), .pos_b(pb), .prod(prod), .pos(pos));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        int p_a, p_b;
        p_a = $urandom % 7;
        p_b = $urandom % 7;
        da = 8'(a); db = 8'(b); pa = 3'(p_a); pb = 3'(p_b);
        #1;
        checks++;
        if (int'(prod) != a * b || int'(pos) != p_a + p_b) begin
          failures++;
          $display("FAIL %0d*%0d = %0d pos %0d", a, b, prod, pos);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
