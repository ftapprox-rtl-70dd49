// tb_ftapprox_adder: random data parts at random block positions; the sum
// and its position must match integer addition after truncating the lower
// operand to the higher operand's position. Includes the worked example.
module tb_ftapprox_adder;
  import ftapprox_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] da, db;
  logic [2:0] pa, pb, pos;
  logic [8:0] sum;
  int checks = 0, failures = 0, carries = 0;

  always #5 clk = ~clk;

  ftapprox_adder dut (.data_a(da), .pos_a(pa), .data_b(db), .pos_b(pb), .sum(sum), .pos(pos));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] a, input int p_a, input logic [7:0] b, input int p_b);
    longint unsigned va, vb, exp_sum;
    int p;
    da = a; db = b; pa = 3'(p_a); pb = 3'(p_b);
    #1;
    p  = (p_a > p_b) ? p_a : p_b;
    va = longint'(a) << (4 * p_a);
    vb = longint'(b) << (4 * p_b);
    exp_sum = (va >> (4 * p)) + (vb >> (4 * p));
    checks++;
    if (int'(pos) != p || 64'(sum) != exp_sum) begin
      failures++;
      $display("FAIL %02h@%0d + %02h@%0d = %03h@%0d exp %0h@%0d", a, p_a, b, p_b, sum, pos, exp_sum, p);
    end
    if (sum[8]) carries++;
  endtask

  initial begin
    check(8'b1010_0001, 3, 8'b0010_0111, 4);   // expects 0011 0001 at position 4
    check(8'hF0, 2, 8'h20, 2);                 // carry out
    for (int i = 0; i < 20000; i++) check(8'($urandom), $urandom % 7, 8'($urandom), $urandom % 7);
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
