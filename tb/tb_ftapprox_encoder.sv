// tb_ftapprox_encoder: the worked conversion examples of the format, edge
// values and random values against the integer reference encoder.
module tb_ftapprox_encoder;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] value;
  ftapprox_t   word;
  logic [2:0]  msvb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftapprox_encoder dut (.value(value), .word(word), .msvb(msvb));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] v, input logic [15:0] exp);
    value = v;
    #1;
    checks++;
    if (word !== exp) begin
      failures++;
      $display("FAIL value=%08h word=%04h exp=%04h", v, word, exp);
    end
  endtask

  initial begin
    // 0x0026DB19: MSVB block 5, data 0010 0111 after OR truncation,
    // control 101 0101, parity 0
    check(32'h0026_DB19, 16'b0_1010101_00100111);
    // 0x000A1384: MSVB block 4, data 1010 0001, control 100 1011, parity 1
    check(32'h000A_1384, 16'b1_1001011_10100001);
    check(32'h0000_0000, 16'b0_0000000_00000000);
    check(32'h0000_0009, 16'b0_0000000_00001001);  // MSVB block 0
    check(32'h0000_00A5, 16'b0_0011110_10100101);  // MSVB block 1
    check(32'hFFFF_FFFF, 16'b0_1111000_11111111);
    check(32'h8000_0000, 16'b1_1111000_10000000);
    check(32'h0000_0188, 16'b1_0101101_00011001);  // 0x18 with bit 3 ORed in
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] v;
      v = rand_value();
      check(v, ref_encode(64'(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
