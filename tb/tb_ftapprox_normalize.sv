// tb_ftapprox_normalize: random mantissas at every block position 0..12; the
// word must equal the reference encoding of mantissa * 16**pos (saturated
// above 32 bits) and overflow must mark exactly the values of 2**32 and up.
module tb_ftapprox_normalize;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] m;
  logic [3:0]  pos;
  ftapprox_t   word;
  logic [2:0]  msvb;
  logic        ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  always #5 clk = ~clk;

  ftapprox_normalize dut (.m(m), .pos(pos), .word(word), .msvb(msvb), .overflow(ovf));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint unsigned v;
      logic [15:0] mm;
      int p;
      mm = 16'($urandom) >> ($urandom % 16);
      p  = $urandom % 13;
      m = mm; pos = 4'(p);
      #1;
      v = longint'(mm) << (4 * p);
      checks++;
      if (word !== ref_encode(v) || ovf != (v >= 64'h1_0000_0000)) begin
        failures++;
        $display("FAIL m=%04h pos=%0d word=%04h exp=%04h ovf=%0d", mm, p, word, ref_encode(v), ovf);
      end
      if (ovf) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
