// tb_ftapprox_decoder: expands clean words, words with one flipped control
// bit (expected to be corrected) and words with a flipped data bit or two
// flipped control bits (expected to be flagged), against the reference.
module tb_ftapprox_decoder;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  logic        clk = 1'b0;
  ftapprox_t   word;
  logic [31:0] value;
  logic [2:0]  order;
  logic        corr, err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftapprox_decoder dut (.word(word), .value(value), .order(order),
                        .corrected(corr), .err_detect(err));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // value of the worked addition result: 0011 0001 at MSVB 5 = 3211264
    word = 16'b1_1010101_00110001;
    #1;
    checks++;
    if (value !== 32'd3211264 || err || corr) begin
      failures++; $display("FAIL example value=%0d", value);
    end
    for (int i = 0; i < 10000; i++) begin
      logic [7:0] d;
      int e, kind, b1, b2;
      d = 8'($urandom);
      e = $urandom % 8;
      word = {^d, CODES[e], d};
      kind = $urandom % 4;
      b1 = $urandom % 7;
      b2 = (b1 + 1 + $urandom % 6) % 7;
      if (kind == 1) word.ctrl[b1] = ~word.ctrl[b1];
      if (kind == 2) begin
        word.ctrl[b1] = ~word.ctrl[b1];
        word.ctrl[b2] = ~word.ctrl[b2];
      end
      if (kind == 3) word.data[b1] = ~word.data[b1];
      #1;
      checks++;
      case (kind)
        0: if (err || corr || value !== 32'(ref_value(d, e))) failures++;
        1: if (err || !corr || value !== 32'(ref_value(d, e))) failures++;
        default: if (!err) failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
