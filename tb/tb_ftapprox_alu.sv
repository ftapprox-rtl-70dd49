// tb_ftapprox_alu: the worked addition example with its flipped control bit,
// then random additions and multiplications on encoded operands with
// injected storage faults: none, one or two control flips, one data or
// parity flip, and two data flips (which parity cannot see).
module tb_ftapprox_alu;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  logic       clk = 1'b0;
  ftapprox_t  a, b, res;
  op_e        op;
  logic [2:0] res_msvb;
  logic       pe_a, pe_b, co_a, co_b, un_a, un_b, err, ovf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ftapprox_alu dut (
    .a(a), .b(b), .op(op), .result(res), .res_msvb(res_msvb),
    .parity_err_a(pe_a), .parity_err_b(pe_b), .corrected_a(co_a), .corrected_b(co_b),
    .uncorrectable_a(un_a), .uncorrectable_b(un_b), .err_detect(err), .overflow(ovf)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flip bits of a stored word; kind: 0 none, 1 one control bit, 2 two
  // control bits, 3 one data bit, 4 parity bit, 5 two data bits.
  function automatic logic [15:0] inject(input logic [15:0] w, input int kind);
    int i, j;
    i = $urandom % 7;
    j = (i + 1 + $urandom % 6) % 7;
    case (kind)
      1: w[8+i] = ~w[8+i];
      2: begin w[8+i] = ~w[8+i]; w[8+j] = ~w[8+j]; end
      3: w[i] = ~w[i];
      4: w[15] = ~w[15];
      5: begin i = $urandom % 8; j = (i + 1 + $urandom % 7) % 8; w[i] = ~w[i]; w[j] = ~w[j]; end
      default: ;
    endcase
    return w;
  endfunction

  initial begin
    // Worked example: A' has its control bit 12 flipped (1001011 -> 1011011)
    a = 16'b1_1011011_10100001;
    b = 16'b0_1010101_00100111;
    op = OP_ADD;
    #1;
    checks++;
    if (res !== 16'b1_1010101_00110001 || !co_a || co_b || err) begin
      failures++; $display("FAIL worked example res=%04h", res);
    end

    for (int i = 0; i < 20000; i++) begin
      logic [15:0] wa, wb;
      int ka, kb, ea, eb;
      logic [7:0] da, db;
      longint unsigned r;
      logic exp_err;
      wa = ref_encode(64'(rand_value()));
      wb = ref_encode(64'(rand_value()));
      ka = ($urandom % 3 == 0) ? $urandom % 6 : 0;
      kb = ($urandom % 3 == 0) ? $urandom % 6 : 0;
      a  = inject(wa, ka);
      b  = inject(wb, kb);
      op = op_e'($urandom % 2);
      #1;
      exp_err = (ka inside {2, 3, 4}) || (kb inside {2, 3, 4});
      checks++;
      if (err != exp_err || co_a != (ka == 1) || co_b != (kb == 1)) begin
        failures++;
        $display("FAIL flags ka=%0d kb=%0d err=%0d co=%0d%0d", ka, kb, err, co_a, co_b);
      end
      if (!exp_err) begin
        // control signals are recovered; data is as loaded (two data flips
        // pass unseen and are computed with)
        ea = int'(wa[14:12]); eb = int'(wb[14:12]);
        da = a.data; db = b.data;
        r = (op == OP_ADD) ? ref_add(da, ea, db, eb) : ref_mul(da, ea, db, eb);
        checks++;
        if (res !== ref_encode(r) || ovf != (r >= 64'h1_0000_0000) || res_msvb != res[14:12]) begin
          failures++;
          $display("FAIL op=%0d a=%04h b=%04h res=%04h exp=%04h", op, a, b, res, ref_encode(r));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
