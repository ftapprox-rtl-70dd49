// ftapprox_adder: the 8-bit addition step of an FTApprox operation.
//
// Each operand is an 8-bit data part whose low block sits at block position
// pos (0..6). The operand at the lower position is shifted right by four bits
// per block of difference, dropping what falls off (no rounding here), and
// the two are added by one 8-bit adder. The 9-bit sum sits at the higher
// position; a carry out in bit 8 is left to the normaliser, which moves the
// result up one block. An accurate adder is used; any 8-bit approximate
// adder could replace it. Alignment by whole blocks follows the format's
// worked addition; dropping shifted-out bits without rounding is read from
// that example. Purely combinational.
module ftapprox_adder
  import ftapprox_pkg::*;
(
  input  logic [DATA_W-1:0] data_a,
  input  logic [2:0]        pos_a,
  input  logic [DATA_W-1:0] data_b,
  input  logic [2:0]        pos_b,
  output logic [DATA_W:0]   sum,      // 9 bits, bit 8 the carry out
  output logic [2:0]        pos       // block position of sum[3:0]
);

  logic [DATA_W-1:0] greater, lesser, aligned;
  logic [2:0]        diff;

  always_comb begin
    if (pos_a >= pos_b) begin
      greater   = data_a;
      lesser = data_b;
      pos   = pos_a;
      diff  = pos_a - pos_b;
    end else begin
      greater   = data_b;
      lesser = data_a;
      pos   = pos_b;
      diff  = pos_b - pos_a;
    end
    unique case (diff)
      3'd0:    aligned = lesser;
      3'd1:    aligned = lesser >> BLK_W;
      default: aligned = '0;
    endcase
    sum = {1'b0, greater} + {1'b0, aligned};
  end

endmodule
