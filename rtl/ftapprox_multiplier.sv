// ftapprox_multiplier: the 8-bit multiplication step of an FTApprox operation.
//
// The two 8-bit data parts are multiplied by one 8x8 multiplier into a 16-bit
// product; the block positions of the operands add to give the position of
// the product's low block (0..12). The normaliser then keeps the two leading
// blocks. An accurate multiplier is used; any 8-bit approximate multiplier
// could replace it. The format says only that the 8-bit addition is replaced
// by an 8-bit multiplication; adding the positions and passing on the whole
// 16-bit product are this design's reading. Purely combinational.
module ftapprox_multiplier
  import ftapprox_pkg::*;
(
  input  logic [DATA_W-1:0]   data_a,
  input  logic [2:0]          pos_a,
  input  logic [DATA_W-1:0]   data_b,
  input  logic [2:0]          pos_b,
  output logic [2*DATA_W-1:0] prod,
  output logic [3:0]          pos     // block position of prod[3:0]
);

  always_comb begin
    prod = data_a * data_b;
    pos  = 4'(pos_a) + 4'(pos_b);
  end

endmodule
