// ftapprox_encoder: converts a 32-bit unsigned fixed-point number into a
// 16-bit FTApprox word (the store path).
//
// The number is cut into eight 4-bit blocks. The Most Significant Valid Block
// (MSVB) is the highest block holding a 1. The data part keeps the MSVB and
// its right neighbour; when the MSVB is block 0 it keeps blocks 1 and 0.
// Everything below is truncated, but the highest truncated bit is ORed into
// bit 0 of the data part to reduce the downward bias of plain truncation.
// The control signal is the legal codeword of the MSVB index and the parity
// bit is the XOR of the data part. A zero input becomes data 0, MSVB 0
// (this design's choice; the format does not single out zero).
// Purely combinational.
module ftapprox_encoder
  import ftapprox_pkg::*;
(
  input  logic [VALUE_W-1:0] value,
  output ftapprox_t          word,
  output logic [2:0]         msvb      // MSVB index, for observation
);

  logic [2:0]         pos;
  logic [VALUE_W+3:0] ext;      // value with a 4-bit zero block below bit 0
  logic [VALUE_W+3:0] shifted;
  logic [11:0]        window;   // kept blocks and the 4 bits below them
  logic [DATA_W-1:0]  data;
  logic               parity_unused;

  always_comb begin
    msvb = 3'd0;
    for (int b = 0; b < N_BLK; b++) begin
      if (value[b*BLK_W +: BLK_W] != '0) msvb = 3'(b);
    end
    pos     = blk_pos(msvb);
    ext     = {value, 4'b0000};
    shifted = ext >> (BLK_W * pos);
    window  = shifted[11:0];
    // window[11:4] are the kept blocks, window[3] the top truncated bit
    data    = window[11:4] | {7'b0, window[3]};
  end

  ftapprox_parity u_par (
    .data          (data),
    .stored_parity (1'b0),
    .parity        (word.parity),
    .parity_err    (parity_unused)
  );

  assign word.ctrl = ctrl_code(msvb);
  assign word.data = data;

endmodule
