// ftapprox_normalize: turns a raw arithmetic result back into an FTApprox word.
//
// Input is a 16-bit mantissa m (four blocks) whose low block sits at block
// position pos of the 32-bit number. The leading non-zero block k of m gives
// the new MSVB, pos+k. The mantissa is shifted so that block k is on top; the
// top two blocks become the data part and the next bit is ORed into data
// bit 0, the same truncation as the encoder. An MSVB of 0 keeps blocks 1
// and 0 as the format requires. The control signal comes from the codeword
// table and the parity bit from the parity module.
// A result above 32 bits (MSVB beyond block 7) saturates to data 0xFF at
// MSVB 7 and raises overflow; the format does not define this case, so the
// saturation is this design's choice. Purely combinational.
module ftapprox_normalize
  import ftapprox_pkg::*;
(
  input  logic [2*DATA_W-1:0] m,
  input  logic [3:0]          pos,
  output ftapprox_t           word,
  output logic [2:0]          msvb,
  output logic                overflow
);

  logic [1:0]          k;
  logic [4:0]          e_full;
  logic [2*DATA_W-1:0] m_sh;     // bits 6:0 fall below the kept window
  logic [DATA_W-1:0]   data;
  logic                parity_unused;

  always_comb begin
    k = 2'd0;
    for (int b = 0; b < 4; b++) begin
      if (m[b*BLK_W +: BLK_W] != '0) k = 2'(b);
    end
    e_full   = 5'(pos) + 5'(k);
    m_sh     = m << (BLK_W * (3 - 32'(k)));
    overflow = 1'b0;
    if (m == '0) begin
      msvb = 3'd0;
      data = '0;
    end else if (e_full > 5'd7) begin
      msvb     = 3'd7;
      data     = '1;
      overflow = 1'b1;
    end else if (e_full == 5'd0) begin
      msvb = 3'd0;
      data = {4'b0000, m[3:0]};
    end else begin
      msvb = e_full[2:0];
      data = m_sh[15:8] | {7'b0, m_sh[7]};
    end
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
