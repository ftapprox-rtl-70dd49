// ftapprox_pkg: types and constants shared by the FTApprox modules.
//
// An FTApprox word stands for a 32-bit unsigned fixed-point number in 16 bits:
//   bit 15     parity bit (even parity over the data part: XOR of data[7:0])
//   bits 14:8  control signal, a 7-bit codeword whose first three bits (14:12)
//              give the index of the Most Significant Valid Block (MSVB)
//   bits 7:0   data part: the MSVB and the 4-bit block to its right
// The 32-bit number is cut into eight 4-bit blocks, block 7 at the MSB end.
// The eight legal control codewords have a minimum Hamming distance of 4, so
// a loaded control signal with one flipped bit is corrected and one with two
// flipped bits is detected. The layout and the codeword table follow the
// format definition; that the parity is even is read from its worked
// examples, and the zero word encoding (data 0, MSVB 0) is this design's choice.
package ftapprox_pkg;

  localparam int unsigned DATA_W  = 8;   // data part width
  localparam int unsigned CTRL_W  = 7;   // control signal width
  localparam int unsigned VALUE_W = 32;  // width of the number it approximates
  localparam int unsigned BLK_W   = 4;   // bits per block
  localparam int unsigned N_BLK   = 8;   // blocks in a 32-bit number

  typedef struct packed {
    logic                parity;
    logic [CTRL_W-1:0]   ctrl;
    logic [DATA_W-1:0]   data;
  } ftapprox_t;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } op_e;

  // Legal control signal for an MSVB index: the index itself followed by
  // four check bits (Table of legal control signals).
  function automatic logic [CTRL_W-1:0] ctrl_code(input logic [2:0] msvb);
    logic [3:0] chk;
    unique case (msvb)
      3'd0: chk = 4'b0000;
      3'd1: chk = 4'b1110;
      3'd2: chk = 4'b1101;
      3'd3: chk = 4'b0011;
      3'd4: chk = 4'b1011;
      3'd5: chk = 4'b0101;
      3'd6: chk = 4'b0110;
      default: chk = 4'b1000;
    endcase
    return {msvb, chk};
  endfunction

  // Block position of the low block of the data part. The data part holds
  // blocks (msvb, msvb-1), except for MSVB 0, where it holds blocks (1, 0).
  function automatic logic [2:0] blk_pos(input logic [2:0] msvb);
    return (msvb == 3'd0) ? 3'd0 : msvb - 3'd1;
  endfunction

  // Number of ones in a control-signal-wide vector (0..7).
  function automatic logic [2:0] popcount7(input logic [CTRL_W-1:0] v);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < CTRL_W; i++) n = n + 3'(v[i]);
    return n;
  endfunction

endpackage
