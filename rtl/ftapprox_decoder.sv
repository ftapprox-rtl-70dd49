// ftapprox_decoder: expands an FTApprox word back to a 32-bit number (the
// load path to full precision).
//
// The control signal is first passed through the control module, so a single
// flipped control bit is corrected, and the data part through the parity
// module. The value is the data part shifted left by four bits per block
// position of its low block: MSVB-1 blocks, or none for MSVB 0. The
// truncated bits come back as zeros. err_detect is raised when the parity
// check fails or the control signal cannot be resolved; value is then not to
// be trusted. The format gives the expansion only by example; the checks on
// this path are this design's choice. Purely combinational.
module ftapprox_decoder
  import ftapprox_pkg::*;
(
  input  ftapprox_t          word,
  output logic [VALUE_W-1:0] value,
  output logic [2:0]         order,
  output logic               corrected,
  output logic               err_detect
);

  logic [CTRL_W-1:0] ctrl_fixed_unused;
  logic [2:0]        min_dist_unused;
  logic              uncorrectable;
  logic              parity_unused;
  logic              parity_err;

  ftapprox_control u_ctrl (
    .ctrl          (word.ctrl),
    .order         (order),
    .ctrl_fixed    (ctrl_fixed_unused),
    .min_dist      (min_dist_unused),
    .corrected     (corrected),
    .uncorrectable (uncorrectable)
  );

  ftapprox_parity u_par (
    .data          (word.data),
    .stored_parity (word.parity),
    .parity        (parity_unused),
    .parity_err    (parity_err)
  );

  always_comb begin
    value      = VALUE_W'(word.data) << (BLK_W * blk_pos(order));
    err_detect = parity_err | uncorrectable;
  end

endmodule
