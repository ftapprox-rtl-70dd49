// ftapprox_alu: one FTApprox arithmetic operation on two loaded words.
//
// Steps, all combinational:
//   1. parity check of each operand's data part (two parity modules);
//   2. control-signal mapping of each operand (two control modules): one
//      flipped control bit is corrected, two are detected;
//   3. the block position of each data part follows from its MSVB order, and
//      the 8-bit adder or the 8-bit multiplier computes the raw result;
//   4. the normaliser finds the result's MSVB, truncates it to two blocks and
//      attaches its control codeword and parity bit.
// err_detect is raised when either operand fails its parity check or has an
// unresolvable control signal: the result is then not to be used and the
// operands should be reloaded from lower-level storage. corrected reports a
// repaired control bit; overflow a result beyond 32 bits (saturated).
// The op encoding, the flag outputs and saturation are this design's
// choices; the steps follow the runtime process of the format.
module ftapprox_alu
  import ftapprox_pkg::*;
(
  input  ftapprox_t  a,
  input  ftapprox_t  b,
  input  op_e        op,
  output ftapprox_t  result,
  output logic [2:0] res_msvb,
  output logic       parity_err_a,
  output logic       parity_err_b,
  output logic       corrected_a,
  output logic       corrected_b,
  output logic       uncorrectable_a,
  output logic       uncorrectable_b,
  output logic       err_detect,
  output logic       overflow
);

  logic [2:0]          order_a, order_b;
  logic [CTRL_W-1:0]   fixed_a_unused, fixed_b_unused;
  logic [2:0]          dist_a_unused, dist_b_unused;
  logic                par_a_unused, par_b_unused;
  logic [DATA_W:0]     sum;
  logic [2:0]          sum_pos;
  logic [2*DATA_W-1:0] prod;
  logic [3:0]          prod_pos;
  logic [2*DATA_W-1:0] m;
  logic [3:0]          m_pos;

  ftapprox_parity u_par_a (
    .data (a.data), .stored_parity (a.parity),
    .parity (par_a_unused), .parity_err (parity_err_a)
  );
  ftapprox_parity u_par_b (
    .data (b.data), .stored_parity (b.parity),
    .parity (par_b_unused), .parity_err (parity_err_b)
  );

  ftapprox_control u_ctrl_a (
    .ctrl (a.ctrl), .order (order_a), .ctrl_fixed (fixed_a_unused),
    .min_dist (dist_a_unused), .corrected (corrected_a),
    .uncorrectable (uncorrectable_a)
  );
  ftapprox_control u_ctrl_b (
    .ctrl (b.ctrl), .order (order_b), .ctrl_fixed (fixed_b_unused),
    .min_dist (dist_b_unused), .corrected (corrected_b),
    .uncorrectable (uncorrectable_b)
  );

  ftapprox_adder u_add (
    .data_a (a.data), .pos_a (blk_pos(order_a)),
    .data_b (b.data), .pos_b (blk_pos(order_b)),
    .sum (sum), .pos (sum_pos)
  );

  ftapprox_multiplier u_mul (
    .data_a (a.data), .pos_a (blk_pos(order_a)),
    .data_b (b.data), .pos_b (blk_pos(order_b)),
    .prod (prod), .pos (prod_pos)
  );

  always_comb begin
    if (op == OP_MUL) begin
      m     = prod;
      m_pos = prod_pos;
    end else begin
      m     = 16'(sum);
      m_pos = 4'(sum_pos);
    end
    err_detect = parity_err_a | parity_err_b | uncorrectable_a | uncorrectable_b;
  end

  ftapprox_normalize u_norm (
    .m (m), .pos (m_pos),
    .word (result), .msvb (res_msvb), .overflow (overflow)
  );

endmodule
