// ftapprox_top: an FTApprox arithmetic unit with its conversion paths.
//
// Three parts stand side by side:
//   store path   st_value (32-bit number) -> ftapprox_encoder -> st_word, the
//                16-bit word to write to storage (combinational);
//   compute path two words as loaded from storage (ld_a, ld_b), where soft
//                errors may have flipped bits, and an op (add or multiply) go
//                through ftapprox_alu; the result word, its 32-bit expansion
//                from ftapprox_decoder and the error flags are registered;
//   recovery     err_detect is brought out: reloading the operands is left
//                to the surrounding system.
// Timing: in_valid with ld_a/ld_b/op in cycle n gives out_valid and the
// outputs in cycle n+1 (one register stage, this design's choice). Reset is
// active-low and synchronous and clears out_valid and the outputs.
module ftapprox_top
  import ftapprox_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // store path
  input  logic [VALUE_W-1:0] st_value,
  output ftapprox_t          st_word,
  // compute path
  input  logic               in_valid,
  input  ftapprox_t          ld_a,
  input  ftapprox_t          ld_b,
  input  op_e                op,
  output logic               out_valid,
  output ftapprox_t          res_word,
  output logic [VALUE_W-1:0] res_value,
  output logic               err_detect,     // result unusable, reload operands
  output logic [1:0]         parity_err,     // per operand, bit 0 = a, bit 1 = b
  output logic [1:0]         uncorrectable,  // per operand: control signal tie
  output logic [1:0]         corrected,      // per operand: control bit repaired
  output logic               overflow
);

  logic [2:0]         st_msvb_unused;
  ftapprox_t          alu_res;
  logic [2:0]         alu_msvb_unused;
  logic               pe_a, pe_b, co_a, co_b, un_a, un_b;
  logic               alu_err, alu_ovf;
  logic [VALUE_W-1:0] dec_value;
  logic [2:0]         dec_order_unused;
  logic               dec_corr_unused, dec_err_unused;

  ftapprox_encoder u_enc (
    .value (st_value), .word (st_word), .msvb (st_msvb_unused)
  );

  ftapprox_alu u_alu (
    .a (ld_a), .b (ld_b), .op (op),
    .result (alu_res), .res_msvb (alu_msvb_unused),
    .parity_err_a (pe_a), .parity_err_b (pe_b),
    .corrected_a (co_a), .corrected_b (co_b),
    .uncorrectable_a (un_a), .uncorrectable_b (un_b),
    .err_detect (alu_err), .overflow (alu_ovf)
  );

  ftapprox_decoder u_dec (
    .word (alu_res), .value (dec_value), .order (dec_order_unused),
    .corrected (dec_corr_unused), .err_detect (dec_err_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      res_word   <= '0;
      res_value  <= '0;
      err_detect    <= 1'b0;
      parity_err    <= '0;
      uncorrectable <= '0;
      corrected     <= '0;
      overflow   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        res_word   <= alu_res;
        res_value  <= dec_value;
        err_detect    <= alu_err;
        parity_err    <= {pe_b, pe_a};
        uncorrectable <= {un_b, un_a};
        corrected     <= {co_b, co_a};
        overflow   <= alu_ovf;
      end
    end
  end

endmodule
