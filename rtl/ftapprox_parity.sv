// ftapprox_parity: the parity module of FTApprox.
//
// Computes the even parity (XOR) of an 8-bit data part. On the load path it
// compares it with the stored parity bit and raises parity_err on a mismatch,
// which reveals any odd number of flipped data bits; an even number of flips
// goes unseen, as the format accepts. On the store path the caller ties
// stored_parity to 0 and takes parity as the bit to store.
// The single parity bit over the data part is part of the format; its even
// sense is read from the format's worked examples. Purely combinational.
module ftapprox_parity
  import ftapprox_pkg::*;
(
  input  logic [DATA_W-1:0] data,
  input  logic              stored_parity,
  output logic              parity,      // XOR of the data bits
  output logic              parity_err   // stored bit disagrees with the data
);

  always_comb begin
    parity     = ^data;
    parity_err = parity ^ stored_parity;
  end

endmodule
