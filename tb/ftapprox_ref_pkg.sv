// ftapprox_ref_pkg: golden models of the FTApprox format for the testbenches.
//
// Written from the format's arithmetic rather than from the RTL structure:
// values are handled as plain (64-bit) integers, the MSVB is found from the
// highest set bit, and the nearest legal control signal by brute force over a
// literal copy of the codeword table.
package ftapprox_ref_pkg;

  // Legal control signals, index = MSVB block.
  localparam logic [6:0] CODES [8] = '{
    7'b000_0000, 7'b001_1110, 7'b010_1101, 7'b011_0011,
    7'b100_1011, 7'b101_0101, 7'b110_0110, 7'b111_1000
  };

  // Encode a non-negative integer; values of 2**32 and above saturate to
  // data 0xFF at MSVB 7 (the unit's overflow rule).
  function automatic logic [15:0] ref_encode(input longint unsigned v);
    int hb, msvb, shift;
    logic [7:0] d;
    if (v >= 64'h1_0000_0000) begin
      d = 8'hFF;
      return {^d, CODES[7], d};
    end
    hb = -1;
    for (int i = 0; i < 32; i++) if (v[i]) hb = i;
    msvb  = (hb < 0) ? 0 : hb / 4;
    shift = (msvb == 0) ? 0 : 4 * (msvb - 1);
    d = 8'((v >> shift) & 64'hFF);
    if (shift > 0 && v[shift-1]) d[0] = 1'b1;
    return {^d, CODES[msvb], d};
  endfunction

  function automatic int ref_pos(input int msvb);
    return (msvb == 0) ? 0 : msvb - 1;
  endfunction

  // Nearest legal codeword: returns the MSVB index, or -1 on a tie.
  function automatic int ref_nearest(input logic [6:0] c, output int dmin);
    int best, n, d;
    dmin = 99; best = -1; n = 0;
    for (int i = 0; i < 8; i++) begin
      d = $countones(c ^ CODES[i]);
      if (d < dmin) begin dmin = d; best = i; n = 1; end
      else if (d == dmin) n++;
    end
    return (n == 1) ? best : -1;
  endfunction

  // Value of a clean data part at a given MSVB.
  function automatic longint unsigned ref_value(input logic [7:0] d, input int msvb);
    return longint'(d) << (4 * ref_pos(msvb));
  endfunction

  // Exact result the unit is expected to approximate: the lower operand is
  // truncated to the higher operand's block position before adding.
  function automatic longint unsigned ref_add(input logic [7:0] da, input int ea,
                                              input logic [7:0] db, input int eb);
    int p;
    p = (ref_pos(ea) > ref_pos(eb)) ? ref_pos(ea) : ref_pos(eb);
    return ((ref_value(da, ea) >> (4 * p)) + (ref_value(db, eb) >> (4 * p))) << (4 * p);
  endfunction

  function automatic longint unsigned ref_mul(input logic [7:0] da, input int ea,
                                              input logic [7:0] db, input int eb);
    return (longint'(da) * longint'(db)) << (4 * (ref_pos(ea) + ref_pos(eb)));
  endfunction

  // Random 32-bit value with a random number of leading zeros, so that every
  // MSVB occurs often.
  function automatic logic [31:0] rand_value();
    logic [31:0] v;
    v = $urandom;
    return v >> ($urandom % 32);
  endfunction

endpackage
