// ftapprox_control: the control module of FTApprox.
//
// Maps a loaded 7-bit control signal to the nearest legal codeword. It
// computes the Hamming distance to each of the eight legal codewords, takes
// the minimum and counts how many codewords reach it. A single nearest
// codeword (distance 0 or 1) is accepted and its first three bits are the
// MSVB order; corrected says a bit was repaired. Two or more codewords at the
// same least distance (the case of two flipped bits) cannot be resolved, and
// uncorrectable is raised instead: the system then reloads the data.
// The order output is then the lowest-indexed of the tied codewords and has
// no meaning. Nearest-codeword mapping with tie detection follows the
// format; computing all eight distances in parallel, and the min_dist and
// ctrl_fixed outputs, are this design's choices. Purely combinational.
module ftapprox_control
  import ftapprox_pkg::*;
(
  input  logic [CTRL_W-1:0] ctrl,           // control signal as loaded
  output logic [2:0]        order,          // MSVB index of the nearest codeword
  output logic [CTRL_W-1:0] ctrl_fixed,     // nearest legal codeword
  output logic [2:0]        min_dist,       // least Hamming distance found
  output logic              corrected,      // one bit repaired
  output logic              uncorrectable   // tie: error detected, not corrected
);

  logic [2:0] hd [N_BLK];
  logic [3:0] n_min;

  always_comb begin
    for (int i = 0; i < N_BLK; i++) hd[i] = popcount7(ctrl ^ ctrl_code(3'(i)));

    min_dist = 3'd7;
    order    = 3'd0;
    for (int i = N_BLK - 1; i >= 0; i--) begin
      if (hd[i] <= min_dist) begin
        min_dist = hd[i];
        order    = 3'(i);
      end
    end

    n_min = '0;
    for (int i = 0; i < N_BLK; i++) n_min = n_min + 4'(hd[i] == min_dist);

    ctrl_fixed    = ctrl_code(order);
    uncorrectable = (n_min != 4'd1);
    corrected     = !uncorrectable && (min_dist != 3'd0);
  end

endmodule
