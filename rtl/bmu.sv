// bmu -- branch metric unit for a rate 1/2 code with 3-bit soft decisions.
//
// The two received soft values (0 = certain 0, 7 = certain 1) are compared with each of
// the four code symbols {V1,V2} = 00, 01, 10, 11. The distance of a value x to an expected
// 0 is x and to an expected 1 is 7 - x, which for 3 bits is x XOR 111: each soft bit is
// XORed with the expected code bit, the soft form of counting differing bits. A branch
// metric is the sum over both bits (0..14, 4 bits). Following the symmetry the published unit exploits, only half the metrics are
// summed: bm[00] and bm[01] come from adders and their complements are derived as
// bm[11] = 14 - bm[00] and bm[10] = 14 - bm[01].
//
// Interface: purely combinational (the published unit has no clock); bm[c] is the metric
// of code symbol c = {V1, V2}. The soft-value encoding is this design's choice.
module bmu
  import viterbi_pkg::*;
(
  input  logic [SOFT_W-1:0] soft0,  // soft value of V1
  input  logic [SOFT_W-1:0] soft1,  // soft value of V2
  output bm_t               bm [4]
);

  localparam int SMAX = (1 << SOFT_W) - 1;  // 7
  localparam bm_t BMAX = bm_t'(2 * SMAX);    // 14

  bm_t              bm00, bm01;
  logic [SOFT_W-1:0] soft1_inv;  // distance of soft1 to an expected 1

  always_comb begin
    bm00  = bm_t'(soft0) + bm_t'(soft1);
    soft1_inv = soft1 ^ SOFT_W'(SMAX);
    bm01  = bm_t'(soft0) + bm_t'(soft1_inv);
    bm[0] = bm00;
    bm[1] = bm01;
    bm[2] = BMAX - bm01;
    bm[3] = BMAX - bm00;
  end

endmodule
