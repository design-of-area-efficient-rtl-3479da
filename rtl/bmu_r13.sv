// bmu_r13 -- half branch metric unit for a rate 1/3 code (correlation metrics).
//
// For received signed soft values A, B, C of the three code bits, the correlation metric of
// code word (x, y, z) adds each value with sign + for a 1 and - for a 0:
//   Bm(x,y,z) = (x ? A : -A) + (y ? B : -B) + (z ? C : -C).
// Because Bm(x,y,z) = -Bm(~x,~y,~z), only the four words with x = 0 are formed here:
//   bm[0] = Bm(0,0,0) = -A-B-C,  bm[1] = Bm(0,0,1) = -A-B+C,
//   bm[2] = Bm(0,1,0) = -A+B-C,  bm[3] = Bm(0,1,1) = -A+B+C,
// and a following ACS obtains the other four by subtracting instead of adding. The four
// equations and the halving come from the published design; the input width (3-bit two's
// complement, positive meaning a received 1) and the 5-bit signed result are this design's
// choices. Purely combinational.
module bmu_r13 #(
  parameter int IN_W = 3,
  localparam int BM_W = IN_W + 2
) (
  input  logic signed [IN_W-1:0] a,
  input  logic signed [IN_W-1:0] b,
  input  logic signed [IN_W-1:0] c,
  output logic signed [BM_W-1:0] bm [4]
);

  logic signed [BM_W-1:0] ax, bx, cx;

  always_comb begin
    ax = BM_W'(a);
    bx = BM_W'(b);
    cx = BM_W'(c);
    bm[0] = -ax - bx - cx;
    bm[1] = -ax - bx + cx;
    bm[2] = -ax + bx - cx;
    bm[3] = -ax + bx + cx;
  end

endmodule
