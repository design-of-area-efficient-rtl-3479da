// viterbi_decoder -- pipelined soft-decision Viterbi decoder, rate 1/2, 64 states.
//
// The chain of the classic decoder: the branch metric unit turns each received pair of
// 3-bit soft values into four branch metrics, a pipeline register holds them, the
// add-compare-select unit advances the 64 path metrics by one trellis step and emits a
// decision vector and the best state, and the traceback unit stores the decisions in a
// four-block survivor memory, traces back and decodes, one bit per received pair.
//
// Interface: present a soft pair (soft0 for V1, soft1 for V2; 0 = certain 0, 7 = certain 1)
// with in_valid. Gaps in in_valid are allowed; every stage advances only with valid data.
// The decoded bit of the n-th pair leaves on out_bit with out_valid when the (n+64)-th pair
// has gone through the ACS, that is, with continuous input, 64 + 3 clock cycles after the
// pair was presented; the first 64 bits after reset need no flushing, but the last 64 bits
// of a message are only delivered when 64 further pairs (e.g. an encoded zero tail) follow.
// renorm reports an ACS step that renormalised the path metrics. Reset (rst_n, synchronous,
// active low) starts the decoder in the zero state. The code is the one of viterbi_pkg
// (generators 171/133 octal, this design's choice); all widths follow the published design.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int BLK = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SOFT_W-1:0] soft0,
  input  logic [SOFT_W-1:0] soft1,
  output logic              out_valid,
  output logic              out_bit,
  output logic              renorm
);

  bm_t               bm_c [4];
  bm_t               bm_q [4];
  logic              bm_valid;
  logic [NSTATE-1:0] dec;
  logic [7:0]        best;
  logic              dec_valid;

  bmu u_bmu (
    .soft0 (soft0),
    .soft1 (soft1),
    .bm    (bm_c)
  );

  // Pipeline register between the BMU and the ACS.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bm_valid <= 1'b0;
      for (int i = 0; i < 4; i++) bm_q[i] <= '0;
    end else begin
      bm_valid <= in_valid;
      if (in_valid) bm_q <= bm_c;
    end
  end

  acs_unit u_acs (
    .clk       (clk),
    .rst_n     (rst_n),
    .enb       (bm_valid),
    .bm        (bm_q),
    .dec       (dec),
    .best      (best),
    .dec_valid (dec_valid),
    .renorm    (renorm)
  );

  traceback_unit #(.NSTATE(NSTATE), .NBANK(4), .BLK(BLK)) u_tbu (
    .clk       (clk),
    .rst_n     (rst_n),
    .enb       (dec_valid),
    .dec       (dec),
    .best      (best),
    .out_bit   (out_bit),
    .out_valid (out_valid)
  );

endmodule
