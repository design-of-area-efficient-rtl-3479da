// viterbi_codec -- convolutional encoders and Viterbi decoder of the design, side by side.
//
// Transmit side: a rate 1/2 encoder set to the decoder's 64-state code (K = 7, generators
// 171/133 octal) turns message bits (tx_bit, taken when tx_valid and tx_ready are both
// high) into code pairs (tx_sym = {V1, V2}, one cycle later). Its output switch also sends
// each pair as a serial stream, V1 then V2 (tx_ser_bit, tx_ser_valid); tx_ready paces the
// encoder to one bit every two cycles so the serial stream never overruns. The parallel
// pair is what a loop-back feeds to the decoder. Receive side: the pipelined Viterbi
// decoder takes soft pairs (rx_soft0/rx_soft1, 0 = certain 0, 7 = certain 1) and returns
// the decoded bits 64 pairs later (see viterbi_decoder). The channel between the two is outside the design, so the
// encoder output and decoder input are separate ports; a loop-back is made by mapping each
// code bit b to the soft value 7*b. Beside them stand the three-stage rate 1/3 encoder
// (enc3_*, paced by enc3_ready to one bit every three cycles, with its own output switch
// and serial output) and the half branch metric unit for rate 1/3 soft triples (r13_*);
// no rate 1/3 path metric or traceback logic exists, so these are not connected to the
// decoder. Clock and synchronous active-low reset are shared.
module viterbi_codec
  import viterbi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // rate 1/2 encoder for the decoder's code
  input  logic              tx_valid,
  input  logic              tx_bit,
  output logic              tx_ready,
  output logic              tx_sym_valid,
  output logic [1:0]        tx_sym,
  output logic              tx_ser_valid,
  output logic              tx_ser_bit,
  // Viterbi decoder
  input  logic              rx_valid,
  input  logic [SOFT_W-1:0] rx_soft0,
  input  logic [SOFT_W-1:0] rx_soft1,
  output logic              rx_out_valid,
  output logic              rx_out_bit,
  output logic              rx_renorm,
  // rate 1/3 encoder
  input  logic              enc3_valid,
  input  logic              enc3_bit,
  output logic              enc3_ready,
  output logic              enc3_sym_valid,
  output logic [2:0]        enc3_sym,
  output logic              enc3_ser_valid,
  output logic              enc3_ser_bit,
  // rate 1/3 half branch metric unit
  input  logic signed [2:0] r13_a,
  input  logic signed [2:0] r13_b,
  input  logic signed [2:0] r13_c,
  output logic signed [4:0] r13_bm [4]
);

  conv_enc_r12 #(.K(K), .G0(G0), .G1(G1)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tx_valid && tx_ready),
    .in_bit    (tx_bit),
    .out_valid (tx_sym_valid),
    .out_sym   (tx_sym)
  );

  output_switch #(.N(2)) u_sw (
    .clk       (clk),
    .rst_n     (rst_n),
    .sym_valid (tx_sym_valid),
    .sym       (tx_sym),
    .accept    (tx_ready),
    .ser_valid (tx_ser_valid),
    .ser_bit   (tx_ser_bit)
  );

  viterbi_decoder u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rx_valid),
    .soft0     (rx_soft0),
    .soft1     (rx_soft1),
    .out_valid (rx_out_valid),
    .out_bit   (rx_out_bit),
    .renorm    (rx_renorm)
  );

  conv_enc_r13 u_enc3 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc3_valid && enc3_ready),
    .in_bit    (enc3_bit),
    .out_valid (enc3_sym_valid),
    .out_sym   (enc3_sym)
  );

  output_switch #(.N(3)) u_sw3 (
    .clk       (clk),
    .rst_n     (rst_n),
    .sym_valid (enc3_sym_valid),
    .sym       (enc3_sym),
    .accept    (enc3_ready),
    .ser_valid (enc3_ser_valid),
    .ser_bit   (enc3_ser_bit)
  );

  bmu_r13 u_bmu3 (
    .a  (r13_a),
    .b  (r13_b),
    .c  (r13_c),
    .bm (r13_bm)
  );

endmodule
