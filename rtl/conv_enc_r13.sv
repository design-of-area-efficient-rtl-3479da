// conv_enc_r13 -- rate 1/3 convolutional encoder with three stages.
//
// The message bit enters S1; S2 and S3 hold the two earlier bits. Three mod-2 adders give
// one code bit each, with the tap vectors of the published figure read in the order
// (S1, S2, S3): V1 from (1,1,1), V2 from (0,1,1) and V3 from (1,0,1). After each bit the
// register shifts S1 -> S2 -> S3.
//
// Interface: one message bit per cycle with in_valid; {V1, V2, V3} (V1 in bit 2) is
// registered and appears one cycle later with out_valid. Delivering the three bits in
// parallel and the synchronous active-low reset to the zero state are this design's choices.
module conv_enc_r13 #(
  parameter logic [2:0] G0 = 3'b111,  // taps (S1,S2,S3) of V1
  parameter logic [2:0] G1 = 3'b011,  // taps of V2
  parameter logic [2:0] G2 = 3'b101   // taps of V3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [2:0] out_sym
);

  logic       s2, s3;
  logic [2:0] win;    // {S1, S2, S3}, S1 = current bit in the MSB like the tap vectors

  assign win = {in_bit, s2, s3};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2        <= 1'b0;
      s3        <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s2      <= in_bit;
        s3      <= s2;
        out_sym <= {^(win & G0), ^(win & G1), ^(win & G2)};
      end
    end
  end

endmodule
