// conv_enc_r12 -- rate 1/2 convolutional encoder.
//
// Each message bit enters stage S0 of a shift register; with the K-1 earlier bits held in
// S1..S(K-1) it forms the encoder window, and two mod-2 adders (XOR trees) over the taps of
// generators G0 and G1 give the code bits V1 and V2. The register then shifts (S0 -> S1,
// S1 -> S2, ...). The defaults are the three-stage encoder of the published design:
// V1 = S0 ^ S2 and V2 = S0 ^ S1 ^ S2. K and the generators are parameters so the same
// encoder can produce the 64-state code of the decoder (K = 7, 171/133 octal).
//
// Generator bit K-1 taps S0 (the newest bit) and bit 0 the oldest stage.
// Interface: one message bit per cycle with in_valid; the symbol {V1, V2} is registered and
// appears on out_sym with out_valid one cycle later. Both code bits are delivered together
// (the published encoder samples V1 then V2 through an output switch; the serialisation is
// left out because the decoder consumes the pair at once). rst_n (synchronous, active low)
// clears the register to the all-zero state.
module conv_enc_r12 #(
  parameter int           K  = 3,
  parameter logic [K-1:0] G0 = 3'b101,
  parameter logic [K-1:0] G1 = 3'b111
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_sym
);

  logic [K-2:0] sr;   // sr[0] = S1 (previous bit) ... sr[K-2] = oldest
  logic [K-1:0] win;  // win[0] = S0 (current bit)

  assign win = {sr, in_bit};

  function automatic logic parity_taps(input logic [K-1:0] w, input logic [K-1:0] g);
    logic p;
    p = 1'b0;
    for (int i = 0; i < K; i++) p ^= w[i] & g[K-1-i];
    return p;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sr      <= win[K-2:0];
        out_sym <= {parity_taps(win, G0), parity_taps(win, G1)};
      end
    end
  end

endmodule
