// output_switch -- parallel-to-serial output switch of a convolutional encoder.
//
// An encoder forms all N code bits of a message bit at once (V1, V2[, V3]); the switch
// samples them one after another, V1 first, onto a single serial line. A symbol presented
// with sym_valid is loaded into a shift register and its bits leave on ser_bit (with
// ser_valid) in the following N cycles, MSB (V1) first.
//
// Flow control: the encoders in this design register their symbol one cycle after taking
// a bit, so accept tells the encoder whether it may take a message bit in this cycle: it
// is high when no symbol is arriving now and at most two bits remain to be sent, so the
// symbol produced next cycle is loaded exactly as the last bit of the current one leaves.
// Honouring it gives a gap-free serial stream of one message bit every N cycles. A symbol
// presented while more than one bit remains would overwrite them; accept prevents that.
// The output switch itself is described by the published design ("the output switch first
// samples V1 and then V2"); the handshake is this design's own.
module output_switch #(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sym_valid,
  input  logic [N-1:0] sym,
  output logic         accept,
  output logic         ser_valid,
  output logic         ser_bit
);

  localparam int CW = $clog2(N + 1);

  logic [N-1:0]  sr;
  logic [CW-1:0] cnt;  // bits still to be sent, including the one on ser_bit

  assign ser_valid = (cnt != '0);
  assign ser_bit   = sr[N-1];
  assign accept    = !sym_valid && (cnt <= CW'(2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr  <= '0;
      cnt <= '0;
    end else if (sym_valid) begin
      sr  <= sym;
      cnt <= CW'(N);
    end else if (cnt != '0) begin
      sr  <= sr << 1;
      cnt <= cnt - 1'b1;
    end
  end

  // A symbol may only arrive while the previous one is on its last bit or finished.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) sym_valid |-> cnt <= CW'(1))
    else $error("output_switch: symbol arrived before the previous one was sent");

endmodule
