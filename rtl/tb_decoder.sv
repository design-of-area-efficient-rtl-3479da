// tb_decoder -- decoding pointer and output reordering of the Viterbi decoder.
//
// While the traceback pointer works on a newer block, this unit walks an older block
// backwards from the state the traceback pointer handed over (start_state, taken on the
// step with col == 0). At each step the decoded message bit of the column is bit 0 of the
// current state (the newest message bit a state holds); the unit then moves to the
// predecessor {dec_bit, cur_state[SW-1:1]} exactly like the traceback pointer.
//
// The bits come out newest first, so they are written into one half of a double buffer at
// position BLK-1-col, while the other half, filled during the previous block, is read in
// forward order, one bit per step, into the registered out_bit. parity (the block count's
// low bit) selects the halves. Timing: out_bit changes on the clock edge of a step and
// holds the bit of column col of the block decoded one block earlier. Walking concurrently
// with the traceback pointer follows the published design; the double buffer is this
// design's own.
module tb_decoder #(
  parameter int SW  = 6,
  parameter int BLK = 16,
  localparam int CW = $clog2(BLK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [CW-1:0] col,
  input  logic          parity,
  input  logic [SW-1:0] start_state,
  output logic [SW-1:0] cur_state,
  input  logic          dec_bit,
  output logic          out_bit
);

  logic [SW-1:0]  st;
  logic [BLK-1:0] obuf [2];

  assign cur_state = (col == '0) ? start_state : st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= '0;
      obuf[0] <= '0;
      obuf[1] <= '0;
      out_bit <= 1'b0;
    end else if (step) begin
      st                                  <= {dec_bit, cur_state[SW-1:1]};
      obuf[parity][CW'(BLK - 1) - col]    <= cur_state[0];
      out_bit                             <= obuf[~parity][col];
    end
  end

endmodule
