// tb_pointer -- traceback pointer of the Viterbi decoder.
//
// Walks the survivor memory backwards one column per enabled step. On the first step of a
// block (start) it begins at start_state, the best state of the newest column; otherwise
// it continues from the state reached by the previous step. Each step presents cur_state
// to the memory, receives that state's decision bit and moves to the predecessor
// {dec_bit, cur_state[SW-1:1]}. On the last step of the block (done) the predecessor is
// stored in end_state: the state the survivor path passes through at the end of the next
// older block, where the decoder will start.
//
// Timing: cur_state is combinational from start/start_state and the state register;
// end_state changes on the clock edge of the done step and holds until the next one.
// The hand-over of a block's end state to the decoder follows the published split into a
// traceback and a decoding module; the one-block traceback length is this design's choice.
module tb_pointer #(
  parameter int SW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          start,
  input  logic          done,
  input  logic [SW-1:0] start_state,
  output logic [SW-1:0] cur_state,
  input  logic          dec_bit,
  output logic [SW-1:0] end_state
);

  logic [SW-1:0] st;
  logic [SW-1:0] prev_state;

  assign cur_state  = start ? start_state : st;
  assign prev_state = {dec_bit, cur_state[SW-1:1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= '0;
      end_state <= '0;
    end else if (step) begin
      st <= prev_state;
      if (done) end_state <= prev_state;
    end
  end

endmodule
