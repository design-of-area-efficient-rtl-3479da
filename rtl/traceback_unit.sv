// traceback_unit -- survivor memory, traceback pointer and decoder with their schedule.
//
// Each enabled cycle (enb) the unit receives the ACS decision vector and best state and
// writes the vector as one column of the survivor memory: NBANK blocks of BLK columns used
// as a ring. While block p is being written:
//   * the traceback pointer walks block p-1 backwards from the best state of its newest
//     column and finds the state at the end of block p-2;
//   * block p-2 waits;
//   * the decoder walks block p-3 backwards from the state the traceback pointer found
//     during the previous block, producing that block's bits, and shifts out in order the
//     bits of the block it decoded before (block p-4, whose columns are being overwritten).
// The traceback pointer and the decoder therefore read different blocks at the same time
// and the decoder never waits. Every column written yields one decoded bit: the bit of
// column n leaves (out_bit, out_valid) on the clock edge that writes column n + NBANK*BLK,
// i.e. 64 columns later at the default sizes, from the fifth block after reset onwards.
//
// The four-block, 64-column memory and the concurrent traceback/decoding come from the
// published design; the exact schedule and the one-block traceback length are this design's
// own choices. The best-state input is 8 bits wide as in the published unit; its low
// $clog2(NSTATE) bits are used.
module traceback_unit #(
  parameter int NSTATE = 64,
  parameter int NBANK  = 4,
  parameter int BLK    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enb,
  input  logic [NSTATE-1:0] dec,
  input  logic [7:0]        best,
  output logic              out_bit,
  output logic              out_valid
);

  localparam int SW = $clog2(NSTATE);
  localparam int CW = $clog2(BLK);
  localparam int BW = $clog2(NBANK);
  localparam int AW = BW + CW;

  logic [BW-1:0] bank;      // block being written
  logic [CW-1:0] col;       // column being written
  logic [2:0]    nblocks;   // blocks completed since reset, saturating
  logic [SW-1:0] best_q;    // best state of the newest column of the previous block
  logic          last_col;

  logic [SW-1:0] tb_state, dc_state, tb_end;
  logic          tb_bit, dc_bit, dc_out;
  logic [CW-1:0] rcol;

  // The schedule (write, trace, wait, decode) needs exactly four blocks.
  if (NBANK != 4) begin : g_bad_nbank
    $error("traceback_unit: NBANK must be 4");
  end

  assign last_col = (col == CW'(BLK - 1));
  assign rcol     = CW'(BLK - 1) - col;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank      <= '0;
      col       <= '0;
      nblocks   <= '0;
      best_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= enb && (nblocks >= 3'd4);
      if (enb) begin
        col <= col + 1'b1;
        if (last_col) begin
          bank   <= bank + 1'b1;
          best_q <= best[SW-1:0];
          if (nblocks != 3'd7) nblocks <= nblocks + 1'b1;
        end
      end
    end
  end

  survivor_mem #(.NSTATE(NSTATE), .NBANK(NBANK), .BLK(BLK)) u_mem (
    .clk      (clk),
    .we       (enb),
    .waddr    ({bank, col}),
    .wdata    (dec),
    .raddr_tb (AW'({bank - BW'(1), rcol})),
    .rsel_tb  (tb_state),
    .rbit_tb  (tb_bit),
    .raddr_dc (AW'({bank - BW'(3), rcol})),
    .rsel_dc  (dc_state),
    .rbit_dc  (dc_bit)
  );

  tb_pointer #(.SW(SW)) u_tb (
    .clk         (clk),
    .rst_n       (rst_n),
    .step        (enb),
    .start       (col == '0),
    .done        (last_col),
    .start_state (best_q),
    .cur_state   (tb_state),
    .dec_bit     (tb_bit),
    .end_state   (tb_end)
  );

  tb_decoder #(.SW(SW), .BLK(BLK)) u_dc (
    .clk         (clk),
    .rst_n       (rst_n),
    .step        (enb),
    .col         (col),
    .parity      (bank[0]),
    .start_state (tb_end),
    .cur_state   (dc_state),
    .dec_bit     (dc_bit),
    .out_bit     (dc_out)
  );

  assign out_bit = dc_out;

endmodule
