// tb_tb_decoder -- self-checking testbench of the decoding pointer and its reorder buffer.
//
// For each block a testbench-side set of 16 random decision columns and a random start
// state are generated. The decoder is stepped through the block (with random idle cycles);
// the state it presents at each step is compared with a trace computed here, and during the
// following block its out_bit must deliver the decoded bits (bit 0 of each traced state) of
// the previous block in forward column order.
module tb_tb_decoder;

  logic clk = 1'b0;
  logic rst_n, step, parity, dec_bit, out_bit;
  logic [3:0] col;
  logic [5:0] start_state, cur_state;
  logic [63:0] cols [16];
  logic [15:0] prev_bits, bits;
  int checks = 0, failures = 0;
  int rd_col;

  always #5 clk = ~clk;

  tb_decoder dut (.*);

  assign dec_bit = cols[rd_col][cur_state];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] s;
    rst_n = 1'b0; step = 1'b0; col = '0; parity = 1'b0; start_state = '0; rd_col = 0;
    prev_bits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 200; blk++) begin
      for (int c = 0; c < 16; c++) cols[c] = {$urandom, $urandom};
      s = 6'($urandom);
      start_state = s;
      parity = blk[0];
      for (int k = 0; k < 16; k++) begin
        while ($urandom_range(0, 3) == 0) begin
          step = 1'b0;
          col = 4'($urandom);  // col and start_state matter only with step
          @(negedge clk);
        end
        col = 4'(k);
        rd_col = 15 - k;
        step = 1'b1;
        #1;
        checks++;
        if (cur_state !== s) begin
          failures++;
          $display("block %0d step %0d: state %0d expected %0d", blk, k, cur_state, s);
        end
        bits[15 - k] = s[0];
        s = {cols[15 - k][s], s[5:1]};
        @(negedge clk);
        step = 1'b0;
        if (blk > 0) begin
          checks++;
          if (out_bit !== prev_bits[k]) begin
            failures++;
            $display("block %0d col %0d: out %b expected %b", blk, k, out_bit, prev_bits[k]);
          end
        end
      end
      prev_bits = bits;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
