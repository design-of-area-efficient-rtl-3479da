// tb_tb_pointer -- self-checking testbench of the traceback pointer.
//
// A testbench-side block of 16 random decision columns stands in for the survivor memory.
// For many blocks, the pointer is started at a random state and stepped through the block
// (newest column first, with random idle cycles); the state it presents at each step and the
// end state it stores are compared with a trace computed here
// (predecessor = {decision, state[5:1]}).
module tb_tb_pointer;

  logic clk = 1'b0;
  logic rst_n, step, start, done, dec_bit;
  logic [5:0] start_state, cur_state, end_state;
  logic [63:0] cols [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tb_pointer dut (.*);

  // the memory model: decision of the presented state in the column being read
  int rd_col;
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
    rst_n = 1'b0; step = 1'b0; start = 1'b0; done = 1'b0; start_state = '0; rd_col = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 200; blk++) begin
      for (int c = 0; c < 16; c++) cols[c] = {$urandom, $urandom};
      s = 6'($urandom);
      start_state = s;
      for (int k = 0; k < 16; k++) begin
        while ($urandom_range(0, 3) == 0) begin  // idle cycles
          step = 1'b0;
          start = 1'b0;
          done = 1'b0;
          @(negedge clk);
        end
        rd_col = 15 - k;
        step = 1'b1;
        start = (k == 0);
        done = (k == 15);
        #1;
        checks++;
        if (cur_state !== s) begin
          failures++;
          $display("block %0d step %0d: state %0d expected %0d", blk, k, cur_state, s);
        end
        s = {cols[15 - k][s], s[5:1]};
        @(negedge clk);
      end
      step = 1'b0; start = 1'b0; done = 1'b0;
      checks++;
      if (end_state !== s) begin
        failures++;
        $display("block %0d: end state %0d expected %0d", blk, end_state, s);
      end
      start_state = 6'($urandom);  // must not disturb the stored end state
      @(negedge clk);
      checks++;
      if (end_state !== s) begin
        failures++;
        $display("block %0d: end state not held", blk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
