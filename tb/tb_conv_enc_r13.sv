// tb_conv_enc_r13 -- self-checking testbench of the rate 1/3 encoder.
//
// Sends random bits with gaps and compares each symbol with V1 = u^u1^u2, V2 = u1^u2,
// V3 = u^u2 (u the current bit, u1 and u2 the two before), worked out from the
// testbench's own history; also checks the one-cycle delay of out_valid and that reset
// returns the encoder to the zero state.
module tb_conv_enc_r13;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_bit, out_valid;
  logic [2:0] out_sym;
  int checks = 0, failures = 0;
  logic u1, u2;

  always #5 clk = ~clk;

  conv_enc_r13 dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic u;
    logic [2:0] exp_sym;
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0; u1 = 1'b0; u2 = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      if (n == 700) begin  // mid-run reset
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        u1 = 1'b0; u2 = 1'b0;
      end
      in_valid = ($urandom_range(0, 4) != 0);
      u = 1'($urandom);
      in_bit = u;
      exp_sym = {u ^ u1 ^ u2, u1 ^ u2, u ^ u2};
      @(negedge clk);
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("out_valid mismatch at %0d", n);
      end
      if (in_valid) begin
        checks++;
        if (out_sym !== exp_sym) begin
          failures++;
          $display("symbol %b expected %b at %0d", out_sym, exp_sym, n);
        end
        u2 = u1;
        u1 = u;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
