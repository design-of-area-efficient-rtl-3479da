// tb_conv_enc_r12 -- self-checking testbench of the rate 1/2 convolutional encoder.
//
// Checks the default three-stage encoder (V1 = S0^S2, V2 = S0^S1^S2) and a second instance
// set to the 64-state code (171/133 octal, written out here as explicit XORs of the message
// history) against a history register kept by the testbench. Random bits are sent with
// random gaps in in_valid; every symbol is compared one cycle after its bit, and out_valid
// is checked to follow in_valid by one cycle.
module tb_conv_enc_r12;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_bit;
  logic v3, v7;
  logic [1:0] s3, s7;
  int checks = 0, failures = 0;
  logic [7:0] hist;  // hist[0] = newest bit already sent, hist[1] the one before ...

  always #5 clk = ~clk;

  conv_enc_r12 dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bit(in_bit),
    .out_valid(v3), .out_sym(s3)
  );
  conv_enc_r12 #(.K(7), .G0(7'o171), .G1(7'o133)) dut7 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_bit(in_bit),
    .out_valid(v7), .out_sym(s7)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic u, e1, e2, f1, f2;
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0; hist = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      u = 1'($urandom);
      in_bit = u;
      // expected symbols: three-stage code and 171/133 code
      e1 = u ^ hist[1];
      e2 = u ^ hist[0] ^ hist[1];
      f1 = u ^ hist[0] ^ hist[1] ^ hist[2] ^ hist[5];
      f2 = u ^ hist[1] ^ hist[2] ^ hist[4] ^ hist[5];
      @(negedge clk);
      checks++;
      if (v3 !== in_valid || v7 !== in_valid) begin
        failures++;
        $display("out_valid mismatch at %0d", n);
      end
      if (in_valid) begin
        checks += 2;
        if (s3 !== {e1, e2}) begin
          failures++;
          $display("K=3 symbol %b expected %b at %0d", s3, {e1, e2}, n);
        end
        if (s7 !== {f1, f2}) begin
          failures++;
          $display("K=7 symbol %b expected %b at %0d", s7, {f1, f2}, n);
        end
        hist = {hist[6:0], u};
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
