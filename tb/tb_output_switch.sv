// tb_output_switch -- self-checking testbench of the encoder output switch.
//
// Two switches (N = 2 and N = 3) are each fed by a model of a registered encoder: when the
// switch accepts and the model is willing (randomly, or always in a second phase), a random
// symbol is queued and presented one cycle later. Every serial bit is compared with the
// queued symbols read out MSB first, the number of bits sent is checked, and in the always-
// willing phase the serial line must carry a bit on every cycle (gap-free streaming).
module tb_output_switch;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       v2, a2, sv2, sb2;
  logic [1:0] s2;
  logic       v3, a3, sv3, sb3;
  logic [2:0] s3;

  output_switch #(.N(2)) dut2 (.clk(clk), .rst_n(rst_n), .sym_valid(v2), .sym(s2),
                               .accept(a2), .ser_valid(sv2), .ser_bit(sb2));
  output_switch #(.N(3)) dut3 (.clk(clk), .rst_n(rst_n), .sym_valid(v3), .sym(s3),
                               .accept(a3), .ser_valid(sv3), .ser_bit(sb3));

  logic q2 [$];
  logic q3 [$];
  bit   eager = 0, stop = 0;
  int   sent2 = 0, sent3 = 0, gaps2 = 0, gaps3 = 0;
  bit   stream2 = 0, stream3 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder models: take a bit when accepted, present the symbol one cycle later
  always @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      if (a2 && !stop && (eager || $urandom_range(0, 2) == 0)) begin
        logic [1:0] s;
        s = 2'($urandom);
        v2 <= 1'b1;
        s2 <= s;
        q2.push_back(s[1]);
        q2.push_back(s[0]);
      end else begin
        v2 <= 1'b0;
        s2 <= 2'($urandom);
      end
      if (a3 && !stop && (eager || $urandom_range(0, 2) == 0)) begin
        logic [2:0] s;
        s = 3'($urandom);
        v3 <= 1'b1;
        s3 <= s;
        q3.push_back(s[2]);
        q3.push_back(s[1]);
        q3.push_back(s[0]);
      end else begin
        v3 <= 1'b0;
        s3 <= 3'($urandom);
      end
    end
  end

  // serial monitor
  always @(negedge clk) begin
    if (rst_n) begin
      if (sv2) begin
        checks++;
        if (q2.size() == 0 || sb2 !== q2.pop_front()) begin
          failures++;
          $display("N=2: wrong serial bit %0d", sent2);
        end
        sent2++;
        stream2 = 1;
      end else if (eager && stream2) gaps2++;
      if (sv3) begin
        checks++;
        if (q3.size() == 0 || sb3 !== q3.pop_front()) begin
          failures++;
          $display("N=3: wrong serial bit %0d", sent3);
        end
        sent3++;
        stream3 = 1;
      end else if (eager && stream3) gaps3++;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    eager = 1;
    stream2 = 0;
    stream3 = 0;
    repeat (3000) @(negedge clk);
    stop = 1;
    eager = 0;
    repeat (10) @(negedge clk);
    checks += 4;
    if (q2.size() != 0 || q3.size() != 0) begin
      failures++;
      $display("bits left unsent: %0d, %0d", q2.size(), q3.size());
    end
    if (gaps2 != 0 || gaps3 != 0) begin
      failures++;
      $display("gaps in continuous streaming: %0d, %0d", gaps2, gaps3);
    end
    if (sent2 < 3000 || sent3 < 3000) begin
      failures++;
      $display("too few bits sent: %0d, %0d", sent2, sent3);
    end
    if (sent2 == 0) failures++;
    $display("serial bits sent: %0d (N=2), %0d (N=3)", sent2, sent3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
