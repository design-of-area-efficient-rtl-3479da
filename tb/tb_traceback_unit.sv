// tb_traceback_unit -- self-checking testbench of the traceback unit.
//
// A random message defines the true state sequence s_n = {s_(n-1)[4:0], u_n}. Each column
// sent to the unit holds random decisions except for the true state, whose decision names
// its true predecessor, and the best-state input is the true state. Tracing back from any
// column must then follow the true path, so the unit has to return the message bit by bit.
// Checks, for every column written (with random gaps in enb): out_valid is low for the
// first 64 columns and follows enb afterwards; with it, out_bit equals the message bit of
// the column written 64 columns earlier. The survivor memory is used as a ring several
// times over (4000 columns); the number of ring wraps is counted.
module tb_traceback_unit;

  logic clk = 1'b0;
  logic rst_n, enb, out_bit, out_valid;
  logic [63:0] dec;
  logic [7:0]  best;
  int checks = 0, failures = 0, wraps = 0;
  logic msg [4096];

  always #5 clk = ~clk;

  traceback_unit dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] s, sp;
    int n;
    rst_n = 1'b0; enb = 1'b0; dec = '0; best = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    s = '0;
    n = 0;
    while (n < 4000) begin
      enb = ($urandom_range(0, 4) != 0);
      if (enb) begin
        sp = s;
        msg[n] = 1'($urandom);
        s = {sp[4:0], msg[n]};
        dec = {$urandom, $urandom};
        dec[s] = sp[5];
        best = {2'b00, s};
      end else begin
        dec = {$urandom, $urandom};
        best = 8'($urandom);
      end
      @(negedge clk);
      checks++;
      if (enb && n >= 64) begin
        if (out_valid !== 1'b1) begin
          failures++;
          $display("column %0d: out_valid low", n);
        end else if (out_bit !== msg[n - 64]) begin
          failures++;
          $display("column %0d: bit %0d is %b expected %b", n, n - 64, out_bit, msg[n - 64]);
        end
      end else if (out_valid !== 1'b0) begin
        failures++;
        $display("column %0d: unexpected out_valid", n);
      end
      if (enb) begin
        n++;
        if (n % 64 == 0) wraps++;
      end
    end
    checks++;
    if (wraps < 2) failures++;
    $display("memory ring wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
