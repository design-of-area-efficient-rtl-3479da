// tb_bmu -- exhaustive self-checking testbench of the branch metric unit.
//
// Applies all 64 pairs of 3-bit soft values and compares the four metrics with the sum of
// per-bit distances (x for an expected 0, 7 - x for an expected 1) computed here. One
// directed point repeats a value pair from the original unit's simulation: soft inputs 011
// and 010 give 0101 for symbol 00 and 1000 for symbol 01.
module tb_bmu;

  logic [2:0] soft0, soft1;
  logic [3:0] bm [4];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  bmu dut (.soft0(soft0), .soft1(soft1), .bm(bm));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d0, d1, e;
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < 8; b++) begin
        soft0 = 3'(a);
        soft1 = 3'(b);
        @(posedge clk);
        for (int c = 0; c < 4; c++) begin
          d0 = c[1] ? 7 - a : a;
          d1 = c[0] ? 7 - b : b;
          e  = d0 + d1;
          checks++;
          if (int'(bm[c]) != e) begin
            failures++;
            $display("soft %0d,%0d symbol %0d: bm %0d expected %0d", a, b, c, bm[c], e);
          end
        end
      end
    end
    soft0 = 3'b011;
    soft1 = 3'b010;
    @(posedge clk);
    checks += 2;
    if (bm[0] !== 4'b0101 || bm[1] !== 4'b1000) begin
      failures++;
      $display("directed point: bm00 %b bm01 %b", bm[0], bm[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
