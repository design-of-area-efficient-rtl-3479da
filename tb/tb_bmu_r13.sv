// tb_bmu_r13 -- exhaustive self-checking testbench of the rate 1/3 half branch metric unit.
//
// For all 512 input triples, computes the correlation metric of all eight code words here
// and checks that the unit's four outputs equal the words with x = 0 and that their
// negations equal the complementary words (x = 1), i.e. the symmetry the unit relies on.
module tb_bmu_r13;

  logic signed [2:0] a, b, c;
  logic signed [4:0] bm [4];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  bmu_r13 dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corr(input int w, input int ra, input int rb, input int rc);
    return (w[2] ? ra : -ra) + (w[1] ? rb : -rb) + (w[0] ? rc : -rc);
  endfunction

  initial begin
    for (int ia = -4; ia < 4; ia++)
      for (int ib = -4; ib < 4; ib++)
        for (int ic = -4; ic < 4; ic++) begin
          a = 3'(ia); b = 3'(ib); c = 3'(ic);
          @(posedge clk);
          for (int w = 0; w < 4; w++) begin
            checks += 2;
            if (int'(bm[w]) != corr(w, ia, ib, ic)) begin
              failures++;
              $display("A=%0d B=%0d C=%0d word %0d: %0d expected %0d", ia, ib, ic, w, bm[w],
                       corr(w, ia, ib, ic));
            end
            if (-int'(bm[w]) != corr(7 - w, ia, ib, ic)) begin
              failures++;
              $display("symmetry fails for word %0d", w);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
