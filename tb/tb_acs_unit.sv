// tb_acs_unit -- self-checking testbench of the 64-state add-compare-select unit.
//
// A reference trellis kept here in unbounded integers (no renormalisation) is advanced with
// the same branch metrics as the unit. The branch labels of the reference come from the
// 171/133 code written out as XORs of the encoder window {d, s'}. After every step the
// 64 decisions and the best state (smallest metric, lowest index on ties) are compared.
// Branch metrics come from random soft pairs (sums of per-bit distances, 0..14), with random
// gaps in enb, for long enough that renormalisation must happen; the number of renormalised
// steps is counted and a run without any is a failure. Also checks that dec_valid follows
// enb by one cycle.
module tb_acs_unit;

  logic clk = 1'b0;
  logic rst_n, enb;
  logic [3:0]  bm [4];
  logic [63:0] dec;
  logic [7:0]  best;
  logic        dec_valid, renorm;
  int checks = 0, failures = 0, renorms = 0;

  int ref_pm [64];
  int nxt [64];
  logic [63:0] ref_dec;
  int ref_best;

  always #5 clk = ~clk;

  acs_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] sym(input int s, input int d);
    logic [6:0] w;  // w[0] newest bit ... w[6] oldest
    w = {1'(d), 6'(s)};
    return {w[0] ^ w[1] ^ w[2] ^ w[3] ^ w[6], w[0] ^ w[2] ^ w[3] ^ w[5] ^ w[6]};
  endfunction

  task automatic ref_step();
    for (int s = 0; s < 64; s++) begin
      int p0, p1, c0, c1;
      p0 = (s >> 1);
      p1 = (s >> 1) | 32;
      c0 = ref_pm[p0] + int'(bm[sym(s, 0)]);
      c1 = ref_pm[p1] + int'(bm[sym(s, 1)]);
      ref_dec[s] = (c1 < c0);
      nxt[s] = (c1 < c0) ? c1 : c0;
    end
    ref_best = 0;
    for (int s = 0; s < 64; s++) begin
      ref_pm[s] = nxt[s];
      if (nxt[s] < nxt[ref_best]) ref_best = s;
    end
  endtask

  initial begin
    int a, b;
    rst_n = 1'b0; enb = 1'b0;
    for (int c = 0; c < 4; c++) bm[c] = '0;
    for (int s = 0; s < 64; s++) ref_pm[s] = (s == 0) ? 0 : 64;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      enb = ($urandom_range(0, 5) != 0);
      a = $urandom_range(0, 7);
      b = $urandom_range(0, 7);
      for (int c = 0; c < 4; c++) bm[c] = 4'((c[1] ? 7 - a : a) + (c[0] ? 7 - b : b));
      if (enb) ref_step();
      @(negedge clk);
      checks++;
      if (dec_valid !== enb) begin
        failures++;
        $display("dec_valid mismatch at %0d", n);
      end
      if (enb) begin
        checks += 2;
        if (dec !== ref_dec) begin
          failures++;
          $display("step %0d: decisions %h expected %h", n, dec, ref_dec);
        end
        if (int'(best) != ref_best) begin
          failures++;
          $display("step %0d: best %0d expected %0d", n, best, ref_best);
        end
        if (renorm) renorms++;
      end
    end
    checks++;
    if (renorms == 0) begin
      failures++;
      $display("renormalisation never happened");
    end
    $display("renormalised steps: %0d", renorms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
