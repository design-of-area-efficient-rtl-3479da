// tb_viterbi_decoder -- end-to-end testbench of the Viterbi decoder on a noisy channel.
//
// A random message with a 72-bit zero tail is encoded here with the 171/133 code (explicit
// XORs of the message history), each code bit b is mapped to the soft value 7*b, and noise
// is added: some soft values are pulled part of the way towards the wrong level and, at
// random but separated positions, whole code bits are inverted. Every decoded bit must
// equal the message bit. Also checked: the decoder's latency is 67 clock cycles for bits
// whose next 64 pairs arrive without gaps, and the number of decoded bits. Counted (and a
// failure if never seen): corrected hard channel errors, gaps in in_valid, ACS
// renormalisations and full turns of the survivor memory ring.
module tb_viterbi_decoder;

  localparam int NMSG = 3000;
  localparam int NTOT = NMSG + 72;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid, out_bit, renorm;
  logic [2:0] soft0, soft1;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_out = 0, n_renorm = 0, n_gap = 0, n_hard = 0;
  logic msg [NTOT];
  int   t_in [NTOT];

  always #5 clk = ~clk;

  viterbi_decoder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // soft value of code bit b after the channel
  function automatic logic [2:0] channel(input logic b, input bit hard_err);
    int v;
    v = b ? 7 : 0;
    if (hard_err) v = 7 - v;
    else if ($urandom_range(0, 5) == 0) v = b ? 7 - $urandom_range(1, 3) : $urandom_range(1, 3);
    return 3'(v);
  endfunction

  // output monitor
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (renorm) n_renorm++;
      if (out_valid) begin
        checks++;
        if (out_bit !== msg[n_out]) begin
          failures++;
          $display("bit %0d decoded %b expected %b", n_out, out_bit, msg[n_out]);
        end
        if (n_out + 64 < NTOT && t_in[n_out + 64] - t_in[n_out] == 64) begin
          checks++;
          if (cyc - t_in[n_out] != 67) begin
            failures++;
            $display("bit %0d latency %0d expected 67", n_out, cyc - t_in[n_out]);
          end
        end
        n_out++;
      end
    end
  end

  initial begin
    logic [6:0] h;  // h[0] newest message bit ... the window is {h[5:0], u}
    logic u, v1, v2;
    int last_err;
    rst_n = 1'b0; in_valid = 1'b0; soft0 = '0; soft1 = '0;
    for (int i = 0; i < NTOT; i++) msg[i] = (i < NMSG) ? 1'($urandom) : 1'b0;
    h = '0;
    last_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTOT; n++) begin
      if (n > 1000 && $urandom_range(0, 9) == 0) begin  // a gap
        in_valid = 1'b0;
        soft0 = 3'($urandom);
        soft1 = 3'($urandom);
        n_gap++;
        @(negedge clk);
      end
      u  = msg[n];
      v1 = u ^ h[0] ^ h[1] ^ h[2] ^ h[5];
      v2 = u ^ h[1] ^ h[2] ^ h[4] ^ h[5];
      h  = {h[5:0], u};
      begin
        bit e, which;
        e = (n - last_err > 40) && ($urandom_range(0, 15) == 0);
        which = 1'($urandom);
        if (e) begin
          last_err = n;
          n_hard++;
        end
        soft0 = channel(v1, e && !which);
        soft1 = channel(v2, e && which);
      end
      in_valid = 1'b1;
      t_in[n] = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out != NTOT - 64) begin
      failures++;
      $display("decoded %0d bits, expected %0d", n_out, NTOT - 64);
    end
    checks += 4;
    if (n_hard == 0)   failures++;
    if (n_gap == 0)    failures++;
    if (n_renorm == 0) failures++;
    if (n_out / 64 < 2) failures++;
    $display("hard channel errors corrected: %0d, input gaps: %0d, renormalisations: %0d, memory ring turns: %0d",
             n_hard, n_gap, n_renorm, n_out / 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
