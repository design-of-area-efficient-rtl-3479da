// tb_viterbi_codec -- end-to-end testbench of the whole design at its default sizes.
//
// The top's own rate 1/2 encoder is fed a random message with a 72-bit zero tail; its code
// pairs pass through a channel model here (code bit b -> soft value 7*b, partial noise on
// some values, separated whole-bit inversions) into the top's Viterbi decoder, and every
// decoded bit must equal the message bit. The encoder's pairs are also compared with the
// 171/133 code computed here. The rate 1/3 encoder beside them is driven with its own
// random bits and checked against V1 = u^u1^u2, V2 = u1^u2, V3 = u^u2, and the rate 1/3
// half branch metric unit with random triples against -A-/+B-/+C. Counted (a failure
// if never seen): corrected hard channel errors, input gaps, renormalisations, survivor
// memory ring turns, and cycles in which the encoder had to wait for its output switch
// (tx_ready low). Both output switches' serial streams are compared bit by bit with the
// expected symbols, V1 first.
module tb_viterbi_codec;

  localparam int NMSG = 2000;
  localparam int NTOT = NMSG + 72;

  logic clk = 1'b0;
  logic rst_n;
  logic tx_valid, tx_bit, tx_ready, tx_sym_valid, tx_ser_valid, tx_ser_bit;
  logic [1:0] tx_sym;
  logic rx_valid, rx_out_valid, rx_out_bit, rx_renorm;
  logic [2:0] rx_soft0, rx_soft1;
  logic enc3_valid, enc3_bit, enc3_ready, enc3_sym_valid, enc3_ser_valid, enc3_ser_bit;
  logic ser_q [$];   // expected serial bits of the rate 1/2 output switch
  logic ser3_q [$];  // expected serial bits of the rate 1/3 output switch
  int   n_ser = 0, n_ser3 = 0, n_wait = 0;
  bit   enc3_done = 0;
  logic [2:0] enc3_sym;
  int checks = 0, failures = 0;
  int n_out = 0, n_renorm = 0, n_gap = 0, n_hard = 0, n_sym = 0, last_err = 0;
  logic msg [NTOT];
  logic [6:0] h = '0;
  logic [1:0] e3 = '0;
  logic [2:0] exp3;
  logic [2:0] exp3_q [$];
  logic signed [2:0] r13_a, r13_b, r13_c;
  logic signed [4:0] r13_bm [4];

  always #5 clk = ~clk;

  viterbi_codec dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel: encoder output of this cycle -> decoder input of this cycle
  always_comb begin
    rx_valid = tx_sym_valid;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // encoder symbol check and channel
      if (tx_sym_valid) begin
        logic u, v1, v2;
        bit e, which;
        u  = msg[n_sym];
        v1 = u ^ h[0] ^ h[1] ^ h[2] ^ h[5];
        v2 = u ^ h[1] ^ h[2] ^ h[4] ^ h[5];
        h  = {h[5:0], u};
        checks++;
        ser_q.push_back(v1);
        ser_q.push_back(v2);
        if (tx_sym !== {v1, v2}) begin
          failures++;
          $display("encoder symbol %0d: %b expected %b", n_sym, tx_sym, {v1, v2});
        end
        e = (n_sym - last_err > 40) && ($urandom_range(0, 15) == 0);
        which = 1'($urandom);
        if (e) begin
          last_err = n_sym;
          n_hard++;
        end
        rx_soft0 = noisy(tx_sym[1], e && !which);
        rx_soft1 = noisy(tx_sym[0], e && which);
        n_sym++;
      end else begin
        n_gap++;
        rx_soft0 = 3'($urandom);
        rx_soft1 = 3'($urandom);
      end
      // decoder output check
      if (rx_renorm) n_renorm++;
      if (rx_out_valid) begin
        checks++;
        if (rx_out_bit !== msg[n_out]) begin
          failures++;
          $display("bit %0d decoded %b expected %b", n_out, rx_out_bit, msg[n_out]);
        end
        n_out++;
      end
      // rate 1/3 branch metrics: -A -/+ B -/+ C for the words 0yz
      begin
        int ia, ib, ic;
        ia = int'(r13_a); ib = int'(r13_b); ic = int'(r13_c);
        for (int w = 0; w < 4; w++) begin
          checks++;
          if (int'(r13_bm[w]) != -ia + (w[1] ? ib : -ib) + (w[0] ? ic : -ic)) begin
            failures++;
            $display("rate 1/3 metric %0d wrong", w);
          end
        end
        r13_a = 3'($urandom); r13_b = 3'($urandom); r13_c = 3'($urandom);
      end
      // rate 1/3 encoder check
      if (enc3_sym_valid) begin
        checks++;
        if (exp3_q.size() == 0) begin
          failures++;
          $display("unexpected rate 1/3 symbol");
        end else begin
          exp3 = exp3_q.pop_front();
          if (enc3_sym !== exp3) begin
            failures++;
            $display("rate 1/3 symbol %b expected %b", enc3_sym, exp3);
          end
          ser3_q.push_back(exp3[2]);
          ser3_q.push_back(exp3[1]);
          ser3_q.push_back(exp3[0]);
        end
      end
      // serial outputs of the two output switches
      if (tx_ser_valid) begin
        checks++;
        if (ser_q.size() == 0 || tx_ser_bit !== ser_q.pop_front()) begin
          failures++;
          $display("rate 1/2 serial bit %0d wrong", n_ser);
        end
        n_ser++;
      end
      if (enc3_ser_valid) begin
        checks++;
        if (ser3_q.size() == 0 || enc3_ser_bit !== ser3_q.pop_front()) begin
          failures++;
          $display("rate 1/3 serial bit %0d wrong", n_ser3);
        end
        n_ser3++;
      end
    end
  end

  function automatic logic [2:0] noisy(input logic b, input bit hard_err);
    int v;
    v = b ? 7 : 0;
    if (hard_err) v = 7 - v;
    else if ($urandom_range(0, 5) == 0) v = b ? 7 - $urandom_range(1, 3) : $urandom_range(1, 3);
    return 3'(v);
  endfunction

  // rate 1/3 encoder stimulus: random bits, taken only when enc3_ready
  initial begin
    logic u3;
    enc3_valid = 1'b0; enc3_bit = 1'b0;
    @(posedge rst_n);
    for (int n = 0; n < 1000; ) begin
      @(negedge clk);
      enc3_valid = ($urandom_range(0, 3) != 0);
      u3 = 1'($urandom);
      enc3_bit = u3;
      if (enc3_valid && enc3_ready) begin  // taken at the next rising edge
        exp3_q.push_back({u3 ^ e3[0] ^ e3[1], e3[0] ^ e3[1], u3 ^ e3[1]});
        e3 = {e3[0], u3};
        n++;
      end
    end
    @(negedge clk);
    enc3_valid = 1'b0;
    enc3_done = 1;
  end

  initial begin
    rst_n = 1'b0; tx_valid = 1'b0; tx_bit = 1'b0; rx_soft0 = '0; rx_soft1 = '0;
    r13_a = '0; r13_b = '0; r13_c = '0;
    for (int i = 0; i < NTOT; i++) msg[i] = (i < NMSG) ? 1'($urandom) : 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTOT; ) begin
      tx_valid = ($urandom_range(0, 9) != 0);
      tx_bit = msg[n];
      if (tx_valid && !tx_ready) n_wait++;
      if (tx_valid && tx_ready) n++;  // taken at the next rising edge
      @(negedge clk);
    end
    tx_valid = 1'b0;
    wait (enc3_done);
    repeat (20) @(negedge clk);
    checks += 3;
    if (ser_q.size() != 0 || ser3_q.size() != 0 || exp3_q.size() != 0) begin
      failures++;
      $display("serial bits or symbols not delivered: %0d %0d %0d", ser_q.size(), ser3_q.size(),
               exp3_q.size());
    end
    if (n_ser != 2 * NTOT || n_ser3 != 3 * 1000) begin
      failures++;
      $display("serial bit counts %0d, %0d", n_ser, n_ser3);
    end
    if (n_wait == 0) failures++;
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
    $display("encoder waits for the output switch: %0d, serial bits: %0d (rate 1/2), %0d (rate 1/3)",
             n_wait, n_ser, n_ser3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
