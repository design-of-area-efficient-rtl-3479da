// acs_unit -- add-compare-select for the 64-state trellis.
//
// Every enabled cycle (enb = a new set of branch metrics) each state s' adds the branch
// metric of its two incoming branches to the stored path metrics of its two predecessors
// {d, s'[5:1]}, keeps the smaller sum as its new metric and records which predecessor won
// in decision bit dec[s'] (a tie keeps d = 0). The 64 decisions form the decision vector
// written to the survivor memory. Alongside, a comparison tree finds the state with the
// smallest new metric (lowest index on ties); it is the start state of the traceback.
//
// Renormalisation: metrics are 8 bits. When every new metric has its MSB set, the MSB is
// cleared in all of them (subtracting 128 from each), which keeps their differences and
// stops them from overflowing; the spread of metrics in this trellis is below 128.
// renorm flags a step where this happened.
//
// Reset puts state 0 at metric 0 and all other states at 64, so decoding starts from the
// encoder's zero state. Timing: dec, best and dec_valid are registered; they change one
// cycle after the branch metrics were presented with enb. The state count, the metric
// widths and the port set (decisions and an 8-bit state output) follow the published unit;
// the renormalisation scheme, tie rule and reset values are this design's choices.
module acs_unit
  import viterbi_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enb,
  input  bm_t               bm [4],
  output logic [NSTATE-1:0] dec,
  output logic [7:0]        best,
  output logic              dec_valid,
  output logic              renorm
);

  localparam pm_t PM_INIT = pm_t'(64);

  pm_t               pm      [NSTATE];  // stored path metrics
  pm_t               pm_new  [NSTATE];
  logic [NSTATE-1:0] dec_new;
  logic              all_msb;
  state_t            best_new;

  // Add, compare, select.
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      pm_t c0, c1;
      c0 = pm[pred_state(state_t'(s), 1'b0)] + pm_t'(bm[branch_sym(state_t'(s), 1'b0)]);
      c1 = pm[pred_state(state_t'(s), 1'b1)] + pm_t'(bm[branch_sym(state_t'(s), 1'b1)]);
      dec_new[s] = (c1 < c0);
      pm_new[s]  = dec_new[s] ? c1 : c0;
    end
  end

  // Renormalisation condition: every new metric has its MSB set.
  always_comb begin
    all_msb = 1'b1;
    for (int s = 0; s < NSTATE; s++) all_msb &= pm_new[s][PM_W-1];
  end

  // Minimum search over the new metrics: a binary tree of compare-select nodes.
  pm_t    tv [2*NSTATE];
  state_t ti [2*NSTATE];
  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      tv[NSTATE+s] = pm_new[s];
      ti[NSTATE+s] = state_t'(s);
    end
    for (int n = NSTATE - 1; n >= 1; n--) begin
      if (tv[2*n+1] < tv[2*n]) begin
        tv[n] = tv[2*n+1];
        ti[n] = ti[2*n+1];
      end else begin
        tv[n] = tv[2*n];
        ti[n] = ti[2*n];
      end
    end
    tv[0] = '0;
    ti[0] = '0;
    best_new = ti[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) pm[s] <= (s == 0) ? '0 : PM_INIT;
      dec       <= '0;
      best      <= '0;
      dec_valid <= 1'b0;
      renorm    <= 1'b0;
    end else begin
      dec_valid <= enb;
      if (enb) begin
        for (int s = 0; s < NSTATE; s++)
          pm[s] <= all_msb ? {1'b0, pm_new[s][PM_W-2:0]} : pm_new[s];
        dec    <= dec_new;
        best   <= 8'(best_new);
        renorm <= all_msb;
      end
    end
  end

endmodule
