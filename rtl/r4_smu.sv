// r4_smu: radix-4 state metric unit (R4FSMu when BACKWARD = 0, R4BSMu when 1).
//
// One add-compare-select step of the collapsed radix-4 trellis: the two
// radix-2 steps of a pair are merged, so each of the 8 states has 4 incoming
// (forward) or 4 outgoing (backward) branches, one per pair value n.
//   forward:  alpha'[r4_next(s,n)] = max over (s,n) of alpha[s] + bm[r4_cw(s,n)]
//   backward: beta'[s]             = max over n of beta[r4_next(s,n)] + bm[r4_cw(s,n)]
// This is the max-log form of the recursions (the design gives them with
// exponentials and sums; the max-log approximation is this design's choice).
// The new metrics are normalised by subtracting their maximum, so the best
// state is 0, and saturated at the bottom to SQ = 9 bits. Combinational;
// the caller holds the metric register.
module r4_smu
  import turbo_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  sm_vec_t sm_in,
  input  bm_vec_t bm,
  output sm_vec_t sm_out
);

  always_comb begin
    logic signed [15:0] acc [NSTATES];
    logic signed [15:0] cand, mx;
    for (int s = 0; s < NSTATES; s++) acc[s] = -16'sd32000;
    for (int s = 0; s < NSTATES; s++) begin
      for (int n = 0; n < 4; n++) begin
        logic [2:0] ns;
        ns = r4_next(3'(s), 2'(n));
        if (BACKWARD) begin
          cand = 16'(sm_in[ns]) + 16'(bm[r4_cw(3'(s), 2'(n))]);
          if (cand > acc[s]) acc[s] = cand;
        end else begin
          cand = 16'(sm_in[s]) + 16'(bm[r4_cw(3'(s), 2'(n))]);
          if (cand > acc[ns]) acc[ns] = cand;
        end
      end
    end
    mx = acc[0];
    for (int s = 1; s < NSTATES; s++) if (acc[s] > mx) mx = acc[s];
    for (int s = 0; s < NSTATES; s++) sm_out[s] = sm_t'(sat(acc[s] - mx, SQ));
  end

endmodule
