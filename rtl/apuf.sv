// apuf: behavioural model of an N-stage arbiter PUF.
//
// Behavioural model, not synthesizable logic in the intended sense: a real
// arbiter PUF is a race between two edges through a chain of N switch stages,
// decided by an arbiter latch at the end, and its behaviour comes from the
// random delays of the silicon. This model reproduces that race numerically.
// The signal difference (top minus bottom arrival time) enters stage i; if the
// challenge bit c[i] is 0 the two paths run straight and the stage adds its
// straight delay difference, if c[i] is 1 the paths cross, the difference
// changes sign and the stage adds its crossed delay difference. The response
// is 1 when the final difference is positive (the bottom edge wins), else 0.
// The per-stage delays are fixed at elaboration from SEED through
// ipn_pkg::stage_delay, so every instance with its own SEED behaves as a
// different chip. Noise-free evaluation, as in the simulations this design
// follows; the delay distribution and the arbiter's tie rule are choices of
// this model.
//
// Interface: challenge (N bits, bit 0 drives the first stage) -> response.
// Timing: combinational, no clock; the enclosing design samples the result.
module apuf #(
  parameter int unsigned N    = 64,
  parameter int unsigned SEED = 1
) (
  input  logic [N-1:0] challenge,
  output logic         response
);
  import ipn_pkg::*;

  typedef logic signed [15:0] delay_t;

  function automatic logic [N-1:0][1:0][15:0] build_delays(input int unsigned seed);
    logic [N-1:0][1:0][15:0] d;
    for (int unsigned i = 0; i < N; i++) begin
      d[i][0] = 16'(stage_delay(seed, i, 1'b0));
      d[i][1] = 16'(stage_delay(seed, i, 1'b1));
    end
    return d;
  endfunction

  localparam logic [N-1:0][1:0][15:0] DELAYS = build_delays(SEED);

  logic signed [31:0] diff;

  always_comb begin
    diff = '0;
    for (int i = 0; i < N; i++) begin
      if (challenge[i]) diff = -diff + 32'(delay_t'(DELAYS[i][1]));
      else              diff =  diff + 32'(delay_t'(DELAYS[i][0]));
    end
    response = (diff > 0);
  end

endmodule
