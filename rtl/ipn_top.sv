// ipn_top: reconfigurable interconnected PUF network (IPN).
//
// A strong PUF built from many arbiter PUFs wired into a network: WIDTH paths
// of DEPTH nodes, each node N arbiter PUFs of N stages, the nodes of a path
// joined by bit shufflers whose permutations (configuration vectors) can be
// changed at run time (ipn_network). To keep an attacker from ever collecting
// enough challenge-response pairs (CRPs) to model one mapping, a counter
// (crp_counter) counts the CRPs handed out and, when THETA have been given,
// a fresh random configuration is drawn (config_rng + config_gen), which
// remaps the whole challenge-response function.
//
// Operation:
//  * After reset every edge holds the identity permutation; the block
//    immediately draws a first random configuration (NVEC*(N-1) cycles,
//    NVEC = WIDTH*(DEPTH-1)) before it accepts a challenge.
//  * A challenge is taken in a cycle with chal_valid && chal_ready. Its K-bit
//    response appears on `response` with resp_valid high one cycle later.
//  * The THETA-th CRP since the last reconfiguration is still answered with
//    the old configuration; from the next cycle chal_ready is low for
//    NVEC*(N-1) cycles while the new configuration is drawn (reconfiguring
//    is high), then the count starts again from 0.
//  * reconfig_count counts completed configurations, the one after reset
//    included (wraps at 2^16); crp_count is the number of CRPs given since
//    the last one.
//
// Defaults follow the 64-bit, depth 4, width 4 network with THETA = 358,350.
// The response width K, the XOR merge of paths, the handshake, the random
// generator and the drawing procedure are this design's choices.
//
// Interface: clk, rst_n (active-low, synchronous); chal_valid, chal_ready,
// challenge (N); resp_valid, response (K); reconfiguring, reconfig_count,
// crp_count.
module ipn_top #(
  parameter int unsigned N         = 64,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned K         = 64,
  parameter int unsigned THETA     = 358350,
  parameter int unsigned CHIP_SEED = 32'h1F2E_3D4C,
  parameter logic [31:0] RNG_SEED  = 32'hACE1_2468,
  localparam int unsigned IW   = $clog2(N),
  localparam int unsigned NVEC = WIDTH * (DEPTH - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          chal_valid,
  output logic          chal_ready,
  input  logic [N-1:0]  challenge,
  output logic          resp_valid,
  output logic [K-1:0]  response,
  output logic          reconfiguring,
  output logic [15:0]   reconfig_count,
  output logic [$clog2(THETA)-1:0] crp_count
);
  logic                          init_pending;
  logic                          crp_fire;
  logic                          threshold_hit;
  logic                          gen_start, gen_busy, gen_done;
  logic                          rnd_step;
  logic [31:0]                   rnd;
  logic [NVEC-1:0][N-1:0][IW-1:0] cfg;
  logic [K-1:0]                  net_resp;

  assign chal_ready    = !gen_busy && !init_pending;
  assign crp_fire      = chal_valid && chal_ready;
  assign gen_start     = init_pending || threshold_hit;
  assign reconfiguring = gen_busy || init_pending;

  ipn_network #(
    .N(N), .DEPTH(DEPTH), .WIDTH(WIDTH), .K(K), .CHIP_SEED(CHIP_SEED)
  ) u_network (
    .challenge(challenge),
    .cfg      (cfg),
    .response (net_resp)
  );

  crp_counter #(.THETA(THETA)) u_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .crp_fire(crp_fire),
    .reached (threshold_hit),
    .count   (crp_count)
  );

  config_rng #(.SEED(RNG_SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .step (rnd_step),
    .rnd  (rnd)
  );

  config_gen #(.N(N), .NVEC(NVEC)) u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (gen_start),
    .rnd     (rnd),
    .rnd_step(rnd_step),
    .busy    (gen_busy),
    .done    (gen_done),
    .cfg     (cfg)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_pending   <= 1'b1;
      resp_valid     <= 1'b0;
      response       <= '0;
      reconfig_count <= '0;
    end else begin
      init_pending <= 1'b0;
      resp_valid   <= crp_fire;
      if (crp_fire) response <= net_resp;
      if (gen_done) reconfig_count <= reconfig_count + 1'b1;
    end
  end

  // The network must never be sampled while its configuration is changing.
  a_no_crp_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    crp_fire |-> !gen_busy);
endmodule
