// tb_ipn_top: end-to-end test of the reconfigurable network at reduced size
// (16-bit nodes, depth 3, width 2, 8 response bits, threshold 40 CRPs).
// The checks themselves are in ipn_top_checks.svh, shared with
// tb_ipn_top_full.
//
// The testbench keeps its own model of the configuration: identity at reset,
// then a Fisher-Yates drawing from its own copy of the LFSR at power-up and
// after every THETA CRPs. Challenges are offered at random cycles. Checked:
// every response against the reference network under the modelled
// configuration; response one cycle after acceptance; chal_ready low for
// exactly NVEC*(N-1) cycles after reset and after each THETA-th CRP;
// reconfig_count and crp_count; and that a fixed probe challenge gets a
// different response under some later configuration. Mechanisms counted:
// reconfigurations, stalled challenge offers, responses checked and remaps
// seen; each must occur.
module tb_ipn_top;
  import ipn_ref_pkg::*;

  localparam int unsigned N = 16, DEPTH = 3, WIDTH = 2, K = 8, THETA = 40;
  localparam int unsigned CHIP_SEED = 32'h1F2E_3D4C;
  localparam logic [31:0] RNG_SEED  = 32'hACE1_2468;
  localparam int unsigned ROUNDS = 6;          // reconfigurations after power-up
  localparam int unsigned CHECK_EVERY = 1;     // check every n-th response

  localparam int unsigned NVEC = WIDTH * (DEPTH - 1);
  localparam int unsigned RECONF_CYCLES = NVEC * (N - 1);

  logic clk = 0, rst_n = 0;
  logic chal_valid = 0, chal_ready, resp_valid, reconfiguring;
  logic [N-1:0] challenge = '0;
  logic [K-1:0] response;
  logic [15:0]  reconfig_count;
  logic [$clog2(THETA)-1:0] crp_count;

  ipn_top #(
    .N(N), .DEPTH(DEPTH), .WIDTH(WIDTH), .K(K), .THETA(THETA),
    .CHIP_SEED(CHIP_SEED), .RNG_SEED(RNG_SEED)
  ) dut (.*);

`include "ipn_top_checks.svh"
endmodule
