// tb_ipn_top_full: ipn_top at its default size (64-bit nodes, depth 4,
// width 4, 64 response bits, threshold 358,350 CRPs), taken through the
// power-up configuration, one full threshold period of CRPs, the
// reconfiguration it triggers and a probe challenge afterwards. The checks
// are those of tb_ipn_top (ipn_top_checks.svh); because the reference model
// is slow at this size, only every 20,000th response, the first and the
// last of the period are compared with it.
module tb_ipn_top_full;
  import ipn_ref_pkg::*;

  localparam int unsigned N = 64, DEPTH = 4, WIDTH = 4, K = 64, THETA = 358350;
  localparam int unsigned CHIP_SEED = 32'h1F2E_3D4C;
  localparam logic [31:0] RNG_SEED  = 32'hACE1_2468;
  localparam int unsigned ROUNDS = 1;          // reconfigurations after power-up
  localparam int unsigned CHECK_EVERY = 20000;     // check every n-th response

  localparam int unsigned NVEC = WIDTH * (DEPTH - 1);
  localparam int unsigned RECONF_CYCLES = NVEC * (N - 1);

  logic clk = 0, rst_n = 0;
  logic chal_valid = 0, chal_ready, resp_valid, reconfiguring;
  logic [N-1:0] challenge = '0;
  logic [K-1:0] response;
  logic [15:0]  reconfig_count;
  logic [$clog2(THETA)-1:0] crp_count;

  ipn_top dut (.*);

`include "ipn_top_checks.svh"
endmodule
