// ipn_network: the interconnected PUF network, WIDTH paths side by side.
//
// WIDTH chains of DEPTH nodes all receive the same challenge, so WIDTH nodes
// share the network input (the network's width) and the shortest path from
// input to output crosses DEPTH nodes (its depth). Each chain has its own PUFs
// and its own shufflers. The K-bit responses of the chains are combined by
// bitwise XOR, the way an XOR PUF combines its arbiter PUFs; a wider network
// therefore adds XORs. How parallel paths are merged is this design's reading.
//
// Configuration: cfg[p*(DEPTH-1) + d] configures the edge after node d of
// path p.
//
// Interface: challenge (N), cfg (WIDTH*(DEPTH-1) vectors) -> response (K).
// Timing: combinational.
module ipn_network #(
  parameter int unsigned N         = 64,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned WIDTH     = 4,
  parameter int unsigned K         = 64,
  parameter int unsigned CHIP_SEED = 1,
  localparam int unsigned IW   = $clog2(N),
  localparam int unsigned NVEC = WIDTH * (DEPTH - 1)
) (
  input  logic [N-1:0]                   challenge,
  input  logic [NVEC-1:0][N-1:0][IW-1:0] cfg,
  output logic [K-1:0]                   response
);
  logic [WIDTH-1:0][K-1:0] path_resp;

  for (genvar p = 0; p < WIDTH; p++) begin : g_path
    ipn_chain #(
      .N(N), .DEPTH(DEPTH), .K(K), .CHIP_SEED(CHIP_SEED), .PATH(p)
    ) u_chain (
      .challenge(challenge),
      .cfg      (cfg[p*(DEPTH-1) +: (DEPTH-1)]),
      .response (path_resp[p])
    );
  end

  always_comb begin
    response = '0;
    for (int p = 0; p < WIDTH; p++) response ^= path_resp[p];
  end
endmodule
