// ipn_chain: one path of an interconnected PUF network, DEPTH nodes in a row.
//
// Node 0 takes the external challenge. The output of node d goes through a
// shuffler (an IPN edge) and becomes the challenge of node d+1, so every PUF
// of node d+1 depends on every PUF of node d. The last node's outputs are the
// path's response.
//
// The general chain lets node sizes fall from level to level (n >= m >= l >= k).
// This implementation keeps every inner node homogeneous, N PUFs of N stages,
// so that all edges have the same width and one configuration generator
// serves them all; only the last node may be smaller (K PUFs of N stages).
//
// Interface: challenge (N), cfg (DEPTH-1 configuration vectors, entry [d]
// configures the edge after node d) -> response (K).
// Timing: combinational.
module ipn_chain #(
  parameter int unsigned N         = 64,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned K         = 64,
  parameter int unsigned CHIP_SEED = 1,
  parameter int unsigned PATH      = 0,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic [N-1:0]                     challenge,
  input  logic [DEPTH-2:0][N-1:0][IW-1:0]  cfg,
  output logic [K-1:0]                     response
);
  logic [DEPTH-1:0][N-1:0] node_in;
  logic [DEPTH-2:0][N-1:0] node_out;

  assign node_in[0] = challenge;

  for (genvar d = 0; d < DEPTH - 1; d++) begin : g_level
    ipn_node #(
      .N(N), .M(N), .CHIP_SEED(CHIP_SEED), .PATH(PATH), .LEVEL(d)
    ) u_node (
      .challenge(node_in[d]),
      .response (node_out[d])
    );

    ipn_shuffler #(.W(N)) u_edge (
      .data_i(node_out[d]),
      .cfg   (cfg[d]),
      .data_o(node_in[d+1])
    );
  end

  ipn_node #(
    .N(N), .M(K), .CHIP_SEED(CHIP_SEED), .PATH(PATH), .LEVEL(DEPTH - 1)
  ) u_last (
    .challenge(node_in[DEPTH-1]),
    .response (response)
  );

  initial begin
    assert (DEPTH >= 2) else $error("ipn_chain: DEPTH must be at least 2");
    assert (K <= N)     else $error("ipn_chain: K must not exceed N");
  end
endmodule
