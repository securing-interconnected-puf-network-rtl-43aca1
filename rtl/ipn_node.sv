// ipn_node: one node of an interconnected PUF network.
//
// A node of size M and length N is M arbiter PUFs of N stages that all receive
// the same N-bit challenge, running in parallel; it returns their M response
// bits. A node with M == N is homogeneous, otherwise heterogeneous. PUF j of
// the node answers on response[j].
//
// Each PUF gets its own delay seed, ipn_pkg::puf_seed(CHIP_SEED, PATH, LEVEL, j),
// so that no two PUFs of the network share delays.
//
// Interface: challenge (N) -> response (M). Timing: combinational.
module ipn_node #(
  parameter int unsigned N         = 64,
  parameter int unsigned M         = 64,
  parameter int unsigned CHIP_SEED = 1,
  parameter int unsigned PATH      = 0,
  parameter int unsigned LEVEL     = 0
) (
  input  logic [N-1:0] challenge,
  output logic [M-1:0] response
);
  for (genvar j = 0; j < M; j++) begin : g_puf
    apuf #(
      .N   (N),
      .SEED(ipn_pkg::puf_seed(CHIP_SEED, PATH, LEVEL, j))
    ) u_apuf (
      .challenge(challenge),
      .response (response[j])
    );
  end
endmodule
