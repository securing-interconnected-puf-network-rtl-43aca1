// ipn_pkg: constants and helper functions shared by the interconnected PUF
// network (IPN) modules.
//
// The arbiter PUF model needs per-stage delay values that stand in for the
// manufacturing variation of a real chip. They are produced here by a fixed
// integer hash of (instance seed, stage, path) and shaped into an approximately
// Gaussian distribution by summing four uniform bytes (central limit), which
// mirrors the Gaussian delay assumption of the simulated PUFs this design is
// based on. The hash and the scale are this design's own choice.
package ipn_pkg;

  // 32-bit integer mixer (xorshift-multiply avalanche).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay difference contributed by one arbiter PUF stage.
  //   seed    : identifies the PUF instance (its "silicon")
  //   stage   : stage index, 0 is the stage next to the launch point
  //   crossed : 0 for the straight path pair, 1 for the crossed pair
  // Result is a signed value in [-510, 510], roughly Gaussian (sigma ~148).
  function automatic int stage_delay(input int unsigned seed, input int unsigned stage,
                                     input logic crossed);
    logic [31:0] h;
    int sum;
    h = mix32(seed ^ mix32((stage << 1) + 32'(crossed) + 32'h9e3779b9));
    sum = int'(h[7:0]) + int'(h[15:8]) + int'(h[23:16]) + int'(h[31:24]);
    return sum - 510;
  endfunction

  // Seed of the arbiter PUF number `puf` of the node at `level` of path `path`.
  function automatic int unsigned puf_seed(input int unsigned chip_seed, input int unsigned path,
                                           input int unsigned level, input int unsigned puf);
    return mix32(chip_seed ^ mix32((path << 24) ^ (level << 16) ^ puf));
  endfunction

endpackage
