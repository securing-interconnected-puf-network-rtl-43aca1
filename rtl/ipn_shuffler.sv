// ipn_shuffler: an IPN edge, a W-bit configurable bit permutation.
//
// The configuration vector holds, for every input bit i, the binary number of
// the output bit it is sent to: data_o[cfg[i]] = data_i[i]. The reversing edge,
// for instance, has cfg[i] = W-1-i. The vector must be a permutation of
// 0..W-1 (config_gen only ever produces permutations); an output that no
// entry names reads 0.
//
// Each output is an OR over the inputs whose entry selects it, i.e. a W-way
// one-hot selection per output bit.
//
// Interface: data_i (W), cfg (W entries of $clog2(W) bits) -> data_o (W).
// Timing: combinational.
module ipn_shuffler #(
  parameter int unsigned W = 64,
  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]         data_i,
  input  logic [W-1:0][IW-1:0] cfg,
  output logic [W-1:0]         data_o
);
  for (genvar o = 0; o < W; o++) begin : g_out
    logic [W-1:0] sel;                 // inputs whose entry names output o
    always_comb begin
      for (int unsigned i = 0; i < W; i++) sel[i] = (cfg[i] == IW'(o));
    end
    assign data_o[o] = |(sel & data_i);
  end
endmodule
