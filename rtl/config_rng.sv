// config_rng: pseudo-random number source for the configuration generator.
//
// A 32-bit Galois LFSR with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1 (feedback mask 0x80200003), loaded with SEED at
// reset. It advances one step in every cycle with `step` high, and `rnd`
// shows its current state. A seed of 0 would lock the register, so 0 is
// replaced by 1. A physical random source could take its place without
// changing the interface; the LFSR is this design's choice of generator.
//
// Interface: clk, rst_n (active-low, synchronous), step -> rnd (registered).
module config_rng #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] rnd
);
  localparam logic [31:0] POLY = 32'h8020_0003;
  localparam logic [31:0] INIT = (SEED == 32'd0) ? 32'd1 : SEED;

  always_ff @(posedge clk) begin
    if (!rst_n)    rnd <= INIT;
    else if (step) rnd <= rnd[0] ? ((rnd >> 1) ^ POLY) : (rnd >> 1);
  end
endmodule
