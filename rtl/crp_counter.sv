// crp_counter: counts challenge-response pairs and signals the reconfiguration
// threshold THETA.
//
// Every cycle with crp_fire high is one CRP handed out. The counter starts at
// 0 after reset. The CRP that brings the count to THETA raises `reached` for
// that same cycle and sets the count back to 0, so `reached` pulses once every
// THETA CRPs. THETA is a design-time constant, to be chosen below the
// sample complexity an attacker needs (358,350 for the 64-bit, depth 4,
// width 4 network, half of its estimated 716,703).
//
// Interface: clk, rst_n (active-low, synchronous), crp_fire -> reached
// (combinational, same cycle as the THETA-th crp_fire), count (registered).
module crp_counter #(
  parameter int unsigned THETA = 358350,
  localparam int unsigned CW = (THETA > 1) ? $clog2(THETA) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          crp_fire,
  output logic          reached,
  output logic [CW-1:0] count
);
  assign reached = crp_fire && (count == CW'(THETA - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)       count <= '0;
    else if (reached) count <= '0;
    else if (crp_fire) count <= count + 1'b1;
  end

  initial assert (THETA >= 2) else $error("crp_counter: THETA must be at least 2");
endmodule
