// config_gen: generates and holds the configuration of every IPN edge.
//
// NVEC configuration vectors of N entries each are kept in registers; each is
// a permutation of 0..N-1 (entry i = output port of input bit i). Reset loads
// the identity permutation. A `start` pulse (taken only while idle) shuffles
// all vectors in place with the Fisher-Yates algorithm, one swap per clock:
// for vector v = 0..NVEC-1 and position i = N-1 down to 1, pick
// j = floor(r * (i+1) / 2^32) with r the 32-bit random word, and
// swap entries i and j. Every swap consumes one random word (rnd_step is high
// in that cycle). Swapping keeps each vector a permutation at every cycle,
// and shuffling any permutation with fresh random indices gives a new
// random one, so the previous configuration need not be cleared.
// The swap procedure and the range reduction by multiplication are this
// design's choices; only "a random number generator produces new
// configuration vectors" is given.
//
// Timing: busy rises the cycle after start and stays high for exactly
// NVEC*(N-1) cycles; done pulses in the last of them, and from the next
// cycle cfg holds the new configuration. cfg changes while busy, so the user
// must not evaluate the network then.
//
// Interface: clk, rst_n (active-low, synchronous), start, rnd (32) ->
// rnd_step, busy, done, cfg (NVEC x N x $clog2(N)).
module config_gen #(
  parameter int unsigned N    = 64,
  parameter int unsigned NVEC = 12,
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned VW  = (NVEC > 1) ? $clog2(NVEC) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [31:0]                   rnd,
  output logic                          rnd_step,
  output logic                          busy,
  output logic                          done,
  output logic [NVEC-1:0][N-1:0][IW-1:0] cfg
);
  logic [VW-1:0] vec_q;
  logic [IW-1:0] pos_q;
  logic [IW-1:0] pick;
  logic [IW+32:0] prod;

  // j = floor(r * (i+1) / 2^32), always in 0..i
  always_comb begin
    prod = (IW+33)'(rnd) * (IW+33)'({1'b0, pos_q} + 1'b1);
    pick = IW'(prod >> 32);
  end

  assign rnd_step = busy;
  assign done     = busy && (pos_q == IW'(1)) && (vec_q == VW'(NVEC - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      vec_q <= '0;
      pos_q <= '0;
      for (int v = 0; v < NVEC; v++)
        for (int i = 0; i < N; i++) cfg[v][i] <= IW'(i);
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        vec_q <= '0;
        pos_q <= IW'(N - 1);
      end
    end else begin
      cfg[vec_q][pos_q] <= cfg[vec_q][pick];
      cfg[vec_q][pick]  <= cfg[vec_q][pos_q];
      if (pos_q == IW'(1)) begin
        pos_q <= IW'(N - 1);
        if (vec_q == VW'(NVEC - 1)) busy <= 1'b0;
        else vec_q <= vec_q + 1'b1;
      end else begin
        pos_q <= pos_q - 1'b1;
      end
    end
  end

  initial assert (N >= 2) else $error("config_gen: N must be at least 2");
endmodule
