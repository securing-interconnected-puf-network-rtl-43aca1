// ipn_ref_pkg: reference model of the reconfigurable PUF network, used by the
// testbenches to work out expected values independently of the RTL.
//
// The arbiter PUF is evaluated here with the linear parity-feature form of the
// delay race instead of the stage-by-stage recurrence the RTL uses:
//   2*delta = sum_i P(i+1)*(a_i + b_i) + P(i)*(a_i - b_i),
//   P(i) = product over j >= i of (c_j ? -1 : +1), P(N) = 1,
// where a_i / b_i are the straight / crossed delay differences of stage i
// (the same silicon values, ipn_pkg::stage_delay). The shuffler, the LFSR and
// the Fisher-Yates drawing are re-implemented from their descriptions.
package ipn_ref_pkg;
  import ipn_pkg::*;

  typedef int unsigned perm_t[];     // one configuration vector
  typedef perm_t       config_t[];   // all vectors of a network

  function automatic bit apuf_ref(int unsigned seed, int unsigned n, logic [63:0] c);
    int p_next, p_here;
    longint twice;
    twice  = 0;
    p_next = 1;                       // P(N)
    for (int i = int'(n) - 1; i >= 0; i--) begin
      int a, b;
      a = stage_delay(seed, i, 1'b0);
      b = stage_delay(seed, i, 1'b1);
      p_here = c[i] ? -p_next : p_next;
      twice = twice + longint'(p_next * (a + b)) + longint'(p_here * (a - b));
      p_next = p_here;
    end
    return twice > 0;
  endfunction

  function automatic logic [63:0] node_ref(int unsigned chip_seed, int unsigned path,
                                           int unsigned level, int unsigned n, int unsigned m,
                                           logic [63:0] c);
    logic [63:0] r = '0;
    for (int unsigned j = 0; j < m; j++)
      r[j] = apuf_ref(puf_seed(chip_seed, path, level, j), n, c);
    return r;
  endfunction

  function automatic logic [63:0] shuffle_ref(perm_t p, logic [63:0] d);
    logic [63:0] o = '0;
    foreach (p[i]) o[p[i]] = d[i];
    return o;
  endfunction

  function automatic logic [63:0] chain_ref(int unsigned chip_seed, int unsigned path,
                                            int unsigned n, int unsigned depth, int unsigned k,
                                            config_t cfg, int unsigned first_vec,
                                            logic [63:0] c);
    logic [63:0] x = c;
    for (int unsigned d = 0; d + 1 < depth; d++)
      x = shuffle_ref(cfg[first_vec + d], node_ref(chip_seed, path, d, n, n, x));
    return node_ref(chip_seed, path, depth - 1, n, k, x);
  endfunction

  function automatic logic [63:0] network_ref(int unsigned chip_seed, int unsigned n,
                                              int unsigned depth, int unsigned width,
                                              int unsigned k, config_t cfg, logic [63:0] c);
    logic [63:0] r = '0;
    for (int unsigned p = 0; p < width; p++)
      r ^= chain_ref(chip_seed, p, n, depth, k, cfg, p * (depth - 1), c);
    return r;
  endfunction

  // x^32 + x^22 + x^2 + x + 1, one step of the right-shifting Galois form
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic fb = s[0];
    s = s >> 1;
    if (fb) begin
      s[31] = ~s[31];
      s[21] = ~s[21];
      s[1]  = ~s[1];
      s[0]  = ~s[0];
    end
    return s;
  endfunction

  function automatic config_t identity_config(int unsigned nvec, int unsigned n);
    config_t c = new[nvec];
    foreach (c[v]) begin
      c[v] = new[n];
      foreach (c[v][i]) c[v][i] = i;
    end
    return c;
  endfunction

  // Fisher-Yates over every vector; rng is advanced once per swap.
  function automatic void draw_config(ref config_t c, ref logic [31:0] rng);
    foreach (c[v]) begin
      for (int i = c[v].size() - 1; i >= 1; i--) begin
        longint unsigned j;
        int unsigned t;
        j = (longint'(rng) * longint'(i) + longint'(rng)) >> 32;
        t = c[v][i]; c[v][i] = c[v][j]; c[v][j] = t;
        rng = lfsr_next(rng);
      end
    end
  endfunction

  function automatic bit is_perm(perm_t p);
    bit seen[] = new[p.size()];
    foreach (p[i]) begin
      if (p[i] >= p.size() || seen[p[i]]) return 0;
      seen[p[i]] = 1;
    end
    return 1;
  endfunction
endpackage
