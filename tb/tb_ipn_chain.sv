// tb_ipn_chain: a chain of three nodes (16-bit, last node 4 PUFs) with random
// edge permutations, checked against the reference chain on random
// challenges. The permutations are redrawn every 50 challenges; the test also
// requires that a new configuration changes some responses.
module tb_ipn_chain;
  import ipn_ref_pkg::*;

  localparam int unsigned N = 16, DEPTH = 3, K = 4;
  localparam int unsigned CS = 32'h0000_C0DE;

  logic [N-1:0]                chal;
  logic [DEPTH-2:0][N-1:0][3:0] cfg;
  logic [K-1:0]                resp;
  int checks = 0, failures = 0;

  ipn_chain #(.N(N), .DEPTH(DEPTH), .K(K), .CHIP_SEED(CS), .PATH(2)) dut (
    .challenge(chal), .cfg(cfg), .response(resp));

  initial begin
    config_t c = identity_config(DEPTH - 1, N);
    logic [31:0] rng = 32'h1357_9BDF;
    int changed = 0;
    for (int round = 0; round < 8; round++) begin
      logic [K-1:0] r_drawn, r_ident;
      draw_config(c, rng);
      foreach (c[v, i]) cfg[v][i] = 4'(c[v][i]);
      for (int t = 0; t < 50; t++) begin
        logic [63:0] e;
        chal = N'($urandom);
        #1;
        e = chain_ref(CS, 2, N, DEPTH, K, c, 0, 64'(chal));
        checks++;
        if (resp !== e[K-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL chal=%h got=%h exp=%h", chal, resp, e[K-1:0]);
        end
      end
      // last challenge: drawn configuration against the identity one
      r_drawn = resp;
      r_ident  = K'(chain_ref(CS, 2, N, DEPTH, K, identity_config(DEPTH - 1, N), 0, 64'(chal)));
      if (r_drawn != r_ident) changed++;
    end
    checks++;
    if (changed == 0) begin failures++; $display("FAIL configuration has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
