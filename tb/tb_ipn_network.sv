// tb_ipn_network: a 16-bit network of depth 3 and width 3 (8 response bits)
// with random edge permutations, checked against the reference network
// (paths XORed) on random challenges, under four configurations.
module tb_ipn_network;
  import ipn_ref_pkg::*;

  localparam int unsigned N = 16, DEPTH = 3, WIDTH = 3, K = 8;
  localparam int unsigned NVEC = WIDTH * (DEPTH - 1);
  localparam int unsigned CS = 32'h00AB_CDEF;

  logic [N-1:0]               chal;
  logic [NVEC-1:0][N-1:0][3:0] cfg;
  logic [K-1:0]               resp;
  int checks = 0, failures = 0;

  ipn_network #(.N(N), .DEPTH(DEPTH), .WIDTH(WIDTH), .K(K), .CHIP_SEED(CS)) dut (
    .challenge(chal), .cfg(cfg), .response(resp));

  initial begin
    config_t c = identity_config(NVEC, N);
    logic [31:0] rng = 32'h2468_ACE1;
    for (int round = 0; round < 4; round++) begin
      if (round > 0) draw_config(c, rng);
      foreach (c[v, i]) cfg[v][i] = 4'(c[v][i]);
      for (int t = 0; t < 100; t++) begin
        logic [63:0] e;
        chal = N'($urandom);
        #1;
        e = network_ref(CS, N, DEPTH, WIDTH, K, c, 64'(chal));
        checks++;
        if (resp !== e[K-1:0]) begin
          failures++;
          if (failures < 10) $display("FAIL chal=%h got=%h exp=%h", chal, resp, e[K-1:0]);
        end
      end
    end
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
