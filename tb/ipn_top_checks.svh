// ipn_top_checks.svh: the body shared by the end-to-end testbenches of ipn_top.
// Expects the including module to declare N, DEPTH, WIDTH, K, THETA,
// CHIP_SEED, RNG_SEED, ROUNDS, CHECK_EVERY, NVEC, RECONF_CYCLES, the DUT port
// signals and an instance of ipn_top.

  int checks = 0, failures = 0;
  int n_reconfig = 0, n_stall = 0, n_checked = 0, n_remap = 0;
  longint cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycles, msg);
    end
  endtask

  // waits out one reconfiguration; ready must stay low exactly RECONF_CYCLES
  task automatic expect_reconfig(ref config_t cfg, ref logic [31:0] rng, input int unsigned epoch,
                                 input int unsigned extra);
    int low = 0;
    while (!chal_ready) begin
      if (chal_valid) n_stall++;
      low++;
      @(negedge clk);
      if (low > int'(RECONF_CYCLES) + 10) break;
    end
    check(low == int'(RECONF_CYCLES + extra),
          $sformatf("ready low for %0d cycles, expected %0d", low, RECONF_CYCLES + extra));
    draw_config(cfg, rng);
    n_reconfig++;
    check(reconfig_count == 16'(epoch), $sformatf("reconfig_count %0d, expected %0d", reconfig_count, epoch));
    check(crp_count == '0, "crp_count not cleared");
  endtask

  initial begin
    automatic config_t      cfg   = identity_config(NVEC, N);
    automatic logic [31:0]  rng   = RNG_SEED;
    automatic logic [N-1:0] probe = N'(64'h5A5A_3C3C_9696_0F0F);
    automatic logic [K-1:0] probe_resp[$];

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chal_valid = 1;                   // offer a challenge during the power-up drawing
    check(!chal_ready && reconfiguring, "not reconfiguring after reset");
    expect_reconfig(cfg, rng, 1, 1);   // one extra cycle: the start after reset

    for (int unsigned epoch = 1; epoch <= ROUNDS; epoch++) begin
      automatic int unsigned given = 0;
      while (given < THETA) begin
        logic [N-1:0] c;
        logic [63:0]  e;
        bit           check_this;
        // offer the probe first in every epoch, then random challenges
        c = (given == 0) ? probe : N'({$urandom, $urandom});
        chal_valid = ($urandom_range(4, 0) != 0) || (given == 0);
        challenge  = c;
        @(negedge clk);
        if (!chal_valid) continue;
        check(resp_valid, "no response one cycle after acceptance");
        check(crp_count == $bits(crp_count)'((given + 1) % THETA), "crp_count");
        check_this = (given == 0) || (given % CHECK_EVERY == 0) || (given == THETA - 1);
        if (check_this) begin
          e = network_ref(CHIP_SEED, N, DEPTH, WIDTH, K, cfg, 64'(c));
          check(response == e[K-1:0], $sformatf("epoch %0d crp %0d chal %h: got %h exp %h",
                                                 epoch, given, c, response, e[K-1:0]));
          n_checked++;
        end
        if (given == 0) probe_resp.push_back(response);
        given++;
        if (given < THETA) check(chal_ready, "stalled before the threshold");
      end
      // the THETA-th CRP was taken: the next configuration is drawn now
      chal_valid = 1'($urandom_range(1, 0));
      check(!chal_ready && reconfiguring, "no reconfiguration at the threshold");
      expect_reconfig(cfg, rng, epoch + 1, 0);
    end
    // the probe once more, under the last configuration
    chal_valid = 1;
    challenge  = probe;
    @(negedge clk);
    chal_valid = 0;
    begin
      automatic logic [63:0] e = network_ref(CHIP_SEED, N, DEPTH, WIDTH, K, cfg, 64'(probe));
      check(resp_valid && response == e[K-1:0], "probe under the last configuration");
      probe_resp.push_back(response);
    end

    foreach (probe_resp[i]) if (i > 0 && probe_resp[i] != probe_resp[0]) n_remap++;

    $display("mechanisms: reconfigurations=%0d stalled_offers=%0d responses_checked=%0d probe_remaps=%0d",
             n_reconfig, n_stall, n_checked, n_remap);
    check(n_reconfig == ROUNDS + 1, "reconfiguration count");
    check(n_stall > 0, "no challenge was ever stalled");
    check(n_checked > 0, "no response checked");
    check(n_remap > 0, "reconfiguration never changed the probe response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(10) * (longint'(ROUNDS + 2) * longint'(THETA * 3 + RECONF_CYCLES + 20) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
