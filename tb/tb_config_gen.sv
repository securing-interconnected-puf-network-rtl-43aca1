// tb_config_gen: a generator of 12 vectors of 64 entries (the default network)
// is started three times with random words supplied from this testbench.
// Checks: identity after reset; busy lasts exactly NVEC*(N-1) cycles with
// rnd_step high in each; done pulses once, in the last busy cycle; start is
// ignored while busy (held high through the second drawing); every vector stays a permutation; the result equals a
// reference Fisher-Yates drawing fed with the same random words; and each
// drawing changes the configuration.
module tb_config_gen;
  import ipn_ref_pkg::*;

  localparam int unsigned N = 64, NVEC = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] rnd;
  logic rnd_step, busy, done;
  logic [NVEC-1:0][N-1:0][5:0] cfg;
  int checks = 0, failures = 0;

  config_gen #(.N(N), .NVEC(NVEC)) dut (.clk, .rst_n, .start, .rnd, .rnd_step, .busy, .done, .cfg);

  always #5 clk = ~clk;

  // random words: a fresh $urandom after every consumed word
  logic [31:0] words[$];
  always @(posedge clk) if (rst_n && rnd_step) begin
    rnd <= $urandom;
  end
  always @(negedge clk) if (rst_n && rnd_step) words.push_back(rnd);

  function automatic bit cfg_equals(config_t c);
    foreach (c[v, i]) if (cfg[v][i] != 6'(c[v][i])) return 0;
    return 1;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    config_t ref_cfg = identity_config(NVEC, N);
    rnd = $urandom;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(cfg_equals(ref_cfg), "identity after reset");
    for (int run = 0; run < 3; run++) begin
      automatic int busy_cycles = 0, done_cycles = 0, last_done = -1;
      automatic config_t prev = ref_cfg;
      words.delete();
      start = 1;
      @(posedge clk);
      @(negedge clk);
      start = (run == 1);              // keep start high during run 1: must be ignored
      while (busy) begin
        check(rnd_step, "rnd_step low while busy");
        if (done) begin done_cycles++; last_done = busy_cycles; end
        busy_cycles++;
        for (int v = 0; v < NVEC; v++) begin
          automatic perm_t p = new[N];
          foreach (p[i]) p[i] = cfg[v][i];
          if (!is_perm(p)) begin check(0, $sformatf("vector %0d not a permutation", v)); break; end
        end
        @(negedge clk);
        if (busy_cycles > NVEC * N) break;
      end
      start = 0;
      check(busy_cycles == NVEC * (N - 1), $sformatf("busy for %0d cycles", busy_cycles));
      check(done_cycles == 1 && last_done == int'(NVEC * (N - 1)) - 1, "done pulse position");
      // reference: the same Fisher-Yates drawing with the words the block consumed
      foreach (ref_cfg[v]) for (int i = N - 1; i >= 1; i--) begin
        longint unsigned j;
        int unsigned t;
        j = (longint'(words.pop_front()) * longint'(i + 1)) >> 32;
        t = ref_cfg[v][i]; ref_cfg[v][i] = ref_cfg[v][j]; ref_cfg[v][j] = t;
      end
      check(cfg_equals(ref_cfg), $sformatf("run %0d result differs from reference", run));
      check(ref_cfg != prev, "drawing left the configuration unchanged");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
