// tb_config_rng: steps the LFSR at random cycles and compares every state with
// a bitwise model of x^32 + x^22 + x^2 + x + 1; also checks the reset value,
// that the state holds while step is low, and that a zero seed is replaced.
module tb_config_rng;
  import ipn_ref_pkg::*;

  localparam logic [31:0] SEED = 32'hACE1_2468;

  logic clk = 0, rst_n = 0, step = 0;
  logic [31:0] rnd, rnd0;
  int checks = 0, failures = 0;

  config_rng #(.SEED(SEED))  dut   (.clk, .rst_n, .step, .rnd(rnd));
  config_rng #(.SEED(32'd0)) dut_z (.clk, .rst_n, .step, .rnd(rnd0));

  always #5 clk = ~clk;

  initial begin
    logic [31:0] model = SEED, model0 = 32'd1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (rnd !== SEED || rnd0 !== 32'd1) begin failures++; $display("FAIL reset value %h %h", rnd, rnd0); end
    for (int t = 0; t < 5000; t++) begin
      step = $urandom_range(1, 0);
      @(posedge clk);
      if (step) begin
        model  = lfsr_next(model);
        model0 = lfsr_next(model0);
      end
      @(negedge clk);
      checks++;
      if (rnd !== model || rnd0 !== model0) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d got %h exp %h", t, rnd, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
