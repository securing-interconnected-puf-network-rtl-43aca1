// tb_apuf: checks the arbiter PUF model against the parity-feature form of the
// delay race for three instances (two of 64 stages, one of 16 stages) on
// random challenges, and checks that the responses are not stuck: each
// instance must answer both 0 and 1, and two 64-stage instances must disagree
// on some challenges.
module tb_apuf;
  import ipn_ref_pkg::*;

  localparam int unsigned SEED_A = 32'h0000_1234;
  localparam int unsigned SEED_B = 32'h0BAD_F00D;
  localparam int unsigned SEED_C = 32'h0000_0077;

  logic [63:0] chal;
  logic        ra, rb, rc;
  int          checks = 0, failures = 0;

  apuf #(.N(64), .SEED(SEED_A)) u_a (.challenge(chal),       .response(ra));
  apuf #(.N(64), .SEED(SEED_B)) u_b (.challenge(chal),       .response(rb));
  apuf #(.N(16), .SEED(SEED_C)) u_c (.challenge(chal[15:0]), .response(rc));

  task automatic check(string what, bit got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s chal=%h got=%0d exp=%0d", what, chal, got, exp);
    end
  endtask

  initial begin
    int ones_a = 0, ones_c = 0, differ = 0;
    localparam int TRIALS = 3000;
    for (int t = 0; t < TRIALS; t++) begin
      chal = {$urandom, $urandom};
      if (t == 0) chal = '0;
      if (t == 1) chal = '1;
      #1;
      check("A", ra, apuf_ref(SEED_A, 64, chal));
      check("B", rb, apuf_ref(SEED_B, 64, chal));
      check("C", rc, apuf_ref(SEED_C, 16, chal));
      ones_a += ra;
      ones_c += rc;
      differ += (ra != rb);
    end
    checks++; if (ones_a == 0 || ones_a == TRIALS) begin failures++; $display("FAIL A stuck"); end
    checks++; if (ones_c == 0 || ones_c == TRIALS) begin failures++; $display("FAIL C stuck"); end
    checks++; if (differ == 0) begin failures++; $display("FAIL A and B identical"); end
    $display("ones A=%0d C=%0d of %0d, A!=B on %0d", ones_a, ones_c, TRIALS, differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
