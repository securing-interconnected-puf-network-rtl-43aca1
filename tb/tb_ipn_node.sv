// tb_ipn_node: checks a homogeneous 64x64 node and a heterogeneous node
// (8 PUFs of 16 stages) against the reference arbiter PUF model, PUF by PUF,
// on random challenges; also requires that the PUFs of a node do not all
// answer alike.
module tb_ipn_node;
  import ipn_ref_pkg::*;

  localparam int unsigned CS = 32'h5EED_0001;

  logic [63:0] chal;
  logic [63:0] r64;
  logic [7:0]  r8;
  int checks = 0, failures = 0;

  ipn_node #(.N(64), .M(64), .CHIP_SEED(CS), .PATH(1), .LEVEL(2)) u_hom (.challenge(chal),       .response(r64));
  ipn_node #(.N(16), .M(8),  .CHIP_SEED(CS), .PATH(0), .LEVEL(0)) u_het (.challenge(chal[15:0]), .response(r8));

  initial begin
    int mixed = 0;
    for (int t = 0; t < 200; t++) begin
      logic [63:0] e64, e8;
      chal = {$urandom, $urandom};
      #1;
      e64 = node_ref(CS, 1, 2, 64, 64, chal);
      e8  = node_ref(CS, 0, 0, 16, 8, chal);
      checks++;
      if (r64 !== e64) begin
        failures++;
        if (failures < 10) $display("FAIL 64x64 chal=%h got=%h exp=%h", chal, r64, e64);
      end
      checks++;
      if (r8 !== e8[7:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 16x8 chal=%h got=%h exp=%h", chal, r8, e8[7:0]);
      end
      if (r64 != '0 && r64 != '1) mixed++;
    end
    checks++;
    if (mixed < 100) begin failures++; $display("FAIL node PUFs answer alike"); end
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
