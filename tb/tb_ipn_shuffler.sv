// tb_ipn_shuffler: drives 64-bit and 8-bit shufflers with random permutations
// (drawn here with $urandom) and random data, and checks that input bit i
// arrives at output bit cfg[i]. The first test uses the reversing
// configuration cfg[i] = W-1-i.
module tb_ipn_shuffler;
  import ipn_ref_pkg::*;

  logic [63:0]        d64, o64;
  logic [63:0][5:0]   c64;
  logic [7:0]         d8, o8;
  logic [7:0][2:0]    c8;
  int checks = 0, failures = 0;

  ipn_shuffler #(.W(64)) u_64 (.data_i(d64), .cfg(c64), .data_o(o64));
  ipn_shuffler #(.W(8))  u_8  (.data_i(d8),  .cfg(c8),  .data_o(o8));

  function automatic perm_t random_perm(int unsigned n, bit reverse);
    perm_t p = new[n];
    foreach (p[i]) p[i] = reverse ? n - 1 - i : i;
    if (!reverse)
      for (int i = int'(n) - 1; i >= 1; i--) begin
        int unsigned j = $urandom_range(i, 0);
        int unsigned t = p[i]; p[i] = p[j]; p[j] = t;
      end
    return p;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      automatic perm_t p64 = random_perm(64, t == 0);
      automatic perm_t p8  = random_perm(8,  t == 0);
      foreach (p64[i]) c64[i] = 6'(p64[i]);
      foreach (p8[i])  c8[i]  = 3'(p8[i]);
      d64 = {$urandom, $urandom};
      d8  = 8'($urandom);
      #1;
      checks++;
      if (o64 !== shuffle_ref(p64, d64)) begin
        failures++;
        if (failures < 10) $display("FAIL W=64 in=%h got=%h exp=%h", d64, o64, shuffle_ref(p64, d64));
      end
      checks++;
      if (o8 !== 8'(shuffle_ref(p8, 64'(d8)))) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 in=%h got=%h", d8, o8);
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
