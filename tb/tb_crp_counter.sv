// tb_crp_counter: feeds CRP events at random cycles into a counter with
// THETA = 7 and one with the full THETA = 358,350, and checks `reached`
// against an independent count: it must pulse exactly on every THETA-th
// event and nowhere else, and `count` must follow the events.
module tb_crp_counter;
  localparam int unsigned T_SMALL = 7;
  localparam int unsigned T_FULL  = 358350;

  logic clk = 0, rst_n = 0, fire = 0;
  logic hit_s, hit_f;
  logic [2:0]  cnt_s;
  logic [18:0] cnt_f;
  int checks = 0, failures = 0, cycles = 0;
  int unsigned events = 0, pulses_s = 0, pulses_f = 0;

  crp_counter #(.THETA(T_SMALL)) u_s (.clk, .rst_n, .crp_fire(fire), .reached(hit_s), .count(cnt_s));
  crp_counter #(.THETA(T_FULL))  u_f (.clk, .rst_n, .crp_fire(fire), .reached(hit_f), .count(cnt_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (events < 2 * T_FULL + 100) begin
      fire <= ($urandom_range(3, 0) != 0);
      @(negedge clk);
      checks++;
      if (hit_s !== (fire && ((events + 1) % T_SMALL == 0))) begin
        failures++;
        if (failures < 10) $display("FAIL small: event %0d reached=%0d", events + 1, hit_s);
      end
      checks++;
      if (hit_f !== (fire && ((events + 1) % T_FULL == 0))) begin
        failures++;
        if (failures < 10) $display("FAIL full: event %0d reached=%0d", events + 1, hit_f);
      end
      checks++;
      if (cnt_s !== 3'(events % T_SMALL) || cnt_f !== 19'(events % T_FULL)) begin
        failures++;
        if (failures < 10) $display("FAIL count after %0d events: %0d %0d", events, cnt_s, cnt_f);
      end
      pulses_s += hit_s;
      pulses_f += hit_f;
      if (fire) events++;
      @(posedge clk);
    end
    checks++;
    if (pulses_f != 2 || pulses_s != events / T_SMALL) begin
      failures++;
      $display("FAIL pulse totals: small %0d full %0d after %0d events", pulses_s, pulses_f, events);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
