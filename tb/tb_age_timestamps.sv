// tb_age_timestamps: checks the victim choice of age_timestamps against a
// model kept in the testbench. Each entry's age is {reference bit, 2-bit
// timestamp}; a touch sets the reference bit (a fresh entry restarts at
// 3'b100), a tick shifts every age right, and the victim is the entry with
// the smallest {valid, age}, lowest index first. A directed opening walks
// through the cases by hand; random touches, ticks and valid patterns
// follow.
module tb_age_timestamps;
  import fvbus_pkg::*;

  localparam int E = 6;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [E-1:0] valid;
  logic         touch, fresh, tick;
  idx_t         touch_idx, victim_idx;

  age_timestamps #(.ENTRIES(E)) dut (.*);

  int checks = 0, failures = 0;
  logic [2:0] age_m [E];

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int model_victim();
    int best, v;
    best = 99;
    v    = 0;
    for (int e = 0; e < E; e++)
      if (int'({valid[e], age_m[e]}) < best) begin
        best = int'({valid[e], age_m[e]});
        v    = e;
      end
    return v;
  endfunction

  task automatic step(input logic t, input int idx, input logic f, input logic k);
    touch     = t;
    touch_idx = idx_t'(idx);
    fresh     = f;
    tick      = k;
    @(posedge clk);
    #1;
    for (int e = 0; e < E; e++) begin
      if (k) age_m[e] = age_m[e] >> 1;
      if (t && e == idx) age_m[e] = f ? 3'b100 : (age_m[e] | 3'b100);
    end
    touch = 1'b0;
    tick  = 1'b0;
    #1;
    check(int'(victim_idx) == model_victim(),
          $sformatf("victim %0d, expected %0d", victim_idx, model_victim()));
  endtask

  initial begin
    valid = '0;
    {touch, fresh, tick} = '0;
    touch_idx = '0;
    foreach (age_m[e]) age_m[e] = '0;
    #12 rst_n = 1'b1;
    #1;
    check(victim_idx == 0, "empty table: victim not 0");
    valid = 6'b000111;
    #1 check(victim_idx == 3, "first invalid entry not chosen");
    valid = '1;
    step(1, 0, 1, 0);                 // entry 0 fresh
    check(victim_idx == 1, "victim should be 1 after touching 0");
    step(1, 1, 1, 0);
    step(1, 2, 0, 0);
    step(1, 3, 0, 0);
    step(1, 4, 0, 0);
    step(1, 5, 0, 0);                 // all ages 100
    check(victim_idx == 0, "all equal: lowest index");
    step(0, 0, 0, 1);                 // all 010
    step(1, 2, 0, 0);                 // entry 2 110
    check(victim_idx == 0, "after tick and touch of 2: victim 0");
    step(1, 0, 0, 1);                 // tick then touch 0: 0 -> 101
    check(victim_idx == 1, "touch on tick cycle: victim 1");
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 19) == 0) valid = E'($urandom);
      if ($urandom_range(0, 3) == 0) valid = '1;
      step(1'($urandom), $urandom_range(0, E - 1), 1'($urandom), ($urandom_range(0, 7) == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
