// tb_value_table: checks value_table (8-bit entries, 5 entries) against a
// model kept in the testbench: associative search over valid entries, read
// by index, insert over the least recently used entry on a miss, touch on a
// hit, ageing on tick. Keys come from a small set so that hits, misses and
// evictions are all frequent. A directed opening fills the table and
// checks that the sixth distinct value replaces the entry that was used
// least recently.
module tb_value_table;
  import fvbus_pkg::*;

  localparam int WD = 8;
  localparam int E  = 5;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [WD-1:0] key, rd_data;
  logic          hit, upd, tick;
  idx_t          hit_idx, rd_idx;

  value_table #(.WIDTH(WD), .ENTRIES(E)) dut (.*);

  int checks = 0, failures = 0;
  logic [WD-1:0] val_m [E];
  logic          vld_m [E];
  logic [2:0]    age_m [E];
  int            n_hit = 0, n_evict = 0;

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int m_find(logic [WD-1:0] k);
    for (int e = 0; e < E; e++) if (vld_m[e] && val_m[e] == k) return e;
    return -1;
  endfunction

  function automatic int m_victim();
    int best, v;
    best = 99;
    v    = 0;
    for (int e = 0; e < E; e++)
      if (int'({vld_m[e], age_m[e]}) < best) begin
        best = int'({vld_m[e], age_m[e]});
        v    = e;
      end
    return v;
  endfunction

  // Present a key; check the search and a random read; optionally update.
  task automatic op(input logic [WD-1:0] k, input logic u, input logic t);
    int f, r, v;
    key    = k;
    upd    = u;
    tick   = t;
    r      = $urandom_range(0, E - 1);
    rd_idx = idx_t'(r);
    #1;
    f = m_find(k);
    v = m_victim();  // chosen from the ages before this edge
    check(hit == (f >= 0), $sformatf("key %h: hit %0b", k, hit));
    if (f >= 0) check(int'(hit_idx) == f, $sformatf("key %h: index %0d, expected %0d", k, hit_idx, f));
    if (vld_m[r]) check(rd_data == val_m[r], $sformatf("read %0d: %h, expected %h", r, rd_data, val_m[r]));
    @(posedge clk);
    #1;
    if (t) for (int e = 0; e < E; e++) age_m[e] = age_m[e] >> 1;
    if (u) begin
      if (f >= 0) begin
        age_m[f] = age_m[f] | 3'b100;
        n_hit++;
      end else begin
        if (vld_m[v]) n_evict++;
        val_m[v] = k;
        vld_m[v] = 1'b1;
        age_m[v] = 3'b100;
      end
    end
    upd  = 1'b0;
    tick = 1'b0;
  endtask

  initial begin
    key = '0; upd = 0; tick = 0; rd_idx = '0;
    foreach (vld_m[e]) begin vld_m[e] = 0; val_m[e] = '0; age_m[e] = '0; end
    #12 rst_n = 1'b1;
    // directed: fill with 10..14, age, reuse all but 12, then insert 99
    for (int i = 0; i < E; i++) op(WD'(8'h10 + i), 1, 0);
    op(8'h00, 0, 1);
    for (int i = 0; i < E; i++) if (i != 2) op(WD'(8'h10 + i), 1, 0);
    op(8'h99, 1, 0);
    #1;
    key = 8'h12;
    #1 check(!hit, "least recently used value 12 was not the one evicted");
    key = 8'h99;
    #1 check(hit && hit_idx == 2, "new value 99 not in entry 2");
    for (int n = 0; n < 4000; n++)
      op(WD'($urandom_range(0, 8)), ($urandom_range(0, 3) != 0), ($urandom_range(0, 9) == 0));
    check(n_hit > 100 && n_evict > 100, $sformatf("hits %0d, evictions %0d", n_hit, n_evict));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
