// tb_fvbus_link_top: end-to-end test of the processor/memory bus with a
// codec at each end, at the default (FV-MSB-LSB, 32-bit) parameters.
//
// A stream of writes (processor to memory) and reads (memory to processor)
// with value locality is offered at random, often from both sides at once.
// Every word must arrive unchanged, in order, two cycles after the cycle in
// which it was accepted. The test counts how often each mechanism of the
// design happened and fails if one never did: each code kind (whole value,
// MSB, LSB, both portions), a table hit sent unencoded, a full FV table
// evicting an entry, the periodic timestamp shift, arbitration between
// both ends, and a turnaround stall. It also checks that the encoded bus
// toggles fewer lines (data lines plus the encode line) than the raw data,
// and that a whole-value code toggles exactly one data line and a code of
// both portions exactly two.
module tb_fvbus_link_top;
  import fvbus_pkg::*;

  localparam int W = 32;
  localparam int N = 4000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         cpu_wr_valid, cpu_wr_ready, cpu_rd_valid;
  logic [W-1:0] cpu_wr_data, cpu_rd_data;
  logic         mem_wr_valid, mem_rd_valid, mem_rd_ready;
  logic [W-1:0] mem_wr_data, mem_rd_data;
  logic [W-1:0] bus_data;
  logic         bus_enc, bus_valid, bus_dir, bus_suppressed, age_tick;
  code_kind_e   bus_kind;

  fvbus_link_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // -------------------------------------------------------- data source
  int unsigned pool[48];
  int unsigned hi_pool[24];
  int unsigned lo_pool[12];

  function automatic logic [W-1:0] next_value();
    int unsigned r;
    r = $urandom_range(0, 99);
    if (r < 40)      return pool[$urandom_range(0, 47)];
    else if (r < 60) return {hi_pool[$urandom_range(0, 23)][19:0], 12'($urandom)};
    else if (r < 75) return {20'($urandom), lo_pool[$urandom_range(0, 11)][11:0]};
    else if (r < 88) return {hi_pool[$urandom_range(0, 15)][19:0], lo_pool[$urandom_range(0, 11)][11:0]};
    else if (r < 92) return {hi_pool[$urandom_range(0, 15)][19:0], 12'(r[0] ? 0 : (1 << $urandom_range(0, 11)))};
    else             return $urandom;
  endfunction

  // ---------------------------------------------------------- scoreboard
  logic [W-1:0] wr_q[$], rd_q[$];
  int           wr_t[$], rd_t[$];
  int           n_wr = 0, n_rd = 0, got_wr = 0, got_rd = 0;
  int           kinds[6];
  int           n_sup = 0, n_evict = 0, n_tick = 0, n_arb = 0, n_turn = 0;
  longint       bus_toggles = 0, raw_toggles = 0;
  logic [W-1:0] last_bus = '0, last_raw = '0;
  logic         last_enc = 1'b0;

  always @(negedge clk) if (rst_n) begin
    if (mem_wr_valid) begin
      check(wr_q.size() > 0, "write arrived that was never sent");
      if (wr_q.size() > 0) begin
        check(mem_wr_data == wr_q[0], $sformatf("write %h, expected %h", mem_wr_data, wr_q[0]));
        check(cycle - wr_t[0] == 2, $sformatf("write latency %0d", cycle - wr_t[0]));
        void'(wr_q.pop_front());
        void'(wr_t.pop_front());
        got_wr++;
      end
    end
    if (cpu_rd_valid) begin
      check(rd_q.size() > 0, "read arrived that was never sent");
      if (rd_q.size() > 0) begin
        check(cpu_rd_data == rd_q[0], $sformatf("read %h, expected %h", cpu_rd_data, rd_q[0]));
        check(cycle - rd_t[0] == 2, $sformatf("read latency %0d", cycle - rd_t[0]));
        void'(rd_q.pop_front());
        void'(rd_t.pop_front());
        got_rd++;
      end
    end
    if (bus_valid) begin
      kinds[bus_kind]++;
      if (bus_suppressed) n_sup++;
      // with no control lines a whole-value code toggles one line and a
      // code of both portions two
      if (bus_kind == CODE_FV)
        check($countones(bus_data ^ last_bus) == 1, "whole-value code toggled more than one line");
      if (bus_kind == CODE_MSB_LSB)
        check($countones(bus_data ^ last_bus) == 2, "two-portion code did not toggle two lines");
      bus_toggles += $countones(bus_data ^ last_bus);
      if (bus_enc != last_enc) bus_toggles++;
      last_bus = bus_data;
      last_enc = bus_enc;
    end
  end

  // Mechanisms seen inside the design, sampled before each clock edge.
  always @(negedge clk) if (rst_n) begin
    if (age_tick) n_tick++;
    if (dut.u_cpu_codec.upd && !dut.u_cpu_codec.fv_hit && (&dut.u_cpu_codec.u_fv.valid_q))
      n_evict++;
  end

  // ------------------------------------------------------------- drivers
  initial begin
    bit cpu_acc, mem_acc;
    foreach (pool[i])    pool[i]    = $urandom;
    foreach (hi_pool[i]) hi_pool[i] = $urandom;
    foreach (lo_pool[i]) lo_pool[i] = $urandom;
    cpu_wr_valid = 1'b0;
    mem_rd_valid = 1'b0;
    cpu_wr_data  = '0;
    mem_rd_data  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_wr < N || n_rd < N) begin
      @(negedge clk);
      if (!cpu_wr_valid && n_wr < N && $urandom_range(0, 99) < 55) begin
        cpu_wr_valid = 1'b1;
        cpu_wr_data  = next_value();
      end
      if (!mem_rd_valid && n_rd < N && $urandom_range(0, 99) < 55) begin
        mem_rd_valid = 1'b1;
        mem_rd_data  = next_value();
      end
      #1;
      cpu_acc = cpu_wr_valid && cpu_wr_ready;
      mem_acc = mem_rd_valid && mem_rd_ready;
      check(!(cpu_acc && mem_acc), "both ends granted the bus");
      if (cpu_wr_valid && mem_rd_valid && dut.both_want) n_arb++;
      if ((cpu_wr_valid && !cpu_wr_ready && mem_rd_valid && !mem_rd_ready) ||
          (cpu_wr_valid && !dut.cpu_tx_ready) || (mem_rd_valid && !dut.mem_tx_ready))
        n_turn++;
      if (cpu_acc) begin
        wr_q.push_back(cpu_wr_data);
        wr_t.push_back(cycle);
        raw_toggles += $countones(cpu_wr_data ^ last_raw);
        last_raw = cpu_wr_data;
        n_wr++;
      end
      if (mem_acc) begin
        rd_q.push_back(mem_rd_data);
        rd_t.push_back(cycle);
        raw_toggles += $countones(mem_rd_data ^ last_raw);
        last_raw = mem_rd_data;
        n_rd++;
      end
      @(posedge clk);
      #1;
      if (cpu_acc) cpu_wr_valid = 1'b0;
      if (mem_acc) mem_rd_valid = 1'b0;
    end
    repeat (4) @(negedge clk);
    check(got_wr == N && got_rd == N, $sformatf("delivered %0d writes, %0d reads", got_wr, got_rd));
    check(kinds[CODE_FV] > 0,      "no whole-value code");
    check(kinds[CODE_MSB] > 0,     "no MSB code");
    check(kinds[CODE_LSB] > 0,     "no LSB code");
    check(kinds[CODE_MSB_LSB] > 0, "no two-portion code");
    check(kinds[CODE_RAW] > 0,     "no unencoded word");
    check(n_sup > 0,   "no table hit sent unencoded");
    check(n_evict > 0, "no FV eviction");
    check(n_tick > 0,  "no timestamp shift");
    check(n_arb > 0,   "no arbitration between the ends");
    check(n_turn > 0,  "no turnaround stall");
    check(n_tick == (2 * N) / 16, $sformatf("%0d timestamp shifts for %0d transfers", n_tick, 2 * N));
    check(bus_toggles < raw_toggles,
          $sformatf("bus toggles %0d not below raw %0d", bus_toggles, raw_toggles));
    $display("kinds: raw=%0d fv=%0d msb=%0d lsb=%0d both=%0d", kinds[CODE_RAW], kinds[CODE_FV],
             kinds[CODE_MSB], kinds[CODE_LSB], kinds[CODE_MSB_LSB]);
    $display("suppressed=%0d evictions=%0d shifts=%0d arbitrations=%0d turnaround=%0d",
             n_sup, n_evict, n_tick, n_arb, n_turn);
    $display("bus toggles %0d, raw data toggles %0d (%0d%% saved)", bus_toggles, raw_toggles,
             100 - int'(100 * bus_toggles / raw_toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
