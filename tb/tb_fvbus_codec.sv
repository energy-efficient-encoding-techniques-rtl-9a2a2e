// tb_fvbus_codec: self-checking test of fvbus_codec in the FV-MSB-LSB
// configuration (32-bit bus, 20-bit MSB and 12-bit LSB portions). Two codecs
// are joined back to back: codec A sends, codec B receives.
//
// Part 1 replays a directed sequence that walks through every selection
// rule: a miss, a whole-value hit, a hit of both portions, an MSB hit with a
// zero low portion (must go unencoded), MSB-only and LSB-only hits, an LSB
// hit whose high portion is one-hot (must go unencoded). For each word the
// expected code is worked out by hand from the table contents (entries are
// filled from index 0 upward after reset) and compared with the XOR of two
// successive bus words, along with the encode line.
// Part 2 sends a long stream with value locality and checks that every
// word arrives intact exactly two cycles after it was accepted, and that
// the bus toggles fewer lines than the raw data would.
module tb_fvbus_codec;
  import fvbus_pkg::*;

  localparam int W = 32;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         a_tx_valid, a_tx_ready, b_rx_valid;
  logic [W-1:0] a_tx_data, a_bus, b_bus, b_rx_data;
  logic         a_enc, b_enc, a_bv, b_bv;
  code_kind_e   a_kind, b_kind, a_rk, b_rk;
  logic         a_sup, b_sup, a_tick, b_tick;
  logic         b_tx_ready, a_rx_valid;
  logic [W-1:0] a_rx_data;

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  fvbus_codec u_a (
    .clk, .rst_n, .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_data(a_tx_data),
    .bus_out(a_bus), .enc_out(a_enc), .bus_valid_out(a_bv),
    .bus_in(b_bus), .enc_in(b_enc), .bus_valid_in(b_bv),
    .rx_valid(a_rx_valid), .rx_data(a_rx_data),
    .tx_kind(a_kind), .tx_suppressed(a_sup), .rx_kind(a_rk), .age_tick(a_tick)
  );

  fvbus_codec u_b (
    .clk, .rst_n, .tx_valid(1'b0), .tx_ready(b_tx_ready), .tx_data('0),
    .bus_out(b_bus), .enc_out(b_enc), .bus_valid_out(b_bv),
    .bus_in(a_bus), .enc_in(a_enc), .bus_valid_in(a_bv),
    .rx_valid(b_rx_valid), .rx_data(b_rx_data),
    .tx_kind(b_kind), .tx_suppressed(b_sup), .rx_kind(b_rk), .age_tick(b_tick)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Receiver scoreboard: expected word and the cycle it was offered in,
  // checked at the falling edge when all registers are settled.
  logic [W-1:0] exp_q[$];
  int           sent_q[$];
  int           received = 0;

  always @(negedge clk) if (rst_n && b_rx_valid) begin
    logic [W-1:0] e;
    int           t;
    if (exp_q.size() == 0) check(1'b0, "word received that was never sent");
    else begin
      e = exp_q.pop_front();
      t = sent_q.pop_front();
      check(b_rx_data == e, $sformatf("received %h, expected %h", b_rx_data, e));
      check(cycle - t == 2, $sformatf("latency %0d cycles, expected 2", cycle - t));
      received++;
    end
  end

  // Send one word; returns the code (bus XOR previous bus) and encode bit.
  task automatic send(input logic [W-1:0] d, output logic [W-1:0] code, output logic enc);
    logic [W-1:0] prev_word;
    prev_word     = a_bus;
    a_tx_data  = d;
    a_tx_valid = 1'b1;
    exp_q.push_back(d);
    sent_q.push_back(cycle);
    @(posedge clk);
    #1;
    a_tx_valid = 1'b0;
    code = a_bus ^ prev_word;
    enc  = a_enc;
  endtask

  task automatic directed(input logic [W-1:0] d, input logic exp_enc,
                          input logic [W-1:0] exp_code, input code_kind_e exp_kind);
    logic [W-1:0] c;
    logic         e;
    send(d, c, e);
    check(e == exp_enc, $sformatf("data %h: encode=%0b, expected %0b", d, e, exp_enc));
    if (exp_enc) check(c == exp_code, $sformatf("data %h: code %h, expected %h", d, c, exp_code));
    else         check(c == d, $sformatf("data %h: raw code %h", d, c));
    check(a_kind == exp_kind, $sformatf("data %h: kind %s, expected %s", d, a_kind.name(), exp_kind.name()));
  endtask

  int unsigned seed_vals[40];
  int unsigned hi_vals[24];
  int          kinds[6];
  longint      bus_toggles = 0, raw_toggles = 0;
  logic [W-1:0] prev_raw = '0;
  logic [W-1:0] prev_bus = '0;

  initial begin
    a_tx_valid = 1'b0;
    a_tx_data  = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // ---------------------------------------------------------- part 1
    directed(32'hF048EFFF, 1'b0, '0,            CODE_RAW);      // FV0 MSB0 LSB0
    directed(32'hF048EFFF, 1'b1, 32'h0000_0001, CODE_FV);       // FV entry 0
    directed(32'h000004CE, 1'b0, '0,            CODE_RAW);      // FV1 MSB1 LSB1
    directed(32'hF048E4CE, 1'b1, 32'h0000_1002, CODE_MSB_LSB);  // MSB0, LSB1
    directed(32'hF048E000, 1'b0, '0,            CODE_RAW);      // low part zero; LSB2
    check(a_sup == 1'b1, "MSB hit with zero low portion not flagged as suppressed");
    directed(32'hF048E777, 1'b1, 32'h0000_1777, CODE_MSB);      // MSB0; LSB3
    directed(32'h0000071F, 1'b1, 32'h0000_271F, CODE_MSB);      // MSB1; LSB4
    directed(32'h8542E71F, 1'b1, 32'h8542_E010, CODE_LSB);      // LSB4; MSB2
    directed(32'h100004CE, 1'b0, '0,            CODE_RAW);      // high part one-hot
    check(a_sup == 1'b1, "LSB hit with one-hot high portion not flagged as suppressed");
    directed(32'h00000000, 1'b1, 32'h0000_2004, CODE_MSB_LSB);  // MSB1, LSB2
    directed(32'h000004CE, 1'b1, 32'h0000_0002, CODE_FV);       // FV entry 1
    repeat (3) @(posedge clk);
    #1;
    check(received == 11, $sformatf("part 1 received %0d words", received));

    // ---------------------------------------------------------- part 2
    foreach (seed_vals[i]) seed_vals[i] = $urandom;
    foreach (hi_vals[i])   hi_vals[i]   = $urandom;
    prev_bus = a_bus;
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] d, c;
      logic         e;
      int unsigned  r;
      r = $urandom_range(0, 99);
      if (r < 40)      d = seed_vals[$urandom_range(0, 39)];
      else if (r < 60) d = {hi_vals[$urandom_range(0, 23)][19:0], 12'($urandom)};
      else if (r < 75) d = {20'($urandom), seed_vals[$urandom_range(0, 9)][11:0]};
      else if (r < 90) d = {hi_vals[$urandom_range(0, 15)][19:0], seed_vals[$urandom_range(0, 9)][11:0]};
      else             d = $urandom;
      raw_toggles += $countones(d ^ prev_raw);
      prev_raw = d;
      send(d, c, e);
      bus_toggles += $countones(a_bus ^ prev_bus);
      prev_bus = a_bus;
      kinds[a_kind]++;
      if ($urandom_range(0, 9) == 0) begin  // idle gap
        @(posedge clk);
        #1;
      end
    end
    repeat (4) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "words lost in part 2");
    check(kinds[CODE_FV] > 0 && kinds[CODE_MSB] > 0 && kinds[CODE_LSB] > 0 &&
          kinds[CODE_MSB_LSB] > 0 && kinds[CODE_RAW] > 0, "some code kind never used");
    check(bus_toggles < raw_toggles,
          $sformatf("bus toggles %0d not below raw %0d", bus_toggles, raw_toggles));
    $display("kinds: raw=%0d fv=%0d msb=%0d lsb=%0d both=%0d; toggles bus=%0d raw=%0d",
             kinds[CODE_RAW], kinds[CODE_FV], kinds[CODE_MSB], kinds[CODE_LSB],
             kinds[CODE_MSB_LSB], bus_toggles, raw_toggles);
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
