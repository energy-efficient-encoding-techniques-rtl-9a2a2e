// codec_pair_stream: testbench helper. Joins two fvbus_codec instances of
// one configuration back to back, sends LEN words with value locality from
// the first to the second, and checks that every word arrives unchanged two
// cycles after it was offered. It reports its counts through ports so that
// one testbench can run several scheme configurations side by side; `coded`
// counts the words sent with the encode line high and `saved` is high when
// the bus toggled fewer lines than the raw data would have.
module codec_pair_stream #(
  parameter int W      = 32,
  parameter int FV_M   = 0,
  parameter bit MSB_EN = 1,
  parameter int MSB_W  = 20,
  parameter int MSB_M  = 0,
  parameter bit LSB_EN = 1,
  parameter int LSB_M  = 0,
  parameter int LEN    = 2000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   coded,
  output logic saved,
  output logic done
);
  import fvbus_pkg::*;

  logic         rst_n = 1'b0;
  logic         tx_valid = 1'b0;
  logic [W-1:0] tx_data = '0;
  logic         a_rdy, b_rdy, a_enc, b_enc, a_bv, b_bv, a_rv, b_rv, a_sup, b_sup, a_tk, b_tk;
  logic [W-1:0] a_bus, b_bus, a_rx, b_rx;
  code_kind_e   a_kind, b_kind, a_rk, b_rk;
  int           cycle = 0;
  logic [W-1:0] exp_q[$];
  int           t_q[$];
  longint       bus_t = 0, raw_t = 0;

  fvbus_codec #(.W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
                .LSB_EN(LSB_EN), .LSB_M(LSB_M)) u_a (
    .clk, .rst_n, .tx_valid, .tx_ready(a_rdy), .tx_data,
    .bus_out(a_bus), .enc_out(a_enc), .bus_valid_out(a_bv),
    .bus_in(b_bus), .enc_in(b_enc), .bus_valid_in(b_bv),
    .rx_valid(a_rv), .rx_data(a_rx), .tx_kind(a_kind), .tx_suppressed(a_sup),
    .rx_kind(a_rk), .age_tick(a_tk)
  );

  fvbus_codec #(.W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
                .LSB_EN(LSB_EN), .LSB_M(LSB_M)) u_b (
    .clk, .rst_n, .tx_valid(1'b0), .tx_ready(b_rdy), .tx_data('0),
    .bus_out(b_bus), .enc_out(b_enc), .bus_valid_out(b_bv),
    .bus_in(a_bus), .enc_in(a_enc), .bus_valid_in(a_bv),
    .rx_valid(b_rv), .rx_data(b_rx), .tx_kind(b_kind), .tx_suppressed(b_sup),
    .rx_kind(b_rk), .age_tick(b_tk)
  );

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && b_rv) begin
    checks++;
    if (exp_q.size() == 0 || b_rx != exp_q[0] || cycle - t_q[0] != 2) begin
      failures++;
      if (failures < 10) $display("FAIL (FV_M=%0d MSB_EN=%0b LSB_EN=%0b): got %h", FV_M, MSB_EN, LSB_EN, b_rx);
    end
    if (exp_q.size() > 0) begin
      void'(exp_q.pop_front());
      void'(t_q.pop_front());
    end
  end

  initial begin
    int unsigned pool[48], hi[24], lo[12];
    logic [W-1:0] prev_raw, prev_bus, d;
    checks = 0; failures = 0; coded = 0; saved = 0; done = 0;
    foreach (pool[i]) pool[i] = $urandom;
    foreach (hi[i])   hi[i]   = $urandom;
    foreach (lo[i])   lo[i]   = $urandom;
    prev_raw = '0;
    prev_bus = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < LEN; n++) begin
      int unsigned r;
      r = $urandom_range(0, 99);
      if (r < 45)      d = W'(pool[$urandom_range(0, 47)]);
      else if (r < 85) d = W'({hi[$urandom_range(0, 23)][19:0], 12'($urandom)});
      else             d = W'($urandom);
      tx_valid = 1'b1;
      tx_data  = d;
      exp_q.push_back(d);
      t_q.push_back(cycle);
      @(posedge clk);
      #1;
      tx_valid = 1'b0;
      if (a_enc) coded++;
      raw_t += $countones(d ^ prev_raw);
      bus_t += $countones(a_bus ^ prev_bus);
      prev_raw = d;
      prev_bus = a_bus;
    end
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0) failures++;
    saved = (bus_t < raw_t);
    done  = 1'b1;
  end

endmodule
