// bus_correlator: correlator and decorrelator of one codec end. It keeps
// the last word seen on the data bus, in either direction, in `prev_q`.
//
// Transmit: the selection logic's output C is XORed with the previous bus
// word P and the result B = C ^ P becomes the new bus word, registered at
// the clock edge and driven on `bus_out` from the next cycle on. A bus line
// therefore toggles only where C holds a 1, so a one-hot code costs a
// single transition. Receive: with `rx_valid` high the word on `bus_in` is
// XORed with P to give back C on `rx_code` (combinational), and it becomes
// the new P at the clock edge. This is the XOR scheme of the paper;
// holding the last word in the driver register (no transitions while the
// bus is idle) and clearing it at reset are this design's choices.
module bus_correlator #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_fire,   // send tx_code this cycle
  input  logic [W-1:0] tx_code,
  output logic [W-1:0] bus_out,   // registered bus word of the last transfer
  input  logic         rx_valid,  // bus_in carries a new word this cycle
  input  logic [W-1:0] bus_in,
  output logic [W-1:0] rx_code
);
  logic [W-1:0] prev_q;

  assign bus_out = prev_q;
  assign rx_code = bus_in ^ prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        prev_q <= '0;
    else if (tx_fire)  prev_q <= tx_code ^ prev_q;
    else if (rx_valid) prev_q <= bus_in;
  end

  no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(tx_fire && rx_valid))
    else $error("bus_correlator: transmit and receive in one cycle");

endmodule
