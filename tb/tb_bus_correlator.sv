// tb_bus_correlator: checks the XOR correlator. On transmit the new bus
// word must equal the code XOR the previous bus word, so the number of
// toggling lines equals the number of ones in the code; on receive the
// recovered code must equal the bus word XOR the previous one, and the
// received word becomes the new reference. Random transmit and receive
// cycles are mixed.
module tb_bus_correlator;
  localparam int W = 32;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         tx_fire, rx_valid;
  logic [W-1:0] tx_code, bus_out, bus_in, rx_code;

  bus_correlator #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] prev_m;

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    tx_fire = 0; rx_valid = 0; tx_code = '0; bus_in = '0;
    prev_m = '0;
    #12 rst_n = 1'b1;
    #1 check(bus_out == '0, "bus not cleared by reset");
    for (int n = 0; n < 3000; n++) begin
      int unsigned r;
      r = $urandom_range(0, 2);
      tx_fire  = (r == 0);
      rx_valid = (r == 1);
      tx_code  = (n % 3 == 0) ? (W'(1) << $urandom_range(0, W - 1)) : W'($urandom);
      bus_in   = $urandom;
      #1;
      if (rx_valid) check(rx_code == (bus_in ^ prev_m), "decorrelated code wrong");
      @(posedge clk);
      #1;
      if (tx_fire) begin
        check(bus_out == (tx_code ^ prev_m), "correlated word wrong");
        check($countones(bus_out ^ prev_m) == $countones(tx_code), "toggles differ from ones in code");
        prev_m = tx_code ^ prev_m;
      end else if (rx_valid) begin
        prev_m = bus_in;
      end
      check(bus_out == prev_m, "reference word wrong");
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
